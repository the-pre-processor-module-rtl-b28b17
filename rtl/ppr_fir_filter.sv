// ppr_fir_filter - five-tap FIR filter of the bunch-crossing identification.
//
// Holds the five most recent samples, multiplies them with the 4-bit
// coefficients and sums the products (17 bits). The 10-bit energy handed on
// is the sum shifted right by `start_bit` and clipped at 1023 (the "start
// bit, from where the FIR result is clipped"). Coefficient #1 weights the
// oldest sample. Besides the energy it hands on, aligned with it, the raw
// sample at the centre of the window and a flag telling whether any sample
// of the window reached `sat_level`.
// Timing: if s(n) is sampled at clock edge t, the window holds s(n-2)..s(n+2)
// after edge t+2 and the outputs for centre n are registered at edge t+3.
// The tap count and coefficient width follow the document; the shift-and-clip
// rule and the output alignment are this design's choices.
module ppr_fir_filter (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [9:0]     s,            // sample stream, one per tick
  input  logic [4:0][3:0] coeff,       // [0] = coefficient #1
  input  logic [2:0]     start_bit,
  input  logic [9:0]     sat_level,
  output logic [9:0]     energy,       // clipped FIR result for the centre sample
  output logic [9:0]     centre,       // raw centre sample
  output logic           saturated     // a sample in the window >= sat_level
);
  logic [9:0]  w [5];     // w[0] newest, w[4] oldest
  logic [16:0] sum;
  logic [16:0] shifted;
  logic        sat_any;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) w[i] <= '0;
    end else begin
      w[0] <= s;
      for (int i = 1; i < 5; i++) w[i] <= w[i-1];
    end
  end

  always_comb begin
    sum = '0;
    sat_any = 1'b0;
    for (int i = 0; i < 5; i++) begin
      sum += 17'(w[4-i]) * 17'(coeff[i]);
      sat_any |= (w[i] >= sat_level);
    end
    shifted = sum >> start_bit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      energy <= '0; centre <= '0; saturated <= 1'b0;
    end else begin
      energy    <= (shifted > 17'd1023) ? 10'd1023 : shifted[9:0];
      centre    <= w[2];
      saturated <= sat_any;
    end
  end
endmodule
