// ppr_delay_line - programmable delay of a W-bit signal by 0..MAX_DELAY ticks.
//
// A shift register of MAX_DELAY stages; the output is taken from the stage
// selected by `delay` (0 passes the input straight through, combinationally).
// Used for the input synchronisation FIFOs ("#BC delay") and for aligning the
// external and saturated BCID bits with the FIR peak finder. Reset clears the
// stages. Delays above MAX_DELAY are clamped.
module ppr_delay_line #(
  parameter int W         = 1,
  parameter int MAX_DELAY = 15,
  parameter int DW        = $clog2(MAX_DELAY + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] delay,
  input  logic [W-1:0]  d,
  output logic [W-1:0]  q
);
  logic [W-1:0] stage [MAX_DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_DELAY; i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < MAX_DELAY; i++) stage[i] <= stage[i-1];
    end
  end

  always_comb begin
    if (delay == '0) q = d;
    else if (int'(delay) > MAX_DELAY) q = stage[MAX_DELAY-1];
    else q = stage[int'(delay) - 1];
  end
endmodule
