// ppr_peak_finder - marks the tick whose FIR energy is a local maximum.
//
// Compares each FIR result with its predecessor and successor. With
// `peak_cond` = 0 a peak needs e(n) > e(n-1) and e(n) >= e(n+1); with 1 it
// needs e(n) >= e(n-1) and e(n) > e(n+1). A zero energy is never a peak.
// Because a peak needs a larger neighbour on neither side, the slices before
// and after an identified slice stay empty. The energy and side information
// of sample n (`aux`) are passed on aligned with the peak flag.
// Timing: the flag for centre n is registered two cycles after e(n) arrives.
// Which comparison each value of `peak_cond` selects is this design's reading
// of "condition for backward/forward comparison in peak finder".
module ppr_peak_finder #(
  parameter int AUX_W = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [9:0]       e,
  input  logic [AUX_W-1:0] aux_in,
  input  logic             peak_cond,
  output logic             peak,
  output logic [9:0]       e_out,
  output logic [AUX_W-1:0] aux_out
);
  logic [9:0]       e1, e2;     // e1 = e(n), e2 = e(n-1) while e = e(n+1)
  logic [AUX_W-1:0] a1;
  logic             back, fwd;

  always_comb begin
    back = peak_cond ? (e1 >= e2) : (e1 > e2);
    fwd  = peak_cond ? (e1 > e)   : (e1 >= e);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1 <= '0; e2 <= '0; a1 <= '0;
      peak <= 1'b0; e_out <= '0; aux_out <= '0;
    end else begin
      e1 <= e; e2 <= e1; a1 <= aux_in;
      peak    <= back && fwd && (e1 != '0);
      e_out   <= e1;
      aux_out <= a1;
    end
  end
endmodule
