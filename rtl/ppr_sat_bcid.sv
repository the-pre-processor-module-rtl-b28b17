// ppr_sat_bcid - bunch-crossing identification for saturated pulses.
//
// Watches two consecutive samples on the leading edge. When s(n) is the first
// sample above `sat_high` (s(n-1) <= sat_high), the pulse peak is placed on
// slice n+1 if s(n-1) was already above `sat_low` (the edge started earlier)
// and on slice n+2 otherwise. The marker for slice m is registered 3 edges after
// s(m) was sampled, the same alignment as the FIR filter's outputs; the
// channel then delays it by the programmable "DelaySatBcid".
// The two thresholds and their use on two consecutive samples follow the
// document; the exact placement rule (n+1 / n+2) is this design's choice.
module ppr_sat_bcid (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] s,
  input  logic [9:0] sat_high,
  input  logic [9:0] sat_low,
  output logic       mark
);
  logic [9:0] s0, s1;          // s0 = s(n), s1 = s(n-1), one cycle after s(n)
  logic       edge_det;
  logic [3:0] near_q;          // slice n+1 path
  logic [4:0] far_q;           // slice n+2 path

  assign edge_det = (s0 > sat_high) && (s1 <= sat_high);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0 <= '0; s1 <= '0; near_q <= '0; far_q <= '0;
    end else begin
      s0 <= s; s1 <= s0;
      near_q <= {near_q[2:0], edge_det && (s1 > sat_low)};
      far_q  <= {far_q[3:0],  edge_det && !(s1 > sat_low)};
    end
  end
  // edge at cycle t(n)+1; slice n+1 must appear at t(n)+5, slice n+2 at t(n)+6
  assign mark = near_q[3] | far_q[4];
endmodule
