// ppr_jet_sum - 4-cell adder forming one 0.2 x 0.2 jet element.
//
// Adds the four BCID-ed 8-bit energies of an MCM into a 10-bit value for the
// jet/energy-sum processor (four times 255 fits 10 bits, so no clipping).
// As on the MCM the adder is split into two pair sums followed by the four-
// cell sum, so the jet data leave one tick after the cluster-processor data
// (whose BC-mux has one register stage), as measured on the module.
// Timing: two register stages.
module ppr_jet_sum (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] et [4],
  output logic [9:0] jet
);
  logic [8:0] s01, s23;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s01 <= '0; s23 <= '0; jet <= '0;
    end else begin
      s01 <= 9'(et[0]) + 9'(et[1]);
      s23 <= 9'(et[2]) + 9'(et[3]);
      jet <= 10'(s01) + 10'(s23);
    end
  end
endmodule
