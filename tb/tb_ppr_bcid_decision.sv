// tb_ppr_bcid_decision - self-checking test of the BCID decision logic.
// Random energies, FADC values, BCID bits, tables, thresholds and override
// flags; after one tick the energy must pass only when the bit
// {peak, sat, ext} of the range's table is set (range from the selected
// source: high above e_high, middle above e_low, low otherwise), the
// saturation flag only with the range's override, and the BCID bits always.
module tb_ppr_bcid_decision;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int hits [3];
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] energy, fadc, e_low, e_high, e_out;
  logic saturated, peak, sat, ext, decision_src, force_sat;
  logic [2:0][7:0] dec_lut;
  logic [2:0] sat_override, bcid_bits;
  ppr_bcid_decision dut (.*);

  initial begin
    energy = '0; fadc = '0; e_low = 10'd511; e_high = 10'd895; saturated = 0;
    peak = 0; sat = 0; ext = 0; decision_src = 0;
    dec_lut = {8'hF0, 8'hFA, 8'hFE}; sat_override = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 6000; k++) begin
      int v, r, idx;
      bit hit;
      if (k % 1000 == 999) begin
        dec_lut = {8'($urandom), 8'($urandom), 8'($urandom)};
        sat_override = 3'($urandom);
        e_low = 10'($urandom_range(100, 500));
        e_high = 10'($urandom_range(501, 1000));
      end
      energy = 10'($urandom); fadc = 10'($urandom);
      {peak, sat, ext, saturated, decision_src} = 5'($urandom);
      v = decision_src ? int'(energy) : int'(fadc);
      r = (v > int'(e_high)) ? 0 : (v > int'(e_low)) ? 1 : 2;
      idx = {peak, sat, ext};
      hit = dec_lut[r][idx];
      if (hit) hits[r]++;
      @(posedge clk); #1;
      checks += 3;
      if (e_out != (hit ? energy : 10'd0)) begin
        failures++;
        if (failures < 10) $display("k %0d r %0d idx %0d e_out %0d", k, r, idx, e_out);
      end
      if (force_sat != (hit && sat_override[r] && saturated)) failures++;
      if (bcid_bits != 3'(idx)) failures++;
    end
    for (int r = 0; r < 3; r++) begin checks++; if (hits[r] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
