// tb_ppr_lut - self-checking test of the look-up table.
// 1) Ramp pre-load with a pedestal and slope: every cell must hold
//    min(255, max(0, i - pedestal) * slope / 256), read through the
//    configuration port, and the fill must take 1024 ticks.
// 2) Single-cell writes, then the real-time path one tick after its input:
//    LUT value, zero energy gives zero, bypass gives min(energy, 255), the
//    saturation override gives the saturation value.
module tb_ppr_lut;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] energy, wr_addr, rd_addr, pedestal;
  logic force_sat, bypass, wr_en, ramp_load, ramp_busy;
  logic [7:0] sat_value, et, wr_data, rd_data;
  logic [10:0] slope;
  ppr_lut dut (.*);
  logic [7:0] ref_mem [1024];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    energy = '0; wr_addr = '0; rd_addr = '0; pedestal = 10'd40; force_sat = 0;
    bypass = 0; wr_en = 0; ramp_load = 0; sat_value = 8'd255; wr_data = '0;
    slope = 11'd384;                                  // 1.5
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    ramp_load = 1; @(posedge clk); #1 ramp_load = 0;
    begin
      int n;
      n = 0;
      while (ramp_busy) begin @(posedge clk); #1; n++; end
      chk(n == 1024, "ramp fill time");
    end
    for (int i = 0; i < 1024; i++) begin
      int v;
      v = (i > 40) ? ((i - 40) * 384) >> 8 : 0;
      if (v > 255) v = 255;
      ref_mem[i] = 8'(v);
      rd_addr = 10'(i); #1;
      chk(rd_data == 8'(v), $sformatf("ramp cell %0d", i));
    end
    // random writes
    for (int i = 0; i < 200; i++) begin
      wr_addr = 10'($urandom); wr_data = 8'($urandom); wr_en = 1;
      ref_mem[wr_addr] = wr_data;
      @(posedge clk); #1;
    end
    wr_en = 0;
    // real-time path
    for (int k = 0; k < 3000; k++) begin
      logic [7:0] expv;
      energy = (k % 5 == 0) ? 10'd0 : 10'($urandom);
      force_sat = ($urandom_range(0, 9) == 0);
      bypass = (k >= 1500);
      sat_value = 8'($urandom);
      if (force_sat) expv = sat_value;
      else if (energy == 0) expv = 0;
      else if (bypass) expv = (energy > 255) ? 8'd255 : energy[7:0];
      else expv = ref_mem[energy];
      @(posedge clk); #1;
      chk(et == expv, $sformatf("et k=%0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
