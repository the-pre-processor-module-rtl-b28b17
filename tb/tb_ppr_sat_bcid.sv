// tb_ppr_sat_bcid - self-checking test of the saturated-pulse BCID.
// Drives rising edges of different steepness through the two thresholds
// and checks the marker against the rule: when sample n is the first above
// the high threshold, the peak is slice n+1 if sample n-1 was above the low
// threshold, else slice n+2; the marker for slice m appears 3 ticks after
// sample m entered (the filter's alignment).
module tb_ppr_sat_bcid;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, near_n = 0, far_n = 0;
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] s, sat_high, sat_low;
  logic mark;
  ppr_sat_bcid dut (.clk, .rst_n, .s, .sat_high, .sat_low, .mark);
  int x [int];
  function automatic int g(int k); return (k < 0) ? 0 : x[k]; endfunction

  initial begin
    s = '0; sat_high = 10'd767; sat_low = 10'd255;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 10000; k++) begin
      int ph;
      ph = k % 20;
      // pulse: 0, then one or two rising samples, then saturation, then decay
      if (ph < 8) s = 10'($urandom_range(0, 100));
      else if (ph == 8) s = 10'($urandom_range(0, 700));
      else if (ph == 9) s = 10'($urandom_range(100, 900));
      else if (ph < 13) s = 10'd1023;
      else s = 10'($urandom_range(0, 200));
      x[k] = s;
      @(posedge clk); #1;
      begin
        bit n1, n2;
        n1 = g(k-4) > 767 && g(k-5) <= 767 && g(k-5) > 255;
        n2 = g(k-5) > 767 && g(k-6) <= 767 && g(k-6) <= 255;
        checks++;
        if (mark != (n1 || n2)) begin
          failures++;
          if (failures < 10) $display("k %0d mark %0d exp %0d", k, mark, n1 || n2);
        end
        if (n1) near_n++;
        if (n2) far_n++;
      end
    end
    checks += 2;
    if (near_n == 0) failures++;
    if (far_n == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
