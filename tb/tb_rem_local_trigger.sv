// tb_rem_local_trigger - self-checking test of the local L1A generator.
// Random delay, count and gap: after a start the L1As must come at
// start + max(delay,1) (t counts from the tick before the start edge), then every max(gap,1) ticks, exactly `count` of them;
// the external pulse must start max(delay_ext,1) ticks after the start and
// last max(length,1) ticks. A start from a masked analog-input trigger line
// must work as well, and an unmasked line must not start anything.
module tb_rem_local_trigger;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [31:0] timing, config_r;
  logic start, l1a, ext_pulse, busy;
  logic [3:0] anin_trig;
  rem_local_trigger dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    timing = '0; config_r = '0; start = 0; anin_trig = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int run = 0; run < 12; run++) begin
      int dly, n, gap, dx, lx, t, got, first, last, xs, xl;
      bit use_anin;
      dly = $urandom_range(0, 40); n = $urandom_range(1, 6); gap = $urandom_range(0, 30);
      dx = $urandom_range(0, 40); lx = $urandom_range(0, 15);
      use_anin = run[0];
      timing = {1'b1, 15'(dx), 1'b1, 15'(dly)};
      config_r = {16'(gap), 4'b0100, 4'(lx), 8'(n)};
      @(posedge clk); #1;
      if (use_anin) begin
        anin_trig = 4'b1000; @(posedge clk); #1;   // not selected
        chk(!busy, "unmasked line ignored");
        anin_trig = 4'b1100;                       // line 2 selected
      end else start = 1;
      @(posedge clk); #1 start = 0;               // start tick = t 0
      t = 0; got = 0; first = -1; last = -1; xs = -1; xl = 0;
      while ((busy || l1a || ext_pulse) && t < 5000) begin
        t++;
        if (l1a) begin
          if (got == 0) first = t;
          else chk(t - last == ((gap == 0) ? 1 : gap), "gap");
          last = t; got++;
        end
        if (ext_pulse) begin if (xs < 0) xs = t; xl++; end
        @(posedge clk); #1;
      end
      anin_trig = '0;
      chk(got == n, $sformatf("count %0d exp %0d", got, n));
      chk(first == ((dly == 0) ? 1 : dly) + 1, $sformatf("first %0d dly %0d", first, dly));
      chk(xs == ((dx == 0) ? 1 : dx) + 1, $sformatf("ext start %0d dx %0d", xs, dx));
      chk(xl == ((lx == 0) ? 1 : lx), $sformatf("ext len %0d lx %0d", xl, lx));
      repeat (3) @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
