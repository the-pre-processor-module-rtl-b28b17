// tb_rem_spi_dac - self-checking test of the DAC serial interface.
// Queues DAC writes (some back to back), decodes the serial line with a
// simple receiver (sample DIN on each rising SCLK while CS is low) and
// compares every 24-bit frame with {4'b0, input, word}. Also checks the
// bit period (2*DIV ticks) and that a write into a full queue is dropped
// and flagged.
module tb_rem_spi_dac;
  localparam int DIV = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic we, sclk, cs_n, din, busy, overrun;
  logic [3:0] sel;
  logic [15:0] wdata;
  rem_spi_dac #(.DIV(DIV)) dut (.*);

  logic [23:0] exp_q [$];
  logic [23:0] sh;
  int nb, frames, last_rise, period_bad;
  logic sclk_q;
  always @(posedge clk) begin
    sclk_q <= sclk;
    if (rst_n && !cs_n && sclk && !sclk_q) begin
      if (nb > 0 && ($time / 10) - last_rise != 2 * DIV) period_bad++;
      last_rise = $time / 10;
      sh = {sh[22:0], din};
      nb++;
      if (nb == 24) begin
        checks++;
        if (exp_q.size() == 0 || sh != exp_q[0]) begin
          failures++; $display("frame %h exp %h", sh, exp_q.size() ? exp_q[0] : 24'h0);
        end
        if (exp_q.size()) void'(exp_q.pop_front());
        frames++; nb = 0;
      end
    end
    if (cs_n) nb = 0;
  end

  task automatic wr(logic [3:0] s, logic [15:0] w, bit expect_kept);
    sel = s; wdata = w; we = 1;
    if (expect_kept) exp_q.push_back({4'b0, s, w});
    @(posedge clk); #1 we = 0;
  endtask

  initial begin
    we = 0; sel = '0; wdata = '0; sclk_q = 0; sh = '0; nb = 0; frames = 0; period_bad = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 10; i++) begin
      wr(4'($urandom), 16'($urandom), 1);
      if (i % 3 != 0) repeat (400) @(posedge clk);
      #1;
    end
    while (busy) @(posedge clk);
    #1;
    checks++; if (overrun) failures++;
    // 1 in flight + 4 queued, the 6th is dropped
    for (int i = 0; i < 6; i++) wr(4'(i), 16'(i * 1111), i < 5);
    repeat (10) @(posedge clk);
    while (busy) @(posedge clk);
    #1;
    repeat (10) @(posedge clk);
    checks += 3;
    if (!overrun) failures++;
    if (frames != 15) begin failures++; $display("frames %0d", frames); end
    if (period_bad != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
