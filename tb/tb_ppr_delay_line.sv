// tb_ppr_delay_line - self-checking test of the programmable delay line.
// Drives random 8-bit words and, for delays 0..15 chosen at random, checks
// that the output equals the input of `delay` ticks before (delay 0: the
// current input). Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_ppr_delay_line;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] delay;
  logic [7:0] d, q;
  ppr_delay_line #(.W(8), .MAX_DELAY(15)) dut (.clk, .rst_n, .delay, .d, .q);

  logic [7:0] hist [int];
  initial begin
    delay = '0; d = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 5000; k++) begin
      if (k % 200 == 0) delay = 4'($urandom_range(0, 15));
      d = 8'($urandom);
      hist[k] = d;
      #1;
      // values written before a delay change still sit in the stages, so
      // check only once the line has been refilled since the change
      if (k % 200 >= 16) begin
        checks++;
        if (q !== hist[k - int'(delay)]) begin
          failures++;
          if (failures < 10) $display("delay %0d k %0d: got %h exp %h", delay, k, q, hist[k - int'(delay)]);
        end
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
