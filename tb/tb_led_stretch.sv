// tb_led_stretch - self-checking test of the indicator pulse stretcher with
// a short length (100 ticks): a single pulse must light the output for
// exactly 100 ticks, starting one tick later; a pulse inside the lit time
// restarts it.
module tb_led_stretch;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic pulse, led;
  led_stretch #(.LEN(100)) dut (.*);
  initial begin
    int n;
    pulse = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++; if (led) failures++;
    pulse = 1; @(posedge clk); #1 pulse = 0;
    n = 0;
    while (led && n < 1000) begin n++; @(posedge clk); #1; end
    checks++; if (n != 100) begin failures++; $display("lit %0d", n); end
    pulse = 1; @(posedge clk); #1 pulse = 0;
    repeat (50) @(posedge clk); #1;
    pulse = 1; @(posedge clk); #1 pulse = 0;
    n = 0;
    while (led && n < 1000) begin n++; @(posedge clk); #1; end
    checks++; if (n != 100) begin failures++; $display("retrigger lit %0d", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
