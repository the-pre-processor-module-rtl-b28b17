// tb_ttc_counters - self-checking test of the bunch and event counters.
// Random L1As and occasional bunch/event counter resets; the counters are
// compared every tick with a reference model (bunch counter wraps at 4096,
// event counter counts L1As, both cleared by their resets).
module tb_ttc_counters;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic bcr, ecr, l1a;
  logic [11:0] bc;
  logic [23:0] evt;
  ttc_counters dut (.*);
  initial begin
    int rbc, revt;
    bcr = 0; ecr = 0; l1a = 0; rbc = 0; revt = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 12000; k++) begin
      bcr = (k % 5000 == 4999); ecr = (k % 3000 == 2999);
      l1a = ($urandom_range(0, 9) == 0);
      rbc = bcr ? 0 : (rbc + 1) % 4096;
      revt = ecr ? 0 : revt + int'(l1a);
      @(posedge clk); #1;
      checks += 2;
      if (int'(bc) != rbc) begin failures++; if (failures < 5) $display("bc %0d exp %0d", bc, rbc); end
      if (int'(evt) != revt) begin failures++; if (failures < 5) $display("evt %0d exp %0d", evt, revt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
