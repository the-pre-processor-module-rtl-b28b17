// tb_ppr_jet_sum - self-checking test of the four-channel jet sum: random
// 8-bit energies, the 10-bit sum must appear two ticks later.
module tb_ppr_jet_sum;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [7:0] et [4];
  logic [9:0] jet;
  ppr_jet_sum dut (.*);
  int s [int];
  initial begin
    for (int i = 0; i < 4; i++) et[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      s[k] = 0;
      for (int i = 0; i < 4; i++) begin
        et[i] = (k % 100 == 0) ? 8'd255 : 8'($urandom);
        s[k] += int'(et[i]);
      end
      @(posedge clk); #1;
      if (k >= 1) begin
        checks++;
        if (int'(jet) != s[k-1]) begin failures++; if (failures < 5) $display("k %0d jet %0d exp %0d", k, jet, s[k-1]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
