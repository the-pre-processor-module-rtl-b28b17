// tb_ppr_bcmux - self-checking test of the BC-multiplexer.
// Each pair of ticks (t0, t1) gets BCID'ed energies for channels A and B
// that obey the rule "a non-zero slice has zero neighbours": both at t0,
// A at t0 and B at t1, B at t0 and A at t1, both at t1, or none. The two
// link words of a pair must follow one and two ticks after the t1 input:
//   both at t0 / none:  {0,A0} {0,B0}      A t0, B t1: {0,A0} {1,B1}
//   B t0, A t1:         {1,B0} {1,A1}      both at t1: {0,A1} {0,B1}
// Bypass mode must pass the selected channel one tick later.
// Each case is counted and must occur.
module tb_ppr_bcmux;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cases [5];
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic pair_phase, bypass, chan_sel;
  logic [7:0] a, b;
  logic [8:0] link;
  ppr_bcmux dut (.*);

  task automatic step(logic ph, logic [7:0] av, logic [7:0] bv);
    pair_phase = ph; a = av; b = bv;
    @(posedge clk); #1;
  endtask
  function automatic logic [7:0] nz(); return 8'($urandom_range(1, 255)); endfunction

  initial begin
    logic [8:0] w1, w2;
    pair_phase = 0; a = 0; b = 0; bypass = 0; chan_sel = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int p = 0; p < 2000; p++) begin
      int c;
      logic [7:0] a0, b0, a1, b1;
      c = $urandom_range(0, 4);
      a0 = 0; b0 = 0; a1 = 0; b1 = 0;
      unique case (c)
        0: begin a0 = nz(); b0 = nz(); w1 = {1'b0, a0}; w2 = {1'b0, b0}; end
        1: begin a0 = nz(); b1 = nz(); w1 = {1'b0, a0}; w2 = {1'b1, b1}; end
        2: begin b0 = nz(); a1 = nz(); w1 = {1'b1, b0}; w2 = {1'b1, a1}; end
        3: begin a1 = nz(); b1 = nz(); w1 = {1'b0, a1}; w2 = {1'b0, b1}; end
        default: begin w1 = 9'd0; w2 = 9'd0; end
      endcase
      cases[c]++;
      step(1'b1, a0, b0);          // t0
      step(1'b0, a1, b1);          // t1
      checks++;
      if (link != w1) begin failures++; if (failures < 10) $display("p %0d case %0d w1 %h exp %h", p, c, link, w1); end
      // the next pair's t0 is driven inside the next iteration; check w2
      // after that edge with all-zero inputs on even pairs
      if (p % 2 == 0) begin
        step(1'b1, 8'd0, 8'd0);
        step(1'b0, 8'd0, 8'd0);
      end else begin
        pair_phase = 1'b1; a = 0; b = 0;
        @(posedge clk); #1;
        checks++;
        if (link != w2) begin failures++; if (failures < 10) $display("p %0d case %0d w2 %h exp %h", p, c, link, w2); end
        step(1'b0, 8'd0, 8'd0);
      end
    end
    // bypass
    bypass = 1;
    for (int k = 0; k < 200; k++) begin
      chan_sel = 1'($urandom);
      a = nz(); b = nz(); pair_phase = 1'(k);
      w1 = {1'b0, chan_sel ? b : a};
      @(posedge clk); #1;
      checks++;
      if (link != w1) failures++;
    end
    for (int c = 0; c < 5; c++) begin checks++; if (cases[c] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
