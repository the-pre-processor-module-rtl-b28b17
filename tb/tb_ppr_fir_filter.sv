// tb_ppr_fir_filter - self-checking test of the 5-tap FIR filter.
// Random samples and random coefficient/start-bit settings; every tick the
// registered outputs are compared with a reference sum over the five
// samples ending one tick before, shifted and clipped at 1023. This also
// checks the latency: the centre sample of a window leaves 3 ticks after it
// entered. Saturation is checked against any sample of the window.
module tb_ppr_fir_filter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] s, sat_level, energy, centre;
  logic [4:0][3:0] coeff;
  logic [2:0] start_bit;
  logic saturated;
  ppr_fir_filter dut (.clk, .rst_n, .s, .coeff, .start_bit, .sat_level,
                      .energy, .centre, .saturated);

  int x [int];
  function automatic int xs(int k); return (k < 0) ? 0 : x[k]; endfunction

  initial begin
    s = '0; coeff = '0; start_bit = '0; sat_level = 10'd1000;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 6000; k++) begin
      if (k % 500 == 0) begin
        for (int i = 0; i < 5; i++) coeff[i] = 4'($urandom);
        if (k == 0) coeff = {4'd0, 4'd0, 4'd1, 4'd0, 4'd0};   // identity
        start_bit = (k == 0) ? 3'd0 : 3'($urandom_range(0, 7));
        sat_level = 10'($urandom_range(600, 1023));
      end
      s = (k % 7 == 0) ? 10'd1023 : 10'($urandom);
      x[k] = s;
      @(posedge clk); #1;
      if (k % 500 >= 6) begin
        int sum, expv;
        bit sat;
        sum = 0; sat = 0;
        for (int i = 0; i < 5; i++) begin
          sum += int'(coeff[i]) * xs(k - 5 + i);
          if (xs(k - 5 + i) >= int'(sat_level)) sat = 1;
        end
        expv = sum >> start_bit;
        if (expv > 1023) expv = 1023;
        checks += 3;
        if (int'(energy) != expv) begin
          failures++;
          if (failures < 10) $display("k %0d energy %0d exp %0d", k, energy, expv);
        end
        if (int'(centre) != xs(k - 3)) failures++;
        if (saturated != sat) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
