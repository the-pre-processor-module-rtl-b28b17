// tb_ppr_peak_finder - self-checking test of the peak finder.
// Feeds random filtered values with frequent plateaus (equal neighbours) and
// both settings of the comparison condition; checks the peak flag for value
// n one tick after value n+1 arrived, and that value and side data are
// passed through with the same alignment.
module tb_ppr_peak_finder;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, peaks = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] e, e_out;
  logic [10:0] aux_in, aux_out;
  logic peak_cond, peak;
  ppr_peak_finder #(.AUX_W(11)) dut (.clk, .rst_n, .e, .aux_in, .peak_cond,
                                     .peak, .e_out, .aux_out);
  int ev [int];
  int av [int];
  function automatic int g(int k); return (k < 0) ? 0 : ev[k]; endfunction

  initial begin
    e = '0; aux_in = '0; peak_cond = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 8000; k++) begin
      if (k % 1000 == 0) peak_cond = 1'($urandom);
      e = 10'($urandom_range(0, 5));          // small range: many ties and zeros
      aux_in = 11'($urandom);
      ev[k] = e; av[k] = aux_in;
      @(posedge clk); #1;
      if (k % 1000 >= 3) begin
        int n;
        bit expp;
        n = k - 1;
        expp = (g(n) != 0) &&
               (peak_cond ? (g(n) >= g(n-1) && g(n) > g(n+1))
                          : (g(n) >  g(n-1) && g(n) >= g(n+1)));
        checks += 3;
        if (peak != expp) begin
          failures++;
          if (failures < 10) $display("k %0d cond %0d %0d %0d %0d peak %0d", k, peak_cond, g(n-1), g(n), g(n+1), peak);
        end
        if (int'(e_out) != g(n)) failures++;
        if (int'(aux_out) != av[n]) failures++;
        if (peak) peaks++;
      end
    end
    checks++;
    if (peaks < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
