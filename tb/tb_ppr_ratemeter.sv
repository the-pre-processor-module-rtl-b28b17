// tb_ppr_ratemeter - self-checking test of the rate meter.
// A short time unit (50 ticks) keeps the run short. Counts the ticks whose
// selected source (FADC or LUT) is above the threshold over `del_time`
// units and checks the latched rate, the reported time span and that the
// result arrives exactly del_time * unit ticks after enabling.
module tb_ppr_ratemeter;
  localparam int UNIT = 50;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic enable, source, done;
  logic [9:0] thresh, fadc;
  logic [15:0] del_time, rate_time;
  logic [7:0] lut;
  logic [19:0] rate;
  ppr_ratemeter #(.UNIT_TICKS(UNIT)) dut (.*);

  initial begin
    enable = 0; source = 0; thresh = 10'd32; fadc = '0; lut = '0; del_time = 16'd4;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int run = 0; run < 6; run++) begin
      int cnt, t;
      source = run[0];
      del_time = 16'($urandom_range(1, 10));
      thresh = 10'($urandom_range(10, 200));
      enable = 1;
      cnt = 0; t = 0;
      do begin
        fadc = 10'($urandom_range(0, 300));
        lut = 8'($urandom_range(0, 255));
        if ((source ? int'(lut) : int'(fadc)) > int'(thresh)) cnt++;
        t++;
        @(posedge clk); #1;
      end while (!done && t < 20000);
      checks += 3;
      if (t != int'(del_time) * UNIT) begin failures++; $display("time %0d", t); end
      if (int'(rate) != cnt) begin failures++; $display("rate %0d exp %0d", rate, cnt); end
      if (rate_time != del_time) failures++;
      enable = 0; @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
