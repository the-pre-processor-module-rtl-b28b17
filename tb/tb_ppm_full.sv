// tb_ppm_full - full-size testbench: ppm_top with all parameters at their
// defaults (16 MCMs, 64 channels).
//
// Drives pedestal noise with random pulses into all 64 inputs, sends random
// TTC accepts, and receives the G-Link frames of all 16 lines. Checks the
// firmware version over VME, a control-register read-back on every MCM, the
// frame length of the default read-out mode (5 FADC + 1 LUT slices: 276
// bits), even parity and the BC bit on every line, a clean error field and
// FADC fields equal to the input samples (MSB inverted) at one latency for
// all lines. Counts frames, non-zero real-time outputs and LUT peaks; a
// count of zero is a failure.
`timescale 1ns/1ps
module tb_ppm_full;
  localparam int N = 16;
  localparam logic [4:0] GA = 5'd17;
  localparam int MAP [4] = '{0, 3, 1, 2};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        mcm_absent [N];
  logic [9:0]  fadc [4*N];
  logic        ext_bcid [4*N];
  logic        ttc_l1a = 0;
  logic        vme_req = 0, vme_write = 0;
  logic [31:0] vme_addr = 0, vme_wdata = 0;
  logic        vme_ack;
  logic [31:0] vme_rdata;
  logic [8:0]  cp_link [N][2];
  logic [9:0]  jep [N];
  logic        glink [N], glink_dav;
  logic [9:0]  glink_err [N];
  logic [19:0] rate [4*N];
  logic        rate_valid [4*N];
  logic        spi_sclk [4], spi_cs_n [4], spi_din [4];
  logic [3:0]  i2c_scl_oe, i2c_sda_oe;
  logic        ext_pulse, led_vme, led_l1a, led_daq;

  ppm_top dut (
    .clk, .rst_n, .ga(GA), .mcm_absent, .fadc, .ext_bcid,
    .ttc_l1a, .ttc_bcr(1'b0), .ttc_ecr(1'b0),
    .vme_req, .vme_am(6'h0D), .vme_addr, .vme_write, .vme_wdata, .vme_ack, .vme_rdata,
    .cp_link, .jep, .glink, .glink_dav, .glink_err, .rate, .rate_valid,
    .spi_sclk, .spi_cs_n, .spi_din, .i2c_sda_in(4'b0000), .i2c_scl_oe, .i2c_sda_oe,
    .ext_pulse, .led_vme, .led_l1a, .led_daq);

  int n_frames = 0, n_cp = 0, n_jep = 0, n_peak = 0;

  initial begin
    repeat (60000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus with a history of every input
  int tick = 0;
  logic [9:0] hist [4*N][4096];
  int pulse_left [4*N];
  int pulse_amp [4*N];
  initial for (int i = 0; i < 4*N; i++) begin pulse_left[i] = 0; pulse_amp[i] = 0; end
  always @(posedge clk) begin
    tick <= tick + 1;
    for (int i = 0; i < 4*N; i++) begin
      int v;
      v = 32 + $urandom_range(0, 15);
      if (pulse_left[i] > 0) begin
        v += (pulse_left[i] == 3) ? pulse_amp[i] : pulse_amp[i] / 3;
        pulse_left[i] <= pulse_left[i] - 1;
      end else if ($urandom_range(0, 79) == 0) begin
        pulse_left[i] <= 5;
        pulse_amp[i] <= $urandom_range(100, 900);
      end
      if (v > 1023) v = 1023;
      fadc[i] <= 10'(v);
      hist[i][(tick + 1) % 4096] <= 10'(v);
      ext_bcid[i] <= 1'b0;
    end
  end

  int l1_tick [$];
  logic [11:0] l1_bc [$];
  always @(posedge clk)
    if (rst_n && dut.l1a) begin
      l1_tick.push_back(tick);
      l1_bc.push_back(dut.rem_bc);
    end

  // G-Link receiver
  bit   fbits [N][400];
  int   flen = 0;
  logic dav_q = 0;
  int   fadc_off = -1;

  function automatic logic [10:0] field(int m, int pos);
    logic [10:0] f;
    for (int b = 0; b < 11; b++) f[b] = fbits[m][pos + b];
    return f;
  endfunction

  task automatic check_frame();
    int t;
    logic [11:0] bcx;
    t = l1_tick.pop_front();
    bcx = l1_bc.pop_front();
    n_frames++;
    checks++;
    if (flen != 276) begin failures++; $display("frame length %0d", flen); return; end
    for (int m = 0; m < N; m++) begin
      int par;
      logic [9:0] e;
      par = 0;
      for (int i = 0; i < flen; i++) par ^= int'(fbits[m][i]);
      for (int b = 0; b < 10; b++) e[b] = fbits[m][265 + b];
      checks += 3;
      if (par != 0) begin failures++; $display("parity line %0d", m); end
      if (fbits[m][0] !== ((m < 12) ? bcx[m] : 1'b0)) begin failures++; $display("BC bit line %0d", m); end
      if (e != 0) begin failures++; $display("error field %b line %0d", e, m); end
      for (int l = 0; l < 4; l++) begin
        int pos, inp;
        logic [10:0] ff;
        pos = 1 + l*66;
        inp = 4*m + MAP[l];
        if (field(m, pos)[7:0] != 0) n_peak++;
        if (fadc_off < 0) begin
          for (int o = 0; o < 40 && fadc_off < 0; o++) begin
            bit ok;
            ok = 1;
            for (int i = 0; i < 5; i++)
              if (field(m, pos + 11*(1 + i))[10:1] != (hist[inp][(t - o + i + 4096) % 4096] ^ 10'h200)) ok = 0;
            if (ok) fadc_off = o;
          end
          checks++;
          if (fadc_off < 0) begin failures++; $display("no FADC latency found"); end
        end else
          for (int i = 0; i < 5; i++) begin
            ff = field(m, pos + 11*(1 + i));
            checks++;
            if (ff[10:1] != (hist[inp][(t - fadc_off + i + 4096) % 4096] ^ 10'h200)) begin
              failures++;
              $display("FADC line %0d ch %0d slice %0d: %0d", m, l, i, ff[10:1]);
            end
          end
      end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    dav_q <= glink_dav;
    if (glink_dav) begin
      if (flen < 400) for (int m = 0; m < N; m++) fbits[m][flen] = glink[m];
      flen++;
    end else if (dav_q) begin
      check_frame();
      flen = 0;
    end
    for (int m = 0; m < N; m++) begin
      if (cp_link[m][0] != 0 || cp_link[m][1] != 0) n_cp++;
      if (jep[m] != 0) n_jep++;
    end
  end

  task automatic vme(input bit wr, input logic [22:0] off, input logic [31:0] d,
                     output logic [31:0] q);
    int n;
    vme_addr = {4'hC, GA, off};
    vme_write = wr;
    vme_wdata = d;
    vme_req = 1;
    @(posedge clk); #1;
    vme_req = 0;
    n = 0;
    while (!vme_ack && n < 30) begin @(posedge clk); #1; n++; end
    q = vme_rdata;
    checks++;
    if (n >= 30) begin failures++; $display("VME timeout"); end
  endtask

  initial begin
    logic [31:0] q, v;
    for (int m = 0; m < N; m++) mcm_absent[m] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (5) @(posedge clk); #1;
    vme(0, 23'h7FFFD0, 0, q);
    checks++;
    if (q != 32'h0002_0001) begin failures++; $display("version %h", q); end
    for (int m = 0; m < N; m++) begin
      logic [22:0] a;
      a = 23'(32'h200000 + m*32'h2000 + 32'h60 + ((m % 4) * 32'h800) + 32'h624 + 4*18);
      v = $urandom_range(1, 1023);
      vme(1, a, v, q);
      vme(0, a, 0, q);
      checks++;
      if (q != v) begin failures++; $display("CR18 MCM %0d: %h", m, q); end
    end
    repeat (200) @(posedge clk);
    repeat (25) begin
      repeat ($urandom_range(400, 900)) @(posedge clk);
      #1 ttc_l1a = 1;
      @(posedge clk); #1 ttc_l1a = 0;
    end
    repeat (1500) @(posedge clk);
    checks += 5;
    if (n_frames != 25) begin failures++; $display("%0d frames", n_frames); end
    if (l1_tick.size() != 0) begin failures++; $display("accepts without frame"); end
    if (n_cp == 0) begin failures++; $display("no CP output"); end
    if (n_jep == 0) begin failures++; $display("no JEP output"); end
    if (n_peak == 0) begin failures++; $display("no LUT peak read out"); end
    $display("frames %0d, CP words %0d, JEP words %0d, peaks %0d", n_frames, n_cp, n_jep, n_peak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
