// tb_ppm_top - end-to-end self-checking testbench of the module (two MCMs).
//
// Drives random pedestal noise with occasional pulses, saturated pulses and
// external-BCID bits into eight inputs, sets the module up over VME and
// receives the G-Link frames of both MCM lines. Checks:
//   VME: version, control-register / LUT / playback-memory read-back, LUT
//        ramp contents, DAQ-mode refusal and the error register;
//   G-Link: frame length for the read-out mode, even parity, BC bit, error
//        field equal to the `glink_err` output, no event/bunch mismatch in
//        normal running, FADC fields equal to the input samples (MSB
//        inverted) with one fixed latency for all events, zeros and the CD
//        bit for a disabled channel, MA for an absent MCM;
//   SPI: the DAC word clocked out; local trigger: L1A count.
// Each mechanism is counted; one that never happens is a failure.
// Interface: instantiates ppm_top with N_MCM = 2 and short LED/rate units.
`timescale 1ns/1ps
module tb_ppm_top;
  import ppm_pkg::*;
  localparam int N = 2;
  localparam logic [4:0] GA = 5'd3;
  localparam int MAP [4] = '{0, 3, 1, 2};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        mcm_absent [N];
  logic [9:0]  fadc [4*N];
  logic        ext_bcid [4*N];
  logic        ttc_l1a = 0, ttc_bcr = 0, ttc_ecr = 0;
  logic        vme_req = 0, vme_write = 0;
  logic [5:0]  vme_am = 6'h09;
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

  ppm_top #(.N_MCM(N), .DERAND_DEPTH(16), .RATE_UNIT(20), .LED_LEN(50)) dut (
    .clk, .rst_n, .ga(GA), .mcm_absent, .fadc, .ext_bcid,
    .ttc_l1a, .ttc_bcr, .ttc_ecr,
    .vme_req, .vme_am, .vme_addr, .vme_write, .vme_wdata, .vme_ack, .vme_rdata,
    .cp_link, .jep, .glink, .glink_dav, .glink_err, .rate, .rate_valid,
    .spi_sclk, .spi_cs_n, .spi_din, .i2c_sda_in(4'b0000), .i2c_scl_oe, .i2c_sda_oe,
    .ext_pulse, .led_vme, .led_l1a, .led_daq);

  // mechanism counters
  typedef enum int {M_FRAME, M_DATA_OK, M_LOSS, M_CD, M_MA, M_SB, M_EB, M_PEAK,
                    M_CP, M_JEP, M_RATE, M_HIS, M_PB, M_RAMP, M_LT, M_EXT,
                    M_DENY, M_SPI, M_I2C, M_LED, M_N} mech_t;
  int mech [M_N];
  initial foreach (mech[i]) mech[i] = 0;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  int tick = 0;
  logic [9:0] hist [4*N][65536];
  int pulse_left [4*N];
  int pulse_amp [4*N];
  initial for (int i = 0; i < 4*N; i++) begin pulse_left[i] = 0; pulse_amp[i] = 0; end
  bit stim_pulses = 1;
  always @(posedge clk) begin
    tick <= tick + 1;
    for (int i = 0; i < 4*N; i++) begin
      int v;
      v = 40 + $urandom_range(0, 7);
      if (pulse_left[i] > 0) begin
        case (pulse_left[i])
          5: v += pulse_amp[i] / 6;
          4: v += pulse_amp[i] / 2;
          3: v += pulse_amp[i];
          2: v += pulse_amp[i] / 2;
          default: v += pulse_amp[i] / 5;
        endcase
        pulse_left[i] <= pulse_left[i] - 1;
      end else if (stim_pulses && $urandom_range(0, 59) == 0) begin
        pulse_left[i] <= 5;
        pulse_amp[i] <= ($urandom_range(0, 4) == 0) ? 3000 : $urandom_range(100, 600);
      end
      if (v > 1023) v = 1023;
      fadc[i] <= 10'(v);
      hist[i][(tick + 1) % 65536] <= 10'(v);
      ext_bcid[i] <= (pulse_left[i] == 3);
    end
  end

  // L1A record: tick and BCID of each accept
  int l1_tick [$];
  logic [11:0] l1_bc [$];
  always @(posedge clk)
    if (rst_n && dut.l1a) begin
      l1_tick.push_back(tick);
      l1_bc.push_back(dut.rem_bc);
    end

  // ---------------- G-Link receiver ----------------
  localparam int MAXF = 800;
  bit   fbits [N][MAXF];
  int   flen = 0;
  logic dav_q = 0;
  int   nl_exp = 1, nf_exp = 5;
  int   fadc_off = -1;
  int   disabled_bit = -1;   // channel bit 4m+L disabled, -1 none
  int   frames = 0;
  bit   burst = 0;         // overload phase: only the loss flag is checked

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
    frames++;
    mech[M_FRAME]++;
    checks++;
    if (flen != 4*11*(nl_exp + nf_exp) + 12) begin
      failures++;
      $display("frame length %0d, expected %0d", flen, 4*11*(nl_exp + nf_exp) + 12);
      return;
    end
    for (int m = 0; m < N; m++) begin
      int par, pos, base;
      logic [9:0] e;
      par = 0;
      for (int i = 0; i < flen; i++) par ^= int'(fbits[m][i]);
      checks++;
      if (par != 0) begin failures++; $display("parity error line %0d", m); end
      checks++;
      if (fbits[m][0] !== bcx[m]) begin failures++; $display("BC bit line %0d", m); end
      base = 1 + 4*11*(nl_exp + nf_exp);
      for (int b = 0; b < 10; b++) e[b] = fbits[m][base + b];
      checks++;
      if (e !== glink_err[m]) begin failures++; $display("error field mismatch %b %b", e, glink_err[m]); end
      if (mcm_absent[m]) begin
        checks++;
        if (!e[4]) begin failures++; $display("MA not set"); end
        else mech[M_MA]++;
        continue;
      end
      if (burst) begin
        if (e[6]) mech[M_LOSS]++;
        continue;
      end
      checks++;
      if (e[5] || e[7] || e[8] || e[9]) begin
        failures++; $display("unexpected error bits %b line %0d at %0t", e, m, $time);
      end
      if (e[6]) mech[M_LOSS]++;
      for (int l = 0; l < 4; l++) begin
        bit dis;
        int inp;
        logic [10:0] lf, ff;
        dis = (disabled_bit == 4*m + l);
        inp = 4*m + MAP[l];
        pos = 1 + l*11*(nl_exp + nf_exp);
        checks++;
        if (e[l] != dis) begin failures++; $display("CD bit %0d line %0d", l, m); end
        if (dis) begin
          for (int i = 0; i < 11*(nl_exp + nf_exp); i++)
            if (fbits[m][pos + i]) begin failures++; $display("disabled channel not zero"); break; end
          mech[M_CD]++;
          continue;
        end
        for (int i = 0; i < nl_exp; i++) begin
          lf = field(m, pos + 11*i);
          if (lf[7:0] != 0) mech[M_PEAK]++;
          if (lf[9]) mech[M_SB]++;
          if (lf[8]) mech[M_EB]++;
        end
        if (e[6]) continue;
        // FADC fields: consecutive input samples, MSB inverted
        if (fadc_off < 0) begin
          for (int o = 0; o < 40; o++) begin
            bit ok;
            ok = 1;
            for (int i = 0; i < nf_exp; i++) begin
              ff = field(m, pos + 11*(nl_exp + i));
              if (ff[10:1] != (hist[inp][(t - o + i + 65536) % 65536] ^ 10'h200)) ok = 0;
            end
            if (ok) begin fadc_off = o; break; end
          end
          checks++;
          if (fadc_off < 0) begin failures++; $display("no latency found for FADC fields"); end
        end else begin
          for (int i = 0; i < nf_exp; i++) begin
            ff = field(m, pos + 11*(nl_exp + i));
            checks++;
            if (ff[10:1] != (hist[inp][(t - fadc_off + i + 65536) % 65536] ^ 10'h200)) begin
              failures++;
              $display("FADC field line %0d ch %0d slice %0d: %0d expected %0d", m, l, i,
                       ff[10:1], hist[inp][(t - fadc_off + i + 65536) % 65536] ^ 10'h200);
            end else mech[M_DATA_OK]++;
          end
        end
      end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    dav_q <= glink_dav;
    if (glink_dav) begin
      for (int m = 0; m < N; m++) fbits[m][flen] = glink[m];
      flen++;
    end else if (dav_q) begin
      check_frame();
      flen = 0;
    end
  end

  // other monitors
  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < N; m++) begin
      if (cp_link[m][0] != 0 || cp_link[m][1] != 0) mech[M_CP]++;
      if (jep[m] != 0) mech[M_JEP]++;
    end
    for (int i = 0; i < 4*N; i++) if (rate_valid[i]) mech[M_RATE]++;
    if (dut.any_his) mech[M_HIS]++;
    if (dut.any_pb) mech[M_PB]++;
    if (dut.lt_l1a) mech[M_LT]++;
    if (ext_pulse) mech[M_EXT]++;
    if (led_l1a) mech[M_LED]++;
    if (i2c_scl_oe != 0) mech[M_I2C]++;
  end

  // SPI receiver on port 0
  logic [23:0] spi_sh;
  int spi_n = 0;
  logic [23:0] spi_word [$];
  always @(posedge spi_sclk[0] or posedge spi_cs_n[0])
    if (spi_cs_n[0]) begin
      if (spi_n > 0 && rst_n) spi_word.push_back(spi_sh);
      spi_n <= 0;
    end else begin
      spi_sh <= {spi_sh[22:0], spi_din[0]};
      spi_n <= spi_n + 1;
    end

  // ---------------- VME ----------------
  function automatic logic [31:0] chan_off(int m, int c);
    return 32'h200000 + m*32'h2000 + 32'h60 + c*32'h800;
  endfunction

  task automatic vme(input bit wr, input logic [31:0] off, input logic [31:0] d,
                     output logic [31:0] q);
    int n;
    vme_addr = {4'hC, GA, off[22:0]};
    vme_write = wr;
    vme_wdata = d;
    vme_req = 1;
    @(posedge clk); #1;
    vme_req = 0;
    n = 0;
    while (!vme_ack && n < 30) begin @(posedge clk); #1; n++; end
    q = vme_rdata;
    checks++;
    if (n >= 30) begin failures++; $display("VME timeout at %h", off); end
  endtask

  task automatic wr(input logic [31:0] off, input logic [31:0] d);
    logic [31:0] q;
    vme(1, off, d, q);
  endtask

  task automatic rd_check(input logic [31:0] off, input logic [31:0] exp, input logic [31:0] mask,
                          input string what);
    logic [31:0] q;
    vme(0, off, 0, q);
    checks++;
    if ((q & mask) !== (exp & mask)) begin
      failures++; $display("%s: read %h expected %h", what, q & mask, exp & mask);
    end
  endtask

  task automatic l1a_pulse();
    @(posedge clk); #1 ttc_l1a = 1;
    @(posedge clk); #1 ttc_l1a = 0;
  endtask

  task automatic wait_frames(int n);
    int target, k;
    target = frames + n;
    k = 0;
    while (frames < target && k < 20000) begin @(posedge clk); k++; end
    #1;
    checks++;
    if (frames < target) begin failures++; $display("missing frame(s) at %0t", $time); end
  endtask

  initial begin
    logic [31:0] q, v;
    int f0;
    for (int m = 0; m < N; m++) mcm_absent[m] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (5) @(posedge clk); #1;

    rd_check(32'h7FFFD0, 32'h0002_0001, '1, "version");
    rd_check(32'h7FFF60, 1, 32'h7, "read-out mode");
    // wrong geographical address / modifier are ignored: no ack
    begin
      int n;
      vme_addr = {4'hC, GA + 5'd1, 23'h7FFFD0}; vme_write = 0; vme_req = 1;
      @(posedge clk); #1 vme_req = 0;
      n = 0;
      repeat (5) begin if (vme_ack) n++; @(posedge clk); #1; end
      vme_am = 6'h3D; vme_addr = {4'hC, GA, 23'h7FFFD0}; vme_req = 1;
      @(posedge clk); #1 vme_req = 0; vme_am = 6'h09;
      repeat (5) begin if (vme_ack) n++; @(posedge clk); #1; end
      checks++;
      if (n != 0) begin failures++; $display("foreign access acknowledged"); end
    end

    // control register, LUT and playback memory read-back
    for (int k = 0; k < 12; k++) begin
      int m, c;
      m = $urandom_range(0, N-1); c = $urandom_range(0, 3);
      v = $urandom;
      wr(chan_off(m, c) + 32'h624 + 4*21, v);
      rd_check(chan_off(m, c) + 32'h624 + 4*21, v, '1, "CR21");
      wr(chan_off(m, c) + 32'h624 + 4*21, 32);
      v = $urandom;
      wr(chan_off(m, c) + 32'h224 + 4*(k+100), v);
      rd_check(chan_off(m, c) + 32'h224 + 4*(k+100), v, '1, "LUT word");
      v = $urandom & 32'h07FF_07FF;
      wr(chan_off(m, c) + 32'h004 + 4*(k+20), v);
      rd_check(chan_off(m, c) + 32'h004 + 4*(k+20), v, 32'h07FF_07FF, "PBM word");
    end

    // LUT ramp on MCM 0 channel A (pedestal 0, slope 256: cell i -> min(i,255))
    wr(chan_off(0, 0) + 32'h21C, 1);
    repeat (1100) @(posedge clk); #1;
    for (int k = 0; k < 8; k++) begin
      int w;
      w = $urandom_range(0, 255);
      v = 0;
      for (int b = 0; b < 4; b++) v[8*b +: 8] = (4*w + b > 255) ? 8'd255 : 8'(4*w + b);
      begin
        int f_before;
        f_before = failures;
        rd_check(chan_off(0, 0) + 32'h224 + 4*w, v, '1, "LUT ramp");
        if (failures == f_before) mech[M_RAMP]++;
      end
    end
    wr(chan_off(0, 0) + 32'h624, 32'b10_0011);   // use the LUT on channel A

    // rate meter (short window) and histogram on MCM 1
    for (int c = 0; c < 4; c++) begin
      wr(chan_off(1, c) + 32'h624 + 4*19, 10);
      wr(chan_off(1, c) + 32'h624 + 4*20, 0);
      wr(chan_off(1, c) + 32'h624 + 4*17, 32'h15);   // rate on, histogram on
      wr(chan_off(1, c) + 32'h624 + 4*22, 0);
      wr(chan_off(1, c) + 32'h624 + 4*24, 63);
      wr(chan_off(1, c) + 32'h624 + 4*25, 63);
    end

    // DAC word over SPI: MCM 0, input 4
    v = $urandom & 32'hFFFF;
    wr(32'h200000 + 32'h04, v);
    repeat (300) @(posedge clk); #1;
    checks++;
    if (spi_word.size() != 1 || spi_word[0][15:0] != v[15:0]) begin
      failures++; $display("SPI word wrong (%0d words)", spi_word.size());
    end else mech[M_SPI]++;
    // fine timing over I2C
    wr(32'h200000 + 32'h14, 32'd7);
    repeat (600) @(posedge clk); #1;

    // normal running with TTC accepts
    repeat (20) begin
      repeat ($urandom_range(400, 700)) @(posedge clk);
      l1a_pulse();
    end
    wait_frames(0);
    repeat (800) @(posedge clk);

    // channel disable: MCM 1 letter B (bit 5)
    disabled_bit = 5;
    wr(32'h7FFF68, 32'h20);
    repeat (10) begin
      repeat ($urandom_range(400, 600)) @(posedge clk);
      l1a_pulse();
    end
    repeat (800) @(posedge clk);
    wr(32'h7FFF68, 0);
    repeat (5) @(posedge clk);
    disabled_bit = -1;

    // absent MCM
    mcm_absent[1] = 1;
    repeat (3) begin
      repeat (500) @(posedge clk);
      l1a_pulse();
    end
    repeat (800) @(posedge clk);
    mcm_absent[1] = 0;

    // read-out mode 3+1 and 5+3
    wr(32'h7FFF60, 0);
    for (int m = 0; m < N; m++) for (int c = 0; c < 4; c++) wr(chan_off(m, c) + 32'h624 + 4*16, 3 | (1 << 7));
    nl_exp = 1; nf_exp = 3;
    repeat (5) begin repeat (500) @(posedge clk); l1a_pulse(); end
    repeat (800) @(posedge clk);
    wr(32'h7FFF60, 3);
    for (int m = 0; m < N; m++) for (int c = 0; c < 4; c++) wr(chan_off(m, c) + 32'h624 + 4*16, 9 | (3 << 7));
    nl_exp = 3; nf_exp = 9;
    repeat (5) begin repeat (800) @(posedge clk); l1a_pulse(); end
    repeat (1200) @(posedge clk);

    // burst of accepts: the 16-word derandomiser overflows, loss flagged
    burst = 1;
    repeat (4) l1a_pulse();
    repeat (12000) @(posedge clk);
    burst = 0;
    wr(32'h7FFF60, 1);
    for (int m = 0; m < N; m++) for (int c = 0; c < 4; c++) wr(chan_off(m, c) + 32'h624 + 4*16, 5 | (1 << 7));
    nl_exp = 1; nf_exp = 5;

    // local trigger: 3 accepts 600 ticks apart, external pulse of 2 ticks
    f0 = frames;
    wr(32'h7FFF84, (600 << 16) | (2 << 8) | 3);
    wr(32'h7FFF80, (1 << 31) | (5 << 16) | (1 << 15) | 20);
    repeat (3000) @(posedge clk); #1;
    checks++;
    if (mech[M_LT] != 3 || frames - f0 != 3) begin
      failures++; $display("local trigger gave %0d accepts, %0d frames", mech[M_LT], frames - f0);
    end

    // playback on MCM 1 channel D, synchronous start
    stim_pulses = 0;
    repeat (20) @(posedge clk);
    for (int k = 0; k < 128; k++) wr(chan_off(1, 3) + 32'h004 + 4*k, {5'd0, 11'(2*k+1), 5'd0, 11'(2*k)});
    wr(chan_off(1, 3) + 32'h624 + 4*28, 32'h7);
    wr(32'h7FFF70, 32'h1);
    repeat (400) @(posedge clk); #1;

    // DAQ mode refuses set-up writes
    wr(32'h7FFFD8, 1);
    v = $urandom & 32'hFF;
    wr(chan_off(0, 1) + 32'h624 + 4*21, v | 32'h100);
    rd_check(chan_off(0, 1) + 32'h624 + 4*21, 32, '1, "CR21 written in DAQ mode");
    vme(0, 32'h7FFFE4, 0, q);
    checks++;
    if (!q[0]) begin failures++; $display("error bit 0 not set"); end else mech[M_DENY]++;
    rd_check(32'h7FFFE4, 0, '1, "error register cleared");
    wr(32'h7FFFD8, 0);

    repeat (500) @(posedge clk);
    checks++;
    if (l1_tick.size() != 0) begin failures++; $display("%0d accepts without frame", l1_tick.size()); end

    foreach (mech[i]) begin
      mech_t mt;
      mt = mech_t'(i);
      $display("mechanism %s: %0d", mt.name(), mech[i]);
      checks++;
      if (mech[i] == 0) begin failures++; $display("mechanism %s never happened", mt.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
