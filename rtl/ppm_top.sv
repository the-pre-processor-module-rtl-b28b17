// ppm_top - one Pre-Processor Module: 64 analog-derived trigger channels on
// 16 multi-chip modules, plus the readout merger (ReM) logic that
// configures them over VME and ships their event data to DAQ.
//
// Real-time path: each MCM (ppr_mcm) digitises-in four 10-bit FADC streams
// (one value per bunch-crossing tick), filters them, identifies the bunch
// crossing, maps the result through a LUT to an 8-bit transverse energy and
// produces two BC-multiplexed 9-bit cluster-processor words (`cp_link`) and
// one 10-bit jet element (`jep`). With the default settings `cp_link` follows
// the FADC sample by CH_LAT+1 = 10 ticks and `jep` by 11 ticks.
// Readout path: on each level-1 accept every channel pair sends its FADC
// and LUT slices over a serial line; per line a rem_sif_rx unpacks the
// record, and rem_glink_formatter merges the 32 records into one frame on
// 16 G-Link bit lines (`glink`, `glink_dav`). The ReM's own bunch/event
// counters (ttc_counters) provide the numbers the records are checked
// against.
// Control: rem_vme_if decodes VME accesses (`vme_*`, a one-tick request and
// acknowledge) into the MCM set-up bus, the ReM registers, SPI writes to the
// four analog-input boards (rem_spi_dac, board b serves MCMs 4b..4b+3) and
// I2C writes to the fine-timing chips (rem_i2c_write, port 0).
// rem_local_trigger generates L1As (and an external test pulse) on its own,
// started by a register write or by the discriminator of any input of a
// selected analog-input board; these L1As are ORed with the TTC ones.
// Local counter resets are ORed with the TTC resets as well. Playback runs
// that wait for a synchronous start begin on a write of MCM control bit 0.
// `mcm_absent` marks unpopulated MCM positions: the formatter does not wait
// for them and flags them in their frame's error field.
// Front-panel indicators: VME activity, L1A and DAQ mode, each stretched.
// Not built: collection of rates and histograms into the board memory on a
// ReM command (the command strobes, the read-back word of each serial line
// and the error register stay unused here), spy buffers, the TTC decoder
// I2C port. Unused-signal lint warnings in this file come from these.
// Inputs `fadc` and `ext_bcid` are indexed 4*m + connector input (0..3) of
// MCM m; per-channel outputs (`rate`) are indexed 4*m + channel letter
// (A=0..D=3). Channel disable bit 4*m + letter flags channel letter of MCM m.
// Follows the document: the partition into 16 MCMs and the ReM functions,
// latency, register map and data formats. This design's choices: the
// parallel VME request bus, the fine-timing I2C address/data layout
// (address {3'b100, m[3:0], 1'b0}, data {letter[1:0], delay[5:0]}), the
// sources of the local trigger and of the playback start.
module ppm_top #(
  parameter int N_MCM        = 16,
  parameter int DERAND_DEPTH = 64,
  parameter int RATE_UNIT    = 3564,
  parameter int LED_LEN      = 4008000,
  parameter int TIMEOUT      = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ga,
  input  logic        mcm_absent [N_MCM],   // MCM position not populated
  // calorimeter side
  input  logic [9:0]  fadc     [4*N_MCM],
  input  logic        ext_bcid [4*N_MCM],
  // TTC
  input  logic        ttc_l1a,
  input  logic        ttc_bcr,
  input  logic        ttc_ecr,
  // VME
  input  logic        vme_req,
  input  logic [5:0]  vme_am,
  input  logic [31:0] vme_addr,
  input  logic        vme_write,
  input  logic [31:0] vme_wdata,
  output logic        vme_ack,
  output logic [31:0] vme_rdata,
  // real-time outputs
  output logic [8:0]  cp_link [N_MCM][2],
  output logic [9:0]  jep     [N_MCM],
  // DAQ output
  output logic        glink   [N_MCM],
  output logic        glink_dav,
  output logic [9:0]  glink_err [N_MCM],
  // monitoring
  output logic [19:0] rate       [4*N_MCM],
  output logic        rate_valid [4*N_MCM],
  // analog-input DACs (one SPI port per board)
  output logic        spi_sclk [4],
  output logic        spi_cs_n [4],
  output logic        spi_din  [4],
  // I2C (open drain)
  input  logic [3:0]  i2c_sda_in,
  output logic [3:0]  i2c_scl_oe,
  output logic [3:0]  i2c_sda_oe,
  // local trigger test pulse and indicators
  output logic        ext_pulse,
  output logic        led_vme,
  output logic        led_l1a,
  output logic        led_daq
);
  import ppm_pkg::*;
  localparam int MAP [4] = '{0, 3, 1, 2};   // DAC word / letter -> connector

  // ---------------- control ----------------
  logic [3:0]  b_mcm;
  logic [1:0]  b_ch;
  logic        b_cfg_we, b_glob_we, b_glob_pair, b_lut_we, b_ramp, b_pbm_we;
  logic [5:0]  b_cfg_addr;
  logic [31:0] b_wdata;
  logic [2:0]  b_glob_addr;
  logic [9:0]  b_lut_addr;
  logic [7:0]  b_lut_wdata;
  logic [7:0]  b_pbm_addr;
  logic [10:0] b_pbm_wdata;
  logic [31:0] m_cfg_rd [N_MCM], m_glob_rd [N_MCM];
  logic [7:0]  m_lut_rd [N_MCM];
  logic [10:0] m_pbm_rd [N_MCM];
  logic        dac_we, phos_we;
  logic [15:0] dac_wdata;
  logic [7:0]  phos_wdata;
  logic [2:0]  ro_mode;
  logic [7:0]  dav_gap;
  logic [63:0] chan_disable;
  logic [2:0]  mcm_control;
  logic        sync_playback;
  logic [31:0] lt_timing, lt_config, rem_error;
  logic        lt_start, local_bcr, local_ecr, daq_mode, cmd_rates, cmd_histos;
  logic [31:1] status;
  wire  [3:0]  sel_mcm = 4'(32'(b_mcm) % N_MCM);

  rem_vme_if u_vme (
    .clk, .rst_n, .ga,
    .req(vme_req), .am(vme_am), .addr(vme_addr), .write(vme_write),
    .wdata(vme_wdata), .ack(vme_ack), .rdata(vme_rdata),
    .mcm(b_mcm), .ch(b_ch),
    .cfg_we(b_cfg_we), .cfg_addr(b_cfg_addr), .cfg_wdata(b_wdata),
    .cfg_rdata(m_cfg_rd[sel_mcm]),
    .glob_we(b_glob_we), .glob_pair(b_glob_pair), .glob_addr(b_glob_addr),
    .glob_rdata(m_glob_rd[sel_mcm]),
    .lut_we(b_lut_we), .lut_addr(b_lut_addr), .lut_wdata(b_lut_wdata),
    .lut_rdata(m_lut_rd[sel_mcm]), .lut_ramp_load(b_ramp),
    .pbm_we(b_pbm_we), .pbm_addr(b_pbm_addr), .pbm_wdata(b_pbm_wdata),
    .pbm_rdata(m_pbm_rd[sel_mcm]),
    .dac_we, .dac_wdata, .phos_we, .phos_wdata,
    .ro_mode, .dav_gap, .chan_disable, .mcm_control, .sync_playback,
    .lt_timing, .lt_config, .lt_start, .local_bcr, .local_ecr,
    .daq_mode, .cmd_rates, .cmd_histos, .status, .error(rem_error)
  );

  // ---------------- timing signals ----------------
  logic       lt_l1a, lt_busy;
  logic [3:0] anin_trig;
  always_comb
    for (int b = 0; b < 4; b++) begin
      anin_trig[b] = 1'b0;
      for (int i = 16*b; i < 16*b + 16; i++)
        if (i < 4*N_MCM) anin_trig[b] |= ext_bcid[i];
    end

  rem_local_trigger u_lt (
    .clk, .rst_n, .timing(lt_timing), .config_r(lt_config), .start(lt_start),
    .anin_trig, .l1a(lt_l1a), .ext_pulse, .busy(lt_busy)
  );

  wire l1a = ttc_l1a | lt_l1a;
  wire bcr = ttc_bcr | local_bcr;
  wire ecr = ttc_ecr | local_ecr;

  logic [11:0] rem_bc;
  logic [23:0] rem_evt;
  ttc_counters u_cnt (.clk, .rst_n, .bcr, .ecr, .l1a, .bc(rem_bc), .evt(rem_evt));

  // ---------------- MCMs ----------------
  logic        ser [N_MCM][2];
  logic        m_af [N_MCM][4];
  logic        m_loss [N_MCM], m_pb [N_MCM], m_his [N_MCM];

  for (genvar m = 0; m < N_MCM; m++) begin : g_mcm
    logic [9:0]  f [4];
    logic        x [4];
    logic [7:0]  et_unused [4];
    logic [19:0] r [4];
    logic        rd [4];
    for (genvar i = 0; i < 4; i++) begin : g_in
      assign f[i] = fadc[4*m+i];
      assign x[i] = ext_bcid[4*m+i];
      assign rate[4*m+i] = r[i];
      assign rate_valid[4*m+i] = rd[i];
    end
    wire sel = (b_mcm == 4'(m));
    ppr_mcm #(.DERAND_DEPTH(DERAND_DEPTH), .RATE_UNIT(RATE_UNIT)) u_mcm (
      .clk, .rst_n, .fadc(f), .ext_bcid(x), .l1a, .bcr, .ecr, .sync_start(sync_playback),
      .cfg_we(b_cfg_we && sel), .cfg_ch(b_ch), .cfg_addr(b_cfg_addr),
      .cfg_wdata(b_wdata), .cfg_rdata(m_cfg_rd[m]),
      .glob_we(b_glob_we && sel), .glob_pair(b_glob_pair), .glob_addr(b_glob_addr),
      .glob_wdata(b_wdata), .glob_rdata(m_glob_rd[m]),
      .lut_we(b_lut_we && sel), .lut_addr(b_lut_addr), .lut_wdata(b_lut_wdata),
      .lut_rdata(m_lut_rd[m]), .lut_ramp_load(b_ramp && sel),
      .pbm_we(b_pbm_we && sel), .pbm_addr(b_pbm_addr), .pbm_wdata(b_pbm_wdata),
      .pbm_rdata(m_pbm_rd[m]),
      .cp_link(cp_link[m]), .jep(jep[m]), .ser_out(ser[m]), .et(et_unused),
      .rate(r), .rate_done(rd), .almost_full(m_af[m]),
      .data_loss(m_loss[m]), .pb_active(m_pb[m]), .his_active(m_his[m])
    );
  end

  // ---------------- readout merger ----------------
  logic [2:0]  n_lut;
  logic [3:0]  n_fadc;
  assign n_lut  = ro_nlut(ro_mode);
  assign n_fadc = ro_nfadc(ro_mode);

  logic        rx_valid [N_MCM][2], rx_err [N_MCM][2];
  logic [10:0] rx_lut  [N_MCM][4][MAX_LUT_SLICES];
  logic [10:0] rx_fadc [N_MCM][4][MAX_FADC_SLICES];
  logic [3:0]  rx_evt [N_MCM][4], rx_bc [N_MCM][4];
  logic        rx_loss [N_MCM][4];
  logic [3:0]  cdis [N_MCM];
  logic        present [N_MCM];

  for (genvar m = 0; m < N_MCM; m++) begin : g_rx
    assign cdis[m]    = (m < 16) ? chan_disable[4*(m%16) +: 4] : 4'd0;
    assign present[m] = !mcm_absent[m];
    for (genvar p = 0; p < 2; p++) begin : g_p
      logic [11:0] rb;
      logic        rbv;
      logic [10:0] lf [2][MAX_LUT_SLICES];
      logic [10:0] ff [2][MAX_FADC_SLICES];
      logic [3:0]  e4 [2], b4 [2];
      logic        ls [2];
      rem_sif_rx u_rx (
        .clk, .rst_n, .ser_in(ser[m][p]), .n_lut, .n_fadc,
        .rdbk(rb), .rdbk_valid(rbv), .rec_valid(rx_valid[m][p]),
        .rec_err(rx_err[m][p]), .lut_f(lf), .fadc_f(ff), .evt4(e4), .bc4(b4),
        .loss(ls)
      );
      for (genvar j = 0; j < 2; j++) begin : g_c
        assign rx_lut[m][2*p+j]  = lf[j];
        assign rx_fadc[m][2*p+j] = ff[j];
        assign rx_evt[m][2*p+j]  = e4[j];
        assign rx_bc[m][2*p+j]   = b4[j];
        assign rx_loss[m][2*p+j] = ls[j];
      end
    end
  end

  logic frame_start, q_overflow;
  rem_glink_formatter #(.N_MCM(N_MCM), .TIMEOUT(TIMEOUT)) u_fmt (
    .clk, .rst_n, .l1a, .bc(rem_bc), .evt(rem_evt[3:0]),
    .n_lut, .n_fadc, .gap_len(dav_gap),
    .chan_disable(cdis), .mcm_present(present),
    .rec_valid(rx_valid), .rec_err(rx_err), .lut_f(rx_lut), .fadc_f(rx_fadc),
    .evt4(rx_evt), .bc4(rx_bc), .loss(rx_loss),
    .glink, .dav(glink_dav), .frame_start, .frame_err(glink_err),
    .q_overflow
  );

  // ---------------- analog-input DACs and fine timing ----------------
  for (genvar b = 0; b < 4; b++) begin : g_spi
    logic busy, ovr;
    rem_spi_dac u_spi (
      .clk, .rst_n,
      .we(dac_we && b_mcm[3:2] == 2'(b)),
      .sel({b_mcm[1:0], 2'(MAP[b_ch])}), .wdata(dac_wdata),
      .sclk(spi_sclk[b]), .cs_n(spi_cs_n[b]), .din(spi_din[b]),
      .busy, .overrun(ovr)
    );
    assign status[23+b] = busy;
  end

  logic i2c_busy, i2c_nack, i2c_ovr;
  rem_i2c_write u_i2c (
    .clk, .rst_n, .we(phos_we),
    .cmd({2'd0, 3'b100, b_mcm, 1'b0, b_ch, phos_wdata[5:0]}),
    .ack_check(4'b1110), .sda_in(i2c_sda_in),
    .scl_oe(i2c_scl_oe), .sda_oe(i2c_sda_oe),
    .busy(i2c_busy), .nack(i2c_nack), .overrun(i2c_ovr)
  );

  // ---------------- status ----------------
  logic any_af, any_loss, any_pb, any_his;
  always_comb begin
    any_af = 1'b0; any_loss = 1'b0; any_pb = 1'b0; any_his = 1'b0;
    for (int m = 0; m < N_MCM; m++) begin
      any_loss |= m_loss[m]; any_pb |= m_pb[m]; any_his |= m_his[m];
      for (int c = 0; c < 4; c++) any_af |= m_af[m][c];
    end
  end
  // status register bits of the document; bits without a source here read 0
  assign status[13:1]  = '0;
  assign status[14]    = any_his;
  assign status[15]    = lt_busy;
  assign status[17:16] = mcm_control[2:1];
  assign status[19:18] = '0;
  assign status[20]    = !glink_dav;
  assign status[21]    = any_af;
  assign status[22]    = q_overflow | any_loss;
  assign status[27]    = i2c_busy;
  assign status[31:28] = '0;

  led_stretch #(.LEN(LED_LEN)) u_led_vme (.clk, .rst_n, .pulse(vme_ack), .led(led_vme));
  led_stretch #(.LEN(LED_LEN)) u_led_l1a (.clk, .rst_n, .pulse(l1a),     .led(led_l1a));
  led_stretch #(.LEN(LED_LEN)) u_led_daq (.clk, .rst_n, .pulse(daq_mode), .led(led_daq));
endmodule
