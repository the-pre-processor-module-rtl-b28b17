// ppr_channel - one trigger-tower processing channel of the PPrASIC.
//
// Turns the 10-bit FADC samples and the external-BCID discriminator bit of
// one calorimeter trigger tower into an 8-bit transverse energy attributed to
// a single bunch crossing, and keeps readout and monitoring data:
//   input stage   MSB inversion of the FADC code (unless disabled), edge
//                 shaping of the external BCID bit to one tick, and the two
//                 programmable synchronisation delays ("#BC delay" FIFOs);
//   playback      the 256-cell playback memory may replace the input;
//   BCID          FIR filter + peak finder, saturated-pulse BCID and the
//                 delayed external BCID, combined by the decision logic;
//   LUT           1024 x 8 energy calibration;
//   readout       pipeline memories and derandomizer (ppr_readout);
//   monitoring    rate meter and energy histogram.
// The 34 control registers CR0..CR33 live here, reset to their documented
// defaults and written/read over a simple register port (cfg_*). The LUT and
// playback/histogram memories have their own ports.
// Timing: an FADC sample sampled at clock edge t gives its LUT result at edge
// t + CH_LAT (9) with both synchronisation delays at zero; the default
// DelayExtBcid (6) and DelaySatBcid (2) align all three BCID methods.
// The chain of functions and all register fields follow the document; the
// register port, the pipeline register placement and hence the exact latency
// are this design's choices.
module ppr_channel #(
  parameter int DERAND_DEPTH = 64,
  parameter int RATE_UNIT    = 3564
) (
  input  logic        clk,
  input  logic        rst_n,
  // analog front end (digitised)
  input  logic [9:0]  fadc,
  input  logic        ext_bcid,
  // timing
  input  logic [11:0] bc,
  input  logic        l1a,
  input  logic [3:0]  evt4,
  input  logic        sync_start,
  input  logic        chan_id,
  // register port
  input  logic        cfg_we,
  input  logic [5:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  input  logic        lut_we,
  input  logic [9:0]  lut_addr,
  input  logic [7:0]  lut_wdata,
  output logic [7:0]  lut_rdata,
  input  logic        lut_ramp_load,
  output logic        lut_ramp_busy,
  input  logic        pbm_we,
  input  logic [7:0]  pbm_addr,
  input  logic [10:0] pbm_wdata,
  output logic [10:0] pbm_rdata,
  // real-time output
  output logic [7:0]  et,
  output logic [2:0]  et_bcid,        // {PB, SB, EB} of the slice in `et`
  // readout
  input  logic        ro_rd,
  output logic [12:0] ro_word,
  output logic        ro_empty,
  output logic        ro_almost_full,
  output logic        ro_loss,
  output logic [6:0]  ro_num_raw,     // slices per event, for the serial interface
  output logic [2:0]  ro_num_bcid,
  // monitoring
  output logic [19:0] rate,
  output logic [15:0] rate_time,
  output logic        rate_done,
  output logic        pb_active,
  output logic        his_active
);
  import ppm_pkg::*;

  logic [31:0] cr [N_CR];
  chan_cfg_t   c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_CR; i++) cr[i] <= cr_default(i);
    end else if (cfg_we && int'(cfg_addr) < N_CR) begin
      cr[cfg_addr] <= cfg_wdata;
    end
  end
  assign cfg_rdata = (int'(cfg_addr) < N_CR) ? cr[cfg_addr] : 32'd0;
  assign c = decode_cfg(cr);

  // input stage
  logic [9:0]  x_r;
  logic        ext_r, ext_prev, ext_sh;
  logic [9:0]  x_d;
  logic        ext_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_r <= '0; ext_r <= 1'b0; ext_prev <= 1'b0;
    end else begin
      x_r      <= c.inv_msb_disable ? fadc : {~fadc[9], fadc[8:0]};
      ext_r    <= ext_bcid;
      ext_prev <= ext_r;
    end
  end
  assign ext_sh = c.ext_edge_en ? (ext_r && !ext_prev) : ext_r;

  ppr_delay_line #(.W(10), .MAX_DELAY(15)) u_sync_data (
    .clk, .rst_n, .delay(c.sync_bypass_data ? 4'd0 : c.sync_delay_data), .d(x_r), .q(x_d));
  ppr_delay_line #(.W(1), .MAX_DELAY(15)) u_sync_bcid (
    .clk, .rst_n, .delay(c.sync_bypass_bcid ? 4'd0 : c.sync_delay_bcid), .d(ext_sh), .q(ext_d));

  // playback / histogram memory and injection
  logic [10:0] pb_word;
  logic [9:0]  s_r;
  logic        e_r;
  ppr_playback_histo u_pbm (
    .clk, .rst_n,
    .wr_en(pbm_we), .wr_addr(pbm_addr), .wr_data(pbm_wdata),
    .rd_addr(pbm_addr), .rd_data(pbm_rdata),
    .pb_enable(c.pb_enable), .pb_sync(c.pb_sync), .pb_oneshot(c.pb_oneshot),
    .pb_delay(c.pb_delay), .sync_start, .pb_active, .pb_word,
    .his_enable(c.his_enable), .his_source(c.his_source), .his_thresh(c.his_thresh),
    .his_lower_bc(c.his_lower_bc), .his_upper_bc(c.his_upper_bc), .bc,
    .fadc(s_r), .lut(et), .his_active);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_r <= '0; e_r <= 1'b0;
    end else begin
      s_r <= pb_active ? pb_word[9:0] : x_d;
      e_r <= pb_active ? pb_word[10]  : ext_d;
    end
  end

  // bunch-crossing identification
  logic [9:0] fir_e, fir_c, pk_e;
  logic       fir_sat;
  logic [10:0] pk_aux;
  logic       peak, sat_mark, sat_d, ext_al;
  ppr_fir_filter u_fir (
    .clk, .rst_n, .s(s_r), .coeff(c.fir_coeff), .start_bit(c.start_bit),
    .sat_level(c.sat_level), .energy(fir_e), .centre(fir_c), .saturated(fir_sat));
  ppr_peak_finder #(.AUX_W(11)) u_peak (
    .clk, .rst_n, .e(fir_e), .aux_in({fir_sat, fir_c}), .peak_cond(c.peak_cond),
    .peak, .e_out(pk_e), .aux_out(pk_aux));
  ppr_sat_bcid u_sat (
    .clk, .rst_n, .s(s_r), .sat_high(c.sat_high), .sat_low(c.sat_low), .mark(sat_mark));
  ppr_delay_line #(.W(1), .MAX_DELAY(3)) u_sat_dly (
    .clk, .rst_n, .delay(c.delay_sat_bcid), .d(sat_mark), .q(sat_d));
  ppr_delay_line #(.W(1), .MAX_DELAY(7)) u_ext_dly (
    .clk, .rst_n, .delay(c.delay_ext_bcid), .d(e_r), .q(ext_al));

  logic [9:0] dec_e;
  logic       force_sat;
  logic [2:0] dec_bits;
  ppr_bcid_decision u_dec (
    .clk, .rst_n, .energy(pk_e), .fadc(pk_aux[9:0]), .saturated(pk_aux[10]),
    .peak, .sat(sat_d), .ext(ext_al), .decision_src(c.decision_src),
    .e_low(c.e_low), .e_high(c.e_high), .dec_lut(c.dec_lut), .sat_override(c.sat_override),
    .e_out(dec_e), .force_sat, .bcid_bits(dec_bits));

  ppr_lut u_lut (
    .clk, .rst_n, .energy(dec_e), .force_sat, .bypass(c.bypass_lut), .sat_value(c.sat_value),
    .et, .wr_en(lut_we), .wr_addr(lut_addr), .wr_data(lut_wdata),
    .rd_addr(lut_addr), .rd_data(lut_rdata), .ramp_load(lut_ramp_load),
    .pedestal(c.lut_pedestal), .slope(c.lut_slope), .ramp_busy(lut_ramp_busy));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) et_bcid <= '0;
    else        et_bcid <= dec_bits;
  end

  // readout
  ppr_readout #(.FIFO_DEPTH(DERAND_DEPTH)) u_ro (
    .clk, .rst_n, .chan_id, .raw_in({e_r, s_r}), .bcid_in({et_bcid, et}),
    .pipe_delay_raw(c.pipe_delay_raw), .pipe_delay_bcid(c.pipe_delay_bcid),
    .num_raw(c.num_bc_raw), .num_bcid(c.num_bc_bcid), .af_mark(c.af_raw),
    .l1a, .evt(evt4), .bc(bc[3:0]), .rd_en(ro_rd), .dout(ro_word), .empty(ro_empty),
    .almost_full(ro_almost_full), .loss_seen(ro_loss));

  assign ro_num_raw  = c.num_bc_raw;
  assign ro_num_bcid = c.num_bc_bcid;

  // monitoring
  ppr_ratemeter #(.UNIT_TICKS(RATE_UNIT)) u_rate (
    .clk, .rst_n, .enable(c.rate_enable), .source(c.rate_source), .thresh(c.rate_thresh),
    .del_time(c.rate_del_time), .fadc(s_r), .lut(et), .rate, .rate_time, .done(rate_done));
endmodule
