// ppr_mcm - one pre-processor multi-chip module: four channels and their
// real-time and readout outputs.
//
// The four analog inputs arrive in connector order 1..4 and are re-ordered
// for the trigger geometry: A = input 1, B = input 4, C = input 2, D = input 3,
// so that the BC-multiplexed pairs (A,B) and (C,D) are neighbours along the
// azimuth. Each MCM produces
//   - two cluster-processor link words, pair (A,B) on link a, (C,D) on link b
//     (ppr_bcmux, 9 bits {M, Et} per tick);
//   - one 10-bit jet element, the sum of all four energies (ppr_jet_sum);
//   - two serial readout lines, one per channel pair (ppr_sif_tx).
// The ASIC's own bunch and event counters (ttc_counters) stamp the readout
// headers. Per channel pair the five "global" registers SIF0..SIF4 are kept
// here; SIF3 (BC-mux bypass and channel select) is used, the others are
// stored and read back only. Configuration ports address a channel by its
// letter (0 = A .. 3 = D).
// Timing: the link words leave 1 tick and the jet element 2 ticks after the
// LUT results (CH_LAT + 1 and CH_LAT + 2 after the FADC sample).
// The re-ordering, the pairs, the adder and the three outputs follow the
// document; the configuration ports are this design's.
module ppr_mcm #(
  parameter int DERAND_DEPTH = 64,
  parameter int RATE_UNIT    = 3564
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [9:0]  fadc [4],        // connector order 1..4
  input  logic        ext_bcid [4],
  input  logic        l1a,
  input  logic        bcr,
  input  logic        ecr,
  input  logic        sync_start,
  // configuration
  input  logic        cfg_we,
  input  logic [1:0]  cfg_ch,
  input  logic [5:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  input  logic        glob_we,
  input  logic        glob_pair,
  input  logic [2:0]  glob_addr,
  input  logic [31:0] glob_wdata,
  output logic [31:0] glob_rdata,
  input  logic        lut_we,
  input  logic [9:0]  lut_addr,
  input  logic [7:0]  lut_wdata,
  output logic [7:0]  lut_rdata,
  input  logic        lut_ramp_load,
  input  logic        pbm_we,
  input  logic [7:0]  pbm_addr,
  input  logic [10:0] pbm_wdata,
  output logic [10:0] pbm_rdata,
  // outputs
  output logic [8:0]  cp_link [2],
  output logic [9:0]  jep,
  output logic        ser_out [2],
  output logic [7:0]  et [4],          // per channel letter, for monitoring
  output logic [19:0] rate [4],
  output logic        rate_done [4],
  output logic        almost_full [4],
  output logic        data_loss,
  output logic        pb_active,
  output logic        his_active
);
  localparam int MAP [4] = '{0, 3, 1, 2};   // letter -> connector index

  logic [11:0] bc;
  logic [23:0] evt;
  ttc_counters u_cnt (.clk, .rst_n, .bcr, .ecr, .l1a, .bc, .evt);

  // global registers per pair
  logic [31:0] sif [2][5];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 2; p++)
        for (int r = 0; r < 5; r++)
          sif[p][r] <= (r == 2) ? 32'd3 : (r == 3) ? 32'd2 : 32'd0;
    end else if (glob_we && glob_addr < 3'd5) begin
      sif[glob_pair][glob_addr] <= glob_wdata;
    end
  end
  assign glob_rdata = (glob_addr < 3'd5) ? sif[glob_pair][glob_addr] : 32'd0;

  logic [31:0] c_rd [4];
  logic [7:0]  l_rd [4];
  logic [10:0] p_rd [4];
  logic [2:0]  bits [4];
  logic [12:0] ro_word [4];
  logic        ro_empty [4], ro_rd [4], ro_loss [4];
  logic        rbusy [4], pba [4], hisa [4];
  logic [15:0] rtime [4];
  logic [6:0]  nraw [4];
  logic [2:0]  nbcid [4];

  for (genvar i = 0; i < 4; i++) begin : g_ch
    ppr_channel #(.DERAND_DEPTH(DERAND_DEPTH), .RATE_UNIT(RATE_UNIT)) u_ch (
      .clk, .rst_n,
      .fadc(fadc[MAP[i]]), .ext_bcid(ext_bcid[MAP[i]]),
      .bc, .l1a, .evt4(evt[3:0]), .sync_start, .chan_id(1'(i % 2)),
      .cfg_we(cfg_we && cfg_ch == 2'(i)), .cfg_addr, .cfg_wdata, .cfg_rdata(c_rd[i]),
      .lut_we(lut_we && cfg_ch == 2'(i)), .lut_addr, .lut_wdata, .lut_rdata(l_rd[i]),
      .lut_ramp_load(lut_ramp_load && cfg_ch == 2'(i)), .lut_ramp_busy(rbusy[i]),
      .pbm_we(pbm_we && cfg_ch == 2'(i)), .pbm_addr, .pbm_wdata, .pbm_rdata(p_rd[i]),
      .et(et[i]), .et_bcid(bits[i]),
      .ro_rd(ro_rd[i]), .ro_word(ro_word[i]), .ro_empty(ro_empty[i]),
      .ro_almost_full(almost_full[i]), .ro_loss(ro_loss[i]),
      .ro_num_raw(nraw[i]), .ro_num_bcid(nbcid[i]),
      .rate(rate[i]), .rate_time(rtime[i]), .rate_done(rate_done[i]),
      .pb_active(pba[i]), .his_active(hisa[i]));
  end

  assign cfg_rdata  = c_rd[cfg_ch];
  assign lut_rdata  = l_rd[cfg_ch];
  assign pbm_rdata  = p_rd[cfg_ch];
  assign data_loss  = ro_loss[0] | ro_loss[1] | ro_loss[2] | ro_loss[3];
  assign pb_active  = pba[0] | pba[1] | pba[2] | pba[3];
  assign his_active = hisa[0] | hisa[1] | hisa[2] | hisa[3];

  // BC-mux: pair (A,B) -> link a, pair (C,D) -> link b
  for (genvar p = 0; p < 2; p++) begin : g_pair
    logic [6:0]  nr [2];
    logic [2:0]  nb [2];
    logic [12:0] w  [2];
    logic        e  [2], af [2], rd [2];
    logic        busy;
    ppr_bcmux u_mux (
      .clk, .rst_n, .pair_phase(!bc[0]), .a(et[2*p]), .b(et[2*p+1]),
      .bypass(sif[p][3][2]), .chan_sel(sif[p][3][3]), .link(cp_link[p]));
    for (genvar j = 0; j < 2; j++) begin : g_c
      assign nr[j] = nraw[2*p+j];
      assign nb[j] = nbcid[2*p+j];
      assign w[j]  = ro_word[2*p+j];
      assign e[j]  = ro_empty[2*p+j];
      assign af[j] = almost_full[2*p+j];
      assign ro_rd[2*p+j] = rd[j];
    end
    ppr_sif_tx u_sif (
      .clk, .rst_n, .num_raw(nr), .num_bcid(nb), .word(w), .empty(e),
      .almost_full(af), .rd, .ser_out(ser_out[p]), .busy);
  end

  ppr_jet_sum u_jet (.clk, .rst_n, .et, .jet(jep));
endmodule
