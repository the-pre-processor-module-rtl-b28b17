// ppm_pkg - types and constants shared by the Pre-Processor Module RTL.
//
// The Pre-Processor Module (PPM) digitises 64 calorimeter trigger towers, runs
// one processing channel per tower (bunch-crossing identification, energy
// look-up table, readout pipelines) on 16 multi-chip modules (MCMs) of four
// channels each, and merges event readout for a G-Link to the readout driver.
// This package holds the widths the whole design agrees on, the per-channel
// control-register file (34 registers of 32 bits, CR0..CR33) with its
// power-up defaults, and the decoded configuration record the channel logic
// uses. Register numbers, bit positions and default values follow the
// register definition table of the module; where that table is silent on the
// meaning of a field, the decoding below is this design's own choice and is
// noted at the field.
package ppm_pkg;

  localparam int FADC_W     = 10;   // FADC sample width
  localparam int LUT_W      = 8;    // calibrated Et from the look-up table
  localparam int JET_W      = 10;   // 4-cell jet element sum
  localparam int WORD_W     = 13;   // serial-interface readout word
  localparam int FIELD_W    = 11;   // G-Link data field
  localparam int BC_W       = 12;   // bunch-crossing number
  localparam int EVT_W      = 24;   // level-1 event number
  localparam int N_CR       = 34;   // channel control registers CR0..CR33
  localparam int CH_PER_MCM = 4;
  localparam int MAX_LUT_SLICES  = 7;    // LUT/BCID slices per event (3-bit field)
  localparam int MAX_FADC_SLICES = 15;   // largest read-out mode of the ReM
  localparam int ERR_W      = 10;   // G-Link error field

  // Ticks from an FADC sample at the channel input to its LUT result, with
  // both synchronisation delays at zero (see ppr_channel).
  localparam int CH_LAT     = 9;

  typedef logic [31:0] cr_file_t [N_CR];

  // Decoded channel configuration.
  typedef struct packed {
    logic        bypass_lut;        // CR0[3]
    logic        inv_msb_disable;   // CR0[4]
    logic        ext_edge_en;       // CR0[5]
    logic [6:0]  pipe_delay_bcid;   // CR1
    logic [6:0]  pipe_delay_raw;    // CR2
    logic [3:0]  sync_delay_bcid;   // CR3[3:0]
    logic [3:0]  sync_delay_data;   // CR3[7:4]
    logic        sync_bypass_bcid;  // CR3[8]
    logic        sync_bypass_data;  // CR3[9]
    logic [4:0][3:0] fir_coeff;     // CR4..CR6, [0] = coefficient #1 (oldest sample)
    logic [9:0]  sat_high;          // CR7
    logic [9:0]  sat_low;           // CR8
    logic [9:0]  sat_level;         // CR9
    logic [9:0]  e_low;             // CR10
    logic [9:0]  e_high;            // CR11
    logic [2:0][7:0] dec_lut;       // CR12..CR14: [0] high, [1] middle, [2] low
    logic [2:0]  sat_override;      // CR12..CR14 bit 8
    logic [2:0]  start_bit;         // CR15[2:0]
    logic        peak_cond;         // CR15[3]
    logic [2:0]  delay_ext_bcid;    // CR15[6:4]
    logic        decision_src;      // CR15[7]  0: FADC, 1: FIR result
    logic [1:0]  delay_sat_bcid;    // CR15[9:8]
    logic [6:0]  num_bc_raw;        // CR16[6:0]
    logic [2:0]  num_bc_bcid;       // CR16[9:7]
    logic        rate_enable;       // CR17[0]
    logic        rate_source;       // CR17[1]  0: FADC, 1: LUT
    logic        his_enable;        // CR17[2]
    logic        his_source;        // CR17[3]  0: FADC, 1: LUT
    logic [9:0]  rate_thresh;       // CR18
    logic [15:0] rate_del_time;     // CR20:CR19
    logic [7:0]  his_thresh;        // CR21
    logic [11:0] his_lower_bc;      // CR23:CR22
    logic [11:0] his_upper_bc;      // CR25:CR24
    logic [9:0]  lut_pedestal;      // CR26
    logic [10:0] lut_slope;         // CR27
    logic        pb_enable;         // CR28[0]
    logic        pb_sync;           // CR28[1]
    logic        pb_oneshot;        // CR28[2]
    logic [15:0] pb_delay;          // CR29:CR30 (CR29 upper byte)
    logic [6:0]  af_raw;            // CR31
    logic [6:0]  af_bcid;           // CR32
    logic [7:0]  sat_value;         // CR33
  } chan_cfg_t;

  // Power-up value of control register n (decimal defaults of the register table).
  function automatic logic [31:0] cr_default(int n);
    case (n)
      0:  return 32'b10_1011;       // InBcidNegedge=1, InDataNegedge=1, BypassLut=1, ExtBcidEdgeEnable=1
      1:  return 32'd10;
      2:  return 32'd10;
      5:  return 32'd1;             // FIRCoeff3 = 1
      7:  return 32'd767;
      8:  return 32'd255;
      9:  return 32'd1023;
      10: return 32'd511;
      11: return 32'd895;
      12: return 32'd254;
      13: return 32'd250;
      14: return 32'd240;
      15: return (32'd6 << 4) | (32'd2 << 8);
      16: return 32'd5 | (32'd1 << 7);  // 5 FADC slices, 1 LUT slice (see README)
      17: return 32'd1 << 4;         // HisOpMode = 1
      18: return 32'd32;
      19: return 32'd20;
      20: return 32'd5;
      21: return 32'd32;
      22: return 32'd1;
      24: return 32'd37;
      25: return 32'd53;
      27: return 32'd256;
      31: return 32'd16;
      32: return 32'd16;
      33: return 32'd255;
      default: return 32'd0;
    endcase
  endfunction

  function automatic chan_cfg_t decode_cfg(cr_file_t r);
    chan_cfg_t c;
    c.bypass_lut       = r[0][3];
    c.inv_msb_disable  = r[0][4];
    c.ext_edge_en      = r[0][5];
    c.pipe_delay_bcid  = r[1][6:0];
    c.pipe_delay_raw   = r[2][6:0];
    c.sync_delay_bcid  = r[3][3:0];
    c.sync_delay_data  = r[3][7:4];
    c.sync_bypass_bcid = r[3][8];
    c.sync_bypass_data = r[3][9];
    c.fir_coeff[0]     = r[4][3:0];
    c.fir_coeff[1]     = r[4][7:4];
    c.fir_coeff[2]     = r[5][3:0];
    c.fir_coeff[3]     = r[6][3:0];
    c.fir_coeff[4]     = r[6][7:4];
    c.sat_high         = r[7][9:0];
    c.sat_low          = r[8][9:0];
    c.sat_level        = r[9][9:0];
    c.e_low            = r[10][9:0];
    c.e_high           = r[11][9:0];
    c.dec_lut[0]       = r[12][7:0];
    c.dec_lut[1]       = r[13][7:0];
    c.dec_lut[2]       = r[14][7:0];
    c.sat_override     = {r[14][8], r[13][8], r[12][8]};
    c.start_bit        = r[15][2:0];
    c.peak_cond        = r[15][3];
    c.delay_ext_bcid   = r[15][6:4];
    c.decision_src     = r[15][7];
    c.delay_sat_bcid   = r[15][9:8];
    c.num_bc_raw       = r[16][6:0];
    c.num_bc_bcid      = r[16][9:7];
    c.rate_enable      = r[17][0];
    c.rate_source      = r[17][1];
    c.his_enable       = r[17][2];
    c.his_source       = r[17][3];
    c.rate_thresh      = r[18][9:0];
    c.rate_del_time    = {r[20][7:0], r[19][7:0]};
    c.his_thresh       = r[21][7:0];
    c.his_lower_bc     = {r[23][5:0], r[22][5:0]};
    c.his_upper_bc     = {r[25][5:0], r[24][5:0]};
    c.lut_pedestal     = r[26][9:0];
    c.lut_slope        = r[27][10:0];
    c.pb_enable        = r[28][0];
    c.pb_sync          = r[28][1];
    c.pb_oneshot       = r[28][2];
    c.pb_delay         = {r[29][7:0], r[30][7:0]};
    c.af_raw           = r[31][6:0];
    c.af_bcid          = r[32][6:0];
    c.sat_value        = r[33][7:0];
    return c;
  endfunction

  // Read-out word builders (13-bit serial-interface words).
  function automatic logic [12:0] w_rdbk(logic [11:0] v);
    return {1'b0, v};
  endfunction
  function automatic logic [12:0] w_head(logic ch, logic loss, logic hdr_only,
                                         logic [3:0] evt, logic [3:0] bc);
    return {2'b10, ch, loss, hdr_only, evt, bc};
  endfunction
  function automatic logic [12:0] w_lut(logic pb, logic sb, logic eb, logic [7:0] v);
    return {2'b10, pb, sb, eb, v};
  endfunction
  function automatic logic [12:0] w_fadc(logic eb, logic [9:0] v);
    return {2'b11, eb, v};
  endfunction

  // Read-out modes of the ReM (RO_Config register, bits 2:0).
  function automatic logic [3:0] ro_nfadc(logic [2:0] mode);
    case (mode)
      3'd0: return 4'd3;   3'd1: return 4'd5;   3'd2: return 4'd7;
      3'd3: return 4'd9;   3'd4: return 4'd11;  3'd5: return 4'd15;
      default: return 4'd5;
    endcase
  endfunction
  function automatic logic [2:0] ro_nlut(logic [2:0] mode);
    case (mode)
      3'd3: return 3'd3;   3'd4: return 3'd5;
      default: return 3'd1;
    endcase
  endfunction

endpackage
