// rem_vme_if - VME slave register interface of the module (ReM side).
//
// Accepts single A32/D32 accesses that the bus protocol logic has already
// turned into a one-tick request (`req`, address, modifier, direction, data)
// and answers with a one-tick `ack` carrying the read data. A request is
// taken only if A31:A28 = 0xC, A27:A23 equals the geographical address and
// the address modifier is one of 0x09, 0x0A, 0x0B, 0x0D, 0x0E, 0x0F;
// anything else is ignored (the bus master times out).
// Address map inside the 8 MB module space (byte addresses):
//   0x200000 + m*0x2000   MCM m (0..15):
//       +0x00..0x0C  analog-input DAC words of inputs 1,4,2,3 (SPI load)
//       +0x10..0x1C  fine-timing delay of channel A..D (I2C load)
//       +0x20..0x30  SIF0..SIF4 of pair (A,B); +0x40..0x50 of pair (C,D)
//       +0x60 + c*0x800  channel c (A..D):
//             +0x004..0x203  playback memory, two 11-bit cells per word
//                            (cell 2k in bits 10:0, cell 2k+1 in bits 26:16)
//             +0x21C         LUT load: a write starts the LUT ramp fill
//             +0x224..0x623  LUT, four 8-bit cells per word, lowest byte first
//             +0x624..0x6A8  control registers CR0..CR33
//   0x7FFF60 read-out setting (slices, mode 0..5), 0x7FFF64 G-Link DAV gap,
//   0x7FFF68/6C channel disable 1..32 / 33..64, 0x7FFF70 MCM control
//   (bit 0 starts synchronous playback, bits 2:1 stored, bit 3 reads 1), 0x7FFF80/84 local trigger timing/config,
//   0x7FFF88 local counter reset, 0x7FFFD0 firmware version, 0x7FFFD4
//   status, 0x7FFFD8 DAQ control, 0x7FFFDC control, 0x7FFFE0 command,
//   0x7FFFE4 error.
// Packed memory words are moved cell by cell on the MCM bus, one cell per
// tick, so such an access is acknowledged 3 (playback) or 5 (LUT) ticks
// after `req`; ASIC register reads after 2 ticks, all else after 1 tick.
// DAQ mode: a write of bit 0 to DAQ control sets or clears it. In DAQ mode
// writes to the ASICs, DACs, fine timing, read-out setting, DAV, channel
// disable, MCM control, local trigger and counter reset are refused and
// flag the matching bit of the error register (bits 0, 10-17, 19, 21);
// the error register clears when it is read.
// Follows the document: address decoding, modifiers, register addresses,
// packing of the memories, the DAQ-mode refusals. This design's choices: the
// one-tick request/ack bus, the direct MCM bus (the board passes ASIC set-up
// through the readout path), the meaning of LUT load, the playback start pulse on an MCM control write, the
// DAQ control clear, and clear-on-read of the error register.
module rem_vme_if #(
  parameter logic [31:0] VERSION = 32'h0002_0001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ga,
  // VME request
  input  logic        req,
  input  logic [5:0]  am,
  input  logic [31:0] addr,
  input  logic        write,
  input  logic [31:0] wdata,
  output logic        ack,
  output logic [31:0] rdata,
  // MCM bus (shared, `mcm` selects the module)
  output logic [3:0]  mcm,
  output logic [1:0]  ch,
  output logic        cfg_we,
  output logic [5:0]  cfg_addr,
  output logic [31:0] cfg_wdata,
  input  logic [31:0] cfg_rdata,
  output logic        glob_we,
  output logic        glob_pair,
  output logic [2:0]  glob_addr,
  input  logic [31:0] glob_rdata,
  output logic        lut_we,
  output logic [9:0]  lut_addr,
  output logic [7:0]  lut_wdata,
  input  logic [7:0]  lut_rdata,
  output logic        lut_ramp_load,
  output logic        pbm_we,
  output logic [7:0]  pbm_addr,
  output logic [10:0] pbm_wdata,
  input  logic [10:0] pbm_rdata,
  // analog input DACs and fine timing (write strobes with the new value)
  output logic        dac_we,
  output logic [15:0] dac_wdata,
  output logic        phos_we,
  output logic [7:0]  phos_wdata,
  // ReM registers
  output logic [2:0]  ro_mode,
  output logic [7:0]  dav_gap,
  output logic [63:0] chan_disable,
  output logic [2:0]  mcm_control,
  output logic        sync_playback,
  output logic [31:0] lt_timing,
  output logic [31:0] lt_config,
  output logic        lt_start,
  output logic        local_bcr,
  output logic        local_ecr,
  output logic        daq_mode,
  output logic        cmd_rates,
  output logic        cmd_histos,
  input  logic [31:1] status,
  output logic [31:0] error
);
  typedef enum logic [1:0] {V_IDLE, V_MEM, V_REG} vst_t;

  wire am_ok = (am == 6'h09) || (am == 6'h0A) || (am == 6'h0B) ||
               (am == 6'h0D) || (am == 6'h0E) || (am == 6'h0F);
  wire hit   = req && am_ok && addr[31:28] == 4'hC && addr[27:23] == ga;
  wire [22:0] a = addr[22:0];

  // MCM area decode
  wire        in_mcm  = a[22:17] == 6'b010000;            // 0x200000..0x21FFFF
  wire [12:0] mo      = a[12:0];                          // offset in the MCM
  wire        in_chan = mo >= 13'h060;
  wire [12:0] co      = mo - 13'h060;                     // offset in the channel area
  wire [10:0] c_off   = co[10:0];

  logic [15:0] dac_r  [16][4];
  logic [7:0]  phos_r [16][4];
  logic [6:1]  rem_ctrl;
  vst_t        st;
  logic [2:0]  k;          // step of a packed memory access
  logic        is_lut;     // packed access: LUT (4 cells) or playback (2 cells)
  logic        is_cr;      // register read: control register or SIF register
  logic        wr_l;
  logic [31:0] wd_l;
  logic [9:0]  base;
  wire  [2:0]  n_cells = is_lut ? 3'd4 : 3'd2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack <= 1'b0; rdata <= '0; mcm <= '0; ch <= '0;
      cfg_we <= 1'b0; cfg_addr <= '0; cfg_wdata <= '0;
      glob_we <= 1'b0; glob_pair <= 1'b0; glob_addr <= '0;
      lut_we <= 1'b0; lut_addr <= '0; lut_wdata <= '0; lut_ramp_load <= 1'b0;
      pbm_we <= 1'b0; pbm_addr <= '0; pbm_wdata <= '0;
      dac_we <= 1'b0; dac_wdata <= '0; phos_we <= 1'b0; phos_wdata <= '0;
      ro_mode <= 3'd1; dav_gap <= 8'd8; chan_disable <= '0; mcm_control <= '0; sync_playback <= 1'b0;
      lt_timing <= '0; lt_config <= '0; lt_start <= 1'b0; sync_playback <= 1'b0;
      local_bcr <= 1'b0; local_ecr <= 1'b0; daq_mode <= 1'b0;
      cmd_rates <= 1'b0; cmd_histos <= 1'b0; error <= '0; rem_ctrl <= '0;
      st <= V_IDLE; k <= '0; is_lut <= 1'b0; is_cr <= 1'b0;
      wr_l <= 1'b0; wd_l <= '0; base <= '0;
      for (int m = 0; m < 16; m++)
        for (int c = 0; c < 4; c++) begin dac_r[m][c] <= '0; phos_r[m][c] <= '0; end
    end else begin
      ack <= 1'b0;
      cfg_we <= 1'b0; glob_we <= 1'b0; lut_we <= 1'b0; pbm_we <= 1'b0;
      lut_ramp_load <= 1'b0; dac_we <= 1'b0; phos_we <= 1'b0; lt_start <= 1'b0; sync_playback <= 1'b0;
      local_bcr <= 1'b0; local_ecr <= 1'b0; cmd_rates <= 1'b0; cmd_histos <= 1'b0;
      unique case (st)
        V_IDLE: if (hit) begin
          logic d;
          d = write && daq_mode;
          ack <= 1'b1;                  // multi-tick accesses clear it below
          rdata <= '0;
          wr_l <= write; wd_l <= wdata;
          if (in_mcm) begin
            mcm <= a[16:13];
            if (!in_chan) begin
              if (mo[6:4] == 3'd0) begin                     // DAC words
                if (!write) rdata <= {16'd0, dac_r[a[16:13]][mo[3:2]]};
                else if (d) error[17] <= 1'b1;
                else begin
                  dac_r[a[16:13]][mo[3:2]] <= wdata[15:0];
                  dac_we <= 1'b1; dac_wdata <= wdata[15:0]; ch <= mo[3:2];
                end
              end else if (mo[6:4] == 3'd1) begin            // fine timing
                if (!write) rdata <= {24'd0, phos_r[a[16:13]][mo[3:2]]};
                else if (d) error[19] <= 1'b1;
                else begin
                  phos_r[a[16:13]][mo[3:2]] <= wdata[7:0];
                  phos_we <= 1'b1; phos_wdata <= wdata[7:0]; ch <= mo[3:2];
                end
              end else begin                                 // SIF registers
                glob_pair <= mo[6];
                glob_addr <= mo[4:2];
                cfg_wdata <= wdata;
                if (!write) begin ack <= 1'b0; is_cr <= 1'b0; st <= V_REG; end
                else if (d) error[0] <= 1'b1;
                else glob_we <= 1'b1;
              end
            end else begin
              ch <= co[12:11];
              cfg_wdata <= wdata;
              if (c_off >= 11'h624) begin                    // control registers
                cfg_addr <= 6'((c_off - 11'h624) >> 2);
                if (!write) begin ack <= 1'b0; is_cr <= 1'b1; st <= V_REG; end
                else if (d) error[0] <= 1'b1;
                else cfg_we <= 1'b1;
              end else if (c_off >= 11'h224) begin           // LUT, 4 cells per word
                base <= 10'(c_off - 11'h224) & 10'h3FC;
                if (d) error[0] <= 1'b1;
                else begin ack <= 1'b0; is_lut <= 1'b1; k <= '0; st <= V_MEM; end
              end else if (c_off == 11'h21C) begin           // LUT ramp load
                if (d) error[0] <= 1'b1;
                else if (write) lut_ramp_load <= 1'b1;
              end else if (c_off >= 11'h004 && c_off < 11'h204) begin  // playback
                base <= {2'b00, 8'((c_off - 11'h004) >> 1) & 8'hFE};
                if (d) error[0] <= 1'b1;
                else begin ack <= 1'b0; is_lut <= 1'b0; k <= '0; st <= V_MEM; end
              end
            end
          end else if (a[22:8] == 15'h7FFF) begin           // ReM registers
            unique case (a[7:0])
              8'h60: if (!write) rdata <= {29'd0, ro_mode};
                     else if (d) error[13] <= 1'b1; else ro_mode <= wdata[2:0];
              8'h64: if (!write) rdata <= {24'd0, dav_gap};
                     else if (d) error[14] <= 1'b1; else dav_gap <= wdata[7:0];
              8'h68: if (!write) rdata <= chan_disable[31:0];
                     else if (d) error[15] <= 1'b1; else chan_disable[31:0] <= wdata;
              8'h6C: if (!write) rdata <= chan_disable[63:32];
                     else if (d) error[16] <= 1'b1; else chan_disable[63:32] <= wdata;
              8'h70: if (!write) rdata <= {27'd0, 2'b01, mcm_control};
                     else if (d) error[21] <= 1'b1;
                     else begin mcm_control <= wdata[2:0]; sync_playback <= wdata[0]; end
              8'h80: if (!write) rdata <= lt_timing;
                     else if (d) error[10] <= 1'b1;
                     else begin lt_timing <= wdata; lt_start <= wdata[15] | wdata[31]; end
              8'h84: if (!write) rdata <= lt_config;
                     else if (d) error[11] <= 1'b1; else lt_config <= wdata;
              8'h88: if (d) error[12] <= 1'b1;
                     else if (write) begin local_bcr <= wdata[0]; local_ecr <= wdata[1]; end
              8'hD0: rdata <= VERSION;
              8'hD4: rdata <= {status, daq_mode};
              8'hD8: if (!write) rdata <= {31'd0, daq_mode}; else daq_mode <= wdata[0];
              8'hDC: if (!write) rdata <= {25'd0, rem_ctrl, daq_mode};
                     else rem_ctrl <= wdata[6:1];
              8'hE0: if (write) begin cmd_rates <= wdata[0]; cmd_histos <= wdata[1]; end
              8'hE4: if (!write) begin rdata <= error; error <= '0; end
              default: ;
            endcase
          end
        end
        // packed memory word: step k drives cell k (k < n_cells) and collects
        // the read data of cell k-1, which the bus presents one tick later
        V_MEM: begin
          if (k < n_cells) begin
            if (is_lut) begin
              lut_addr <= base + 10'(k);
              lut_wdata <= wd_l[8*k[1:0] +: 8];
              lut_we <= wr_l;
            end else begin
              pbm_addr <= base[7:0] + 8'(k);
              pbm_wdata <= k[0] ? wd_l[26:16] : wd_l[10:0];
              pbm_we <= wr_l;
            end
          end
          if (k != '0) begin
            logic [1:0] kp;
            kp = k[1:0] - 2'd1;
            if (is_lut) rdata[8*kp +: 8] <= lut_rdata;
            else if (k == 3'd1) rdata[10:0] <= pbm_rdata;
            else rdata[26:16] <= pbm_rdata;
          end
          if (k == n_cells) begin st <= V_IDLE; ack <= 1'b1; end
          k <= k + 3'd1;
        end
        V_REG: begin
          st <= V_IDLE; ack <= 1'b1;
          rdata <= is_cr ? cfg_rdata : glob_rdata;
        end
        default: st <= V_IDLE;
      endcase
    end
  end
endmodule
