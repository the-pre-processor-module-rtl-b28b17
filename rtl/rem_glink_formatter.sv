// rem_glink_formatter - builds the ReM's DAQ frames: one serial G-Link bit
// line per MCM, all lines framed together, one frame per level-1 accept.
//
// How it works: every L1A pushes the ReM's own bunch number and event number
// into a queue (8 deep). For the oldest entry the formatter waits until every
// present MCM has delivered both channel-pair records (rem_sif_rx outputs,
// `rec_valid`), or until TIMEOUT ticks have passed, then copies the records
// into a frame buffer and sends the frame with `dav` high. Line m carries,
// one bit per tick:
//   1 bit   bunch-number bit (line m < 12 sends bc[m], others 0)
//   4 x 11*(n_lut+n_fadc) bits: channels A, B, C, D; per channel the LUT
//           fields 1..n_lut then the FADC fields 1..n_fadc, each 11 bits,
//           least significant bit first
//   10 bits error field, bit 0 first:
//           0..3 CD channel A..D disabled, 4 MA MCM absent, 5 TO time-out,
//           6 AFF derandomiser full (loss flag of a header), 7 ENM event
//           number mismatch, 8 BNM bunch number mismatch, 9 RFC record
//           format error or record overrun
//   1 bit   GP, even parity over the frame of this line
// The frame is 4*11*(n_lut+n_fadc) + 12 ticks long. After it `dav` stays low
// for at least `gap_len` + 2 ticks before the next frame.
// Data of disabled channels or missing records are sent as zeros.
// Interface: records are sampled from the receivers when the frame is
// latched, so a receiver must not complete two records for one pair between
// frames (an overrun is flagged as RFC). `frame_start` pulses when a frame
// is latched; `frame_err` holds the error fields of the latest frame.
// Each pair has a single record slot, and a record (about 28 ticks per slice
// pair) arrives faster than a frame is sent (44 ticks per slice pair), so
// accepts must on average be spaced by at least one frame; a burst closer
// than that overruns the slot and is flagged, it is not buffered.
// Follows the document: the frame content, field layouts, read-out modes,
// the BC bit and the error/parity bits. This design's choices: the order of
// the error bits, the queue depth, the time-out and the zero fill.
module rem_glink_formatter #(
  parameter int N_MCM   = 16,
  parameter int TIMEOUT = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        l1a,
  input  logic [11:0] bc,
  input  logic [3:0]  evt,       // low bits of the ReM event number
  input  logic [2:0]  n_lut,
  input  logic [3:0]  n_fadc,
  input  logic [7:0]  gap_len,
  input  logic [3:0]  chan_disable [N_MCM],
  input  logic        mcm_present  [N_MCM],
  // receiver records, channel letters 0 = A .. 3 = D (pair = letter / 2)
  input  logic        rec_valid [N_MCM][2],
  input  logic        rec_err   [N_MCM][2],
  input  logic [10:0] lut_f  [N_MCM][4][ppm_pkg::MAX_LUT_SLICES],
  input  logic [10:0] fadc_f [N_MCM][4][ppm_pkg::MAX_FADC_SLICES],
  input  logic [3:0]  evt4 [N_MCM][4],
  input  logic [3:0]  bc4  [N_MCM][4],
  input  logic        loss [N_MCM][4],
  // G-Link side
  output logic        glink [N_MCM],
  output logic        dav,
  output logic        frame_start,
  output logic [9:0]  frame_err [N_MCM],
  output logic        q_overflow
);
  import ppm_pkg::*;
  localparam int QD = 8;
  typedef enum logic [1:0] {F_IDLE, F_SEND, F_GAP} fst_t;
  typedef enum logic [1:0] {G_BC, G_DATA, G_ERR, G_PAR} seg_t;

  // ---- L1A queue ----
  logic [15:0] q [QD];
  logic [2:0]  q_wp, q_rp;
  logic [3:0]  q_n;
  logic        q_pop;
  wire         q_push = l1a && (q_n != 4'(QD));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_wp <= '0; q_rp <= '0; q_n <= '0; q_overflow <= 1'b0;
      for (int i = 0; i < QD; i++) q[i] <= '0;
    end else begin
      if (q_push) begin q[q_wp] <= {evt, bc}; q_wp <= q_wp + 3'd1; end
      if (l1a && !q_push) q_overflow <= 1'b1;
      if (q_pop) q_rp <= q_rp + 3'd1;
      q_n <= q_n + 4'(q_push) - 4'(q_pop);
    end
  end
  wire [11:0] h_bc  = q[q_rp][11:0];
  wire [3:0]  h_evt = q[q_rp][15:12];

  // ---- record bookkeeping ----
  logic got [N_MCM][2];
  logic ovf [N_MCM][2];
  logic all_got;
  always_comb begin
    all_got = 1'b1;
    for (int m = 0; m < N_MCM; m++)
      if (mcm_present[m] && !(got[m][0] && got[m][1])) all_got = 1'b0;
  end

  fst_t        st;
  seg_t        seg;
  logic [1:0]  ch_i;
  logic [4:0]  f_i;
  logic [3:0]  b_i;
  logic [7:0]  gap_cnt;
  logic [$clog2(TIMEOUT+1)-1:0] tmo;
  logic [11:0] fr_bc;
  logic [10:0] fr_lut  [N_MCM][4][MAX_LUT_SLICES];
  logic [10:0] fr_fadc [N_MCM][4][MAX_FADC_SLICES];
  logic        par [N_MCM];
  wire  [4:0]  n_fields = 5'(n_lut) + 5'(n_fadc);
  wire         latch = (st == F_IDLE) && (q_n != '0) &&
                       (all_got || 32'(tmo) >= TIMEOUT);
  assign q_pop = latch;

  // bit of line m in the current position
  function automatic logic line_bit(int m, seg_t s, logic [1:0] c, logic [4:0] f,
                                    logic [3:0] b, logic [3:0] e);
    logic [10:0] fld;
    if (f < 5'(n_lut)) fld = fr_lut[m][c][3'(f)];
    else               fld = fr_fadc[m][c][4'(f - 5'(n_lut))];
    unique case (s)
      G_BC:   return (m < 12) ? fr_bc[m % 12] : 1'b0;
      G_DATA: return fld[b];
      G_ERR:  return frame_err[m][e];
      default: return 1'b0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= F_IDLE; seg <= G_BC; ch_i <= '0; f_i <= '0; b_i <= '0;
      gap_cnt <= '0; tmo <= '0; fr_bc <= '0; dav <= 1'b0; frame_start <= 1'b0;
      for (int m = 0; m < N_MCM; m++) begin
        glink[m] <= 1'b0; par[m] <= 1'b0; frame_err[m] <= '0;
        for (int p = 0; p < 2; p++) begin got[m][p] <= 1'b0; ovf[m][p] <= 1'b0; end
        for (int c = 0; c < 4; c++) begin
          for (int i = 0; i < MAX_LUT_SLICES; i++)  fr_lut[m][c][i]  <= '0;
          for (int i = 0; i < MAX_FADC_SLICES; i++) fr_fadc[m][c][i] <= '0;
        end
      end
    end else begin
      frame_start <= 1'b0;
      // time-out counter runs while an event waits
      if (st == F_IDLE && q_n != '0 && !latch) begin
        if (32'(tmo) < TIMEOUT) tmo <= tmo + 1'b1;
      end else tmo <= '0;

      // records arriving
      for (int m = 0; m < N_MCM; m++)
        for (int p = 0; p < 2; p++)
          if (latch) begin
            got[m][p] <= rec_valid[m][p];
            ovf[m][p] <= 1'b0;
          end else if (rec_valid[m][p]) begin
            if (got[m][p]) ovf[m][p] <= 1'b1;
            got[m][p] <= 1'b1;
          end

      unique case (st)
        F_IDLE: if (latch) begin
          fr_bc <= h_bc;
          frame_start <= 1'b1;
          for (int m = 0; m < N_MCM; m++) begin
            logic [9:0] e;
            e = '0;
            e[3:0] = chan_disable[m];
            e[4]   = !mcm_present[m];
            for (int c = 0; c < 4; c++) begin
              logic ok;
              ok = mcm_present[m] && got[m][c/2] && !chan_disable[m][c];
              for (int i = 0; i < MAX_LUT_SLICES; i++)  fr_lut[m][c][i]  <= ok ? lut_f[m][c][i]  : '0;
              for (int i = 0; i < MAX_FADC_SLICES; i++) fr_fadc[m][c][i] <= ok ? fadc_f[m][c][i] : '0;
              if (mcm_present[m] && got[m][c/2]) begin
                if (loss[m][c])              e[6] = 1'b1;
                if (evt4[m][c] != h_evt) e[7] = 1'b1;
                if (bc4[m][c]  != h_bc[3:0])  e[8] = 1'b1;
              end
            end
            for (int p = 0; p < 2; p++) begin
              if (mcm_present[m] && !got[m][p]) e[5] = 1'b1;
              if (mcm_present[m] && got[m][p] && (rec_err[m][p] || ovf[m][p])) e[9] = 1'b1;
            end
            frame_err[m] <= e;
            par[m] <= 1'b0;
          end
          seg <= G_BC; ch_i <= '0; f_i <= '0; b_i <= '0;
          st <= F_SEND;
        end
        F_SEND: begin
          dav <= 1'b1;
          for (int m = 0; m < N_MCM; m++) begin
            logic bt;
            bt = (seg == G_PAR) ? par[m] : line_bit(m, seg, ch_i, f_i, b_i, b_i);
            glink[m] <= bt;
            par[m]   <= par[m] ^ bt;
          end
          unique case (seg)
            G_BC: seg <= (n_fields == '0) ? G_ERR : G_DATA;
            G_DATA: begin
              if (b_i == 4'd10) begin
                b_i <= '0;
                if (f_i + 5'd1 == n_fields) begin
                  f_i <= '0;
                  if (ch_i == 2'd3) seg <= G_ERR;
                  ch_i <= ch_i + 2'd1;
                end else f_i <= f_i + 5'd1;
              end else b_i <= b_i + 4'd1;
            end
            G_ERR: begin
              if (b_i == 4'd9) begin b_i <= '0; seg <= G_PAR; end
              else b_i <= b_i + 4'd1;
            end
            G_PAR: begin
              st <= F_GAP;
              gap_cnt <= (gap_len == '0) ? 8'd1 : gap_len;
            end
          endcase
        end
        F_GAP: begin
          dav <= 1'b0;
          for (int m = 0; m < N_MCM; m++) glink[m] <= 1'b0;
          if (gap_cnt == 8'd1) st <= F_IDLE;
          gap_cnt <= gap_cnt - 8'd1;
        end
        default: st <= F_IDLE;
      endcase
    end
  end
endmodule
