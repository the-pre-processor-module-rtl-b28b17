// rem_sif_rx - ReM receiver of one PPrASIC serial interface (a channel pair).
//
// Deserialises the 13-bit words of the line (idle low, start bit '1', MSB
// first) and parses the readout record the ASIC sends per level-1 accept:
// one read-back word, then for each of the two channels a header and its LUT
// and FADC words. The read-back word is stripped off and handed on separately
// (`rdbk`, `rdbk_valid`); the event data are unpacked into G-Link fields:
//   LUT field  {PB, SB, EB, Et[7:0]}     FADC field {FADC[9:0], EB}
// The expected numbers of slices are the ReM's read-out setting (`n_lut`,
// `n_fadc`); a header with its H bit set carries no slices. When the second
// channel is complete `rec_valid` pulses and the record stays on the outputs
// until the next one completes. A word of the wrong kind sets `rec_err` in the
// record; a read-back word always restarts parsing.
// The word formats and the stripping of read-back data follow the document;
// the line coding and the error rule are this design's choices.
module rem_sif_rx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ser_in,
  input  logic [2:0]  n_lut,
  input  logic [3:0]  n_fadc,
  output logic [11:0] rdbk,
  output logic        rdbk_valid,
  output logic        rec_valid,
  output logic        rec_err,
  output logic [10:0] lut_f  [2][ppm_pkg::MAX_LUT_SLICES],
  output logic [10:0] fadc_f [2][ppm_pkg::MAX_FADC_SLICES],
  output logic [3:0]  evt4 [2],
  output logic [3:0]  bc4 [2],
  output logic        loss [2]
);
  import ppm_pkg::*;
  typedef enum logic [2:0] {P_RDBK, P_HDR, P_LUT, P_FADC} pst_t;

  // deserialiser
  logic [11:0] sh;
  logic [3:0]  cnt;
  logic        word_v;
  logic [12:0] word;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; cnt <= '0; word_v <= 1'b0; word <= '0;
    end else begin
      word_v <= 1'b0;
      if (cnt == '0) begin
        if (ser_in) cnt <= 4'd13;
      end else begin
        sh  <= {sh[10:0], ser_in};
        cnt <= cnt - 4'd1;
        if (cnt == 4'd1) begin word_v <= 1'b1; word <= {sh[11:0], ser_in}; end
      end
    end
  end

  // parser
  pst_t       st;
  logic       ch;
  logic [3:0] k;
  logic       err;
  logic       done_r;
  logic [10:0] lut_w  [2][MAX_LUT_SLICES];
  logic [10:0] fadc_w [2][MAX_FADC_SLICES];
  logic [3:0]  evt_w [2], bc_w [2];
  logic        loss_w [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_RDBK; ch <= 1'b0; k <= '0; err <= 1'b0; done_r <= 1'b0;
      rdbk <= '0; rdbk_valid <= 1'b0; rec_valid <= 1'b0; rec_err <= 1'b0;
      for (int c = 0; c < 2; c++) begin
        evt_w[c] <= '0; bc_w[c] <= '0; loss_w[c] <= 1'b0;
        evt4[c] <= '0; bc4[c] <= '0; loss[c] <= 1'b0;
        for (int i = 0; i < MAX_LUT_SLICES; i++)  begin lut_w[c][i]  <= '0; lut_f[c][i]  <= '0; end
        for (int i = 0; i < MAX_FADC_SLICES; i++) begin fadc_w[c][i] <= '0; fadc_f[c][i] <= '0; end
      end
    end else begin
      logic done_ch;
      rdbk_valid <= 1'b0;
      rec_valid  <= 1'b0;
      done_r     <= 1'b0;
      done_ch = 1'b0;
      if (word_v) begin
        if (!word[12]) begin                       // read-back word: start of a record
          rdbk <= word[11:0]; rdbk_valid <= 1'b1;
          st <= P_HDR; ch <= 1'b0; err <= 1'b0;
        end else begin
          unique case (st)
            P_RDBK: err <= 1'b1;
            P_HDR: begin
              if (word[11] != 1'b0 || word[10] != ch) err <= 1'b1;
              evt_w[ch] <= word[7:4]; bc_w[ch] <= word[3:0]; loss_w[ch] <= word[9];
              k <= '0;
              if (word[8] || (n_lut == '0 && n_fadc == '0)) done_ch = 1'b1;
              else if (n_lut != '0) st <= P_LUT;
              else st <= P_FADC;
            end
            P_LUT: begin
              if (word[11] != 1'b0) err <= 1'b1;
              lut_w[ch][k[2:0]] <= word[10:0];
              if (k + 4'd1 == 4'(n_lut)) begin
                k <= '0;
                if (n_fadc == '0) done_ch = 1'b1; else st <= P_FADC;
              end else k <= k + 4'd1;
            end
            P_FADC: begin
              if (word[11] != 1'b1) err <= 1'b1;
              fadc_w[ch][k] <= {word[9:0], word[10]};
              if (k + 4'd1 == n_fadc) done_ch = 1'b1;
              else k <= k + 4'd1;
            end
            default: ;
          endcase
          if (done_ch) begin
            if (ch) begin
              st <= P_RDBK; done_r <= 1'b1;
            end else begin
              ch <= 1'b1; st <= P_HDR;
            end
          end
        end
      end
      // publish a completed record together with rec_valid
      if (done_r) begin
        rec_valid <= 1'b1;
        rec_err <= err;
        lut_f <= lut_w; fadc_f <= fadc_w; evt4 <= evt_w; bc4 <= bc_w; loss <= loss_w;
      end
    end
  end
endmodule
