// ppr_sif_tx - readout side of one PPrASIC serial interface (a channel pair).
//
// For every level-1 accept it sends one record on the serial line:
//   - one read-back word {0, 12 bits}; with no read-back requested this is a
//     status word, here {10'b0, almost_full of channel 1, of channel 0};
//   - the event of the pair's first channel (header, LUT words, FADC words),
//   - the event of the second channel.
// A channel event is its header plus `num_bcid` + `num_raw` words, or the
// header alone when its H (headers only) bit is set. Words are taken from the
// two derandomizers as they become available.
// Line coding: the line idles low; each 13-bit word is sent MSB first behind
// a start bit '1', 14 ticks per word.
// The record layout and word formats follow the document; the line coding
// and the status-word content are this design's choices.
module ppr_sif_tx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [6:0]  num_raw [2],
  input  logic [2:0]  num_bcid [2],
  input  logic [12:0] word [2],
  input  logic        empty [2],
  input  logic        almost_full [2],
  output logic        rd [2],
  output logic        ser_out,
  output logic        busy
);
  typedef enum logic [1:0] {S_IDLE, S_RDBK, S_CHAN} st_t;
  st_t         st;
  logic        ch;
  logic [7:0]  left;         // words still to send of the current channel event
  logic        first;        // next word of the channel is its header
  logic [13:0] sh;
  logic [3:0]  bits;         // bits left in the shift register
  logic        load;
  logic [12:0] load_word;

  assign busy = (st != S_IDLE) || (bits != '0);

  always_comb begin
    load = 1'b0;
    load_word = '0;
    rd[0] = 1'b0; rd[1] = 1'b0;
    if (bits == '0 || bits == 4'd1) begin
      unique case (st)
        S_IDLE: ;
        S_RDBK: begin load = 1'b1; load_word = ppm_pkg::w_rdbk({10'd0, almost_full[1], almost_full[0]}); end
        S_CHAN: if (!empty[ch]) begin load = 1'b1; load_word = word[ch]; rd[ch] = 1'b1; end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ch <= 1'b0; left <= '0; first <= 1'b0; sh <= '0; bits <= '0;
    end else begin
      if (load) begin
        sh <= {1'b1, load_word}; bits <= 4'd14;
      end else if (bits != '0) begin
        sh <= {sh[12:0], 1'b0}; bits <= bits - 4'd1;
      end
      unique case (st)
        S_IDLE: if (!empty[0]) begin st <= S_RDBK; ch <= 1'b0; first <= 1'b1; end
        S_RDBK: if (load) st <= S_CHAN;
        S_CHAN: if (load) begin
          if (first) begin
            first <= 1'b0;
            if (load_word[8]) left <= 8'd0;                    // H bit: header only
            else left <= 8'(num_bcid[ch]) + 8'(num_raw[ch]);
            if (load_word[8] || (num_bcid[ch] == '0 && num_raw[ch] == '0)) begin
              if (ch) st <= S_IDLE; else begin ch <= 1'b1; first <= 1'b1; end
            end
          end else begin
            left <= left - 8'd1;
            if (left == 8'd1) begin
              if (ch) st <= S_IDLE; else begin ch <= 1'b1; first <= 1'b1; end
            end
          end
        end
        default: ;
      endcase
    end
  end
  assign ser_out = (bits != '0) ? sh[13] : 1'b0;
endmodule
