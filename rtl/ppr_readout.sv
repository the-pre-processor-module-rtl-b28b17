// ppr_readout - readout pipelines and derandomizer of one processing channel.
//
// Two circular pipeline memories of 128 x 11 bits keep the recent history of
// the channel: raw samples ({FADC[9:0], EB} stored as {EB, FADC}) and LUT
// results ({PB, SB, EB, Et[7:0]}). Both are written every tick at the same
// pointer. A level-1 accept captures, for each memory, the slice written
// `pipe_delay_*` ticks earlier; the event's slices are that one and the next
// newer ones. Accepts wait in a 4-deep queue and are copied one at a time
// into the derandomizer FIFO as 13-bit readout words: a header
// {1,0,C,L,H,evt[3:0],bc[3:0]}, then `num_bcid` LUT words {1,0,PB,SB,EB,Et},
// then `num_raw` FADC words {1,1,EB,FADC}. If the FIFO lacks room for the
// whole event only the header is written, with L (data loss) and H (headers
// only) set. `almost_full` is high while fewer than `af_mark` words are free.
// Timing: the copy writes one word per tick.
// Memory sizes, word formats and the per-channel slice counts and delays are
// the document's; the FIFO depth, the queue depth and the slice selection rule
// are this design's choices.
module ppr_readout #(
  parameter int FIFO_DEPTH = 64          // a power of two
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        chan_id,          // C bit of the header
  input  logic [10:0] raw_in,           // {EB, FADC}
  input  logic [10:0] bcid_in,          // {PB, SB, EB, Et}
  input  logic [6:0]  pipe_delay_raw,
  input  logic [6:0]  pipe_delay_bcid,
  input  logic [6:0]  num_raw,
  input  logic [2:0]  num_bcid,
  input  logic [6:0]  af_mark,
  input  logic        l1a,
  input  logic [3:0]  evt,
  input  logic [3:0]  bc,
  input  logic        rd_en,
  output logic [12:0] dout,
  output logic        empty,
  output logic        almost_full,
  output logic        loss_seen         // pulses when an event lost its data
);
  localparam int AW = $clog2(FIFO_DEPTH);
  typedef struct packed {
    logic [6:0] raw_ptr;
    logic [6:0] bcid_ptr;
    logic [3:0] evt;
    logic [3:0] bc;
  } acc_t;
  typedef enum logic [1:0] {C_IDLE, C_HEAD, C_LUT, C_RAW} cp_state_t;

  logic [10:0] raw_mem  [128];
  logic [10:0] bcid_mem [128];
  logic [6:0]  wr_ptr;
  acc_t        q [4];
  logic [2:0]  q_cnt;
  acc_t        cur;
  cp_state_t   st;
  logic [6:0]  k;
  logic [12:0] fifo [FIFO_DEPTH];
  logic [AW-1:0] f_wp, f_rp;
  logic [AW:0]   f_cnt;
  logic          f_we;
  logic [12:0]   f_wd;
  logic [AW:0]   free_words;
  logic [7:0]    need;
  logic          q_pop;

  // pipelines
  always_ff @(posedge clk) begin
    raw_mem[wr_ptr]  <= raw_in;
    bcid_mem[wr_ptr] <= bcid_in;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_ptr <= '0;
    else        wr_ptr <= wr_ptr + 7'd1;
  end

  // accept queue
  assign q_pop = (st == C_IDLE) && (q_cnt != '0);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_cnt <= '0;
      for (int i = 0; i < 4; i++) q[i] <= '0;
    end else begin
      if (q_pop) for (int i = 0; i < 3; i++) q[i] <= q[i+1];
      if (l1a && (q_cnt - 3'(q_pop)) < 3'd4) begin
        q[2'(q_cnt - 3'(q_pop))] <= '{raw_ptr:  wr_ptr - pipe_delay_raw,
                                  bcid_ptr: wr_ptr - pipe_delay_bcid,
                                  evt: evt, bc: bc};
      end
      q_cnt <= q_cnt - 3'(q_pop) + 3'(l1a && (q_cnt - 3'(q_pop)) < 3'd4);
    end
  end

  // copy engine
  assign free_words = (AW+1)'(FIFO_DEPTH) - f_cnt;
  assign need = 8'd1 + 8'(num_bcid) + 8'(num_raw);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; cur <= '0; k <= '0; loss_seen <= 1'b0;
    end else begin
      loss_seen <= 1'b0;
      unique case (st)
        C_IDLE: if (q_pop) begin cur <= q[0]; st <= C_HEAD; end
        C_HEAD: begin
          k <= '0;
          if (32'(free_words) < 32'(need)) begin
            st <= C_IDLE; loss_seen <= 1'b1;
          end else if (num_bcid != '0) st <= C_LUT;
          else if (num_raw != '0)      st <= C_RAW;
          else                         st <= C_IDLE;
        end
        C_LUT: if (k + 7'd1 == 7'(num_bcid)) begin
                 k <= '0;
                 st <= (num_raw != '0) ? C_RAW : C_IDLE;
               end else k <= k + 7'd1;
        C_RAW: if (k + 7'd1 == num_raw) begin k <= '0; st <= C_IDLE; end
               else k <= k + 7'd1;
      endcase
    end
  end

  always_comb begin
    logic [10:0] rw, bw;
    rw = raw_mem[cur.raw_ptr + k];
    bw = bcid_mem[cur.bcid_ptr + k];
    f_we = 1'b0;
    f_wd = '0;
    unique case (st)
      C_HEAD: begin
        f_we = 1'b1;
        if (32'(free_words) < 32'(need))
          f_wd = ppm_pkg::w_head(chan_id, 1'b1, 1'b1, cur.evt, cur.bc);
        else
          f_wd = ppm_pkg::w_head(chan_id, 1'b0, 1'b0, cur.evt, cur.bc);
      end
      C_LUT: begin f_we = 1'b1; f_wd = ppm_pkg::w_lut(bw[10], bw[9], bw[8], bw[7:0]); end
      C_RAW: begin f_we = 1'b1; f_wd = ppm_pkg::w_fadc(rw[10], rw[9:0]); end
      default: ;
    endcase
  end

  // derandomizer FIFO
  always_ff @(posedge clk) if (f_we && f_cnt != (AW+1)'(FIFO_DEPTH)) fifo[f_wp] <= f_wd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_wp <= '0; f_rp <= '0; f_cnt <= '0;
    end else begin
      logic wr, rd;
      wr = f_we && f_cnt != (AW+1)'(FIFO_DEPTH);
      rd = rd_en && f_cnt != '0;
      if (wr) f_wp <= f_wp + 1'b1;
      if (rd) f_rp <= f_rp + 1'b1;
      f_cnt <= f_cnt + (AW+1)'(wr) - (AW+1)'(rd);
    end
  end
  assign dout        = fifo[f_rp];
  assign empty       = (f_cnt == '0);
  assign almost_full = 32'(free_words) < 32'(af_mark);
endmodule
