// ppr_playback_histo - 256 x 11-bit memory shared by playback and histogramming.
//
// Playback: with `pb_enable` the memory content replaces the digitised input.
// Each cell holds a 10-bit sample (bits 9:0) and an external-BCID bit (bit 10).
// The 256 cells are played one per tick. With `pb_sync` the sequence waits
// for a `sync_start` pulse (the synchronous START of the timing system),
// otherwise it starts as soon as playback is enabled. In one-shot mode the
// memory is injected once; otherwise it repeats after `pb_delay` idle ticks.
// While no cell is being played the injected stream is zero.
// Histogramming: with `his_enable` and playback off, every tick whose bunch
// number lies in [his_lower_bc, his_upper_bc] and whose value reaches
// `his_thresh` increments the bin addressed by the value: the upper 8 bits of
// the FADC sample (his_source = 0) or the 8-bit LUT result (1). Bins
// saturate at 2047. The configuration port writes cells and has priority.
// Memory size and use follow the document; the cell layout, the binning and
// the start/repeat rules are this design's choices.
module ppr_playback_histo (
  input  logic        clk,
  input  logic        rst_n,
  // configuration port
  input  logic        wr_en,
  input  logic [7:0]  wr_addr,
  input  logic [10:0] wr_data,
  input  logic [7:0]  rd_addr,
  output logic [10:0] rd_data,
  // playback
  input  logic        pb_enable,
  input  logic        pb_sync,
  input  logic        pb_oneshot,
  input  logic [15:0] pb_delay,
  input  logic        sync_start,
  output logic        pb_active,
  output logic [10:0] pb_word,
  // histogramming
  input  logic        his_enable,
  input  logic        his_source,
  input  logic [7:0]  his_thresh,
  input  logic [11:0] his_lower_bc,
  input  logic [11:0] his_upper_bc,
  input  logic [11:0] bc,
  input  logic [9:0]  fadc,
  input  logic [7:0]  lut,
  output logic        his_active
);
  typedef enum logic [1:0] {PB_IDLE, PB_PLAY, PB_GAP, PB_DONE} pb_state_t;
  pb_state_t   st;
  logic [10:0] mem [256];
  logic [7:0]  ptr;
  logic [15:0] gap;
  logic [7:0]  hval;
  logic        hinc;

  always_comb begin
    hval = his_source ? lut : fadc[9:2];
    his_active = his_enable && !pb_enable;
    hinc = his_active && (bc >= his_lower_bc) && (bc <= his_upper_bc) && (hval >= his_thresh);
  end

  always_ff @(posedge clk) begin
    if (wr_en)     mem[wr_addr] <= wr_data;
    else if (hinc && mem[hval] != 11'h7FF) mem[hval] <= mem[hval] + 11'd1;
  end
  assign rd_data = mem[rd_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= PB_IDLE; ptr <= '0; gap <= '0;
    end else if (!pb_enable) begin
      st <= PB_IDLE; ptr <= '0;
    end else begin
      unique case (st)
        PB_IDLE: if (!pb_sync || sync_start) begin st <= PB_PLAY; ptr <= '0; end
        PB_PLAY: begin
          ptr <= ptr + 8'd1;
          if (ptr == 8'd255) begin
            if (pb_oneshot)          st <= PB_DONE;
            else if (pb_delay == '0) st <= PB_PLAY;
            else begin st <= PB_GAP; gap <= pb_delay; end
          end
        end
        PB_GAP:  begin
          gap <= gap - 16'd1;
          if (gap == 16'd1) st <= PB_PLAY;
        end
        PB_DONE: ;
      endcase
    end
  end

  assign pb_active = pb_enable;
  assign pb_word   = (st == PB_PLAY) ? mem[ptr] : 11'd0;
endmodule
