// rem_local_trigger - local ("self-triggering") level-1 accept generator of
// the ReM, used when the module runs without the central trigger.
//
// Two registers set it up (bit fields as in the register map):
//   timing: [14:0] delay of the first L1A, [15] enable,
//           [30:16] delay of the external pulse, [31] enable of the pulse
//   config: [7:0] number of L1As, [11:8] length of the external pulse,
//           [15:12] mask of the four analog-input trigger lines,
//           [31:16] distance between L1As in ticks
// A sequence starts on `start` (a register write) or, when at least one
// mask bit is set, on a rising edge of any selected analog-input trigger
// line. With the enable set, the first L1A comes `delay` ticks after the
// start and `count` L1As follow at `gap` tick spacing (a gap below one is
// taken as one). With the external enable set, `ext_pulse` goes high
// `delay_external` ticks after the start for `length_external` ticks
// (at least one), e.g. to fire a pulse generator into the analog inputs.
// `busy` is high while a sequence runs; starts during a sequence are ignored.
// Timing: a delay of d puts the L1A on the d-th tick after the start tick
// (delay 0 and 1 both give the next tick). All outputs are registered.
// The register fields follow the document; what starts a sequence and the
// meaning of a zero field are this design's choices.
module rem_local_trigger (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] timing,
  input  logic [31:0] config_r,
  input  logic        start,
  input  logic [3:0]  anin_trig,
  output logic        l1a,
  output logic        ext_pulse,
  output logic        busy
);
  wire [14:0] dly     = timing[14:0];
  wire        en      = timing[15];
  wire [14:0] dly_ext = timing[30:16];
  wire        en_ext  = timing[31];
  wire [7:0]  n_l1a   = config_r[7:0];
  wire [3:0]  len_ext = config_r[11:8];
  wire [3:0]  mask    = config_r[15:12];
  wire [15:0] gap     = config_r[31:16];

  logic [3:0]  trig_q;
  wire         go = !busy && (start || |(anin_trig & ~trig_q & mask));

  logic        l_run, x_run, x_on;
  logic [15:0] l_cnt;
  logic [7:0]  l_left;
  logic [14:0] x_cnt;
  logic [3:0]  x_len;

  assign busy = l_run || x_run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_q <= '0; l_run <= 1'b0; x_run <= 1'b0; x_on <= 1'b0;
      l_cnt <= '0; l_left <= '0; x_cnt <= '0; x_len <= '0;
      l1a <= 1'b0; ext_pulse <= 1'b0;
    end else begin
      trig_q <= anin_trig;
      l1a <= 1'b0;
      // L1A sequence
      if (go && en && n_l1a != '0) begin
        l_run <= 1'b1; l_left <= n_l1a;
        l_cnt <= (dly == '0) ? 16'd1 : 16'(dly);
      end else if (l_run) begin
        if (l_cnt == 16'd1) begin
          l1a <= 1'b1;
          if (l_left == 8'd1) l_run <= 1'b0;
          l_left <= l_left - 8'd1;
          l_cnt  <= (gap == '0) ? 16'd1 : gap;
        end else l_cnt <= l_cnt - 16'd1;
      end
      // external pulse
      if (go && en_ext) begin
        x_run <= 1'b1; x_on <= 1'b0;
        x_cnt <= (dly_ext == '0) ? 15'd1 : dly_ext;
        x_len <= (len_ext == '0) ? 4'd1 : len_ext;
      end else if (x_run) begin
        if (!x_on) begin
          if (x_cnt == 15'd1) begin x_on <= 1'b1; ext_pulse <= 1'b1; end
          else x_cnt <= x_cnt - 15'd1;
        end else if (x_len == 4'd1) begin
          ext_pulse <= 1'b0; x_on <= 1'b0; x_run <= 1'b0;
        end else x_len <= x_len - 4'd1;
      end
    end
  end
endmodule
