// ppr_bcmux - bunch-crossing multiplexing of two towers onto one CP link.
//
// BCID leaves the slices before and after an identified slice empty, so in a
// pair of consecutive ticks (t0, t1) each tower carries at most one non-zero
// value. The two towers A and B therefore share one 9-bit link word
// {M, Et[7:0]} per tick. Per pair the mux bits M(t0), M(t1) tell the
// receiver how to read the two words:
//   0,0  parallel in time:   t0 sends A(t0), t1 sends B(t0)
//   0,1  consecutive:        t0 sends A(t0), t1 sends B(t1)
//   1,1  reversed in time:   t0 sends B(t0), t1 sends A(t1)
// Empty towers are sent as zero. If both towers carry data on t1 alone (a
// case the scheme cannot express) they are sent as the parallel case.
// `pair_phase` is high on the t0 tick of a pair (even bunch number). With
// `bypass` the mux is skipped and the tower picked by `chan_sel` is sent on
// every tick with M = 0.
// Timing: the word for t0 is registered on the edge that samples t1 (the
// decision needs both), the word for t1 on the following edge: every word
// leaves one edge after its input slice was sampled.
// The three M-bit combinations and their meaning are the document's; the
// handling of the t1/t1 case and the pairing by bunch-number parity are this
// design's choices.
module ppr_bcmux (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pair_phase,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       bypass,
  input  logic       chan_sel,
  output logic [8:0] link        // {M, Et}
);
  logic [7:0] a0, b0;            // t0 values of the current pair
  logic [8:0] pend;              // word for t1, decided at t1
  logic       in_t1;             // the input tick is the t1 of a pair

  assign in_t1 = !pair_phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a0 <= '0; b0 <= '0; pend <= '0; link <= '0;
    end else if (bypass) begin
      link <= {1'b0, chan_sel ? b : a};
    end else if (!in_t1) begin
      a0   <= a; b0 <= b;
      link <= pend;                                   // t1 word of the previous pair
    end else begin
      // a, b hold t1 values; a0, b0 the t0 values
      if (a == '0 && b == '0) begin                   // everything at t0 (or nothing)
        link <= {1'b0, a0}; pend <= {1'b0, b0};
      end else if (b0 == '0 && a == '0) begin         // A at t0 (or none), B at t1
        link <= {1'b0, a0}; pend <= {1'b1, b};
      end else if (a0 == '0 && b == '0) begin         // B at t0, A at t1
        link <= {1'b1, b0}; pend <= {1'b1, a};
      end else begin                                  // not expressible: parallel
        link <= {1'b0, (a0 != '0) ? a0 : a}; pend <= {1'b0, (b0 != '0) ? b0 : b};
      end
    end
  end
endmodule
