// ppr_bcid_decision - combines the three BCID methods into one decision.
//
// The energy of the current slice is classified into one of three ranges by
// the two "energy level" thresholds, taken either from the raw FADC sample
// (decision_src = 0) or from the FIR result (1): high if above e_high, low if
// not above e_low, middle otherwise. Each range has an 8-bit decision table;
// the three BCID bits form the index {peak, sat, ext}, and the addressed bit
// says whether the slice is identified. An identified slice passes its FIR
// energy on to the look-up table, any other slice passes zero. If the range's
// override flag is set and the FIR window held a saturated sample, the slice
// is marked to take the fixed "saturation value" instead of the LUT result.
// The three BCID bits are passed on for readout (PB, SB, EB).
// Timing: one register stage.
// The ranges, the per-range tables, their defaults (0xFE, 0xFA, 0xF0) and the
// override flags follow the document; the index order {peak, sat, ext} and
// the range boundaries are this design's choices.
module ppr_bcid_decision (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [9:0]      energy,
  input  logic [9:0]      fadc,
  input  logic            saturated,
  input  logic            peak,
  input  logic            sat,
  input  logic            ext,
  input  logic            decision_src,
  input  logic [9:0]      e_low,
  input  logic [9:0]      e_high,
  input  logic [2:0][7:0] dec_lut,       // [0] high, [1] middle, [2] low
  input  logic [2:0]      sat_override,
  output logic [9:0]      e_out,         // energy of an identified slice, else 0
  output logic            force_sat,     // use the saturation value
  output logic [2:0]      bcid_bits      // {PB, SB, EB}
);
  logic [9:0] v;
  logic [1:0] range;
  logic [2:0] idx;
  logic       hit;

  always_comb begin
    v = decision_src ? energy : fadc;
    if (v > e_high)       range = 2'd0;
    else if (v > e_low)   range = 2'd1;
    else                  range = 2'd2;
    idx = {peak, sat, ext};
    hit = dec_lut[range][idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_out <= '0; force_sat <= 1'b0; bcid_bits <= '0;
    end else begin
      e_out     <= hit ? energy : 10'd0;
      force_sat <= hit && sat_override[range] && saturated;
      bcid_bits <= {peak, sat, ext};
    end
  end
endmodule
