// ppr_ratemeter - counts how often a channel exceeds a threshold.
//
// Over a measuring interval of `del_time` units of UNIT_TICKS bunch
// crossings, every tick whose value (raw FADC sample, or LUT result when
// `source` = 1) is above `thresh` is counted. At the end of the interval the
// 20-bit count and the 16-bit interval are latched into `rate` / `rate_time`,
// `done` pulses for one tick and a new interval begins. Counts saturate.
// The threshold, the two-byte time span and the 20-bit rate / 16-bit time
// read-out format follow the document; the time unit (one LHC turn of 3564
// bunch crossings) is this design's choice, the document not giving one.
module ppr_ratemeter #(
  parameter int UNIT_TICKS = 3564
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        source,
  input  logic [9:0]  thresh,
  input  logic [15:0] del_time,
  input  logic [9:0]  fadc,
  input  logic [7:0]  lut,
  output logic [19:0] rate,
  output logic [15:0] rate_time,
  output logic        done
);
  localparam int UW = $clog2(UNIT_TICKS + 1);
  logic [UW-1:0] unit_cnt;
  logic [15:0]   units;
  logic [19:0]   cnt;
  logic [9:0]    v;
  logic          last_tick;

  assign v = source ? {2'b00, lut} : fadc;
  assign last_tick = (int'(unit_cnt) == UNIT_TICKS - 1) && (units + 16'd1 >= del_time);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      unit_cnt <= '0; units <= '0; cnt <= '0;
      rate <= '0; rate_time <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!enable || del_time == '0) begin
        unit_cnt <= '0; units <= '0; cnt <= '0;
      end else if (last_tick) begin
        rate      <= (v > thresh && cnt != '1) ? cnt + 20'd1 : cnt;
        rate_time <= del_time;
        done      <= 1'b1;
        unit_cnt  <= '0; units <= '0; cnt <= '0;
      end else begin
        if (v > thresh && cnt != '1) cnt <= cnt + 20'd1;
        if (int'(unit_cnt) == UNIT_TICKS - 1) begin
          unit_cnt <= '0; units <= units + 16'd1;
        end else unit_cnt <= unit_cnt + 1'b1;
      end
    end
  end
endmodule
