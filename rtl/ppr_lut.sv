// ppr_lut - 1024 x 8-bit energy look-up table (10-bit energy to 8-bit Et).
//
// Translates the identified energy into calibrated transverse energy. The
// table is a memory written one cell at a time over the configuration port,
// or filled in one pass with a ramp: on `ramp_load` every cell i receives
// clip255(max(0, i - pedestal) * slope / 256), one cell per tick, while
// `ramp_busy` is high. With `bypass` the table is skipped and the energy,
// clipped at 255, is used directly. A slice that was not identified (zero energy) always
// yields zero. A forced-saturation slice yields
// `sat_value`. Timing: one register stage from energy to `et`.
// The table size, the bypass, the pedestal/slope ramp and the saturation
// value follow the document; the ramp formula (slope in units of 1/256, so
// that the default slope 256 is unity gain) is this design's reading.
module ppr_lut (
  input  logic        clk,
  input  logic        rst_n,
  // real-time path
  input  logic [9:0]  energy,
  input  logic        force_sat,
  input  logic        bypass,
  input  logic [7:0]  sat_value,
  output logic [7:0]  et,
  // configuration
  input  logic        wr_en,
  input  logic [9:0]  wr_addr,
  input  logic [7:0]  wr_data,
  input  logic [9:0]  rd_addr,
  output logic [7:0]  rd_data,
  input  logic        ramp_load,
  input  logic [9:0]  pedestal,
  input  logic [10:0] slope,
  output logic        ramp_busy
);
  logic [7:0]  mem [1024];
  logic [9:0]  ramp_addr;
  logic [21:0] ramp_val;

  always_comb begin
    ramp_val = (ramp_addr > pedestal) ? (22'(ramp_addr - pedestal) * 22'(slope)) >> 8 : 22'd0;
  end

  always_ff @(posedge clk) begin
    if (ramp_busy)  mem[ramp_addr] <= (ramp_val > 22'd255) ? 8'd255 : ramp_val[7:0];
    else if (wr_en) mem[wr_addr]   <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ramp_busy <= 1'b0; ramp_addr <= '0;
    end else if (ramp_busy) begin
      ramp_addr <= ramp_addr + 10'd1;
      if (ramp_addr == 10'd1023) ramp_busy <= 1'b0;
    end else if (ramp_load) begin
      ramp_busy <= 1'b1; ramp_addr <= '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) et <= '0;
    else if (force_sat)    et <= sat_value;
    else if (energy == '0) et <= '0;
    else if (bypass)       et <= (energy > 10'd255) ? 8'd255 : energy[7:0];
    else                   et <= mem[energy];
  end

  assign rd_data = mem[rd_addr];
endmodule
