// rem_i2c_write - write-only I2C master of the ReM for the fine-timing
// (delay) chips on the MCMs and the TTC decoder.
//
// A command word (`we`, `cmd`, bits 17:0 of the register word) holds the port in bits 17:16, the
// address byte in bits 15:8 and the data byte in bits 7:0. The master sends
// START, the address byte, an acknowledge slot, the data byte, an
// acknowledge slot and STOP on the selected port; the other ports stay idle.
// Lines are open-drain: `scl_oe`/`sda_oe` high pull the line low. Each bit
// takes 4*DIV ticks (SCL low, data change, SCL high, SCL high). A missing
// acknowledge sets the sticky `nack`; the fine-timing bus gives none, so
// `ack_check` masks it per port. Commands arriving while `busy` are dropped
// and set `overrun`.
// Follows the document: the command word layout, write-only access to the
// delay chips. This design's choices: bit timing, acknowledge handling,
// the four-port fan-out and single-byte writes.
module rem_i2c_write #(
  parameter int DIV = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [17:0] cmd,
  input  logic [3:0]  ack_check,
  input  logic [3:0]  sda_in,
  output logic [3:0]  scl_oe,
  output logic [3:0]  sda_oe,
  output logic        busy,
  output logic        nack,
  output logic        overrun
);
  typedef enum logic [2:0] {I_IDLE, I_START, I_BIT, I_STOP, I_END} ist_t;
  ist_t        st;
  logic [1:0]  port;
  logic [17:0] sh;           // address byte, ack slot, data byte, ack slot
  logic [4:0]  nbit;
  logic [1:0]  q;            // quarter of the bit period
  logic [$clog2(DIV)-1:0] div;
  logic        scl_lo, sda_lo;

  assign busy = st != I_IDLE;
  always_comb begin
    scl_oe = '0; sda_oe = '0;
    scl_oe[port] = scl_lo;
    sda_oe[port] = sda_lo;
  end

  wire tick = 32'(div) == DIV - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= I_IDLE; port <= '0; sh <= '0; nbit <= '0; q <= '0; div <= '0;
      scl_lo <= 1'b0; sda_lo <= 1'b0; nack <= 1'b0; overrun <= 1'b0;
    end else begin
      div <= tick ? '0 : div + 1'b1;
      if (we && st != I_IDLE) overrun <= 1'b1;
      unique case (st)
        I_IDLE: if (we) begin
          port <= cmd[17:16];
          sh   <= {cmd[15:8], 1'b1, cmd[7:0], 1'b1};   // ack slots released
          nbit <= 5'd18; q <= '0; div <= '0;
          st   <= I_START;
        end
        I_START: if (tick) begin                        // SDA falls while SCL high
          q <= q + 2'd1;
          if (q == 2'd0) sda_lo <= 1'b1;
          if (q == 2'd1) begin scl_lo <= 1'b1; q <= '0; st <= I_BIT; end
        end
        I_BIT: if (tick) begin
          q <= q + 2'd1;
          unique case (q)
            2'd0: sda_lo <= !sh[17];                    // data while SCL low
            2'd1: scl_lo <= 1'b0;
            2'd2: if ((nbit == 5'd10 || nbit == 5'd1) && ack_check[port] && sda_in[port])
                    nack <= 1'b1;                       // sample acknowledge
            2'd3: begin
              scl_lo <= 1'b1;
              sh <= {sh[16:0], 1'b1};
              nbit <= nbit - 5'd1;
              if (nbit == 5'd1) st <= I_STOP;
            end
          endcase
        end
        I_STOP: if (tick) begin                         // SDA rises while SCL high
          q <= q + 2'd1;
          if (q == 2'd0) sda_lo <= 1'b1;
          if (q == 2'd1) scl_lo <= 1'b0;
          if (q == 2'd2) begin sda_lo <= 1'b0; st <= I_END; end
        end
        I_END: if (tick) st <= I_IDLE;
        default: st <= I_IDLE;
      endcase
    end
  end
endmodule
