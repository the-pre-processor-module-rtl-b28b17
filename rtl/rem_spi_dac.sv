// rem_spi_dac - write-only serial programming interface (SPI) to the DACs of
// one analog-input board (offset and discriminator threshold per input).
//
// A write (`we`, 4-bit input number on the board, 16-bit DAC word with the
// threshold in bits 7:0 and the offset in bits 15:8) enters a 4-deep queue.
// Each queued word is sent as a 24-bit frame {4'b0, input[3:0], word[15:0]},
// most significant bit first, framed by the active-low chip select `cs_n`.
// `din` changes on the falling edge of `sclk` and is stable at its rising
// edge; one `sclk` period lasts 2*DIV clock ticks. A write into a full queue
// is dropped and sets the sticky `overrun`. `busy` is high while a frame is
// sent or words are waiting.
// Follows the document: write-only SPI to the analog-input DACs with the
// three signals DIN, CS and CLK, threshold and offset per input. This
// design's choices: the frame layout, the clock divider and the queue (the
// DAC part and its protocol are not specified).
module rem_spi_dac #(
  parameter int DIV = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [3:0]  sel,
  input  logic [15:0] wdata,
  output logic        sclk,
  output logic        cs_n,
  output logic        din,
  output logic        busy,
  output logic        overrun
);
  localparam int QD = 4;
  logic [19:0] q [QD];
  logic [1:0]  wp, rp;
  logic [2:0]  n;
  logic [22:0] sh;   // bits still to send after the current one
  logic [4:0]  bits;
  logic [$clog2(DIV)-1:0] div;
  logic        ph;           // 0: sclk low half, 1: sclk high half
  logic        act;
  wire         pop = !act && n != '0;

  assign busy = act || n != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; n <= '0; overrun <= 1'b0;
      sh <= '0; bits <= '0; div <= '0; ph <= 1'b0; act <= 1'b0;
      sclk <= 1'b0; cs_n <= 1'b1; din <= 1'b0;
      for (int i = 0; i < QD; i++) q[i] <= '0;
    end else begin
      if (we) begin
        if (n == 3'(QD) && !pop) overrun <= 1'b1;
        else begin q[wp] <= {sel, wdata}; wp <= wp + 2'd1; end
      end
      n <= n + 3'(we && !(n == 3'(QD) && !pop)) - 3'(pop);
      if (pop) begin
        rp <= rp + 2'd1;
        sh <= {3'b0, q[rp]};
        act <= 1'b1; bits <= 5'd24; div <= '0; ph <= 1'b0;
        cs_n <= 1'b0; sclk <= 1'b0; din <= 1'b0;   // first bit of {4'b0, ...}
      end else if (act) begin
        if (32'(div) == DIV - 1) begin
          div <= '0;
          if (!ph) begin
            ph <= 1'b1; sclk <= 1'b1;             // receiver samples din
          end else begin
            ph <= 1'b0; sclk <= 1'b0;
            if (bits == 5'd1) begin act <= 1'b0; cs_n <= 1'b1; end
            else begin sh <= {sh[21:0], 1'b0}; din <= sh[22]; end
            bits <= bits - 5'd1;
          end
        end else div <= div + 1'b1;
      end
    end
  end
endmodule
