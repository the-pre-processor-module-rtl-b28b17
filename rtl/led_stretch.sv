// led_stretch - front-panel indicator driver: stretches short events
// (a VME data acknowledge, an L1A, clock activity) so that they are visible.
//
// Every tick with `pulse` high reloads a down-counter with LEN; `led` is high
// while the counter is not zero, so an isolated one-tick pulse lights the
// indicator for LEN ticks and a steady stream keeps it lit. Registered
// output, one tick after the pulse.
// Follows the document: 100 ms stretching, i.e. LEN = 4,008,000 ticks of the
// 40.08 MHz clock. This design's choice: retriggering on every pulse.
module led_stretch #(
  parameter int LEN = 4008000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pulse,
  output logic led
);
  logic [$clog2(LEN+1)-1:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (pulse) cnt <= ($bits(cnt))'(LEN);
    else if (cnt != '0) cnt <= cnt - 1'b1;
  end
  assign led = cnt != '0;
endmodule
