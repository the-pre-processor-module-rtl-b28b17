// tb_rem_i2c_write - self-checking test of the write-only I2C master.
// A bus model per port resolves the open-drain lines, detects START and
// STOP, shifts in the bits on rising SCL and drives the acknowledge slots
// low when its device is present. Checks the received address and data
// byte and the port, the nack flag for a missing acknowledge on a checked
// port and no flag on an unchecked port, and the overrun flag.
module tb_rem_i2c_write;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic we, busy, nack, overrun;
  logic [17:0] cmd;
  logic [3:0] ack_check, sda_in, scl_oe, sda_oe;
  rem_i2c_write #(.DIV(2)) dut (.*);

  logic [3:0] present;            // device answers on that port
  logic [3:0] ack_drive;
  wire  [3:0] scl = ~scl_oe;
  assign sda_in = ~(sda_oe | ack_drive);
  logic [3:0] scl_q, sda_q;
  int nbits [4];
  logic [18:0] rx [4];          // 18 bits plus the SCL rise of the STOP
  int starts [4], stops [4];

  always @(posedge clk) begin
    for (int p = 0; p < 4; p++) begin
      if (scl[p] && scl_q[p] && sda_q[p] && !sda_in[p]) begin starts[p]++; nbits[p] = 0; end
      if (scl[p] && scl_q[p] && !sda_q[p] && sda_in[p]) stops[p]++;
      if (scl[p] && !scl_q[p]) begin rx[p] = {rx[p][17:0], sda_in[p]}; nbits[p]++; end
      // acknowledge: pull SDA low during the 9th and 18th SCL low phases
      if (!scl[p] && scl_q[p]) ack_drive[p] = present[p] && (nbits[p] == 8 || nbits[p] == 17);
    end
    scl_q <= scl; sda_q <= sda_in;
  end

  task automatic send(logic [1:0] port, logic [7:0] ad, logic [7:0] dt);
    cmd = {port, ad, dt}; we = 1;
    @(posedge clk); #1 we = 0;
    while (busy) @(posedge clk);
    #1;
    repeat (4) @(posedge clk); #1;
  endtask

  initial begin
    we = 0; cmd = '0; ack_check = 4'b0010; present = 4'b0001; ack_drive = '0;
    scl_q = '1; sda_q = '1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      logic [7:0] ad, dt;
      int s0, e0;
      ad = 8'($urandom); dt = 8'($urandom);
      s0 = starts[0]; e0 = stops[0];
      send(2'd0, ad, dt);
      checks += 4;
      if (starts[0] != s0 + 1 || stops[0] != e0 + 1) failures++;
      if (nbits[0] != 19) begin failures++; $display("bits %0d", nbits[0]); end
      if (rx[0][18:11] != ad || rx[0][9:2] != dt) begin failures++; $display("rx %h ad %h dt %h", rx[0], ad, dt); end
      if (rx[0][10] != 1'b0 || rx[0][1] != 1'b0) failures++;     // acknowledged
    end
    checks += 2;
    if (nack) failures++;
    if (starts[1] != 0) failures++;                             // other ports idle
    send(2'd1, 8'h42, 8'h17);                                   // no device, checked
    checks++; if (!nack) failures++;
    checks++; if (rx[1][18:11] != 8'h42) failures++;
    // overrun
    cmd = 18'h0; we = 1; @(posedge clk); #1;
    @(posedge clk); #1 we = 0;
    checks++; if (!overrun) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
