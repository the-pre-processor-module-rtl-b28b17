// ttc_counters - bunch-crossing and level-1 event counters.
//
// The bunch counter advances every LHC clock tick and is cleared by the
// bunch-counter reset sent before each LHC turn; the event counter advances
// with every level-1 accept and is cleared by the event-counter reset. The
// counter values seen by an accept are those before it is counted, so the
// first event after a reset is number 0. Both counters follow the timing
// protocol described in the document; widths (12 and 24 bits) are those of
// the bunch number on the G-Link and of the TTC receiver's event counter.
module ttc_counters (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bcr,      // bunch-counter reset
  input  logic        ecr,      // event-counter reset
  input  logic        l1a,
  output logic [11:0] bc,
  output logic [23:0] evt
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc <= '0; evt <= '0;
    end else begin
      bc <= bcr ? 12'd0 : bc + 12'd1;
      if (ecr)      evt <= '0;
      else if (l1a) evt <= evt + 24'd1;
    end
  end
endmodule
