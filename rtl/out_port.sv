// out_port: byte-serial output port with reset (four-phase) signalling.
//
// What it does: sends one byte at a time to a receiver: odata holds the byte, ordy says it is
// valid, olast marks the final byte of a packet, and the receiver answers with oack.
//
// How it works: writing the port (wr, from the micro-instruction) loads the data register
// from the Y bus, sets the ready JK flip-flop (J) and sets or clears the last-byte flip-flop
// from C3 (last). The receiver's acknowledge clears ready (K = oack). The port is clear for the
// next byte (osvc) when both ready and acknowledge are low, i.e. the full four-phase cycle of
// the previous byte has ended.
//
// Timing: single clock; outputs change at the rising edge after the write. rst_n (synchronous)
// clears ready and last.
//
// From the document: the JK arrangement, the status equation and the handshake. This design's
// choices: edge-triggered on the rising edge; the data register has no reset (the document's
// latch has none).
module out_port (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic       last,
  input  logic [7:0] ydata,
  input  logic       oack,
  output logic       ordy,
  output logic       olast,
  output logic [7:0] odata,
  output logic       osvc
);

  assign osvc = ~ordy & ~oack;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ordy  <= 1'b0;
      olast <= 1'b0;
    end else begin
      unique case ({wr, oack})
        2'b10:   ordy <= 1'b1;
        2'b01:   ordy <= 1'b0;
        2'b11:   ordy <= ~ordy;
        default: ;
      endcase
      if (wr) olast <= last;
    end
  end

  always_ff @(posedge clk) begin
    if (wr) odata <= ydata;
  end

  // A byte may only be written when the previous one has been taken.
  a_write_when_clear: assert property (@(posedge clk) disable iff (!rst_n) wr |-> osvc)
    else $error("output port written while not clear");

endmodule
