// in_port: byte-serial input port with reset (four-phase) signalling.
//
// What it does: receives one byte at a time from a sender that raises irdy with the byte on
// idata (and ilast marking the final byte of a packet), and answers with iack.
//
// How it works: a JK flip-flop holds iack. Reading the port (rd, from the micro-instruction)
// sets it (J); the sender's ready going low clears it (K = NOT irdy). So one read completes the
// processor's part of the handshake and the rest (ready falls, acknowledge falls) runs by
// itself. The processor sees only two status bits: isvc (a byte other than the last is
// waiting) and ilst (the last byte of a packet is waiting), both irdy AND NOT iack. The data
// goes straight to the B bus (data_out) when the port is read; there is no data register. The
// buffer is enabled by the read; while the port is not read data_out is 0, so the B bus
// multiplexer of the module can OR or select it freely.
//
// Timing: single clock; iack changes at the rising edge after the read. rst_n (synchronous)
// clears iack.
//
// From the document: the JK arrangement, the status equations and the handshake. This design's
// choices: edge-triggered on the module clock's rising edge; like the document, no synchroniser
// on irdy (the sender must meet the module's clock timing).
module in_port (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rd,
  input  logic       irdy,
  input  logic       ilast,
  input  logic [7:0] idata,
  output logic       iack,
  output logic       isvc,
  output logic       ilst,
  output logic [7:0] data_out
);

  logic avail;
  logic j, k;

  assign avail    = irdy & ~iack;
  assign isvc     = avail & ~ilast;
  assign ilst     = avail & ilast;
  assign data_out = rd ? idata : 8'h00;
  assign j        = rd;
  assign k        = ~irdy;

  always_ff @(posedge clk) begin
    if (!rst_n) iack <= 1'b0;
    else begin
      unique case ({j, k})
        2'b10:   iack <= 1'b1;
        2'b01:   iack <= 1'b0;
        2'b11:   iack <= ~iack;
        default: ;
      endcase
    end
  end

  // A read is only meaningful while a byte is waiting.
  a_read_when_ready: assert property (@(posedge clk) disable iff (!rst_n) rd |-> avail)
    else $error("input port read with no byte waiting");

endmodule
