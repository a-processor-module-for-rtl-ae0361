// ucode_store: writable control store and micro-instruction register.
//
// What it does: holds the microprogram (2^AW words of 40 bits) and loads the micro-instruction
// register (uIR) from the word the sequencer selects, once per clock.
//
// How it works: the uIR is the registered read port of the memory: at each rising edge
// uIR <= mem[addr]. The memory is written one byte at a time: we[k] (k = 0..4) writes byte k+1
// of the word at addr, byte 1 being micro-instruction bits 1-8 (the most significant). While
// hold_nop is high (microprogram loading) the uIR is loaded with a no-operation word instead,
// so that the data path stays idle while the store is being written.
//
// Interface: addr comes from the sequencer's Y output; wdata and we from the load logic.
//
// Timing: single clock; the word selected in one cycle is executed in the next (the one-level
// pipeline of the document).
//
// From the document: 12-bit micro-address, 40-bit word, five bytes per word, uIR loaded at the
// start of each cycle. This design's choice: the no-operation uIR during loading (the document
// leaves the data path running while the store is loaded).
module ucode_store
  import pm_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [4:0]    we,
  input  logic [7:0]    wdata,
  input  logic          hold_nop,
  output uword_t        uir
);

  logic [39:0] mem [2**AW];

  always_ff @(posedge clk) begin
    for (int k = 0; k < 5; k++) begin
      if (we[k]) mem[addr][39-8*k -: 8] <= wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (hold_nop) uir <= UW_NOP;
    else          uir <= uword_t'(mem[addr]);
  end

endmodule
