// seq_select: selection logic in front of the sequencer's D input.
//
// What it does: builds the 12-bit jump address from the micro-instruction's jump field and the
// B bus, for the four ways the microcode can jump or load the register/counter.
//
// How it works (combinational):
//   variable register/counter load (rld): D = {jf[11:8], B[7:0]}
//   JMAP (map_n low), 16-way dispatch:   D = {jf[11:4], B[3:0]}
//   CJV (vect_n low), 8-way priority:    D = {jf[11:4], 1'b0, index of the lowest 1 in B}
//   otherwise (PL):                      D = jf
// rld takes priority, because the variable load is used with sequencer instructions that do
// not take their address from D.
//
// From the document: the four formats and the bit fields. This design's choices: the B bus
// bits used by JMAP are the low four; when the B bus is zero the priority index is 0 (the CJV
// is then normally made conditional on a non-zero value, as in the document's example).
module seq_select (
  input  logic        map_n,
  input  logic        vect_n,
  input  logic        rld,
  input  logic [11:0] jf,
  input  logic [7:0]  bbus,
  output logic [11:0] d
);

  logic [2:0] lsb_idx;

  always_comb begin
    lsb_idx = 3'd0;
    for (int k = 7; k >= 0; k--) begin
      if (bbus[k]) lsb_idx = 3'(k);
    end
  end

  always_comb begin
    if (rld)          d = {jf[11:8], bbus};
    else if (!map_n)  d = {jf[11:4], bbus[3:0]};
    else if (!vect_n) d = {jf[11:4], 1'b0, lsb_idx};
    else              d = jf;
  end

endmodule
