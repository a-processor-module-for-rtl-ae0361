// ucode_decode: micro-instruction decoding logic.
//
// What it does: turns the encoded fields of the current micro-instruction into the individual
// strobes of the module: B bus source and destination, I/O port read and write strobes, the
// Am2903 DB output enable and the Am2904 shift enable.
//
// How it works (combinational):
//   IOEN = 0: the C field (C1 C2 C3, C1 most significant) names the B bus transfer:
//     0 RIOS (I/O status -> ALU), 1 RSR (status register -> ALU), 2 none, 3 CLA, 4 LHA,
//     5 LLA, 6 WRITE (memory), 7 RLD (sequencer register/counter).
//   IOEN = 1: C1 = 0 is input (C2 = port, C3 = also write the byte to memory);
//             C1 = 1 is output (C2 = port, C3 = last byte of the packet).
//   OE_B_n = NOT(C1 + NOT IOEN . C2): the ALU drives the B bus unless the source is the I/O
//            status, the status register or an input port.
//   SE_n   = EA_n + (Am2910 instruction not 8, A, D or E) + RLD: the shift code shares bits
//            1-4 with the direct data and the jump address, so shifting is only enabled when
//            neither is in use.
//
// From the document: the C field table, the input/output formats, the equations printed for
// RIOS, RSR, CLA, LLA, LHA, WRITE and OE_B, and the rule for SE. This design's choice: SE is
// written from the stated rule (8, A, D, E), not from the printed product-of-terms.
module ucode_decode
  import pm_pkg::*;
(
  input  uword_t uw,
  output ctl_t   ctl
);

  logic c1, c2, c3;
  assign {c1, c2, c3} = uw.c;

  always_comb begin
    ctl = '0;
    ctl.oe_b_n   = ~(c1 | (~uw.ioen & c2));
    ctl.cla      = ~uw.ioen && (uw.c == C_CLA);
    ctl.lha      = ~uw.ioen && (uw.c == C_LHA);
    ctl.lla      = ~uw.ioen && (uw.c == C_LLA);
    ctl.rld      = ~uw.ioen && (uw.c == C_RLD);
    ctl.mem_we   = (~uw.ioen && (uw.c == C_WRITE)) || (uw.ioen && ~c1 && c3);
    ctl.in_rd0   = uw.ioen & ~c1 & ~c2;
    ctl.in_rd1   = uw.ioen & ~c1 &  c2;
    ctl.out_wr0  = uw.ioen &  c1 & ~c2;
    ctl.out_wr1  = uw.ioen &  c1 &  c2;
    ctl.out_last = c3;
    ctl.se_n     = uw.ea_n
                 | ~(uw.i10 inside {SQ_RFCT, SQ_CRTN, SQ_LOOP, SQ_CONT})
                 | ctl.rld;
    if (uw.ioen)
      ctl.bsrc = c1 ? BSRC_ALU : (c2 ? BSRC_IN1 : BSRC_IN0);
    else if (uw.c == C_RIOS)
      ctl.bsrc = BSRC_IOSTAT;
    else if (uw.c == C_RSR)
      ctl.bsrc = BSRC_STATUS;
    else
      ctl.bsrc = BSRC_ALU;
  end

endmodule
