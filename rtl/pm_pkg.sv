// pm_pkg: types and constants shared by the processor module.
//
// The processor module is controlled by a 40-bit micro-instruction. Its fields are numbered
// 1 to 40 from the most significant end, as in the microcode format: field bit k is bit
// (40-k) of the packed word, so bit 1 is the MSB. Several fields overlap in bits 1-12: the
// Am2910 jump address D11-0, the direct data byte (bits 1-8), the shift-linkage code (bits 1-4),
// the A address (bits 5-8) and the B address (bits 9-12). The overlap and the bit positions
// follow the document's microcode format; the packed-struct form is this design's own.
package pm_pkg;

  // Micro-instruction, field bits 1..40 from MSB to LSB.
  typedef struct packed {
    logic [11:0] jf;       // bits 1-12: D11-0 / {shift I9-6, Aadr, Badr} / {direct data, Badr}
    logic [8:0]  i03;      // bits 13-21: Am2903 instruction I8-0
    logic [1:0]  i04_ci;   // bits 22-23: Am2904 I12, I11 (carry-in select)
    logic [3:0]  i04_cc;   // bits 24-27: Am2904 I3-0 (condition code select)
    logic [3:0]  i10;      // bits 28-31: Am2910 instruction I3-0
    logic        ccen_n;   // bit 32: condition code enable, active low
    logic [2:0]  c;        // bits 33-35: C1 C2 C3 (C1 is the MSB of the C value)
    logic        ioen;     // bit 36: I/O instruction
    logic        rd;       // bit 37: Y bus from main memory (1) or ALU (0)
    logic        ce_n;     // bit 38: status register load enable, active low
    logic        ien_n;    // bit 39: ALU write enable, active low
    logic        ea_n;     // bit 40: ALU R operand = direct data (1) or A register (0)
  } uword_t;

  // C field values when IOEN = 0 (B bus source and destination).
  typedef enum logic [2:0] {
    C_RIOS  = 3'd0,   // I/O status -> ALU DB
    C_RSR   = 3'd1,   // status register -> ALU DB
    C_NONE  = 3'd2,   // ALU DB -> nothing (default)
    C_CLA   = 3'd3,   // clear lower address register
    C_LHA   = 3'd4,   // ALU DB -> higher address register
    C_LLA   = 3'd5,   // ALU DB -> lower address register
    C_WRITE = 3'd6,   // ALU DB -> main memory
    C_RLD   = 3'd7    // ALU DB -> Am2910 register/counter (low 8 bits)
  } cfield_e;

  // Am2910 instructions.
  typedef enum logic [3:0] {
    SQ_JZ   = 4'h0, SQ_CJS  = 4'h1, SQ_JMAP = 4'h2, SQ_CJP  = 4'h3,
    SQ_PUSH = 4'h4, SQ_JSRP = 4'h5, SQ_CJV  = 4'h6, SQ_JRP  = 4'h7,
    SQ_RFCT = 4'h8, SQ_RPCT = 4'h9, SQ_CRTN = 4'hA, SQ_CJPP = 4'hB,
    SQ_LDCT = 4'hC, SQ_LOOP = 4'hD, SQ_CONT = 4'hE, SQ_TWB  = 4'hF
  } seq_op_e;

  // Source of the B bus in a given cycle.
  typedef enum logic [2:0] {
    BSRC_ALU, BSRC_IOSTAT, BSRC_STATUS, BSRC_IN0, BSRC_IN1
  } bsrc_e;

  // Control strobes derived from the micro-instruction.
  typedef struct packed {
    bsrc_e      bsrc;      // B bus source
    logic       oe_b_n;    // Am2903 DB output enable, active low
    logic       se_n;      // Am2904 shift enable, active low
    logic       cla;       // clear lower address register
    logic       lha;       // load higher address register
    logic       lla;       // load lower address register
    logic       mem_we;    // write main memory from the B bus
    logic       rld;       // variable load of the Am2910 register/counter
    logic       in_rd0;    // read input port 0
    logic       in_rd1;    // read input port 1
    logic       out_wr0;   // write output port 0
    logic       out_wr1;   // write output port 1
    logic       out_last;  // written byte is the last of its packet
  } ctl_t;

  // The micro-instruction held in the register while loading: no writes, no I/O, continue.
  localparam uword_t UW_NOP = '{jf: 12'h000, i03: 9'h000, i04_ci: 2'b00, i04_cc: 4'h0,
                                i10: 4'hE, ccen_n: 1'b1, c: 3'd2, ioen: 1'b0, rd: 1'b0,
                                ce_n: 1'b1, ien_n: 1'b1, ea_n: 1'b0};

endpackage
