// am2904_status: the status and shift control unit, the part of an Am2904 this module uses.
//
// What it does: holds the machine status register (MZ, MN, MC, MOVR), produces the condition
// code CT for the sequencer from it, selects the ALU carry-in, and routes the four shift lines
// of the ALU (SIO0, SIO7, QIO0, QIO7) according to a 5-bit shift-linkage code.
//
// How it works: CT is a 16-way selection of tests on the registered status (the codes of the
// document's "I5 = 1, I4 = 0" column), so the next micro-address never waits for the current
// ALU result. The carry-in is 0, 1, Cx or MC/NOT MC, chosen by I12, I11 and I3-1. The shift
// mux drives the MSB-side lines (SIO7, QIO7) for right shifts (I10 = 0) and the LSB-side lines
// (SIO0, QIO0) for left shifts (I10 = 1); the lines it does not drive are read from the ALU.
// With se_n high it drives nothing (outputs 0). On a clock edge with ce_n low the status
// register loads Z, N, OVR and C (C inverted for CT codes 8 and 9); where the shift table
// names a line "loaded into MC" and shifts are enabled, MC takes that line instead.
//
// Interface: status is {MOVR, MC, MN, MZ}, i.e. B bus bits 3..0 when the status is read.
//
// Timing: single clock, status register written at the rising edge.
//
// From the document: the CT table, the carry-in table, the register-load table and the shift
// linkage table as printed. This design's choices: undriven shift lines read as 0; the status
// register has no reset (the chip has none); an MC load from a shift line takes priority over
// the carry load.
module am2904_status (
  input  logic       clk,
  input  logic [3:0] i_cc,     // I3-0: condition code select
  input  logic [1:0] i_ci,     // {I12, I11}: carry-in select
  input  logic [4:0] i_sh,     // I10-6: shift linkage code
  input  logic       se_n,     // shift enable, active low
  input  logic       ce_n,     // status register load, active low
  input  logic       z,
  input  logic       c,
  input  logic       n,
  input  logic       ovr,
  input  logic       cx,
  // shift lines as driven by the ALU
  input  logic       sio0_i,
  input  logic       sion_i,
  input  logic       qio0_i,
  input  logic       qion_i,
  // shift lines as driven by this unit (0 where it does not drive)
  output logic       sio0_o,
  output logic       sion_o,
  output logic       qio0_o,
  output logic       qion_o,
  output logic       ct,
  output logic       c0,
  output logic [3:0] status
);

  logic mz, mn, mc, movr;
  assign status = {movr, mc, mn, mz};

  // Condition code output.
  always_comb begin
    unique case (i_cc)
      4'h0: ct = (mn ^ movr) | mz;
      4'h1: ct = ~(mn ^ movr) & ~mz;
      4'h2: ct = mn ^ movr;
      4'h3: ct = ~(mn ^ movr);
      4'h4: ct = mz;
      4'h5: ct = ~mz;
      4'h6: ct = movr;
      4'h7: ct = ~movr;
      4'h8: ct = mc | mz;
      4'h9: ct = ~mc & ~mz;
      4'hA: ct = mc;
      4'hB: ct = ~mc;
      4'hC: ct = ~mc | mz;
      4'hD: ct = mc & ~mz;
      4'hE: ct = mn;
      default: ct = ~mn;
    endcase
  end

  // Carry-in multiplexer.
  always_comb begin
    unique case (i_ci)
      2'b00: c0 = 1'b0;
      2'b01: c0 = 1'b1;
      2'b10: c0 = cx;
      default: c0 = (i_cc[3:1] == 3'b100) ? ~mc : mc;
    endcase
  end

  // Shift linkage multiplexer.
  logic       mc_from_shift;
  logic       mc_shift_val;
  always_comb begin
    sio0_o = 1'b0; sion_o = 1'b0; qio0_o = 1'b0; qion_o = 1'b0;
    mc_from_shift = 1'b0;
    mc_shift_val  = 1'b0;
    if (!i_sh[4]) begin
      // right shifts: drive SIOn and QIOn
      unique case (i_sh[3:0])
        4'h0: begin sion_o = 1'b0;    qion_o = 1'b0;   mc_from_shift = 1'b1; mc_shift_val = sio0_i; end
        4'h1: begin sion_o = 1'b1;    qion_o = 1'b1;   end
        4'h2: begin sion_o = 1'b0;    qion_o = mn;     end
        4'h3: begin sion_o = 1'b1;    qion_o = sio0_i; end
        4'h4: begin sion_o = mc;      qion_o = sio0_i; end
        4'h5: begin sion_o = mn;      qion_o = sio0_i; end
        4'h6: begin sion_o = 1'b0;    qion_o = sio0_i; end
        4'h7: begin sion_o = 1'b0;    qion_o = sio0_i; mc_from_shift = 1'b1; mc_shift_val = qio0_i; end
        4'h8: begin sion_o = sio0_i;  qion_o = qio0_i; mc_from_shift = 1'b1; mc_shift_val = sio0_i; end
        4'h9: begin sion_o = mc;      qion_o = qio0_i; mc_from_shift = 1'b1; mc_shift_val = sio0_i; end
        4'hA: begin sion_o = sio0_i;  qion_o = qio0_i; end
        4'hB: begin sion_o = c;       qion_o = sio0_i; end
        4'hC: begin sion_o = mc;      qion_o = sio0_i; mc_from_shift = 1'b1; mc_shift_val = qio0_i; end
        4'hD: begin sion_o = qio0_i;  qion_o = sio0_i; mc_from_shift = 1'b1; mc_shift_val = qio0_i; end
        4'hE: begin sion_o = n ^ ovr; qion_o = sio0_i; end
        default: begin sion_o = qio0_i; qion_o = sio0_i; end
      endcase
    end else begin
      // left shifts: drive SIO0 and QIO0
      unique case (i_sh[3:0])
        4'h0: begin sio0_o = 1'b0;   qio0_o = 1'b0;   mc_from_shift = 1'b1; mc_shift_val = sion_i; end
        4'h1: begin sio0_o = 1'b1;   qio0_o = 1'b1;   mc_from_shift = 1'b1; mc_shift_val = sion_i; end
        4'h2: begin sio0_o = 1'b0;   qio0_o = 1'b0;   end
        4'h3: begin sio0_o = 1'b1;   qio0_o = 1'b1;   end
        4'h4: begin sio0_o = qion_i; qio0_o = 1'b0;   mc_from_shift = 1'b1; mc_shift_val = sion_i; end
        4'h5: begin sio0_o = qion_i; qio0_o = 1'b1;   mc_from_shift = 1'b1; mc_shift_val = sion_i; end
        4'h6: begin sio0_o = qion_i; qio0_o = 1'b0;   end
        4'h7: begin sio0_o = qion_i; qio0_o = 1'b1;   end
        4'h8: begin sio0_o = sion_i; qio0_o = qion_i; mc_from_shift = 1'b1; mc_shift_val = sion_i; end
        4'h9: begin sio0_o = mc;     qio0_o = qion_i; mc_from_shift = 1'b1; mc_shift_val = sion_i; end
        4'hA: begin sio0_o = sion_i; qio0_o = qion_i; end
        4'hB: begin sio0_o = mc;     qio0_o = 1'b0;   end
        4'hC: begin sio0_o = qion_i; qio0_o = mc;     mc_from_shift = 1'b1; mc_shift_val = sion_i; end
        4'hD: begin sio0_o = qion_i; qio0_o = sion_i; mc_from_shift = 1'b1; mc_shift_val = sion_i; end
        4'hE: begin sio0_o = qion_i; qio0_o = mc;     end
        default: begin sio0_o = qion_i; qio0_o = sion_i; end
      endcase
    end
    if (se_n) begin
      sio0_o = 1'b0; sion_o = 1'b0; qio0_o = 1'b0; qion_o = 1'b0;
      mc_from_shift = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!ce_n) begin
      mz   <= z;
      mn   <= n;
      movr <= ovr;
      if (mc_from_shift)                  mc <= mc_shift_val;
      else if (i_cc == 4'h8 || i_cc == 4'h9) mc <= ~c;
      else                                mc <= c;
    end
  end

endmodule
