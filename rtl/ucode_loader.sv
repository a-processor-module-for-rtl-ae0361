// ucode_loader: microprogram load logic.
//
// What it does: lets an external source write the control store five bytes per
// micro-instruction, using the sequencer itself as the address counter.
//
// How it works: a 5-stage ring counter (one-hot, stage 1 after reset) selects which byte of the
// current word the next load strobe writes. While disabled (dsbl_n low) the sequencer runs only
// on load strobes and its instruction is forced to CONT, and its carry-in is high only when the
// ring is at stage 5, so the microprogram counter advances after every fifth byte. Reset
// (rst_n low) forces the instruction to JZ (address 0, stack cleared) and presets the ring. In
// normal operation (dsbl_n high) the carry-in is always 1, the instruction comes from the uIR
// and the sequencer runs on every clock.
//
// Interface: i10_uc is the uIR's sequencer field; i10 goes to the sequencer. ld_stb is one
// clock wide per program-load pulse; seq_en is the sequencer's clock enable; we selects the
// byte written with the load data.
//
// Timing: synchronous to the module clock. Load sequence: one strobe with rst_n and dsbl_n low
// (reset), then strobes with only dsbl_n low, five per word, then rst_n low with dsbl_n high
// for at least one clock, then rst_n high: execution starts at word 0.
//
// From the document: the instruction forcing, the ring counter, the carry-in rule and the
// loading sequence. This design's choice: the separate load clock of the document is a one-cycle
// strobe sampled by the module clock, so the module has a single clock.
module ucode_loader (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dsbl_n,
  input  logic       ld_stb,
  input  logic [3:0] i10_uc,
  output logic [3:0] i10,
  output logic       ci,
  output logic       seq_en,
  output logic [4:0] we
);

  logic [4:0] ring;   // ring[k] high: byte k+1 is next

  always_comb begin
    if (!rst_n)       i10 = 4'h0;   // JZ
    else if (!dsbl_n) i10 = 4'hE;   // CONT
    else              i10 = i10_uc;
  end

  assign ci     = dsbl_n | ring[4];
  assign seq_en = dsbl_n | ld_stb;
  assign we     = (!dsbl_n && rst_n && ld_stb) ? ring : 5'b00000;

  always_ff @(posedge clk) begin
    if (!rst_n)                          ring <= 5'b00001;
    else if (!dsbl_n && ld_stb)          ring <= {ring[3:0], ring[4]};
  end

endmodule
