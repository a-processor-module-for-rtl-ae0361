// processor_module: a microprogrammed 8-bit processor module for packet communication.
//
// What it does: a general-purpose, microprogrammable processing element with the same external
// connections as a 2x2 packet router: two byte-serial input ports and two byte-serial output
// ports using reset (four-phase) signalling, plus a program-load interface for the control
// store. The microcode decides whether it acts as a cell block or as an instruction processor.
//
// How it works: every clock the micro-instruction register (uIR) controls the whole module.
//   - ALU (am2903_alu): 16 registers, Q, R/S operand selection, shifts, special functions.
//   - Status and shift control (am2904_status): status register, condition code CT, carry-in,
//     shift linkage.
//   - Sequencer (am2910_seq) with selection logic (seq_select) picks the next micro-address
//     from the uIR, CT (from the status register loaded in an earlier cycle) and the B bus.
//   - B bus: driven by the ALU's B register, an input port, the I/O status or the status
//     register; read by the ALU, main memory, the address registers and the selection logic.
//   - Y bus: driven by the ALU output or main memory (RD bit); read by the ALU register file
//     and both output ports.
//   - I/O status on the B bus: bit0 ISVC0, bit1 ISVC1, bit2 OSVC0, bit3 OSVC1, bit4 ILST0,
//     bit5 ILST1, bits 6-7 zero. Status register on the B bus: {0000, MOVR, MC, MN, MZ}.
// Because CT comes from the registered status, the sequencer and the ALU work in parallel
// (a one-level pipeline): a branch tests the status saved by an earlier micro-instruction.
//
// Interface: clk is the module clock (one micro-instruction per cycle). rst_n low forces the
// sequencer to address 0 and clears the port flip-flops. dsbl_n low enters load mode: each
// one-clock ld_stb writes pld into the next byte of the control store (five bytes per word,
// most significant byte first); one ld_stb with rst_n also low first resets the address.
// uaddr is the micro-address being fetched, for observation.
//
// From the document: the block structure, bus connections, field encoding and all control
// equations, as described in the component modules. This design's choices are listed in each
// component's header; at this level: B and Y are multiplexers rather than tri-state buses, and
// the load clock is a strobe in the module clock domain.
module processor_module
  import pm_pkg::*;
#(
  parameter int unsigned UAW  = 12,  // micro-address bits
  parameter int unsigned HI_W = 8,   // higher memory address register width
  parameter int unsigned LO_W = 8    // lower memory address register width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           dsbl_n,
  input  logic           ld_stb,
  input  logic [7:0]     pld,
  // input ports
  input  logic [1:0]     irdy,
  input  logic [1:0]     ilast,
  input  logic [1:0][7:0] idata,
  output logic [1:0]     iack,
  // output ports
  output logic [1:0]     ordy,
  output logic [1:0]     olast,
  output logic [1:0][7:0] odata,
  input  logic [1:0]     oack,
  output logic [UAW-1:0] uaddr
);

  uword_t     uir;
  ctl_t       ctl;
  logic [7:0] bbus, ybus;

  // ALU
  logic [7:0] alu_db, alu_y;
  logic       alu_z, alu_n, alu_ovr, alu_co, alu_zcx;
  logic       a_sio0, a_sio7, a_qio0, a_qio7;      // ALU-driven shift lines
  logic       s_sio0, s_sion, s_qio0, s_qion;      // shift-mux-driven shift lines
  // status and shift
  logic       ct, c0;
  logic [3:0] status;
  // sequencer
  logic [3:0]     seq_i;
  logic           seq_ci, seq_en;
  logic [UAW-1:0] seq_d, seq_y;
  logic           pl_n, map_n, vect_n, full_n;
  logic [11:0]    sel_d;
  logic [4:0]     ucode_we;
  // ports and memory
  logic [1:0]     isvc, ilst, osvc;
  logic [1:0][7:0] in_data;
  logic [7:0]     mem_rdata;
  logic [HI_W+LO_W-1:0] mem_addr;

  ucode_decode u_dec (.uw(uir), .ctl(ctl));

  // B bus
  always_comb begin
    unique case (ctl.bsrc)
      BSRC_IOSTAT: bbus = {2'b00, ilst[1], ilst[0], osvc[1], osvc[0], isvc[1], isvc[0]};
      BSRC_STATUS: bbus = {4'b0000, status};
      BSRC_IN0:    bbus = in_data[0];
      BSRC_IN1:    bbus = in_data[1];
      default:     bbus = alu_db;
    endcase
  end

  // Y bus
  assign ybus = uir.rd ? mem_rdata : alu_y;

  am2903_alu u_alu (
    .clk     (clk),
    .aadr    (uir.jf[7:4]),
    .badr    (uir.jf[3:0]),
    .da      (uir.jf[11:4]),
    .ea_n    (uir.ea_n),
    .i       (uir.i03),
    .ien_n   (uir.ien_n),
    .oe_b_n  (ctl.oe_b_n),
    .cn      (c0),
    .db_in   (bbus),
    .db_out  (alu_db),
    .y_in    (ybus),
    .y_out   (alu_y),
    .sio0_in (s_sio0),
    .sio7_in (s_sion),
    .qio0_in (s_qio0),
    .qio7_in (s_qion),
    .sio0_out(a_sio0),
    .sio7_out(a_sio7),
    .qio0_out(a_qio0),
    .qio7_out(a_qio7),
    .z       (alu_z),
    .n       (alu_n),
    .ovr     (alu_ovr),
    .co      (alu_co),
    .z_cx    (alu_zcx)
  );

  am2904_status u_sts (
    .clk    (clk),
    .i_cc   (uir.i04_cc),
    .i_ci   (uir.i04_ci),
    .i_sh   ({uir.i03[8], uir.jf[11:8]}),
    .se_n   (ctl.se_n),
    .ce_n   (uir.ce_n),
    .z      (alu_z),
    .c      (alu_co),
    .n      (alu_n),
    .ovr    (alu_ovr),
    .cx     (alu_zcx),
    .sio0_i (a_sio0),
    .sion_i (a_sio7),
    .qio0_i (a_qio0),
    .qion_i (a_qio7),
    .sio0_o (s_sio0),
    .sion_o (s_sion),
    .qio0_o (s_qio0),
    .qion_o (s_qion),
    .ct     (ct),
    .c0     (c0),
    .status (status)
  );

  ucode_loader u_ldr (
    .clk    (clk),
    .rst_n  (rst_n),
    .dsbl_n (dsbl_n),
    .ld_stb (ld_stb),
    .i10_uc (uir.i10),
    .i10    (seq_i),
    .ci     (seq_ci),
    .seq_en (seq_en),
    .we     (ucode_we)
  );

  seq_select u_sel (
    .map_n  (map_n),
    .vect_n (vect_n),
    .rld    (ctl.rld),
    .jf     (uir.jf),
    .bbus   (bbus),
    .d      (sel_d)
  );
  assign seq_d = UAW'(sel_d);

  am2910_seq #(.AW(UAW)) u_seq (
    .clk    (clk),
    .en     (seq_en),
    .i      (seq_i),
    .ccen_n (uir.ccen_n),
    .cc_n   (ct),
    .rld_n  (~ctl.rld),
    .ci     (seq_ci),
    .d      (seq_d),
    .y      (seq_y),
    .pl_n   (pl_n),
    .map_n  (map_n),
    .vect_n (vect_n),
    .full_n (full_n)
  );
  assign uaddr = seq_y;

  ucode_store #(.AW(UAW)) u_ucs (
    .clk      (clk),
    .addr     (seq_y),
    .we       (ucode_we),
    .wdata    (pld),
    .hold_nop (~dsbl_n),
    .uir      (uir)
  );

  in_port u_in0 (
    .clk(clk), .rst_n(rst_n), .rd(ctl.in_rd0), .irdy(irdy[0]), .ilast(ilast[0]),
    .idata(idata[0]), .iack(iack[0]), .isvc(isvc[0]), .ilst(ilst[0]), .data_out(in_data[0])
  );
  in_port u_in1 (
    .clk(clk), .rst_n(rst_n), .rd(ctl.in_rd1), .irdy(irdy[1]), .ilast(ilast[1]),
    .idata(idata[1]), .iack(iack[1]), .isvc(isvc[1]), .ilst(ilst[1]), .data_out(in_data[1])
  );
  out_port u_out0 (
    .clk(clk), .rst_n(rst_n), .wr(ctl.out_wr0), .last(ctl.out_last), .ydata(ybus),
    .oack(oack[0]), .ordy(ordy[0]), .olast(olast[0]), .odata(odata[0]), .osvc(osvc[0])
  );
  out_port u_out1 (
    .clk(clk), .rst_n(rst_n), .wr(ctl.out_wr1), .last(ctl.out_last), .ydata(ybus),
    .oack(oack[1]), .ordy(ordy[1]), .olast(olast[1]), .odata(odata[1]), .osvc(osvc[1])
  );

  main_memory #(.HI_W(HI_W), .LO_W(LO_W)) u_mem (
    .clk   (clk),
    .bbus  (bbus),
    .lha   (ctl.lha),
    .lla   (ctl.lla),
    .cla   (ctl.cla),
    .we    (ctl.mem_we),
    .rdata (mem_rdata),
    .addr  (mem_addr)
  );

endmodule
