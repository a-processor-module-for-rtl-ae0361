// tb_processor_module: end-to-end test of the processor module at its default size.
//
// The microprogram is loaded through the program-load interface (five bytes per word,
// reset strobe first) and then run. It is an I/O handler in the style of a polling dispatcher:
//   - a 6-bit I/O status word is read, masked with an "active" mask in R0 and dispatched with
//     an 8-way priority jump (CJV) to a service routine per status bit;
//   - the input routines store each byte of a packet arriving on input port 0 at 0x0101 upward
//     (pointer R3:R2) and of one arriving on input port 1 at 0x0201 upward (R5:R4); the
//     last-byte routines also write the packet length + 1 at 0x0100 / 0x0200 and mark the
//     port inactive;
//   - the port-0 packet is then sent back on output port 0 from memory, the last byte marked when
//     the pointer reaches the stored length;
//   - finally the first two packet bytes are multiplied with eight Am2903 multiply steps under
//     a sequencer counter loop (count loaded from a register with RLD), with Q fed through
//     the Am2904 shift linkage, and the 16-bit product is sent as a two-byte packet on output
//     port 1.
// Expected results (echoed packet, stored length, product) are computed here. The test also
// checks that straight-line micro-instructions execute one per clock, and counts each
// mechanism (program load, input read, last-byte input, output write, last-byte output,
// priority dispatch, map jump, subroutine call/return, loop, counter loop, memory read and
// write, multiply step, status-register read, RLD); a mechanism that never happens is a failure.
module tb_processor_module;
  import pm_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, dsbl_n, ld_stb;
  logic [7:0] pld;
  logic [1:0] irdy, ilast, iack, ordy, olast, oack;
  logic [1:0][7:0] idata, odata;
  logic [11:0] uaddr;

  processor_module dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // ---------------------------------------------------------------- microprogram assembly
  localparam int PLEN = 152;  // words 0x000-0x097
  logic [39:0] prog [PLEN];

  // One micro-instruction from its fields (see pm_pkg::uword_t).
  function automatic logic [39:0] W(input logic [11:0] jf, input logic [3:0] dst,
      input logic [3:0] fn, input logic i0, input logic [1:0] ci, input logic [3:0] cc,
      input logic [3:0] sq, input logic ccen_n, input logic [2:0] c, input logic ioen,
      input logic rd, input logic ce_n, input logic ien_n, input logic ea_n);
    return {jf, dst, fn, i0, ci, cc, sq, ccen_n, c, ioen, rd, ce_n, ien_n, ea_n};
  endfunction

  // Common forms.
  // Register b <= constant v (R = direct data, F = R, F -> Y, write).
  function automatic logic [39:0] LDK(input logic [3:0] b, input logic [7:0] v);
    return W({v, b}, 4'h4, 4'h6, 0, 2'b00, 4'h0, SQ_CONT, 1, C_NONE, 0, 0, 1, 0, 1);
  endfunction
  // Register b <= register b AND NOT mask, status loaded.
  function automatic logic [39:0] MASK(input logic [3:0] b, input logic [7:0] m);
    return W({m, b}, 4'h4, 4'h9, 0, 2'b00, 4'h0, SQ_CONT, 1, C_NONE, 0, 0, 0, 0, 1);
  endfunction
  // Jump to a fixed address, unconditional or on condition code cc.
  function automatic logic [39:0] JMP(input logic [3:0] op, input logic [11:0] a,
                                      input logic cond, input logic [3:0] cc);
    return W(a, 4'hF, 4'h4, 0, 2'b00, cc, op, ~cond, C_NONE, 0, 0, 1, 1, 0);
  endfunction
  // Sequencer op with no data path activity.
  function automatic logic [39:0] SEQ(input logic [3:0] op, input logic cond, input logic [3:0] cc);
    return W(12'h000, 4'hF, 4'h4, 0, 2'b00, cc, op, ~cond, C_NONE, 0, 0, 1, 1, 0);
  endfunction
  // B bus transfer from register b with C field c (no register change).
  function automatic logic [39:0] XFER(input logic [3:0] b, input logic [2:0] c);
    return W({8'h00, b}, 4'hF, 4'h4, 0, 2'b00, 4'h0, SQ_CONT, 1, c, 0, 0, 1, 1, 0);
  endfunction
  // lower address <= register b; register b <= b + 1.
  function automatic logic [39:0] LLA_INC(input logic [3:0] b);
    return W({8'h00, b}, 4'h4, 4'h4, 0, 2'b01, 4'h0, SQ_CONT, 1, C_LLA, 0, 0, 1, 0, 0);
  endfunction

  localparam logic [11:0] MAIN = 12'h008, DISPATCH = 12'h010, IOSVC = 12'h020,
                          I0R = 12'h030, LI0R = 12'h040, I1R = 12'h038, LI1R = 12'h048, TX = 12'h050, O0R = 12'h060,
                          L00 = 12'h068, MUL = 12'h070, MAPT = 12'h090;
  localparam logic [3:0] CC_Z = 4'h4, CC_NZ = 4'h5;   // CT = MZ / CT = NOT MZ

  task automatic assemble;
    for (int k = 0; k < PLEN; k++) prog[k] = UW_NOP;
    // initialisation
    prog[0] = LDK(4'd0, 8'h33);              // R0: input ports active (status bits 0, 1, 4, 5)
    prog[1] = LDK(4'd2, 8'h01);              // R3:R2: pointer for input 0
    prog[2] = LDK(4'd3, 8'h01);
    prog[3] = LDK(4'd4, 8'h01);              // R5:R4: pointer for input 1
    prog[4] = LDK(4'd5, 8'h02);
    prog[5] = W({8'h09, 4'd0}, 4'hF, 4'h4, 0, 2'b00, 4'h0, SQ_JMAP, 1, C_NONE, 0, 0, 1, 1, 0);
    prog[MAPT + 3] = JMP(SQ_CJP, MAIN, 0, 0); // JMAP on R0 = 0x33 lands here
    // main loop: call the dispatcher until no port is active
    prog[MAIN]     = JMP(SQ_CJS, DISPATCH, 0, 0);
    prog[MAIN + 1] = W({8'h00, 4'd0}, 4'hF, 4'h4, 0, 2'b00, 4'h0, SQ_CONT, 1, C_NONE, 0, 0, 0, 1, 0);
    prog[MAIN + 2] = JMP(SQ_CJP, MAIN, 1, CC_Z);   // R0 != 0: keep polling
    prog[MAIN + 3] = JMP(SQ_CJP, TX, 0, 0);
    // dispatcher: R1 <= I/O status AND R0; push; 8-way dispatch if R1 != 0, else return
    prog[DISPATCH]     = W({4'h0, 4'd0, 4'd1}, 4'h4, 4'hC, 0, 2'b00, 4'h0, SQ_PUSH, 1, C_RIOS, 0, 0, 0, 0, 0);
    prog[DISPATCH + 1] = W({IOSVC[11:4], 4'd1}, 4'hF, 4'h4, 0, 2'b00, CC_Z, SQ_CJV, 0, C_NONE, 0, 0, 1, 1, 0);
    prog[DISPATCH + 2] = SEQ(SQ_CRTN, 0, 0);
    // dispatch table
    prog[IOSVC + 0] = JMP(SQ_CJP, I0R, 0, 0);
    prog[IOSVC + 1] = JMP(SQ_CJP, I1R, 0, 0);
    prog[IOSVC + 2] = JMP(SQ_CJP, O0R, 0, 0);
    prog[IOSVC + 3] = SEQ(SQ_CRTN, 0, 0);
    prog[IOSVC + 4] = JMP(SQ_CJP, LI0R, 0, 0);
    prog[IOSVC + 5] = JMP(SQ_CJP, LI1R, 0, 0);
    // input byte, not last
    prog[I0R + 0] = LLA_INC(4'd2);
    prog[I0R + 1] = XFER(4'd3, C_LHA);
    prog[I0R + 2] = MASK(4'd1, 8'h01);
    prog[I0R + 3] = W(12'h000, 4'hF, 4'h4, 0, 2'b00, CC_NZ, SQ_LOOP, 0, 3'b001, 1, 0, 1, 1, 0);
    prog[I0R + 4] = SEQ(SQ_CRTN, 0, 0);
    // input byte, last of packet
    prog[LI0R + 0] = MASK(4'd0, 8'h11);
    prog[LI0R + 1] = LLA_INC(4'd2);
    prog[LI0R + 2] = XFER(4'd3, C_LHA);
    prog[LI0R + 3] = W(12'h000, 4'hF, 4'h4, 0, 2'b00, 4'h0, SQ_CONT, 1, 3'b001, 1, 0, 1, 1, 0);
    prog[LI0R + 4] = W({8'h10, 4'd1}, 4'h4, 4'h9, 0, 2'b00, 4'h0, SQ_CONT, 1, C_CLA, 0, 0, 0, 0, 1);
    prog[LI0R + 5] = W({8'h00, 4'd2}, 4'hF, 4'h4, 0, 2'b00, CC_NZ, SQ_LOOP, 0, C_WRITE, 0, 0, 1, 1, 0);
    prog[LI0R + 6] = SEQ(SQ_CRTN, 0, 0);
    // input port 1: same routines with pointer R5:R4 and status bits 1, 5
    prog[I1R + 0] = LLA_INC(4'd4);
    prog[I1R + 1] = XFER(4'd5, C_LHA);
    prog[I1R + 2] = MASK(4'd1, 8'h02);
    prog[I1R + 3] = W(12'h000, 4'hF, 4'h4, 0, 2'b00, CC_NZ, SQ_LOOP, 0, 3'b011, 1, 0, 1, 1, 0);
    prog[I1R + 4] = SEQ(SQ_CRTN, 0, 0);
    prog[LI1R + 0] = MASK(4'd0, 8'h22);
    prog[LI1R + 1] = LLA_INC(4'd4);
    prog[LI1R + 2] = XFER(4'd5, C_LHA);
    prog[LI1R + 3] = W(12'h000, 4'hF, 4'h4, 0, 2'b00, 4'h0, SQ_CONT, 1, 3'b011, 1, 0, 1, 1, 0);
    prog[LI1R + 4] = W({8'h20, 4'd1}, 4'h4, 4'h9, 0, 2'b00, 4'h0, SQ_CONT, 1, C_CLA, 0, 0, 0, 0, 1);
    prog[LI1R + 5] = W({8'h00, 4'd4}, 4'hF, 4'h4, 0, 2'b00, CC_NZ, SQ_LOOP, 0, C_WRITE, 0, 0, 1, 1, 0);
    prog[LI1R + 6] = SEQ(SQ_CRTN, 0, 0);
    // transmit set-up
    prog[TX + 0] = LDK(4'd7, 8'h01);
    prog[TX + 1] = XFER(4'd7, C_LHA);
    prog[TX + 2] = XFER(4'd7, C_CLA);
    prog[TX + 3] = W({8'h00, 4'd10}, 4'h4, 4'h4, 0, 2'b00, 4'h0, SQ_CONT, 1, C_NONE, 0, 1, 1, 0, 0); // R10 <= mem
    prog[TX + 4] = LDK(4'd6, 8'h01);
    prog[TX + 5] = LDK(4'd0, 8'h04);           // output port 0 active (status bit 2)
    prog[TX + 6] = JMP(SQ_CJS, DISPATCH, 0, 0);
    prog[TX + 7] = W({8'h00, 4'd0}, 4'hF, 4'h4, 0, 2'b00, 4'h0, SQ_CONT, 1, C_NONE, 0, 0, 0, 1, 0);
    prog[TX + 8] = JMP(SQ_CJP, TX + 6, 1, CC_Z);
    prog[TX + 9] = JMP(SQ_CJP, MUL, 0, 0);
    // output byte
    prog[O0R + 0] = LLA_INC(4'd6);
    prog[O0R + 1] = XFER(4'd7, C_LHA);
    prog[O0R + 2] = W({4'h0, 4'd6, 4'd10}, 4'hF, 4'hB, 0, 2'b00, 4'h0, SQ_CONT, 1, C_NONE, 0, 0, 0, 1, 0);
    prog[O0R + 3] = JMP(SQ_CJP, L00, 1, CC_NZ);   // R6 = R10: last byte
    prog[O0R + 4] = MASK(4'd1, 8'h04);
    prog[O0R + 5] = W(12'h000, 4'hF, 4'h4, 0, 2'b00, CC_NZ, SQ_LOOP, 0, 3'b100, 1, 1, 1, 1, 0);
    prog[O0R + 6] = SEQ(SQ_CRTN, 0, 0);
    prog[L00 + 0] = MASK(4'd0, 8'h04);
    prog[L00 + 1] = MASK(4'd1, 8'h04);
    prog[L00 + 2] = W(12'h000, 4'hF, 4'h4, 0, 2'b00, CC_NZ, SQ_LOOP, 0, 3'b101, 1, 1, 1, 1, 0);
    prog[L00 + 3] = SEQ(SQ_CRTN, 0, 0);
    // multiply the first two packet bytes
    prog[MUL + 0] = LDK(4'd11, 8'h01);
    prog[MUL + 1] = LLA_INC(4'd11);
    prog[MUL + 2] = W({8'h00, 4'd12}, 4'h4, 4'h4, 0, 2'b00, 4'h0, SQ_CONT, 1, C_NONE, 0, 1, 1, 0, 0);
    prog[MUL + 3] = XFER(4'd11, C_LLA);
    prog[MUL + 4] = W({8'h00, 4'd13}, 4'h4, 4'h4, 0, 2'b00, 4'h0, SQ_CONT, 1, C_NONE, 0, 1, 1, 0, 0);
    prog[MUL + 5] = W({8'h00, 4'd13}, 4'h6, 4'h4, 0, 2'b00, 4'h0, SQ_CONT, 1, C_NONE, 0, 0, 1, 0, 0); // Q <= R13
    prog[MUL + 6] = LDK(4'd14, 8'h00);
    prog[MUL + 7] = LDK(4'd15, 8'h07);
    // variable counter load: counter <= {jf[11:8], B} = {0, R15} = 7
    prog[MUL + 8] = W({4'h0, 4'h0, 4'd15}, 4'hF, 4'h4, 0, 2'b00, 4'h0, SQ_CONT, 1, C_RLD, 0, 0, 1, 1, 0);
    // push the loop start; the condition fails (MZ = 1 from the last mask), so the counter
    // keeps 7 instead of loading 0x0FF from the jump field
    prog[MUL + 9] = W(12'h0FF, 4'hF, 4'h4, 0, 2'b00, CC_Z, SQ_PUSH, 0, C_NONE, 0, 0, 1, 1, 0);
    // multiply step: A = R12, B = R14, shift code 00110 (QIO7 <= SIO0), repeat 8 times
    prog[MUL + 10] = W({4'b0110, 4'd12, 4'd14}, 4'h0, 4'h0, 0, 2'b00, 4'h0, SQ_RFCT, 1, C_NONE, 0, 0, 1, 0, 0);
    // read the status register (MZ of the last status load is 1) into R15
    prog[MUL + 11] = W({8'h00, 4'd15}, 4'h4, 4'h4, 0, 2'b00, 4'h0, SQ_CONT, 1, C_RSR, 0, 0, 1, 0, 0);
    prog[MUL + 12] = W({8'h00, 4'd14}, 4'hF, 4'h4, 0, 2'b00, 4'h0, SQ_CONT, 1, 3'b110, 1, 0, 1, 1, 0); // out1 <= R14
    prog[MUL + 13] = W({8'h08, 4'd1}, 4'hF, 4'hC, 0, 2'b00, 4'h0, SQ_CONT, 1, C_RIOS, 0, 0, 0, 1, 1);
    prog[MUL + 14] = JMP(SQ_CJP, MUL + 13, 1, CC_NZ);   // wait until output 1 is clear
    prog[MUL + 15] = W(12'h000, 4'hF, 4'h4, 1, 2'b00, 4'h0, SQ_CONT, 1, 3'b111, 1, 0, 1, 1, 0); // out1 <= Q, last
    prog[MUL + 16] = JMP(SQ_CJP, MUL + 16, 0, 0);       // done
  endtask

  // ---------------------------------------------------------------- load
  int n_loaded = 0;
  task automatic strobe(input logic [7:0] v);
    pld = v; ld_stb = 1; @(posedge clk); #1; ld_stb = 0; @(posedge clk); #1;
  endtask

  task automatic load_program;
    dsbl_n = 0; rst_n = 0; #1;
    strobe(8'h00);                      // reset sequencer and ring
    rst_n = 1;
    for (int k = 0; k < PLEN; k++)
      for (int b = 0; b < 5; b++) begin
        strobe(prog[k][39 - 8 * b -: 8]);
        n_loaded++;
      end
    dsbl_n = 1; rst_n = 0;
    repeat (2) @(posedge clk); #1;
  endtask

  // ---------------------------------------------------------------- port models
  localparam int N = 6;
  logic [7:0] pkt [N];
  logic [7:0] pkt1 [N];
  logic [7:0] rx0 [$];
  logic       rx0_last [$];
  logic [7:0] rx1 [$];
  logic       rx1_last [$];
  logic       go = 0;

  // Both senders present each byte in the same cycle, so the dispatcher regularly sees two
  // pending requests and serves the second one through the LOOP back to the dispatch jump.
  initial begin : senders
    irdy = 0; ilast = 0; idata = '0;
    wait (go);
    for (int k = 0; k < N; k++) begin
      repeat ($urandom_range(1, 20)) @(posedge clk);
      #2;
      idata[0] = pkt[k];  ilast[0] = (k == N - 1); irdy[0] = 1;
      idata[1] = pkt1[k]; ilast[1] = (k == N - 1); irdy[1] = 1;
      fork
        begin wait (iack[0]); repeat ($urandom_range(0, 3)) @(posedge clk); #2; irdy[0] = 0; wait (!iack[0]); end
        begin wait (iack[1]); repeat ($urandom_range(0, 3)) @(posedge clk); #2; irdy[1] = 0; wait (!iack[1]); end
      join
    end
  end

  for (genvar p = 0; p < 2; p++) begin : receivers
    initial begin
      oack[p] = 0;
      forever begin
        wait (ordy[p]);
        repeat ($urandom_range(0, 5)) @(posedge clk);
        if (p == 0) begin rx0.push_back(odata[0]); rx0_last.push_back(olast[0]); end
        else        begin rx1.push_back(odata[1]); rx1_last.push_back(olast[1]); end
        #2; oack[p] = 1;
        wait (!ordy[p]);
        repeat ($urandom_range(0, 5)) @(posedge clk);
        #2; oack[p] = 0;
      end
    end
  end

  // ---------------------------------------------------------------- mechanism counters
  int c_in, c_in_last, c_out, c_out_last, c_cjv, c_jmap, c_call, c_ret, c_loop_back,
      c_rfct_back, c_mem_rd, c_mem_wr, c_mul, c_rsr, c_rld;
  always @(posedge clk) if (rst_n && dsbl_n) begin
    if (dut.ctl.in_rd0) begin c_in++; if (ilast[0]) c_in_last++; end
    if (dut.ctl.in_rd1) begin c_in++; if (ilast[1]) c_in_last++; end
    if (dut.ctl.out_wr0 || dut.ctl.out_wr1) begin c_out++; if (dut.ctl.out_last) c_out_last++; end
    if (dut.uir.i10 == SQ_CJV && uaddr[11:4] == IOSVC[11:4]) c_cjv++;
    if (dut.uir.i10 == SQ_JMAP) c_jmap++;
    if (dut.uir.i10 == SQ_CJS) c_call++;
    if (dut.uir.i10 == SQ_CRTN && (dut.uir.ccen_n || !dut.ct)) c_ret++;
    if (dut.uir.i10 == SQ_LOOP && dut.ct) c_loop_back++;
    if (dut.uir.i10 == SQ_RFCT && dut.u_seq.rc != 0) c_rfct_back++;
    if (dut.uir.rd) c_mem_rd++;
    if (dut.ctl.mem_we) c_mem_wr++;
    if (!dut.uir.ien_n && dut.uir.i03[4:0] == 5'd0 && dut.uir.i03[8:5] == 4'h0) c_mul++;
    if (dut.ctl.bsrc == BSRC_STATUS) c_rsr++;
    if (dut.ctl.rld) c_rld++;
  end

  // ---------------------------------------------------------------- test
  logic [15:0] prod;
  int cyc;
  initial begin
    {c_in, c_in_last, c_out, c_out_last, c_cjv, c_jmap, c_call, c_ret, c_loop_back,
     c_rfct_back, c_mem_rd, c_mem_wr, c_mul, c_rsr, c_rld} = '0;
    ld_stb = 0; pld = 0; dsbl_n = 1; rst_n = 0;
    for (int k = 0; k < N; k++) begin
      pkt[k] = 8'($urandom_range(1, 255)); pkt1[k] = 8'($urandom_range(0, 255));
    end
    assemble();
    repeat (2) @(posedge clk); #1;
    load_program();
    chk("bytes loaded", 16'(n_loaded), 16'(5 * PLEN));
    // loaded words read back from the control store
    for (int k = 0; k < PLEN; k += 17) chk("store word", dut.u_ucs.mem[k][15:0], prog[k][15:0]);
    // one micro-instruction per clock: 0 -> 1 -> ... -> 5 -> (JMAP) 0x93 -> 0x08
    rst_n = 1; #1;
    for (int k = 1; k <= 5; k++) begin
      chk("uaddr straight", 16'(uaddr), 16'(k)); @(posedge clk); #1;
    end
    chk("uaddr jmap", 16'(uaddr), 16'h093); @(posedge clk); #1;
    chk("uaddr after jmap", 16'(uaddr), 16'(MAIN));
    go = 1;
    cyc = 0;
    while (rx1.size() < 2 && cyc < 100000) begin @(posedge clk); cyc++; end
    // echoed packet
    chk("rx0 count", 16'(rx0.size()), 16'(N));
    for (int k = 0; k < N && k < rx0.size(); k++) begin
      chk($sformatf("rx0 byte %0d", k), 16'(rx0[k]), 16'(pkt[k]));
      chk($sformatf("rx0 last %0d", k), 16'(rx0_last[k]), 16'(k == N - 1));
    end
    chk("stored length+1", 16'(dut.u_mem.mem[16'h0100]), 16'(N + 1));
    for (int k = 0; k < N; k++) chk("stored byte", 16'(dut.u_mem.mem[16'h0101 + k]), 16'(pkt[k]));
    chk("stored length+1 (port 1)", 16'(dut.u_mem.mem[16'h0200]), 16'(N + 1));
    for (int k = 0; k < N; k++) chk("stored byte (port 1)", 16'(dut.u_mem.mem[16'h0201 + k]), 16'(pkt1[k]));
    // product packet
    prod = 16'(pkt[0]) * 16'(pkt[1]);
    chk("rx1 count", 16'(rx1.size()), 16'd2);
    if (rx1.size() == 2) begin
      chk("product hi", 16'(rx1[0]), 16'(prod[15:8]));
      chk("product lo", 16'(rx1[1]), 16'(prod[7:0]));
      chk("product last", 16'({rx1_last[0], rx1_last[1]}), 16'b01);
    end
    chk("status read", 16'(dut.u_alu.ram[15]), 16'h0001);   // Z set by the last mask
    // mechanisms
    chk("seen program load", 16'(n_loaded > 0), 16'd1);
    chk("seen input read", 16'(c_in == 2 * N), 16'd1);
    chk("seen last input", 16'(c_in_last), 16'd2);
    chk("seen output write", 16'(c_out == N + 2), 16'd1);
    chk("seen last output", 16'(c_out_last), 16'd2);
    chk("seen priority dispatch", 16'(c_cjv > 0), 16'd1);
    chk("seen map jump", 16'(c_jmap), 16'd1);
    chk("seen call", 16'(c_call > 0), 16'd1);
    chk("seen return", 16'(c_ret > 0), 16'd1);
    chk("seen loop back", 16'(c_loop_back > 0), 16'd1);
    chk("seen counter loop", 16'(c_rfct_back), 16'd7);
    chk("seen memory read", 16'(c_mem_rd > 0), 16'd1);
    chk("seen memory write", 16'(c_mem_wr > 0), 16'd1);
    chk("seen multiply steps", 16'(c_mul), 16'd8);
    chk("seen status read", 16'(c_rsr > 0), 16'd1);
    chk("seen variable counter load", 16'(c_rld), 16'd1);
    $display("mechanisms: in=%0d in_last=%0d out=%0d out_last=%0d cjv=%0d jmap=%0d call=%0d ret=%0d loop_back=%0d rfct_back=%0d mem_rd=%0d mem_wr=%0d mul=%0d rsr=%0d rld=%0d cycles=%0d",
             c_in, c_in_last, c_out, c_out_last, c_cjv, c_jmap, c_call, c_ret, c_loop_back,
             c_rfct_back, c_mem_rd, c_mem_wr, c_mul, c_rsr, c_rld, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
