// tb_am2910_seq: self-checking test of the microprogram sequencer.
// Y in each step is the address of the next word, so PUSH saves the address of the word
// after it. Runs directed sequences of instructions and checks the address produced each cycle against
// the instruction table: JZ, CONT, CJP pass/fail, CJS/CRTN, JMAP, CJV, PUSH with LOOP,
// RFCT and RPCT loop counts, LDCT, JRP, JSRP, CJPP, TWB, RLD, the clock enable, stack
// overflow (five entries kept) and the PL/MAP/VECT enables.
module tb_am2910_seq;
  logic clk = 0;
  always #5 clk = ~clk;

  logic en, ccen_n, cc_n, rld_n, ci, pl_n, map_n, vect_n, full_n;
  logic [3:0] i;
  logic [11:0] d, y;
  int checks = 0, failures = 0;

  am2910_seq dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic [11:0] got, input logic [11:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // Apply an instruction, check Y, clock once.
  task automatic step(input logic [3:0] op, input logic [11:0] dv, input logic pass,
                      input logic [11:0] exp_y, input string what);
    i = op; d = dv; ccen_n = 1'b0; cc_n = ~pass; #1;
    chk(what, y, exp_y);
    @(posedge clk); #1;
  endtask

  initial begin
    en = 1; ci = 1; rld_n = 1; ccen_n = 1; cc_n = 1; i = 4'h0; d = '0;
    step(4'h0, 12'h000, 1, 12'h000, "jz");
    step(4'hE, 12'h000, 1, 12'h001, "cont");
    step(4'h3, 12'h100, 0, 12'h002, "cjp fail");
    step(4'h3, 12'h100, 1, 12'h100, "cjp pass");
    step(4'h1, 12'h200, 1, 12'h200, "cjs");        // pushes 0x101
    chk("pl", {11'b0, pl_n}, 12'd0);
    step(4'hA, 12'h000, 0, 12'h201, "crtn fail");
    step(4'hA, 12'h000, 1, 12'h101, "crtn pass");  // pops
    i = 4'h2; #1; chk("map", {10'b0, map_n, pl_n}, 12'b01);
    i = 4'h6; #1; chk("vect", {11'b0, vect_n}, 12'd0);
    step(4'h2, 12'h345, 0, 12'h345, "jmap");
    step(4'h6, 12'h3A0, 0, 12'h346, "cjv fail");
    step(4'h6, 12'h3A0, 1, 12'h3A0, "cjv pass");
    // PUSH with counter load, then a LOOP body of two words repeated until pass.
    step(4'h4, 12'h003, 1, 12'h3A1, "push");       // pushes 0x3A1 (next word), R = 3
    step(4'hE, 12'h000, 1, 12'h3A2, "body1");
    step(4'hD, 12'h000, 0, 12'h3A1, "loop fail");
    step(4'hE, 12'h000, 1, 12'h3A2, "body1 again");
    step(4'hD, 12'h000, 1, 12'h3A3, "loop pass");
    step(4'hE, 12'h000, 1, 12'h3A4, "after loop");
    // RFCT: PUSH loads R=2; loop body runs 3 times.
    step(4'h4, 12'h002, 1, 12'h3A5, "push2");      // pushes 0x3A5
    for (int k = 0; k < 3; k++) begin
      step(4'hE, 12'h000, 1, 12'h3A6, "rfct body");
      step(4'h8, 12'h000, 1, (k < 2) ? 12'h3A5 : 12'h3A7, "rfct");
    end
    // RPCT: LDCT 2 then repeat at D three times in total.
    step(4'hC, 12'h002, 1, 12'h3A8, "ldct");
    step(4'h9, 12'h050, 1, 12'h050, "rpct1");
    step(4'h9, 12'h050, 1, 12'h050, "rpct2");
    step(4'h9, 12'h050, 1, 12'h051, "rpct end");
    // JRP with R = 0x002 (left from the count) and JSRP.
    step(4'hC, 12'h777, 1, 12'h052, "ldct 777");
    step(4'h7, 12'h123, 0, 12'h777, "jrp fail->R");
    step(4'h5, 12'h600, 1, 12'h600, "jsrp pass");  // pushes 0x778
    step(4'hB, 12'h700, 1, 12'h700, "cjpp pass");  // pops
    chk("stack empty after cjpp", {11'b0, full_n}, 12'd1);
    // TWB: R = 1, push 0x702; fail -> F while R != 0, then D when R = 0
    step(4'h4, 12'h001, 1, 12'h701, "push3");      // pushes 0x701, R = 1
    step(4'hF, 12'h7F0, 0, 12'h701, "twb r!=0 fail -> F");
    step(4'hF, 12'h7F0, 0, 12'h7F0, "twb r=0 fail -> D");
    // RLD forces a register load with any instruction
    rld_n = 0; step(4'hE, 12'h004, 1, 12'h7F1, "rld"); rld_n = 1;
    step(4'h9, 12'h010, 1, 12'h010, "rpct after rld");
    // Clock enable low: no state change
    en = 0; step(4'hE, 12'h000, 1, 12'h011, "en low"); en = 1;
    step(4'hE, 12'h000, 1, 12'h011, "en back");
    // Stack overflow: six pushes, the sixth overwrites the top.
    step(4'h0, 12'h000, 1, 12'h000, "jz2");
    for (int k = 0; k < 6; k++) step(4'h1, 12'(16 * (k + 1)), 1, 12'(16 * (k + 1)), "cjs n");
    chk("full", {11'b0, full_n}, 12'd0);
    step(4'hA, 12'h000, 1, 12'h051, "ret6");
    step(4'hA, 12'h000, 1, 12'h031, "ret4");
    step(4'hA, 12'h000, 1, 12'h021, "ret3");
    step(4'hA, 12'h000, 1, 12'h011, "ret2");
    step(4'hA, 12'h000, 1, 12'h001, "ret1");
    // CI low holds the counter
    ci = 0; step(4'hE, 12'h000, 1, 12'h002, "ci0"); step(4'hE, 12'h000, 1, 12'h002, "ci0 hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
