// tb_ucode_decode: self-checking test of the micro-instruction decoder.
// Sweeps IOEN and the C field exhaustively (and the shift-enable inputs) and compares every
// strobe with the document's table and equations, evaluated here independently.
module tb_ucode_decode;
  import pm_pkg::*;
  uword_t uw;
  ctl_t   ctl;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  ucode_decode dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  logic c1, c2, c3, io;
  logic exp_se;
  bsrc_e exp_src;
  initial begin
    uw = UW_NOP;
    for (int k = 0; k < 16 * 2 * 2; k++) begin
      {io, c1, c2, c3} = 4'(k);
      uw.ioen = io; uw.c = {c1, c2, c3};
      uw.ea_n = k[4]; uw.i10 = k[5] ? 4'h8 : 4'h1;
      #1;
      chk("rios/bsrc", 4'(ctl.bsrc), 4'(io ? (c1 ? BSRC_ALU : (c2 ? BSRC_IN1 : BSRC_IN0))
                                       : ({c1,c2,c3} == 3'd0 ? BSRC_IOSTAT
                                       : ({c1,c2,c3} == 3'd1 ? BSRC_STATUS : BSRC_ALU))));
      chk("cla", {3'b0, ctl.cla}, {3'b0, ~io & ~c1 & c2 & c3});
      chk("lha", {3'b0, ctl.lha}, {3'b0, ~io & c1 & ~c2 & ~c3});
      chk("lla", {3'b0, ctl.lla}, {3'b0, ~io & c1 & ~c2 & c3});
      chk("write", {3'b0, ctl.mem_we}, {3'b0, (~io & c1 & c2 & ~c3) | (io & ~c1 & c3)});
      chk("rld", {3'b0, ctl.rld}, {3'b0, ~io & c1 & c2 & c3});
      chk("oe_b", {3'b0, ctl.oe_b_n}, {3'b0, ~(c1 | (~io & c2))});
      chk("in", {2'b0, ctl.in_rd1, ctl.in_rd0}, {2'b0, io & ~c1 & c2, io & ~c1 & ~c2});
      chk("out", {1'b0, ctl.out_last, ctl.out_wr1, ctl.out_wr0},
          {1'b0, c3, io & c1 & c2, io & c1 & ~c2});
      exp_se = uw.ea_n | (uw.i10 != 4'h8) | (~io & c1 & c2 & c3);
      chk("se", {3'b0, ctl.se_n}, {3'b0, exp_se});
      @(posedge clk);
    end
    // shift enable for each sequencer instruction, no direct data, no RLD
    uw = UW_NOP; uw.ea_n = 0;
    for (int k = 0; k < 16; k++) begin
      uw.i10 = 4'(k); #1;
      chk("se by op", {3'b0, ctl.se_n}, {3'b0, !(k == 8 || k == 10 || k == 13 || k == 14)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
