// tb_ucode_store: self-checking test of the control store and micro-instruction register.
// Writes random words byte by byte (byte 1 = most significant), reads them back through the
// uIR one clock after the address is presented, checks partial byte writes, and checks that
// the uIR holds the no-operation word while hold_nop is high. Uses a 6-bit address.
module tb_ucode_store;
  import pm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [5:0] addr;
  logic [4:0] we;
  logic [7:0] wdata;
  logic hold_nop;
  uword_t uir;
  logic [39:0] model [64];
  int checks = 0, failures = 0;

  ucode_store #(.AW(6)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic [39:0] got, input logic [39:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    we = 0; hold_nop = 0; addr = 0; wdata = 0;
    for (int a = 0; a < 64; a++) begin
      model[a] = {8'($urandom), 32'($urandom)};
      for (int b = 0; b < 5; b++) begin
        addr = 6'(a); we = 5'(1 << b); wdata = model[a][39 - 8 * b -: 8];
        @(posedge clk); #1;
      end
    end
    we = 0;
    for (int a = 0; a < 64; a++) begin
      addr = 6'(a); @(posedge clk); #1;
      chk("read", uir, model[a]);
    end
    // overwrite byte 3 only of word 5
    addr = 6'd5; we = 5'b00100; wdata = 8'hA5; @(posedge clk); #1; we = 0;
    model[5][23:16] = 8'hA5;
    @(posedge clk); #1; chk("byte3", uir, model[5]);
    hold_nop = 1; @(posedge clk); #1; chk("nop", uir, UW_NOP);
    hold_nop = 0; @(posedge clk); #1; chk("after nop", uir, model[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
