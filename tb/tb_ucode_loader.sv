// tb_ucode_loader: self-checking test of the microprogram load logic.
// Checks the instruction forcing (JZ under reset, CONT under disable, the uIR field otherwise),
// that a reset strobe presets the ring to byte 1, that the byte enables walk through bytes 1-5
// on successive load strobes, that the sequencer carry-in is high only with byte 5 selected
// (so the address advances once per five strobes), and that the sequencer enable follows the
// strobe only while disabled.
module tb_ucode_loader;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, dsbl_n, ld_stb, ci, seq_en;
  logic [3:0] i10_uc, i10;
  logic [4:0] we;
  int checks = 0, failures = 0;

  ucode_loader dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic [4:0] got, input logic [4:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    i10_uc = 4'h3; ld_stb = 0;
    rst_n = 1; dsbl_n = 1; #1;
    chk("run op", 5'(i10), 5'h3); chk("run ci", 5'(ci), 5'd1); chk("run en", 5'(seq_en), 5'd1);
    chk("run we", we, 5'd0);
    rst_n = 0; dsbl_n = 0; #1;
    chk("reset op", 5'(i10), 5'h0);
    chk("reset we", we, 5'd0);
    chk("en without strobe", 5'(seq_en), 5'd0);
    ld_stb = 1; #1; chk("en with strobe", 5'(seq_en), 5'd1);
    @(posedge clk); #1; ld_stb = 0; rst_n = 1; #1;
    chk("disabled op", 5'(i10), 5'hE);
    for (int w = 0; w < 3; w++) begin
      for (int b = 0; b < 5; b++) begin
        repeat (2) @(posedge clk);
        #1; ld_stb = 1; #1;
        chk("byte enable", we, 5'(1 << b));
        chk("ci", 5'(ci), 5'(b == 4));
        @(posedge clk); #1; ld_stb = 0;
      end
    end
    rst_n = 0; dsbl_n = 1; #1; chk("end op", 5'(i10), 5'h0); chk("end ci", 5'(ci), 5'd1);
    @(posedge clk); #1; rst_n = 1; #1; chk("back op", 5'(i10), 5'h3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
