// tb_seq_select: self-checking test of the sequencer selection logic.
// Random jump fields and B bus values for each of the four modes; the priority index is
// computed here by a separate loop from the least significant end.
module tb_seq_select;
  logic map_n, vect_n, rld;
  logic [11:0] jf, d;
  logic [7:0] bbus;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  seq_select dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic [11:0] got, input logic [11:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  function automatic logic [2:0] lowest_one(input logic [7:0] v);
    for (int k = 0; k < 8; k++) if (v[k]) return 3'(k);
    return 3'd0;
  endfunction

  initial begin
    for (int t = 0; t < 500; t++) begin
      jf = 12'($urandom); bbus = 8'($urandom);
      if (t % 7 == 0) bbus = 8'h00;
      if (t % 5 == 0) bbus = 8'h80;
      rld = 0; map_n = 1; vect_n = 1; #1; chk("pl", d, jf);
      map_n = 0; #1; chk("map", d, {jf[11:4], bbus[3:0]});
      map_n = 1; vect_n = 0; #1; chk("vect", d, {jf[11:4], 1'b0, lowest_one(bbus)});
      vect_n = 1; rld = 1; #1; chk("rld", d, {jf[11:8], bbus});
      @(posedge clk);
    end
    // a fixed case: I/O status with bits 2 and 4 set dispatches to entry 2
    rld = 0; vect_n = 0; jf = 12'h120; bbus = 8'b0001_0100; #1; chk("vect fixed", d, 12'h122);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
