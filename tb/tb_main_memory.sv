// tb_main_memory: self-checking test of main memory and its address registers.
// Loads the higher and lower address registers from the B bus, clears the lower one, writes
// random bytes at random addresses and reads them back, checking the address and data against
// a model kept here. Uses the full 16-bit address.
module tb_main_memory;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] bbus, rdata;
  logic lha, lla, cla, we;
  logic [15:0] addr;
  logic [7:0] model [logic [15:0]];
  logic [15:0] a [200];
  int checks = 0, failures = 0;

  main_memory dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic set_addr(input logic [15:0] v);
    bbus = v[15:8]; lha = 1; @(posedge clk); #1; lha = 0;
    bbus = v[7:0];  lla = 1; @(posedge clk); #1; lla = 0;
    chk("addr", addr, v);
  endtask

  initial begin
    lha = 0; lla = 0; cla = 0; we = 0; bbus = 0;
    for (int k = 0; k < 200; k++) begin
      a[k] = 16'($urandom);
      set_addr(a[k]);
      bbus = 8'($urandom); model[a[k]] = bbus; we = 1; @(posedge clk); #1; we = 0;
    end
    for (int k = 199; k >= 0; k--) begin
      set_addr(a[k]);
      chk("data", 16'(rdata), 16'(model[a[k]]));
    end
    // CLA clears only the lower register, and wins over LLA
    set_addr(16'h5A3C);
    cla = 1; lla = 1; bbus = 8'h77; @(posedge clk); #1; cla = 0; lla = 0;
    chk("cla", addr, 16'h5A00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
