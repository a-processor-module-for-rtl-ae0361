// tb_out_port: self-checking test of the byte-serial output port.
// A receiver model takes each byte when ready is high, raises acknowledge after a random
// delay and drops it after ready falls. The writer writes only when the port reports clear.
// Checks each byte and its last mark as received, that ready rises the clock after the write,
// that the port is not clear until acknowledge has fallen, and reset.
module tb_out_port;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, wr, last, oack, ordy, olast, osvc;
  logic [7:0] ydata, odata;
  int checks = 0, failures = 0;
  localparam int N = 40;
  logic [7:0] exp_d [N];
  logic       exp_l [N];
  int rcv = 0;

  out_port dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // receiver
  initial begin
    oack = 0;
    forever begin
      wait (ordy);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      chk("rx data", odata, exp_d[rcv]);
      chk("rx last", {7'b0, olast}, {7'b0, exp_l[rcv]});
      rcv++;
      #2; oack = 1;
      wait (!ordy);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #2; oack = 0;
    end
  end

  initial begin
    rst_n = 0; wr = 0; last = 0; ydata = 0;
    repeat (2) @(posedge clk); #1;
    chk("reset", {6'b0, ordy, olast}, 8'd0);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      while (!osvc) begin @(posedge clk); #1; end
      exp_d[k] = 8'($urandom); exp_l[k] = 1'($urandom);
      ydata = exp_d[k]; last = exp_l[k]; wr = 1;
      @(posedge clk); #1; wr = 0; ydata = 8'h00;
      chk("ready after write", {7'b0, ordy}, 8'd1);
      chk("not clear", {7'b0, osvc}, 8'd0);
    end
    while (rcv < N) @(posedge clk);
    chk("received all", 8'(rcv), 8'(N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
