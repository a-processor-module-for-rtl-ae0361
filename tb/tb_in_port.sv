// tb_in_port: self-checking test of the byte-serial input port.
// A sender model follows the reset-signalling rules (raise ready with data, wait for
// acknowledge, drop ready, wait for acknowledge to fall) with random delays. The reader reads
// only when a status bit shows a waiting byte. Checks the bytes and the last-byte marks, that
// exactly one status bit is set while a byte waits, that acknowledge rises the clock after the
// read and falls the clock after ready falls, and that reset clears acknowledge.
module tb_in_port;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, rd, irdy, ilast, iack, isvc, ilst;
  logic [7:0] idata, data_out;
  int checks = 0, failures = 0;
  localparam int N = 40;
  logic [7:0] sent [N];
  logic       sent_last [N];

  in_port dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // sender
  initial begin
    irdy = 0; ilast = 0; idata = 0;
    wait (rst_n);
    for (int k = 0; k < N; k++) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      sent[k] = 8'($urandom); sent_last[k] = (k % 8 == 7);
      #2; idata = sent[k]; ilast = sent_last[k]; irdy = 1;
      wait (iack);
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #2; irdy = 0;
      wait (!iack);
    end
  end

  // reader
  initial begin
    rst_n = 0; rd = 0;
    repeat (2) @(posedge clk); #1;
    chk("reset ack", {7'b0, iack}, 8'd0);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      while (!(isvc || ilst)) begin @(posedge clk); #1; end
      chk("one status", {6'b0, isvc, ilst}, sent_last[k] ? 8'd1 : 8'd2);
      chk("buffer off", data_out, 8'h00);
      rd = 1; #1;
      chk("data", data_out, sent[k]);
      @(posedge clk); #1; rd = 0;
      chk("ack after read", {7'b0, iack}, 8'd1);
      chk("no status while acked", {6'b0, isvc, ilst}, 8'd0);
      wait (!irdy); @(posedge clk); #1;
      chk("ack falls", {7'b0, iack}, 8'd0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
