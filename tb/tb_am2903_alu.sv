// tb_am2903_alu: self-checking test of the 8-bit ALU.
// Loads registers through direct data, then checks arithmetic with carry and overflow, the
// logic functions, the four operand sources, right and left shifts of F and Q, write enable
// gating by IEN_n, and an 8-step unsigned multiply against a*b. Expected values are computed
// here from plain integer arithmetic.
module tb_am2903_alu;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0] aadr, badr;
  logic [7:0] da, db_in, db_out, y_in, y_out;
  logic       ea_n, ien_n, oe_b_n, cn;
  logic [8:0] i;
  logic       sio0_in, sio7_in, qio0_in, qio7_in;
  logic       sio0_out, sio7_out, qio0_out, qio7_out;
  logic       z, n, ovr, co, z_cx;
  logic       mul_mode;

  int checks = 0, failures = 0;

  am2903_alu dut (.*);
  assign y_in    = y_out;              // register file written from the Y bus (ALU drives it)
  assign qio7_in = mul_mode ? sio0_out : 1'b0;   // multiply: F0 shifts into Q7

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Drive one micro-operation; sample outputs before the clock edge.
  task automatic setop(input logic [3:0] a, input logic [3:0] b, input logic [7:0] d,
                       input logic ea, input logic [3:0] dst, input logic [3:0] fn,
                       input logic i0, input logic c);
    aadr = a; badr = b; da = d; ea_n = ea; i = {dst, fn, i0}; cn = c; ien_n = 0;
    #1;
  endtask

  task automatic tick; @(posedge clk); #1; endtask

  // Write a constant into register b: F = R + Cn with R = direct data, dest 4 (F->Y, write).
  task automatic ldreg(input logic [3:0] b, input logic [7:0] v);
    setop(4'd0, b, v, 1'b1, 4'h4, 4'h6, 1'b0, 1'b0);
    chk("ldreg y", y_out, v);
    tick;
  endtask

  logic [7:0] av, bv;
  logic [8:0] sum;
  logic [15:0] prod;

  initial begin
    oe_b_n = 0; db_in = 8'h00; sio0_in = 0; sio7_in = 0; qio0_in = 0; mul_mode = 0;
    ien_n = 1; aadr = 0; badr = 0; da = 0; ea_n = 0; i = '0; cn = 0;
    @(posedge clk); #1;

    // Load registers 0..15 with distinct values and read them back through db_out.
    for (int k = 0; k < 16; k++) ldreg(4'(k), 8'(k * 17 + 3));
    ien_n = 1;
    for (int k = 0; k < 16; k++) begin
      badr = 4'(k); #1;
      chk($sformatf("readback %0d", k), db_out, 8'(k * 17 + 3));
    end

    // Random arithmetic: R + S + Cn, S - R - 1 + Cn, R - S - 1 + Cn (A/B registers).
    for (int t = 0; t < 40; t++) begin
      av = 8'($urandom); bv = 8'($urandom);
      ldreg(4'd1, av);
      ldreg(4'd2, bv);
      // R+S+Cn into register 3, Cn random
      cn = 1'($urandom);
      setop(4'd1, 4'd2, 8'h00, 1'b0, 4'hF, 4'h3, 1'b0, cn);   // dest F: F->Y (combinational check)
      sum = {1'b0, av} + {1'b0, bv} + {8'd0, cn};
      chk("add f", y_out, sum[7:0]);
      chk("add co", co, sum[8]);
      chk("add ovr", ovr, (av[7] == bv[7]) && (sum[7] != av[7]));
      chk("add n", n, sum[7]);
      chk("add z", z, sum[7:0] == 0);
      // S - R - 1 + Cn with Cn = 1 is S - R
      setop(4'd1, 4'd2, 8'h00, 1'b0, 4'hF, 4'h1, 1'b0, 1'b1);
      sum = {1'b0, bv} + {1'b0, ~av} + 9'd1;
      chk("sub f", y_out, 8'(bv - av));
      chk("sub co", co, sum[8]);
      chk("sub ovr", ovr, (av[7] != bv[7]) && (sum[7] != bv[7]));
      // R - S - 1 + Cn with Cn = 0
      setop(4'd1, 4'd2, 8'h00, 1'b0, 4'hF, 4'h2, 1'b0, 1'b0);
      chk("rsub f", y_out, 8'(av - bv - 1));
      // logic functions
      setop(4'd1, 4'd2, 8'h00, 1'b0, 4'hF, 4'h9, 1'b0, 1'b0); chk("andn", y_out, 8'(~av & bv));
      setop(4'd1, 4'd2, 8'h00, 1'b0, 4'hF, 4'hA, 1'b0, 1'b0); chk("xnor", y_out, 8'(~(av ^ bv)));
      setop(4'd1, 4'd2, 8'h00, 1'b0, 4'hF, 4'hB, 1'b0, 1'b0); chk("xor", y_out, av ^ bv);
      setop(4'd1, 4'd2, 8'h00, 1'b0, 4'hF, 4'hC, 1'b0, 1'b0); chk("and", y_out, av & bv);
      setop(4'd1, 4'd2, 8'h00, 1'b0, 4'hF, 4'hD, 1'b0, 1'b0); chk("nor", y_out, 8'(~(av | bv)));
      setop(4'd1, 4'd2, 8'h00, 1'b0, 4'hF, 4'hE, 1'b0, 1'b0); chk("nand", y_out, 8'(~(av & bv)));
      setop(4'd1, 4'd2, 8'h00, 1'b0, 4'hF, 4'hF, 1'b0, 1'b0); chk("or", y_out, av | bv);
      chk("logic co", co, 0);
      setop(4'd1, 4'd2, 8'h00, 1'b0, 4'hF, 4'h8, 1'b0, 1'b0); chk("zero", y_out, 0);
      chk("zero z", z, 1);
      // S from the DB input when oe_b_n is high
      oe_b_n = 1; db_in = 8'($urandom);
      setop(4'd1, 4'd2, 8'h00, 1'b0, 4'hF, 4'h4, 1'b0, 1'b0); chk("s=db", y_out, db_in);
      oe_b_n = 0;
      // Direct data as R
      setop(4'd1, 4'd2, 8'h5A, 1'b1, 4'hF, 4'h6, 1'b0, 1'b0); chk("r=da", y_out, 8'h5A);
      // Write R+S into register 3, then read it back
      setop(4'd1, 4'd3, 8'h00, 1'b0, 4'h4, 4'h3, 1'b0, 1'b0);
      // S is register 3 here; compute expected from its current value
      sum = {1'b0, av} + {1'b0, db_out};
      tick;
      badr = 4'd3; #1; chk("write r3", db_out, sum[7:0]);
      // IEN_n high: no write
      setop(4'd0, 4'd3, 8'hFF, 1'b1, 4'h4, 4'h6, 1'b0, 1'b0);
      ien_n = 1; #1; tick; ien_n = 0;
      badr = 4'd3; #1; chk("ien gate", db_out, sum[7:0]);
    end

    // Destination F writes the B register; destination C does not.
    ldreg(4'd5, 8'h11);
    setop(4'd0, 4'd5, 8'h77, 1'b1, 4'hF, 4'h6, 1'b0, 1'b0); tick;
    badr = 4'd5; #1; chk("dest F writes", db_out, 8'h77);
    setop(4'd0, 4'd5, 8'h22, 1'b1, 4'hC, 4'h6, 1'b0, 1'b0); tick;
    badr = 4'd5; #1; chk("dest C holds", db_out, 8'h77);
    setop(4'd0, 4'd5, 8'h33, 1'b1, 4'h5, 4'h6, 1'b0, 1'b0); tick;
    badr = 4'd5; #1; chk("dest 5 holds", db_out, 8'h77);

    // Shifts of F: arithmetic and logical, right and left, with shift inputs.
    ldreg(4'd4, 8'hB6);
    sio7_in = 1; sio0_in = 1;
    setop(4'd0, 4'd4, 8'h00, 1'b0, 4'h0, 4'h4, 1'b0, 1'b0);          // arith F/2
    chk("arith r", y_out, {1'b1, 1'b1, 6'b011011}); chk("sio0 out", sio0_out, 1'b0);
    setop(4'd0, 4'd4, 8'h00, 1'b0, 4'h1, 4'h4, 1'b0, 1'b0);          // log F/2
    chk("log r", y_out, {1'b1, 7'h5B});
    setop(4'd0, 4'd4, 8'h00, 1'b0, 4'h9, 4'h4, 1'b0, 1'b0);          // log 2F
    chk("log l", y_out, 8'h6D); chk("sio7 out", sio7_out, 1'b1);
    setop(4'd0, 4'd4, 8'h00, 1'b0, 4'h8, 4'h4, 1'b0, 1'b0);          // arith 2F
    chk("arith l", y_out, {1'b1, 6'h36, 1'b1});
    setop(4'd0, 4'd4, 8'h00, 1'b0, 4'hE, 4'h4, 1'b0, 1'b0);          // SIO0 -> all Y
    chk("sign ext", y_out, 8'hFF);
    sio7_in = 0; sio0_in = 0;

    // Q: load F -> Q, then shift Q right and left.
    setop(4'd0, 4'd0, 8'hC3, 1'b1, 4'h6, 4'h6, 1'b0, 1'b0); tick;    // Q <= C3
    setop(4'd0, 4'd0, 8'h00, 1'b0, 4'hF, 4'h4, 1'b1, 1'b0);          // S = Q
    chk("q load", y_out, 8'hC3);
    setop(4'd0, 4'd0, 8'h00, 1'b0, 4'h5, 4'h4, 1'b1, 1'b0); tick;    // Q log right, QIO7 = 0
    setop(4'd0, 4'd0, 8'h00, 1'b0, 4'hF, 4'h4, 1'b1, 1'b0);
    chk("q right", y_out, 8'h61);
    qio0_in = 1;
    setop(4'd0, 4'd0, 8'h00, 1'b0, 4'hC, 4'h4, 1'b1, 1'b0); tick;    // Q log left, QIO0 = 1
    qio0_in = 0;
    setop(4'd0, 4'd0, 8'h00, 1'b0, 4'hF, 4'h4, 1'b1, 1'b0);
    chk("q left", y_out, 8'hC3);

    // Unsigned multiply: Q = multiplier, R(A=5) = multiplicand, S(B=6) = accumulator.
    for (int t = 0; t < 10; t++) begin
      av = 8'($urandom); bv = 8'($urandom);
      ldreg(4'd5, av);
      ldreg(4'd6, 8'h00);
      setop(4'd0, 4'd0, bv, 1'b1, 4'h6, 4'h6, 1'b0, 1'b0); tick;     // Q <= bv
      mul_mode = 1;
      for (int s = 0; s < 8; s++) begin
        setop(4'd5, 4'd6, 8'h00, 1'b0, 4'h0, 4'h0, 1'b0, 1'b0);      // special 0
        chk("mul z_cx", z_cx, dut.q[0]);
        tick;
      end
      mul_mode = 0;
      prod = 16'(av) * 16'(bv);
      badr = 4'd6; #1; chk("mul hi", db_out, prod[15:8]);
      setop(4'd0, 4'd0, 8'h00, 1'b0, 4'hF, 4'h4, 1'b1, 1'b0);
      chk("mul lo", y_out, prod[7:0]);
    end

    // Increment special: F = S + 1 + Cn
    ldreg(4'd7, 8'h41);
    setop(4'd0, 4'd7, 8'h00, 1'b0, 4'h4, 4'h0, 1'b0, 1'b1);
    chk("inc2", y_out, 8'h43);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
