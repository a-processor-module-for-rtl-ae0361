// tb_am2904_status: self-checking test of the status and shift control unit.
// Loads random status values and checks all 16 condition codes against the document's
// formulas, the inverted-carry load (codes 8, 9), the carry-in selections, the status readout
// order, the CE_n gating and a selection of shift-linkage codes, including MC loaded from a
// shift line and the shift enable.
module tb_am2904_status;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0] i_cc; logic [1:0] i_ci; logic [4:0] i_sh;
  logic se_n, ce_n, z, c, n, ovr, cx;
  logic sio0_i, sion_i, qio0_i;
  logic qion_i, sio0_o, sion_o, qio0_o, qion_o, ct, c0;
  logic [3:0] status;
  int checks = 0, failures = 0;

  am2904_status dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  function automatic logic ref_ct(input logic [3:0] code, input logic mz, mn, mc, mo);
    case (code)
      4'h0: return (mn ^ mo) | mz;          4'h1: return ~(mn ^ mo) & ~mz;
      4'h2: return mn ^ mo;                 4'h3: return ~(mn ^ mo);
      4'h4: return mz;                      4'h5: return ~mz;
      4'h6: return mo;                      4'h7: return ~mo;
      4'h8: return mc | mz;                 4'h9: return ~mc & ~mz;
      4'hA: return mc;                      4'hB: return ~mc;
      4'hC: return ~mc | mz;                4'hD: return mc & ~mz;
      4'hE: return mn;                      default: return ~mn;
    endcase
  endfunction

  logic ez, en, ec, eo;
  initial begin
    se_n = 1; ce_n = 1; i_cc = 0; i_ci = 0; i_sh = 0; cx = 0;
    sio0_i = 0; sion_i = 0; qio0_i = 0; qion_i = 0; z = 0; c = 0; n = 0; ovr = 0;
    @(posedge clk); #1;
    for (int t = 0; t < 64; t++) begin
      {z, c, n, ovr} = 4'($urandom);
      i_cc = 4'($urandom_range(0, 15));
      ce_n = 0; #1;
      @(posedge clk); #1; ce_n = 1;
      ez = z; en = n; eo = ovr; ec = (i_cc == 4'h8 || i_cc == 4'h9) ? ~c : c;
      chk("status", status, {eo, ec, en, ez});
      for (int k = 0; k < 16; k++) begin
        i_cc = 4'(k); #1;
        chk("ct", {3'b0, ct}, {3'b0, ref_ct(4'(k), ez, en, ec, eo)});
      end
      // carry-in
      cx = 1'($urandom);
      i_ci = 2'b00; #1; chk("ci0", {3'b0, c0}, 4'd0);
      i_ci = 2'b01; #1; chk("ci1", {3'b0, c0}, 4'd1);
      i_ci = 2'b10; #1; chk("cix", {3'b0, c0}, {3'b0, cx});
      i_ci = 2'b11; i_cc = 4'h8; #1; chk("cimcn", {3'b0, c0}, {3'b0, ~ec});
      i_ci = 2'b11; i_cc = 4'h2; #1; chk("cimc", {3'b0, c0}, {3'b0, ec});
      // CE_n high holds the register
      {z, c, n, ovr} = ~{ez, ec, en, eo}; i_cc = 4'h4; @(posedge clk); #1;
      chk("hold", status, {eo, ec, en, ez});
    end
    // shift linkage: right shift code 00010 drives SIOn = 0 and QIOn = MN
    se_n = 0; i_sh = 5'b00010; #1;
    chk("r2", {2'b0, sion_o, qion_o}, {2'b0, 1'b0, status[1]});
    chk("r2 lsb side undriven", {2'b0, sio0_o, qio0_o}, 4'd0);
    // right shift code 01000: SIOn <= SIO0, QIOn <= QIO0 (rotate)
    i_sh = 5'b01000; sio0_i = 1; qio0_i = 0; #1;
    chk("r8", {2'b0, sion_o, qion_o}, 4'b0010);
    // left shift code 11000: SIO0 <= SIOn, QIO0 <= QIOn
    i_sh = 5'b11000; sion_i = 0; qion_i = 1; #1;
    chk("l8", {2'b0, sio0_o, qio0_o}, 4'b0001);
    // left shift code 10011: shift in ones
    i_sh = 5'b10011; #1; chk("l3", {2'b0, sio0_o, qio0_o}, 4'b0011);
    // MC loaded from SIOn for code 10000, instead of the carry
    i_sh = 5'b10000; sion_i = 1; c = 0; i_cc = 4'h4; ce_n = 0; #1;
    @(posedge clk); #1; ce_n = 1;
    chk("mc from shift", {3'b0, status[2]}, 4'd1);
    // shift enable off: nothing driven, MC from carry
    se_n = 1; #1; chk("se off", {sio0_o, sion_o, qio0_o, qion_o}, 4'd0);
    ce_n = 0; c = 0; @(posedge clk); #1; ce_n = 1;
    chk("mc from c", {3'b0, status[2]}, 4'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
