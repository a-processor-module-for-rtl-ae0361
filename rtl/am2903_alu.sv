// am2903_alu: the 8-bit ALU of the processor module, behaving as two cascaded Am2903 slices.
//
// What it does: a 16 x 8 two-port register file (A and B read addresses, written at the B
// address), a Q register, operand multiplexers (R = A register or direct data, S = B register,
// the DB input or Q), a 16-function ALU, an ALU shifter and a Q shifter, and the Am2903 special
// functions used for multiplication, division, normalization and sign/magnitude conversion.
// Status outputs are Z, N, OVR and the carry out CO.
//
// How it works: one combinational pass computes R, S, F and the shifted Y output from the
// instruction I8-0; at the rising clock edge, if IEN_n is low, the register at the B address
// is written from the external Y bus (y_in) when the destination code says so, Q is loaded or
// shifted, and the divide sign-compare flip-flop is updated. The register file is written from
// the Y bus, not from the internal shifter, so a memory byte placed on the Y bus can be written
// into a register, as in the document's organisation.
//
// Interface: db_out is the B register read (the slice's DB port when it drives the B bus);
// db_in is the B bus as seen by the S multiplexer when oe_b_n is high. Shift lines follow the
// pins SIO0, SIO7, QIO0 and QIO7 of the pair; each has an _in (value from the shift mux) and
// an _out (value the ALU drives when that pin is an output for the current code).
//
// Timing: single clock; all writes at the rising edge; everything else combinational.
//
// From the document: the operand selection, function and destination tables, the special
// functions, the status rules and the 8-bit cascade wiring. This design's choices: the
// parity output uses F only (the SIO7 term is dropped so that a right shift with SIO7 fed from
// SIO0 is not a combinational loop); the sign-compare flip-flop is loaded with NOT(R7 xor F7)
// on divide steps A and C; the reserved special codes behave as F = S + Cn with no writes;
// z_cx carries the Z pin only for special functions that drive Z from a register or operand
// (Q0, S7, sign flip-flop) and is 0 otherwise, which breaks the Z -> Cx -> Cn loop.
// Destination codes A-F follow the standard Am2903 ordering, so the register file is written
// for every code except 5, 6 and C (F is F -> Y with a write and Q held).
module am2903_alu (
  input  logic       clk,
  input  logic [3:0] aadr,
  input  logic [3:0] badr,
  input  logic [7:0] da,        // direct data
  input  logic       ea_n,
  input  logic [8:0] i,
  input  logic       ien_n,
  input  logic       oe_b_n,
  input  logic       cn,        // carry in
  input  logic [7:0] db_in,     // B bus
  output logic [7:0] db_out,    // B register read
  input  logic [7:0] y_in,      // Y bus (register file write data)
  output logic [7:0] y_out,     // shifter output
  input  logic       sio0_in,
  input  logic       sio7_in,
  input  logic       qio0_in,
  input  logic       qio7_in,
  output logic       sio0_out,
  output logic       sio7_out,
  output logic       qio0_out,
  output logic       qio7_out,
  output logic       z,
  output logic       n,
  output logic       ovr,
  output logic       co,
  output logic       z_cx       // Z pin value for special functions, for the Am2904 Cx input
);

  logic [7:0] ram [16];
  logic [7:0] q;
  logic       sign_ff;

  logic [7:0] r, s, f;
  logic       c8, c7;
  logic       special;
  logic [3:0] dest;
  logic       zin;
  logic       ram_we, q_ld;
  logic [7:0] q_next;

  assign special = (i[4:0] == 5'd0);
  assign dest    = i[8:5];
  assign db_out  = ram[badr];
  assign r       = ea_n ? da : ram[aadr];
  assign s       = i[0] ? q : (oe_b_n ? db_in : ram[badr]);

  // Z pin when a special function uses it as an input (driven by one slice, read by the other).
  always_comb begin
    unique case (dest)
      4'h0, 4'h2, 4'h6: zin = q[0];
      4'h5:             zin = s[7];
      4'hC, 4'hE:       zin = sign_ff;
      default:          zin = 1'b0;
    endcase
  end
  assign z_cx = special ? zin : 1'b0;

  // Adder with carry into bit 7 exposed for overflow.
  function automatic logic [9:0] add8(input logic [7:0] a, input logic [7:0] b, input logic ci);
    logic [8:0] full;
    full = {1'b0, a} + {1'b0, b} + {8'd0, ci};
    // carry into bit 7 recovered from the sum bit
    return {a[7] ^ b[7] ^ full[7], full};   // {c7, c8, sum}
  endfunction

  // ALU function.
  always_comb begin
    logic [9:0] res;
    logic       arith;
    res   = '0;
    arith = 1'b1;
    if (!special) begin
      unique case (i[4:1])
        4'h0: begin res = {2'b00, 8'hFF}; arith = 1'b0; end
        4'h1: res = add8(s, ~r, cn);
        4'h2: res = add8(r, ~s, cn);
        4'h3: res = add8(r, s, cn);
        4'h4: res = add8(s, 8'h00, cn);
        4'h5: res = add8(~s, 8'h00, cn);
        4'h6: res = add8(r, 8'h00, cn);
        4'h7: res = add8(~r, 8'h00, cn);
        4'h8: begin res = {2'b00, 8'h00};   arith = 1'b0; end
        4'h9: begin res = {2'b00, ~r & s};  arith = 1'b0; end
        4'hA: begin res = {2'b00, ~(r ^ s)}; arith = 1'b0; end
        4'hB: begin res = {2'b00, r ^ s};   arith = 1'b0; end
        4'hC: begin res = {2'b00, r & s};   arith = 1'b0; end
        4'hD: begin res = {2'b00, ~(r | s)}; arith = 1'b0; end
        4'hE: begin res = {2'b00, ~(r & s)}; arith = 1'b0; end
        default: begin res = {2'b00, r | s}; arith = 1'b0; end
      endcase
    end else begin
      unique case (dest)
        4'h0, 4'h2:  res = zin ? add8(r, s, cn) : add8(s, 8'h00, cn);
        4'h4:        res = add8(s, 8'h01, cn);
        4'h5:        res = zin ? add8(~s, 8'h00, cn) : add8(s, 8'h00, cn);
        4'h6:        res = zin ? add8(s, ~r, cn) : add8(s, 8'h00, cn);
        4'hC, 4'hE:  res = zin ? add8(s, ~r, cn) : add8(s, r, cn);
        default:     res = add8(s, 8'h00, cn);
      endcase
    end
    f  = res[7:0];
    c8 = arith ? res[8] : 1'b0;
    c7 = arith ? res[9] : 1'b0;
  end

  // Shifters, write enables and status.
  always_comb begin
    y_out    = f;
    sio0_out = ^f;          // parity in the F -> Y codes
    sio7_out = f[7];
    qio0_out = q[0];
    qio7_out = q[7];
    ram_we   = 1'b1;
    q_ld     = 1'b0;
    q_next   = q;
    z        = (y_out == 8'd0);
    n        = f[7];
    ovr      = c7 ^ c8;
    co       = c8;
    if (!special) begin
      unique case (dest)
        4'h0, 4'h2: begin y_out = {f[7], sio7_in, f[6:1]}; sio0_out = f[0]; end
        4'h1, 4'h3: begin y_out = {sio7_in, f[7:1]};       sio0_out = f[0]; end
        4'h8, 4'hA: begin y_out = {f[7], f[5:0], sio0_in}; sio7_out = f[6]; end
        4'h9, 4'hB: begin y_out = {f[6:0], sio0_in};       sio7_out = f[7]; end
        4'hE:       y_out = {8{sio0_in}};
        default:    y_out = f;
      endcase
      unique case (dest)
        4'h5, 4'h6, 4'hC:       ram_we = 1'b0;
        default:                ram_we = 1'b1;
      endcase
      unique case (dest)
        4'h2, 4'h3, 4'h5:       begin q_ld = 1'b1; q_next = {qio7_in, q[7:1]}; end
        4'h6, 4'h7:             begin q_ld = 1'b1; q_next = f; end
        4'hA, 4'hB, 4'hC, 4'hD: begin q_ld = 1'b1; q_next = {q[6:0], qio0_in}; end
        default:                q_ld = 1'b0;
      endcase
      z = (y_out == 8'd0);
    end else begin
      unique case (dest)
        4'h0: begin   // unsigned multiply step
          y_out = {c8, f[7:1]}; sio0_out = f[0];
          q_ld = 1'b1; q_next = {qio7_in, q[7:1]}; z = zin;
        end
        4'h2, 4'h6: begin   // two's complement multiply step / last step
          y_out = {f[7] ^ (c7 ^ c8), f[7:1]}; sio0_out = f[0];
          q_ld = 1'b1; q_next = {qio7_in, q[7:1]}; z = zin;
        end
        4'h4: y_out = f;    // increment
        4'h5: begin         // sign/magnitude <-> two's complement
          y_out = {s[7] ^ f[7], f[6:0]};
          z = zin;
          n = zin ? (f[7] ^ s[7]) : f[7];
        end
        4'h8: begin         // single length normalize
          y_out = f; sio7_out = f[7];
          q_ld = 1'b1; q_next = {q[6:0], qio0_in};
          z = (q == 8'd0); n = q[7]; co = q[7] ^ q[6]; ovr = q[6] ^ q[5];
        end
        4'hA: begin         // double length normalize and first divide step
          y_out = {f[6:0], sio0_in}; sio7_out = r[7] ^ f[7];
          q_ld = 1'b1; q_next = {q[6:0], qio0_in};
          z = (q == 8'd0) && (f == 8'd0); n = f[7]; co = f[7] ^ f[6]; ovr = f[6] ^ f[5];
        end
        4'hC: begin         // two's complement divide step
          y_out = {f[6:0], sio0_in}; sio7_out = ~(r[7] ^ f[7]);
          q_ld = 1'b1; q_next = {q[6:0], qio0_in}; z = sign_ff;
        end
        4'hE: begin         // divide correction and remainder
          y_out = f; sio7_out = f[7];
          q_ld = 1'b1; q_next = {q[6:0], qio0_in}; z = sign_ff;
        end
        default: begin      // reserved codes: no writes
          y_out = f; ram_we = 1'b0;
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!ien_n) begin
      if (ram_we) ram[badr] <= y_in;
      if (q_ld)   q <= q_next;
      if (special && (dest == 4'hA || dest == 4'hC)) sign_ff <= ~(r[7] ^ f[7]);
    end
  end

endmodule
