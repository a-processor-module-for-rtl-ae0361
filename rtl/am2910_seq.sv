// am2910_seq: microprogram sequencer with the instruction set of the Am2910.
//
// What it does: each cycle it selects the next micro-address Y from the microprogram counter
// (PC), the direct input D, the register/counter R or the top of a 5-deep stack F, according
// to the 4-bit instruction and the test result, and updates PC, stack and register/counter.
//
// How it works: pass = ccen_n | ~cc_n (the condition input is active low). Y is combinational.
// At a clock edge with en high, PC <= Y + ci, and the stack and register/counter change as the
// instruction table gives. rld_n low loads the register/counter from D whatever the
// instruction. JZ clears the stack. A push onto a full stack overwrites the top entry and a
// pop from an empty stack leaves it empty, as the chip does. pl_n, map_n and vect_n tell the
// selection logic where D should come from (MAP for JMAP, VECT for CJV, PL otherwise).
//
// Interface: 12-bit addresses; full_n is low when the stack holds five entries.
//
// Timing: single clock with enable (en is the clock enable used during microprogram loading).
//
// From the document: the instruction table, the 12-bit address, the 5-deep stack, RLD. This
// design's choices: no reset pin (the module is reset by forcing JZ, as in the document); the
// stack-overflow behaviour is that of the original part.
module am2910_seq #(
  parameter int unsigned AW    = 12,
  parameter int unsigned DEPTH = 5
) (
  input  logic          clk,
  input  logic          en,
  input  logic [3:0]    i,
  input  logic          ccen_n,
  input  logic          cc_n,
  input  logic          rld_n,
  input  logic          ci,
  input  logic [AW-1:0] d,
  output logic [AW-1:0] y,
  output logic          pl_n,
  output logic          map_n,
  output logic          vect_n,
  output logic          full_n
);

  localparam int unsigned SPW = $clog2(DEPTH + 1);

  logic [AW-1:0]  upc;
  logic [AW-1:0]  rc;
  logic [AW-1:0]  stk [DEPTH];
  logic [SPW-1:0] sp;            // number of entries
  logic [AW-1:0]  tos;
  logic           pass, rc_zero;

  typedef enum logic [1:0] {ST_HOLD, ST_PUSH, ST_POP, ST_CLEAR} stk_op_e;
  typedef enum logic [1:0] {RC_HOLD, RC_LOAD, RC_DEC} rc_op_e;
  stk_op_e stk_op;
  rc_op_e  rc_op;

  assign pass    = ccen_n | ~cc_n;
  assign rc_zero = (rc == '0);
  assign tos     = (sp == '0) ? stk[0] : stk[sp - 1'b1];
  assign full_n  = (sp != SPW'(DEPTH));
  assign map_n   = (i != 4'h2);
  assign vect_n  = (i != 4'h6);
  assign pl_n    = ~(map_n & vect_n);

  always_comb begin
    y      = upc;
    stk_op = ST_HOLD;
    rc_op  = RC_HOLD;
    unique case (i)
      4'h0: begin y = '0; stk_op = ST_CLEAR; end                                    // JZ
      4'h1: if (pass) begin y = d; stk_op = ST_PUSH; end                             // CJS
      4'h2: y = d;                                                                   // JMAP
      4'h3: if (pass) y = d;                                                         // CJP
      4'h4: begin stk_op = ST_PUSH; if (pass) rc_op = RC_LOAD; end                   // PUSH
      4'h5: begin y = pass ? d : rc; stk_op = ST_PUSH; end                           // JSRP
      4'h6: if (pass) y = d;                                                         // CJV
      4'h7: y = pass ? d : rc;                                                       // JRP
      4'h8: if (!rc_zero) begin y = tos; rc_op = RC_DEC; end else stk_op = ST_POP;   // RFCT
      4'h9: if (!rc_zero) begin y = d; rc_op = RC_DEC; end                           // RPCT
      4'hA: if (pass) begin y = tos; stk_op = ST_POP; end                            // CRTN
      4'hB: if (pass) begin y = d; stk_op = ST_POP; end                              // CJPP
      4'hC: rc_op = RC_LOAD;                                                         // LDCT
      4'hD: if (pass) stk_op = ST_POP; else y = tos;                                 // LOOP
      4'hE: ;                                                                        // CONT
      default: begin                                                                 // TWB
        if (!rc_zero) begin
          rc_op = RC_DEC;
          if (pass) stk_op = ST_POP; else y = tos;
        end else begin
          stk_op = ST_POP;
          if (!pass) y = d;
        end
      end
    endcase
    if (!rld_n) rc_op = RC_LOAD;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      upc <= y + AW'(ci);
      unique case (rc_op)
        RC_LOAD: rc <= d;
        RC_DEC:  rc <= rc - 1'b1;
        default: ;
      endcase
      unique case (stk_op)
        ST_CLEAR: sp <= '0;
        ST_PUSH: begin
          if (sp == SPW'(DEPTH)) stk[DEPTH-1] <= upc;
          else begin
            stk[sp] <= upc;
            sp      <= sp + 1'b1;
          end
        end
        ST_POP:  if (sp != '0) sp <= sp - 1'b1;
        default: ;
      endcase
    end
  end

endmodule
