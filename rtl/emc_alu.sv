// emc_alu: one of the two integer execution units of the EMC back end.
//
// Purely combinational. It evaluates the integer and logical uops the EMC
// supports (add, sub, move, and, or, xor, not, shifts, sign-extend), computes
// the effective address of loads and stores (src1 + src2 + imm), and resolves
// conditional branches against the direction the core predicted. The second
// operand is src2 when the uop has one, otherwise the sign-extended immediate.
// The enclosing engine registers the result, so a uop takes one cycle.
// Inputs : uop, operand values a (src1) and b (src2).
// Outputs: result (register value or address), mispredict for a branch whose
//          computed direction differs from uop.pred_taken.
// The operation set follows the document; the encoding and the branch
// conditions (eq, ne, signed lt/ge) are this design's choice.
module emc_alu
  import emc_pkg::*;
(
  input  emc_uop_t        uop,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] result,
  output logic            taken,
  output logic            mispredict
);
  logic [XLEN-1:0] opb;
  logic [5:0]      sh;

  always_comb begin
    opb = uop.src2.valid ? b : sext_imm(uop.imm);
    sh  = opb[5:0];
    result = '0;
    taken  = 1'b0;
    unique case (uop.op)
      OP_ADD:  result = a + opb;
      OP_SUB:  result = a - opb;
      OP_MOV:  result = uop.src1.valid ? a : sext_imm(uop.imm);
      OP_AND:  result = a & opb;
      OP_OR:   result = a | opb;
      OP_XOR:  result = a ^ opb;
      OP_NOT:  result = ~a;
      OP_SHL:  result = a << sh;
      OP_SHR:  result = a >> sh;
      OP_SAR:  result = $signed(a) >>> sh;
      OP_SEXT: unique case (uop.imm[1:0])
                 2'd0: result = {{56{a[7]}},  a[7:0]};
                 2'd1: result = {{48{a[15]}}, a[15:0]};
                 2'd2: result = {{32{a[31]}}, a[31:0]};
                 default: result = a;
               endcase
      OP_LD:   result = a + (uop.src2.valid ? b : '0) + sext_imm(uop.imm);
      OP_ST:   result = a + sext_imm(uop.imm);
      OP_BEQ:  taken = (a == opb);
      OP_BNE:  taken = (a != opb);
      OP_BLT:  taken = ($signed(a) <  $signed(opb));
      OP_BGE:  taken = ($signed(a) >= $signed(opb));
      default: result = '0;
    endcase
    mispredict = is_branch(uop.op) && (taken != uop.pred_taken);
  end
endmodule
