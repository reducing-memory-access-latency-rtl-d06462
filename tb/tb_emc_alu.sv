// tb_emc_alu: self-checking test of the EMC integer unit. Random operands for
// every operation are compared with a reference computed here from the
// operation's definition; branch resolution is checked for both predicted
// directions.
module tb_emc_alu;
  import emc_pkg::*;
  int checks = 0, failures = 0;
  emc_uop_t uop;
  logic [XLEN-1:0] a, b, result, exp_r;
  logic taken, misp, exp_t;

  emc_alu dut (.uop, .a, .b, .result, .taken, .mispredict(misp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic emc_op_e ops[17] = '{OP_ADD, OP_SUB, OP_MOV, OP_AND, OP_OR, OP_XOR, OP_NOT, OP_SHL, OP_SHR,
                         OP_SAR, OP_SEXT, OP_LD, OP_ST, OP_BEQ, OP_BNE, OP_BLT, OP_BGE};
    for (int it = 0; it < 400; it++) begin
      logic [XLEN-1:0] opb;
      uop = '0;
      uop.op = ops[it % 17];
      uop.src1.valid = 1'b1;
      uop.src2.valid = ($urandom % 2) == 1;
      uop.imm = IMM_W'($urandom);
      uop.pred_taken = 1'($urandom % 2);
      a = {$urandom, $urandom};
      b = (it % 5 == 0) ? a : {$urandom, $urandom};
      if (it % 7 == 0) uop.src1.valid = 1'b0;
      #1;
      opb = uop.src2.valid ? b : {{44{uop.imm[19]}}, uop.imm};
      exp_t = 1'b0;
      exp_r = '0;
      case (uop.op)
        OP_ADD: exp_r = a + opb;
        OP_SUB: exp_r = a - opb;
        OP_MOV: exp_r = uop.src1.valid ? a : {{44{uop.imm[19]}}, uop.imm};
        OP_AND: exp_r = a & opb;
        OP_OR:  exp_r = a | opb;
        OP_XOR: exp_r = a ^ opb;
        OP_NOT: exp_r = ~a;
        OP_SHL: exp_r = a << opb[5:0];
        OP_SHR: exp_r = a >> opb[5:0];
        OP_SAR: exp_r = $signed(a) >>> opb[5:0];
        OP_SEXT: case (uop.imm[1:0])
                   0: exp_r = 64'($signed(a[7:0]));
                   1: exp_r = 64'($signed(a[15:0]));
                   2: exp_r = 64'($signed(a[31:0]));
                   default: exp_r = a;
                 endcase
        OP_LD: exp_r = a + (uop.src2.valid ? b : 64'd0) + {{44{uop.imm[19]}}, uop.imm};
        OP_ST: exp_r = a + {{44{uop.imm[19]}}, uop.imm};
        OP_BEQ: exp_t = a == opb;
        OP_BNE: exp_t = a != opb;
        OP_BLT: exp_t = $signed(a) < $signed(opb);
        OP_BGE: exp_t = $signed(a) >= $signed(opb);
        default: ;
      endcase
      checks++;
      if (is_branch(uop.op)) begin
        if (taken !== exp_t || misp !== (exp_t != uop.pred_taken)) begin
          failures++;
          $display("FAIL branch op=%s a=%h b=%h taken=%b", uop.op.name(), a, opb, taken);
        end
      end else if (result !== exp_r || misp) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h got=%h exp=%h", uop.op.name(), a, opb, result, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
