// tb_func_unit: every operation with random operands against a reference.
module tb_func_unit;
  import dob_pkg::*;
  op_e op;
  data_t a, b, y, e;
  logic [IMM_W-1:0] imm;
  int checks = 0, failures = 0;

  func_unit dut (.*);

  initial begin
    for (int t = 0; t < 4000; t++) begin
      op  = op_e'(t % 8);
      a   = {$urandom, $urandom};
      b   = {$urandom, $urandom};
      imm = IMM_W'($urandom);
      #1;
      case (op)
        OP_ADD:  e = a + b;
        OP_SUB:  e = a - b;
        OP_AND:  e = a & b;
        OP_OR:   e = a | b;
        OP_XOR:  e = a ^ b;
        OP_ADDI: e = a + {{(DATA_W-IMM_W){imm[IMM_W-1]}}, imm};
        OP_LI:   e = {{(DATA_W-IMM_W){imm[IMM_W-1]}}, imm};
        default: e = a;
      endcase
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h imm=%h y=%h e=%h", op.name(), a, b, imm, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
