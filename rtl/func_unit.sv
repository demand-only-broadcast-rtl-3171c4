// func_unit: one general-purpose functional unit (EXEC stage).
//
// The document's clusters have four all-purpose functional units but it does
// not define their operations (the simulated machine runs the Alpha ISA). This
// unit implements a small integer operation set of this design's own choosing
// (add, subtract, and, or, xor, add-immediate, load-immediate and move; a copy
// instruction executes as a move). Combinational, one cycle: the result is on
// the cluster's result bus in the same EXEC cycle.
module func_unit
  import dob_pkg::*;
(
  input  op_e              op,
  input  data_t            a,
  input  data_t            b,
  input  logic [IMM_W-1:0] imm,
  output data_t            y
);
  data_t simm;
  assign simm = data_t'($signed(imm));

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_ADDI: y = a + simm;
      OP_LI:   y = simm;
      OP_MOV:  y = a;
      default: y = a;
    endcase
  end
endmodule
