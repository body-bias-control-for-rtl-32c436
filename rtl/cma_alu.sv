// cma_alu: the combinational ALU inside each processing element.
//
// The PE array has no registers between PEs, so the ALU is purely
// combinational: y follows op, a and b within the array's settling time.
// Operations (cma_pkg::alu_op_e): pass A, add, subtract, and, or, xor,
// logical shift left/right and arithmetic shift right by b[4:0], unsigned
// less-than and equality (result 1 or 0), unsigned minimum and maximum.
// The published chip names the ALU but not its operation set; this set is
// this design's choice and has no multiplier (the alpha-blend mappings use
// shifts and adds).  Unused codes give zero.
module cma_alu
  import cma_pkg::*;
#(
  parameter int W = cma_pkg::DW
) (
  input  alu_op_e        op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [W-1:0]   y
);

  logic [4:0] sh;
  assign sh = b[4:0];

  always_comb begin
    unique case (op)
      OP_PASSA: y = a;
      OP_ADD:   y = a + b;
      OP_SUB:   y = a - b;
      OP_AND:   y = a & b;
      OP_OR:    y = a | b;
      OP_XOR:   y = a ^ b;
      OP_SLL:   y = a << sh;
      OP_SRL:   y = a >> sh;
      OP_SRA:   y = W'($signed(a) >>> sh);
      OP_LTU:   y = W'(a < b);
      OP_EQ:    y = W'(a == b);
      OP_MINU:  y = (a < b) ? a : b;
      OP_MAXU:  y = (a < b) ? b : a;
      default:  y = '0;
    endcase
  end

endmodule
