// mc_alu: the single ALU of the multicycle processor.
//
// It computes one of add, subtract, and, or and set-on-less-than on two 32-bit
// operands, chosen by the 3-bit ALU operation, and raises Zero when the result
// is zero. The control unit uses it for PC+4, the branch target, effective
// addresses, R-type results and, by subtracting, the beq equality test.
// The operation set, the Zero flag and the codes 010 (add) and 110 (subtract)
// follow the document; the codes for and, or and slt are this design's choice
// (see mc_pkg). slt is a signed comparison, as in MIPS. An unused code
// produces zero. Purely combinational.
module mc_alu
  import mc_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_t          op,
  output logic [WIDTH-1:0] result,
  output logic             zero
);

  always_comb begin
    unique case (op)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_SLT: result = WIDTH'($signed(a) < $signed(b));
      default: result = '0;
    endcase
  end

  assign zero = (result == '0);

endmodule
