// mc_control: the finite-state-machine control unit of the multicycle processor.
//
// Every instruction starts with the same two states - instruction fetch with
// PC increment, then register fetch with the optimistic branch-target
// computation - and then branches on the opcode:
//   beq:    BRANCH (compare A and B by subtracting; PC <= ALUOut if Zero)     3 cycles
//   R-type: RTYPE_EX (ALUOut <= A op B) -> RTYPE_WB (rd <= ALUOut)            4 cycles
//   sw:     MEM_ADDR (ALUOut <= A + sext(imm)) -> MEM_WR (Mem[ALUOut] <= B)   4 cycles
//   lw:     MEM_ADDR -> MEM_RD (MDR <= Mem[ALUOut]) -> REG_WR (rt <= MDR)     5 cycles
// after which it returns to FETCH. The states, transitions and the control
// values in each state follow the document's state diagram and signal tables;
// signals a state leaves unspecified (don't-care) are driven to 0.
// The state is a Moore machine except for PCWrite, which in BRANCH equals the
// ALU Zero flag of the same cycle. In RTYPE_EX the ALU operation is decoded
// from the function field (add, sub, and, or, slt); the decoding of an
// unlisted function code to add, and the return to FETCH for an unknown opcode,
// are this design's choices. Synchronous reset enters FETCH.
module mc_control
  import mc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] op,       // IR[31:26]
  input  logic [5:0] funct,    // IR[5:0]
  input  logic       zero,     // ALU Zero flag
  output ctrl_t      ctrl,
  output logic       pc_write,
  output state_t     state
);

  state_t  state_n;
  alu_op_t funct_op;

  always_ff @(posedge clk) begin
    if (rst) state <= S_FETCH;
    else     state <= state_n;
  end

  // Next state
  always_comb begin
    state_n = S_FETCH;
    unique case (state)
      S_FETCH:  state_n = S_DECODE;
      S_DECODE: begin
        if      (op == OP_BEQ)                 state_n = S_BRANCH;
        else if (op == OP_RTYPE)               state_n = S_RTYPE_EX;
        else if (op == OP_LW || op == OP_SW)   state_n = S_MEM_ADDR;
        else                                   state_n = S_FETCH;
      end
      S_MEM_ADDR: state_n = (op == OP_LW) ? S_MEM_RD : S_MEM_WR;
      S_MEM_RD:   state_n = S_REG_WR;
      S_RTYPE_EX: state_n = S_RTYPE_WB;
      S_BRANCH, S_RTYPE_WB, S_MEM_WR, S_REG_WR: state_n = S_FETCH;
      default:    state_n = S_FETCH;
    endcase
  end

  // ALU operation for R-type execution, from the function field
  always_comb begin
    unique case (funct)
      FN_ADD:  funct_op = ALU_ADD;
      FN_SUB:  funct_op = ALU_SUB;
      FN_AND:  funct_op = ALU_AND;
      FN_OR:   funct_op = ALU_OR;
      FN_SLT:  funct_op = ALU_SLT;
      default: funct_op = ALU_ADD;
    endcase
  end

  // Control outputs
  always_comb begin
    ctrl     = '0;
    ctrl.alu_op = ALU_ADD;
    pc_write = 1'b0;
    unique case (state)
      S_FETCH: begin
        ctrl.mem_read  = 1'b1;
        ctrl.iord      = 1'b0;
        ctrl.ir_write  = 1'b1;
        ctrl.alu_src_a = 1'b0;
        ctrl.alu_src_b = SRCB_FOUR;
        ctrl.alu_op    = ALU_ADD;
        ctrl.pc_source = 1'b0;
        pc_write       = 1'b1;
      end
      S_DECODE: begin
        ctrl.alu_src_a = 1'b0;
        ctrl.alu_src_b = SRCB_BRANCH;
        ctrl.alu_op    = ALU_ADD;
      end
      S_BRANCH: begin
        ctrl.alu_src_a = 1'b1;
        ctrl.alu_src_b = SRCB_B;
        ctrl.alu_op    = ALU_SUB;
        ctrl.pc_source = 1'b1;
        pc_write       = zero;
      end
      S_RTYPE_EX: begin
        ctrl.alu_src_a = 1'b1;
        ctrl.alu_src_b = SRCB_B;
        ctrl.alu_op    = funct_op;
      end
      S_RTYPE_WB: begin
        ctrl.reg_write  = 1'b1;
        ctrl.reg_dst    = 1'b1;
        ctrl.mem_to_reg = 1'b0;
      end
      S_MEM_ADDR: begin
        ctrl.alu_src_a = 1'b1;
        ctrl.alu_src_b = SRCB_SIGNEX;
        ctrl.alu_op    = ALU_ADD;
      end
      S_MEM_WR: begin
        ctrl.mem_write = 1'b1;
        ctrl.iord      = 1'b1;
      end
      S_MEM_RD: begin
        ctrl.mem_read = 1'b1;
        ctrl.iord     = 1'b1;
      end
      S_REG_WR: begin
        ctrl.reg_write  = 1'b1;
        ctrl.reg_dst    = 1'b0;
        ctrl.mem_to_reg = 1'b1;
      end
      default: ;
    endcase
  end

  // A write to memory and a write to the register file never share a cycle,
  // and the memory is never read and written in the same cycle.
  a_no_rw: assert property (@(posedge clk) disable iff (rst)
                            !(ctrl.mem_read && ctrl.mem_write));
  a_no_mem_reg_write: assert property (@(posedge clk) disable iff (rst)
                                       !(ctrl.mem_write && ctrl.reg_write));

endmodule
