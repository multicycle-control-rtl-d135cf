// mc_pkg: types and constants shared by the multicycle MIPS-subset processor.
//
// The processor executes four instruction classes (R-type add/sub/and/or/slt,
// lw, sw and beq) over three to five clock cycles each, using one ALU and one
// memory. This package holds the encodings they share:
//   * alu_op_t   - the 3-bit ALU operation. The values 010 (add) and 110
//                  (subtract) are the ones the control-signal tables use; the
//                  codes for and (000), or (001) and slt (111) are this design's
//                  choice, following the same conventional MIPS ALU-control scheme.
//   * opcodes and function-field codes - standard MIPS32 values, which the
//                  tables name only as "R-type", "LW", "SW", "BEQ" and "func".
//   * state_t    - the nine control states of the FSM.
//   * ctrl_t     - the datapath control signals other than PCWrite, which is
//                  kept separate because in the branch state it equals the ALU
//                  Zero flag of the same cycle.
package mc_pkg;

  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_op_t;

  // Primary opcodes, IR[31:26]
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // R-type function field, IR[5:0]
  localparam logic [5:0] FN_ADD = 6'h20;
  localparam logic [5:0] FN_SUB = 6'h22;
  localparam logic [5:0] FN_AND = 6'h24;
  localparam logic [5:0] FN_OR  = 6'h25;
  localparam logic [5:0] FN_SLT = 6'h2A;

  // ALUSrcB selections
  localparam logic [1:0] SRCB_B      = 2'b00;
  localparam logic [1:0] SRCB_FOUR   = 2'b01;
  localparam logic [1:0] SRCB_SIGNEX = 2'b10;
  localparam logic [1:0] SRCB_BRANCH = 2'b11;

  typedef enum logic [3:0] {
    S_FETCH    = 4'd0,  // instruction fetch and PC increment
    S_DECODE   = 4'd1,  // register fetch and branch target computation
    S_BRANCH   = 4'd2,  // branch completion
    S_RTYPE_EX = 4'd3,  // R-type execution
    S_RTYPE_WB = 4'd4,  // R-type writeback
    S_MEM_ADDR = 4'd5,  // effective address computation
    S_MEM_WR   = 4'd6,  // memory write (sw)
    S_MEM_RD   = 4'd7,  // memory read (lw)
    S_REG_WR   = 4'd8   // register write (lw)
  } state_t;

  typedef struct packed {
    logic       iord;        // 0: address from PC, 1: from ALUOut
    logic       mem_read;
    logic       mem_write;
    logic       ir_write;
    logic       reg_dst;     // 0: rt (IR[20:16]), 1: rd (IR[15:11])
    logic       mem_to_reg;  // 0: ALUOut, 1: MDR
    logic       reg_write;
    logic       alu_src_a;   // 0: PC, 1: A
    logic [1:0] alu_src_b;   // 00: B, 01: 4, 10: sign-extend, 11: sign-extend << 2
    alu_op_t    alu_op;
    logic       pc_source;   // 0: ALU result, 1: ALUOut
  } ctrl_t;

endpackage
