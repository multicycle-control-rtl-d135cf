// mc_cpu: multicycle processor for a MIPS subset (add, sub, and, or, slt, lw,
// sw, beq), built from one ALU and one memory shared across the cycles of an
// instruction.
//
// The control FSM (mc_control) steps each instruction through three (beq),
// four (R-type, sw) or five (lw) clock cycles and drives the datapath
// (mc_datapath); the single memory (mc_memory) supplies both instructions and
// data. Structure, states and control values follow the document; memory
// size, reset and the loader port are this design's choices.
// Interface: synchronous active-high reset (PC = 0, state FETCH, registers
// cleared). While rst is high a program can be written word by word through
// init_we/init_addr/init_wdata. pc, ir and state are brought out for
// observation. There is no halt: a program ends in a branch to itself.
module mc_cpu
  import mc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        init_we,
  input  logic [31:0] init_addr,
  input  logic [31:0] init_wdata,
  output logic [31:0] pc,
  output logic [31:0] ir,
  output state_t      state
);

  ctrl_t       ctrl;
  logic        pc_write, zero;
  logic [5:0]  op, funct;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;

  mc_control u_ctrl (
    .clk, .rst, .op, .funct, .zero, .ctrl, .pc_write, .state
  );

  mc_datapath u_dp (
    .clk, .rst, .ctrl, .pc_write, .op, .funct, .zero,
    .mem_addr, .mem_wdata, .mem_rdata, .pc, .ir
  );

  mc_memory #(.MEM_WORDS(MEM_WORDS), .WIDTH(32)) u_mem (
    .clk,
    .mem_read(ctrl.mem_read), .mem_write(ctrl.mem_write),
    .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata),
    .init_we, .init_addr, .init_wdata
  );

endmodule
