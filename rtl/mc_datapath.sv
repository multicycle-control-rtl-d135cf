// mc_datapath: the multicycle datapath, without its memory.
//
// One ALU and one external memory serve every step of an instruction. Six
// registers hold state between cycles: PC (written when PCWrite), IR (when
// IRWrite) and MDR, A, B and ALUOut, written on every clock edge. Six
// multiplexers steer the data:
//   IorD      memory address         0: PC          1: ALUOut
//   RegDst    register write index   0: rt IR[20:16] 1: rd IR[15:11]
//   MemToReg  register write data    0: ALUOut      1: MDR
//   ALUSrcA   ALU operand A          0: PC          1: A
//   ALUSrcB   ALU operand B          00: B  01: 4  10: sext(IR[15:0])  11: sext(IR[15:0]) << 2
//   PCSource  next PC                0: ALU result  1: ALUOut
// The memory write data always comes from B. The register file is read at
// IR[25:21] and IR[20:16] in every cycle. All of this structure follows the
// document's datapath diagram; register reset values (PC = 0) are this
// design's choice. The control signals arrive as an mc_pkg::ctrl_t plus the
// separate pc_write; opcode, function field and Zero go back to the control.
module mc_datapath
  import mc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  input  logic        pc_write,
  output logic [5:0]  op,
  output logic [5:0]  funct,
  output logic        zero,
  // memory port
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata,
  // observation
  output logic [31:0] pc,
  output logic [31:0] ir
);

  logic [31:0] mdr, a_q, b_q, alu_out;
  logic [31:0] rd1, rd2;
  logic [31:0] alu_a, alu_b, alu_result;
  logic [31:0] pc_next, reg_wdata, imm_sext, imm_shift;
  logic [4:0]  reg_waddr;

  // State registers
  mc_reg #(.WIDTH(32)) u_pc     (.clk, .rst, .en(pc_write),      .d(pc_next),    .q(pc));
  mc_reg #(.WIDTH(32)) u_ir     (.clk, .rst, .en(ctrl.ir_write), .d(mem_rdata),  .q(ir));
  mc_reg #(.WIDTH(32)) u_mdr    (.clk, .rst, .en(1'b1),          .d(mem_rdata),  .q(mdr));
  mc_reg #(.WIDTH(32)) u_a      (.clk, .rst, .en(1'b1),          .d(rd1),        .q(a_q));
  mc_reg #(.WIDTH(32)) u_b      (.clk, .rst, .en(1'b1),          .d(rd2),        .q(b_q));
  mc_reg #(.WIDTH(32)) u_aluout (.clk, .rst, .en(1'b1),          .d(alu_result), .q(alu_out));

  assign op    = ir[31:26];
  assign funct = ir[5:0];

  // Sign extend and shift left 2
  assign imm_sext  = {{16{ir[15]}}, ir[15:0]};
  assign imm_shift = {imm_sext[29:0], 2'b00};

  // Multiplexers
  assign mem_addr  = ctrl.iord       ? alu_out   : pc;
  assign reg_waddr = ctrl.reg_dst    ? ir[15:11] : ir[20:16];
  assign reg_wdata = ctrl.mem_to_reg ? mdr       : alu_out;
  assign alu_a     = ctrl.alu_src_a  ? a_q       : pc;
  assign pc_next   = ctrl.pc_source  ? alu_out   : alu_result;

  always_comb begin
    unique case (ctrl.alu_src_b)
      SRCB_B:      alu_b = b_q;
      SRCB_FOUR:   alu_b = 32'd4;
      SRCB_SIGNEX: alu_b = imm_sext;
      SRCB_BRANCH: alu_b = imm_shift;
      default:     alu_b = b_q;
    endcase
  end

  assign mem_wdata = b_q;

  mc_regfile #(.NREGS(32), .WIDTH(32)) u_rf (
    .clk, .rst,
    .raddr1(ir[25:21]), .raddr2(ir[20:16]),
    .rdata1(rd1),       .rdata2(rd2),
    .we(ctrl.reg_write), .waddr(reg_waddr), .wdata(reg_wdata)
  );

  mc_alu #(.WIDTH(32)) u_alu (
    .a(alu_a), .b(alu_b), .op(ctrl.alu_op), .result(alu_result), .zero(zero)
  );

endmodule
