// mc_regfile: the 32 x 32-bit register file of the multicycle processor.
//
// Two combinational read ports (Read register 1/2 -> Read data 1/2) and one
// write port written at the rising clock edge when RegWrite is high. The
// datapath addresses the read ports straight from IR[25:21] and IR[20:16], so
// the operands appear every cycle and are captured into A and B.
// Register 0 always reads as zero and ignores writes, as MIPS $zero does; the
// document does not mention it. Clearing all registers on reset is also this
// design's choice, so that simulation starts from a known state.
module mc_regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    raddr1,
  input  logic [AW-1:0]    raddr2,
  output logic [WIDTH-1:0] rdata1,
  output logic [WIDTH-1:0] rdata2,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1 = (raddr1 == '0) ? '0 : regs[raddr1];
  assign rdata2 = (raddr2 == '0) ? '0 : regs[raddr2];

endmodule
