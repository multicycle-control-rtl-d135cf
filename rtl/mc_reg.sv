// mc_reg: a clocked register with a write enable and synchronous reset.
//
// The multicycle datapath keeps its state in six such registers: PC (written
// only when PCWrite), the instruction register (only when IRWrite), and MDR,
// A, B and ALUOut, which are written on every clock cycle, as the document specifies - those
// instances tie the enable high. A write takes effect at the rising clock
// edge that ends the cycle, so the new value is visible in the next cycle.
// The synchronous reset to RESET_VALUE is this design's choice; the document
// does not discuss reset.
module mc_reg #(
  parameter int unsigned      WIDTH       = 32,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VALUE;
    else if (en) q <= d;
  end

endmodule
