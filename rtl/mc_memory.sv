// mc_memory: the single memory that holds both instructions and data.
//
// Word-organised array of MEM_WORDS 32-bit words addressed by byte address
// (addr[1:0] ignored, upper bits beyond the array wrap). Reading is
// combinational: while MemRead is high, Mem Data shows the addressed word so
// that IR or MDR can capture it at the end of the same cycle; otherwise Mem
// Data is zero. A write with MemWrite high takes effect at the rising clock
// edge. The single shared memory, MemRead/MemWrite and the write data coming
// from B follow the document; its size, the combinational read, the zero
// output when not reading and the loader port (init_*, used to place a program
// before the processor leaves reset, with priority over MemWrite) are this
// design's choices.
module mc_memory #(
  parameter int unsigned MEM_WORDS = 1024,
  parameter int unsigned WIDTH     = 32,
  localparam int unsigned AW       = $clog2(MEM_WORDS)
) (
  input  logic             clk,
  input  logic             mem_read,
  input  logic             mem_write,
  input  logic [31:0]      addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata,
  input  logic             init_we,
  input  logic [31:0]      init_addr,
  input  logic [WIDTH-1:0] init_wdata
);

  logic [WIDTH-1:0] mem [MEM_WORDS];

  always_ff @(posedge clk) begin
    if (init_we)        mem[init_addr[AW+1:2]] <= init_wdata;
    else if (mem_write) mem[addr[AW+1:2]]      <= wdata;
  end

  assign rdata = mem_read ? mem[addr[AW+1:2]] : '0;

endmodule
