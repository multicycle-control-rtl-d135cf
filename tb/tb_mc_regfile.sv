// tb_mc_regfile: self-checking test of the 32 x 32-bit register file.
// Random writes and reads on both ports are compared with a reference array
// kept in the testbench; register 0 must read zero even after a write, and
// nothing is written while the write enable is low.
module tb_mc_regfile;
  logic clk = 0, rst, we;
  logic [4:0]  raddr1, raddr2, waddr;
  logic [31:0] rdata1, rdata2, wdata;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  mc_regfile #(.NREGS(32), .WIDTH(32)) dut (.clk, .rst, .raddr1, .raddr2, .rdata1, .rdata2,
                                            .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    #1;
    checks += 2;
    if (rdata1 !== model[raddr1]) begin failures++; $display("FAIL r1[%0d]=%h exp %h", raddr1, rdata1, model[raddr1]); end
    if (rdata2 !== model[raddr2]) begin failures++; $display("FAIL r2[%0d]=%h exp %h", raddr2, rdata2, model[raddr2]); end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) model[i] = '0;
    rst = 1; we = 0; waddr = 0; wdata = 0; raddr1 = 0; raddr2 = 0;
    @(posedge clk); #1; rst = 0;
    for (int r = 0; r < 32; r++) begin raddr1 = 5'(r); raddr2 = 5'(31 - r); check_reads(); end
    for (int i = 0; i < 2000; i++) begin
      we = ($urandom % 4) != 0; waddr = 5'($urandom); wdata = $urandom;
      raddr1 = 5'($urandom); raddr2 = 5'($urandom);
      @(posedge clk);
      if (we && waddr != 0) model[waddr] = wdata;
      check_reads();
    end
    we = 0;
    for (int r = 0; r < 32; r++) begin raddr1 = 5'(r); raddr2 = 5'(r); check_reads(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
