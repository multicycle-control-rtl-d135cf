// tb_mc_cpu_examples: the processor running the worked example instructions
// add $t1,$t1,$t2 / sw $a0,16($sp) / lw / beq $t0,$t1,offset.
// Unlike the random end-to-end test, loads and stores here use a non-zero base
// register ($sp) with positive and negative offsets. Checked: the cycles each
// instruction takes (R-type 4, sw 4, lw 5, beq 3), the PC sequence including
// a taken branch, the register results, and the memory words written (and
// the one that the branch skips). Runs at the processor's default size.
module tb_mc_cpu_examples;
  import mc_pkg::*;

  localparam int T0 = 8, T1 = 9, T2 = 10, A0 = 4, SP = 29;

  logic clk = 0, rst, init_we;
  logic [31:0] init_addr, init_wdata, pc, ir;
  state_t state;
  int checks = 0, failures = 0;

  mc_cpu dut (.clk, .rst, .init_we, .init_addr, .init_wdata, .pc, .ir, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] enc_r(int rs, int rt, int rd, logic [5:0] fn);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] enc_i(logic [5:0] o, int rs, int rt, int imm);
    return {o, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s = %h expected %h", what, got, exp); end
  endtask

  task automatic load(int unsigned byte_addr, logic [31:0] word);
    @(negedge clk); init_we = 1; init_addr = byte_addr; init_wdata = word;
  endtask

  // expected trace: PC of each instruction and its cycle count
  logic [31:0] exp_pc  [10] = '{32'h00, 32'h04, 32'h08, 32'h0C, 32'h10, 32'h14, 32'h18, 32'h1C, 32'h28, 32'h2C};
  int          exp_cyc [10] = '{5, 5, 5, 5, 4, 4, 5, 3, 4, 3};

  initial begin
    int n, cyc;
    rst = 1; init_we = 0; init_addr = 0; init_wdata = 0;
    for (int i = 0; i < 1024; i++) load(4 * i, 32'd0);
    load(32'h00, enc_i(OP_LW, 0, SP, 32'h200));
    load(32'h04, enc_i(OP_LW, 0, T1, 32'h204));
    load(32'h08, enc_i(OP_LW, 0, T2, 32'h208));
    load(32'h0C, enc_i(OP_LW, 0, A0, 32'h20C));
    load(32'h10, enc_r(T1, T2, T1, FN_ADD));        // add $t1, $t1, $t2
    load(32'h14, enc_i(OP_SW, SP, A0, 16));         // sw  $a0, 16($sp)
    load(32'h18, enc_i(OP_LW, SP, T0, -4));         // lw  $t0, -4($sp)
    load(32'h1C, enc_i(OP_BEQ, T0, T1, 2));         // beq $t0, $t1, 2  (taken)
    load(32'h20, enc_i(OP_SW, SP, T0, 0));          // skipped
    load(32'h24, enc_i(OP_SW, SP, T0, 8));          // skipped
    load(32'h28, enc_i(OP_SW, SP, T1, 4));          // sw  $t1, 4($sp)
    load(32'h2C, enc_i(OP_BEQ, 0, 0, -1));          // stay here
    load(32'h200, 32'h300);                         // initial $sp
    load(32'h204, 32'd10);
    load(32'h208, 32'd32);
    load(32'h20C, 32'h0000_CAFE);
    load(32'h2FC, 32'd42);                          // read back through -4($sp)
    @(negedge clk); init_we = 0;
    @(negedge clk); rst = 0;
    n = 0; cyc = 0;
    while (n <= 10) begin
      @(posedge clk);
      if (state == S_FETCH) begin
        if (n > 0) expect_eq($sformatf("cycles of instruction %0d", n - 1), cyc, exp_cyc[n - 1]);
        if (n < 10) expect_eq($sformatf("pc of instruction %0d", n), pc, exp_pc[n]);
        n++; cyc = 1;
      end else cyc++;
    end
    expect_eq("$sp", dut.u_dp.u_rf.regs[SP], 32'h300);
    expect_eq("$t1 = $t1 + $t2", dut.u_dp.u_rf.regs[T1], 32'd42);
    expect_eq("$t0 from -4($sp)", dut.u_dp.u_rf.regs[T0], 32'd42);
    expect_eq("16($sp) = $a0", dut.u_mem.mem[32'h310 >> 2], 32'h0000_CAFE);
    expect_eq("4($sp) = $t1", dut.u_mem.mem[32'h304 >> 2], 32'd42);
    expect_eq("0($sp) skipped", dut.u_mem.mem[32'h300 >> 2], 32'd0);
    expect_eq("8($sp) skipped", dut.u_mem.mem[32'h308 >> 2], 32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
