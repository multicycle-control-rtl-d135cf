// tb_mc_datapath: self-checking test of the datapath on its own.
// The testbench plays the control unit and the memory: it sets the control
// signals of each stage exactly as the control-signal tables list them
// (the ALU operation of R-type execution decoded here from the function
// field), and serves reads and writes from a memory array of its own. A short
// program of lw, add, sub, and, or, slt, sw and beq (taken, not taken and
// backwards) is run; the PC after every fetch and branch, the IR, the memory
// address of every load and store, and the final data memory are checked
// against values worked out by hand for that program.
module tb_mc_datapath;
  import mc_pkg::*;

  logic clk = 0, rst, pc_write, zero;
  ctrl_t ctrl;
  logic [5:0]  op, funct;
  logic [31:0] mem_addr, mem_wdata, mem_rdata, pc, ir;
  logic [31:0] mem [64];
  int checks = 0, failures = 0;

  mc_datapath dut (.clk, .rst, .ctrl, .pc_write, .op, .funct, .zero,
                   .mem_addr, .mem_wdata, .mem_rdata, .pc, .ir);

  always #5 clk = ~clk;

  // memory model: combinational read while MemRead, write at the clock edge
  assign mem_rdata = ctrl.mem_read ? mem[mem_addr[7:2]] : 32'd0;
  always @(posedge clk) if (ctrl.mem_write) mem[mem_addr[7:2]] <= mem_wdata;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rtype(int rs, int rt, int rd, logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] itype(logic [5:0] o, int rs, int rt, int imm);
    return {o, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s = %h expected %h", what, got, exp); end
  endtask

  task automatic step();
    @(posedge clk); #1;
  endtask

  // Executes the instruction at the PC, stage by stage; returns PC after it.
  task automatic exec(logic [31:0] exp_pc_after, logic [31:0] exp_mem_addr);
    logic [31:0] pc0;
    pc0 = pc;
    // Stage 1: IR = Mem[PC]; PC = PC + 4
    ctrl = '0; ctrl.mem_read = 1; ctrl.iord = 0; ctrl.ir_write = 1;
    ctrl.alu_src_a = 0; ctrl.alu_src_b = 2'b01; ctrl.alu_op = ALU_ADD; ctrl.pc_source = 0;
    pc_write = 1;
    step();
    expect_eq("PC after fetch", pc, pc0 + 4);
    expect_eq("IR", ir, mem[pc0[7:2]]);
    // Stage 2: A, B from registers; ALUOut = PC + (sext(imm) << 2)
    ctrl = '0; ctrl.alu_src_a = 0; ctrl.alu_src_b = 2'b11; ctrl.alu_op = ALU_ADD; pc_write = 0;
    step();
    case (op)
      OP_BEQ: begin
        ctrl = '0; ctrl.alu_src_a = 1; ctrl.alu_src_b = 2'b00; ctrl.alu_op = ALU_SUB; ctrl.pc_source = 1;
        #1 pc_write = zero;
        step();
      end
      OP_RTYPE: begin
        ctrl = '0; ctrl.alu_src_a = 1; ctrl.alu_src_b = 2'b00;
        case (funct)
          FN_ADD: ctrl.alu_op = ALU_ADD;
          FN_SUB: ctrl.alu_op = ALU_SUB;
          FN_AND: ctrl.alu_op = ALU_AND;
          FN_OR:  ctrl.alu_op = ALU_OR;
          default: ctrl.alu_op = ALU_SLT;
        endcase
        step();
        ctrl = '0; ctrl.reg_write = 1; ctrl.reg_dst = 1; ctrl.mem_to_reg = 0;
        step();
      end
      default: begin   // lw, sw
        ctrl = '0; ctrl.alu_src_a = 1; ctrl.alu_src_b = 2'b10; ctrl.alu_op = ALU_ADD;
        step();
        ctrl = '0; ctrl.iord = 1;
        if (op == OP_SW) ctrl.mem_write = 1; else ctrl.mem_read = 1;
        #1 expect_eq("memory address", mem_addr, exp_mem_addr);
        step();
        if (op == OP_LW) begin
          ctrl = '0; ctrl.reg_write = 1; ctrl.reg_dst = 0; ctrl.mem_to_reg = 1;
          step();
        end
      end
    endcase
    ctrl = '0;
    expect_eq("PC after instruction", pc, exp_pc_after);
  endtask

  initial begin
    ctrl = '0; pc_write = 0;
    for (int i = 0; i < 64; i++) mem[i] = '0;
    mem[32] = 32'd7;   // 0x80
    mem[33] = 32'd5;   // 0x84
    mem[0]  = itype(OP_LW, 0, 1, 32'h80);
    mem[1]  = itype(OP_LW, 0, 2, 32'h84);
    mem[2]  = rtype(1, 2, 3, FN_ADD);
    mem[3]  = rtype(1, 2, 4, FN_SUB);
    mem[4]  = rtype(1, 2, 5, FN_AND);
    mem[5]  = rtype(1, 2, 6, FN_OR);
    mem[6]  = rtype(2, 1, 7, FN_SLT);
    mem[7]  = itype(OP_SW, 0, 3, 32'h88);
    mem[8]  = itype(OP_SW, 0, 4, 32'h8C);
    mem[9]  = itype(OP_SW, 0, 5, 32'h90);
    mem[10] = itype(OP_SW, 0, 6, 32'h94);
    mem[11] = itype(OP_SW, 0, 7, 32'h98);
    mem[12] = itype(OP_BEQ, 1, 2, 5);        // 7 != 5: not taken
    mem[13] = itype(OP_BEQ, 6, 1, 2);        // 7 == 7: to 0x38 + 8 = 0x40
    mem[14] = itype(OP_SW, 0, 1, 32'hA0);    // skipped
    mem[17] = itype(OP_BEQ, 0, 0, -1);       // to 0x48 - 4 = 0x44
    mem[16] = itype(OP_SW, 5, 2, 32'h97);
    rst = 1; step(); rst = 0;
    exec(32'h04, 32'h80);
    exec(32'h08, 32'h84);
    for (int i = 2; i < 7; i++) exec(32'(4 * i + 4), 0);
    exec(32'h20, 32'h88);
    exec(32'h24, 32'h8C);
    exec(32'h28, 32'h90);
    exec(32'h2C, 32'h94);
    exec(32'h30, 32'h98);
    exec(32'h34, 0);
    exec(32'h40, 0);
    exec(32'h44, 32'h9C);
    exec(32'h44, 0);
    exec(32'h44, 0);
    expect_eq("mem[0x88] add", mem[34], 32'd12);
    expect_eq("mem[0x8C] sub", mem[35], 32'd2);
    expect_eq("mem[0x90] and", mem[36], 32'd5);
    expect_eq("mem[0x94] or",  mem[37], 32'd7);
    expect_eq("mem[0x98] slt", mem[38], 32'd1);
    expect_eq("mem[0x9C] sw with base", mem[39], 32'd5);
    expect_eq("mem[0xA0] skipped by branch", mem[40], 32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
