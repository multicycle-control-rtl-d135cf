// tb_mc_control: self-checking test of the control FSM.
// For each instruction class (beq taken and not taken, the five R-type
// functions, sw, lw, and an unknown opcode) it resets the FSM, presents the
// opcode and function field, and checks cycle by cycle the state sequence,
// every control signal against the values of the control-signal tables, and
// the number of cycles the instruction takes (beq 3, R-type 4, sw 4, lw 5).
module tb_mc_control;
  import mc_pkg::*;

  logic clk = 0, rst, zero, pc_write;
  logic [5:0] op, funct;
  ctrl_t  ctrl;
  state_t state;
  int checks = 0, failures = 0;

  mc_control dut (.clk, .rst, .op, .funct, .zero, .ctrl, .pc_write, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected outputs as a flat vector:
  // {PCWrite, IorD, MemRead, MemWrite, IRWrite, RegDst, MemToReg, RegWrite,
  //  ALUSrcA, ALUSrcB[1:0], ALUOp[2:0], PCSource}
  function automatic logic [14:0] expect_bits(string step, logic [2:0] fop, logic z);
    case (step)
      "fetch":   return {1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 2'b01, 3'b010, 1'b0};
      "decode":  return {1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 2'b11, 3'b010, 1'b0};
      "branch":  return {z,    1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 2'b00, 3'b110, 1'b1};
      "rex":     return {1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 2'b00, fop,    1'b0};
      "rwb":     return {1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 2'b00, 3'b010, 1'b0};
      "addr":    return {1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 2'b10, 3'b010, 1'b0};
      "memwr":   return {1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 2'b00, 3'b010, 1'b0};
      "memrd":   return {1'b0, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 2'b00, 3'b010, 1'b0};
      "regwr":   return {1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 2'b00, 3'b010, 1'b0};
      default:   return '1;
    endcase
  endfunction

  function automatic logic [14:0] actual_bits();
    return {pc_write, ctrl.iord, ctrl.mem_read, ctrl.mem_write, ctrl.ir_write, ctrl.reg_dst,
            ctrl.mem_to_reg, ctrl.reg_write, ctrl.alu_src_a, ctrl.alu_src_b, 3'(ctrl.alu_op),
            ctrl.pc_source};
  endfunction

  // Runs one instruction from reset through its steps and back to fetch.
  task automatic run(string name, logic [5:0] o, logic [5:0] f, logic [2:0] fop, logic z,
                     string steps[$], state_t states[$]);
    rst = 1; op = o; funct = f; zero = z;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < steps.size(); i++) begin
      checks += 2;
      if (state !== states[i]) begin
        failures++; $display("FAIL %s step %0d state=%s expected %s", name, i, state.name(), states[i].name());
      end
      if (actual_bits() !== expect_bits(steps[i], fop, z)) begin
        failures++;
        $display("FAIL %s step %s outputs=%b expected %b", name, steps[i], actual_bits(), expect_bits(steps[i], fop, z));
      end
      @(posedge clk); #1;
    end
    // instruction length: back in fetch after exactly steps.size() cycles
    checks++;
    if (state !== S_FETCH) begin
      failures++; $display("FAIL %s took more than %0d cycles", name, steps.size());
    end
  endtask

  initial begin
    rst = 1; op = 0; funct = 0; zero = 0;
    run("beq taken",     OP_BEQ, 6'h00, 3'b000, 1'b1, '{"fetch", "decode", "branch"}, '{S_FETCH, S_DECODE, S_BRANCH});
    run("beq not taken", OP_BEQ, 6'h00, 3'b000, 1'b0, '{"fetch", "decode", "branch"}, '{S_FETCH, S_DECODE, S_BRANCH});
    run("add", OP_RTYPE, 6'h20, 3'b010, 1'b0, '{"fetch", "decode", "rex", "rwb"}, '{S_FETCH, S_DECODE, S_RTYPE_EX, S_RTYPE_WB});
    run("sub", OP_RTYPE, 6'h22, 3'b110, 1'b0, '{"fetch", "decode", "rex", "rwb"}, '{S_FETCH, S_DECODE, S_RTYPE_EX, S_RTYPE_WB});
    run("and", OP_RTYPE, 6'h24, 3'b000, 1'b0, '{"fetch", "decode", "rex", "rwb"}, '{S_FETCH, S_DECODE, S_RTYPE_EX, S_RTYPE_WB});
    run("or",  OP_RTYPE, 6'h25, 3'b001, 1'b1, '{"fetch", "decode", "rex", "rwb"}, '{S_FETCH, S_DECODE, S_RTYPE_EX, S_RTYPE_WB});
    run("slt", OP_RTYPE, 6'h2A, 3'b111, 1'b0, '{"fetch", "decode", "rex", "rwb"}, '{S_FETCH, S_DECODE, S_RTYPE_EX, S_RTYPE_WB});
    run("sw",  OP_SW, 6'h10, 3'b000, 1'b1, '{"fetch", "decode", "addr", "memwr"}, '{S_FETCH, S_DECODE, S_MEM_ADDR, S_MEM_WR});
    run("lw",  OP_LW, 6'h04, 3'b000, 1'b1, '{"fetch", "decode", "addr", "memrd", "regwr"},
        '{S_FETCH, S_DECODE, S_MEM_ADDR, S_MEM_RD, S_REG_WR});
    run("unknown", 6'h3F, 6'h00, 3'b000, 1'b0, '{"fetch", "decode"}, '{S_FETCH, S_DECODE});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
