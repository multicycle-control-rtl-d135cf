// tb_mc_cpu: end-to-end test of the multicycle processor at its default size.
//
// Each round generates a random program of lw, sw, beq and the five R-type
// operations (forward branches only, so it always ends), plus random data,
// loads both through the loader port while the processor is held in reset,
// and runs it until it reaches the closing branch-to-self. A reference
// instruction-set model in this testbench executes the same program. Checked:
//   * the PC of every instruction fetched follows the model's trace;
//   * every instruction takes its document-given number of cycles
//     (beq 3, R-type 4, sw 4, lw 5), and the total cycle count matches;
//   * the final registers and the whole data area match the model.
// Every mechanism is counted - each FSM state, taken and untaken branches,
// each R-type function, writes aimed at register 0, signed slt - and a
// mechanism that never happened counts as a failure.
module tb_mc_cpu;
  import mc_pkg::*;

  localparam int unsigned MEM_WORDS  = 1024;   // the processor's default
  localparam int unsigned PROG_WORDS = 400;
  localparam int unsigned DATA_BASE  = 768;    // first data word
  localparam int unsigned DATA_WORDS = MEM_WORDS - DATA_BASE;
  localparam int          ROUNDS     = 4;

  logic clk = 0, rst, init_we;
  logic [31:0] init_addr, init_wdata, pc, ir;
  state_t state;
  int checks = 0, failures = 0;

  mc_cpu dut (.clk, .rst, .init_we, .init_addr, .init_wdata, .pc, .ir, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- program
  logic [31:0] prog  [PROG_WORDS];
  logic [31:0] dinit [DATA_WORDS];
  int unsigned prog_len;

  // reference model state
  logic [31:0] mregs [32];
  logic [31:0] mdata [DATA_WORDS];
  logic [31:0] pc_trace [$];
  int          cyc_trace [$];
  longint      exp_total;

  // mechanism counters
  int n_state [9];
  int n_taken, n_not_taken, n_fn [5], n_zero_dst, n_slt_signed;

  function automatic logic [31:0] enc_r(int rs, int rt, int rd, logic [5:0] fn);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] enc_i(logic [5:0] o, int rs, int rt, int imm);
    return {o, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  task automatic make_program();
    logic [5:0] fns [5] = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_SLT};
    prog_len = PROG_WORDS;
    for (int i = 0; i < DATA_WORDS; i++) dinit[i] = $urandom;
    for (int i = 0; i < PROG_WORDS; i++) prog[i] = '0;
    // start by loading registers 1..10
    for (int r = 1; r <= 10; r++) prog[r - 1] = enc_i(OP_LW, 0, r, int'(4 * (DATA_BASE + r)));
    for (int i = 10; i < PROG_WORDS - 1; i++) begin
      int k, rs, rt, rd, off;
      k  = $urandom % 10;
      rs = $urandom % 12; rt = $urandom % 12; rd = $urandom % 12;
      if (k < 5) begin
        prog[i] = enc_r(rs, rt, rd, fns[$urandom % 5]);
      end else if (k < 7) begin
        prog[i] = enc_i(OP_LW, 0, rt, int'(4 * (DATA_BASE + $urandom % DATA_WORDS)));
      end else if (k < 9) begin
        prog[i] = enc_i(OP_SW, 0, rt, int'(4 * (DATA_BASE + $urandom % DATA_WORDS)));
      end else begin
        off = $urandom % 4;
        if (i + 1 + off > PROG_WORDS - 1) off = PROG_WORDS - 2 - i;
        if ($urandom % 2 == 0) rt = rs;
        prog[i] = enc_i(OP_BEQ, rs, rt, off);
      end
    end
    prog[PROG_WORDS - 1] = enc_i(OP_BEQ, 0, 0, -1);
  endtask

  // Reference execution, up to the first fetch of the closing instruction.
  task automatic run_model();
    logic [31:0] mpc, ins, x, y, res;
    int guard;
    for (int r = 0; r < 32; r++) mregs[r] = '0;
    for (int i = 0; i < DATA_WORDS; i++) mdata[i] = dinit[i];
    pc_trace.delete(); cyc_trace.delete();
    exp_total = 0; mpc = 0; guard = 0;
    while (mpc != 4 * (PROG_WORDS - 1) && guard < 100000) begin
      guard++;
      ins = prog[mpc[31:2]];
      pc_trace.push_back(mpc);
      x = mregs[ins[25:21]]; y = mregs[ins[20:16]];
      mpc = mpc + 4;
      unique case (ins[31:26])
        OP_RTYPE: begin
          case (ins[5:0])
            FN_ADD: res = x + y;
            FN_SUB: res = x - y;
            FN_AND: res = x & y;
            FN_OR:  res = x | y;
            default: res = ($signed(x) < $signed(y)) ? 32'd1 : 32'd0;
          endcase
          if (ins[15:11] != 0) mregs[ins[15:11]] = res;
          cyc_trace.push_back(4);
        end
        OP_LW: begin
          res = mdata[(32'(signed'(ins[15:0])) >> 2) - DATA_BASE];
          if (ins[20:16] != 0) mregs[ins[20:16]] = res;
          cyc_trace.push_back(5);
        end
        OP_SW: begin
          mdata[(32'(signed'(ins[15:0])) >> 2) - DATA_BASE] = y;
          cyc_trace.push_back(4);
        end
        default: begin  // beq
          if (x == y) mpc = mpc + (32'(signed'(ins[15:0])) << 2);
          cyc_trace.push_back(3);
        end
      endcase
      exp_total += cyc_trace[$];
    end
  endtask

  // ---------------------------------------------------------------- monitor
  bit      running = 0;
  int      n_fetch, cyc_in_instr;
  longint  total_cycles;
  state_t  prev_state;

  always @(posedge clk) begin
    if (running && !rst) begin
      total_cycles++;
      n_state[int'(state)]++;
      if (state == S_FETCH) begin
        if (n_fetch > 0 && n_fetch <= cyc_trace.size()) begin
          checks++;
          if (cyc_in_instr != cyc_trace[n_fetch - 1]) begin
            failures++;
            $display("FAIL instruction %0d took %0d cycles, expected %0d", n_fetch - 1, cyc_in_instr, cyc_trace[n_fetch - 1]);
          end
        end
        if (n_fetch < pc_trace.size()) begin
          checks++;
          if (pc !== pc_trace[n_fetch]) begin
            failures++;
            $display("FAIL fetch %0d at pc %h, expected %h", n_fetch, pc, pc_trace[n_fetch]);
          end
        end
        n_fetch++;
        cyc_in_instr = 1;
      end else begin
        cyc_in_instr++;
      end
      if (state == S_BRANCH) begin
        if (dut.u_dp.u_alu.zero) n_taken++; else n_not_taken++;
      end
      if (state == S_RTYPE_EX) begin
        case (ir[5:0])
          FN_ADD: n_fn[0]++;
          FN_SUB: n_fn[1]++;
          FN_AND: n_fn[2]++;
          FN_OR:  n_fn[3]++;
          default: begin
            n_fn[4]++;
            if (dut.u_dp.u_alu.a[31] != dut.u_dp.u_alu.b[31]) n_slt_signed++;
          end
        endcase
      end
      if ((state == S_RTYPE_WB && ir[15:11] == 0) || (state == S_REG_WR && ir[20:16] == 0)) n_zero_dst++;
    end
  end

  // ---------------------------------------------------------------- rounds
  initial begin
    rst = 1; init_we = 0; init_addr = 0; init_wdata = 0;
    for (int s = 0; s < 9; s++) n_state[s] = 0;
    for (int f = 0; f < 5; f++) n_fn[f] = 0;
    n_taken = 0; n_not_taken = 0; n_zero_dst = 0; n_slt_signed = 0;
    for (int round = 0; round < ROUNDS; round++) begin
      make_program();
      run_model();
      // load program and data while in reset
      rst = 1;
      for (int i = 0; i < MEM_WORDS; i++) begin
        @(negedge clk);
        init_we = 1; init_addr = 32'(4 * i);
        init_wdata = (i < PROG_WORDS) ? prog[i] : (i >= DATA_BASE) ? dinit[i - DATA_BASE] : 32'd0;
      end
      @(negedge clk); init_we = 0;
      @(negedge clk);
      n_fetch = 0; cyc_in_instr = 0; total_cycles = 0; running = 1;
      rst = 0;
      // run to the first fetch of the closing branch-to-self
      wait (n_fetch == pc_trace.size() + 1);
      running = 0;
      checks++;
      if (total_cycles - 1 != exp_total) begin
        failures++; $display("FAIL round %0d: %0d cycles, expected %0d", round, total_cycles - 1, exp_total);
      end
      // let the closing loop run a few times: state must not change
      repeat (9) @(posedge clk);
      #1;
      checks++;
      if (pc !== 32'(4 * (PROG_WORDS - 1)) && pc !== 32'(4 * PROG_WORDS)) begin
        failures++; $display("FAIL round %0d: closing loop pc %h", round, pc);
      end
      for (int r = 0; r < 32; r++) begin
        checks++;
        if (dut.u_dp.u_rf.regs[r] !== mregs[r] && r != 0) begin
          failures++; $display("FAIL round %0d: $%0d = %h expected %h", round, r, dut.u_dp.u_rf.regs[r], mregs[r]);
        end
      end
      for (int i = 0; i < DATA_WORDS; i++) begin
        checks++;
        if (dut.u_mem.mem[DATA_BASE + i] !== mdata[i]) begin
          failures++; $display("FAIL round %0d: data word %0d = %h expected %h", round, i, dut.u_mem.mem[DATA_BASE + i], mdata[i]);
        end
      end
      $display("round %0d: %0d instructions, %0d cycles", round, pc_trace.size(), exp_total);
    end
    // every mechanism must have happened
    for (int s = 0; s < 9; s++) begin
      checks++;
      if (n_state[s] == 0) begin failures++; $display("FAIL state %s never entered", state_t'(s)); end
    end
    checks += 4;
    if (n_taken == 0)      begin failures++; $display("FAIL no taken branch"); end
    if (n_not_taken == 0)  begin failures++; $display("FAIL no untaken branch"); end
    if (n_zero_dst == 0)   begin failures++; $display("FAIL no write aimed at register 0"); end
    if (n_slt_signed == 0) begin failures++; $display("FAIL no slt on operands of differing sign"); end
    for (int f = 0; f < 5; f++) begin
      checks++;
      if (n_fn[f] == 0) begin failures++; $display("FAIL R-type function %0d never executed", f); end
    end
    $display("mechanisms: taken=%0d not_taken=%0d add/sub/and/or/slt=%0d/%0d/%0d/%0d/%0d zero_dst=%0d slt_signed=%0d",
             n_taken, n_not_taken, n_fn[0], n_fn[1], n_fn[2], n_fn[3], n_fn[4], n_zero_dst, n_slt_signed);
    $display("states: %0d %0d %0d %0d %0d %0d %0d %0d %0d", n_state[0], n_state[1], n_state[2], n_state[3],
             n_state[4], n_state[5], n_state[6], n_state[7], n_state[8]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
