// tb_mc_alu: self-checking test of the ALU.
// Drives directed corner cases and random operands through every operation
// (add, sub, and, or, slt) and compares result and Zero with values computed
// here; also checks that an unused operation code yields zero.
module tb_mc_alu;
  import mc_pkg::*;

  logic [31:0] a, b, result;
  alu_op_t     op;
  logic        zero;
  int checks = 0, failures = 0;

  mc_alu #(.WIDTH(32)) dut (.a, .b, .op, .result, .zero);

  function automatic logic [31:0] model(alu_op_t o, logic [31:0] x, logic [31:0] y);
    case (o)
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_ADD: return x + y;
      ALU_SUB: return x + (~y) + 32'd1;
      ALU_SLT: begin
        // signed compare worked out from sign bits and the unsigned order
        if (x[31] != y[31]) return {31'd0, x[31]};
        else                return {31'd0, (x < y)};
      end
      default: return 32'd0;
    endcase
  endfunction

  task automatic check(alu_op_t o, logic [31:0] x, logic [31:0] y);
    logic [31:0] exp;
    op = o; a = x; b = y;
    #1;
    exp = model(o, x, y);
    checks++;
    if (result !== exp || zero !== (exp == 32'd0)) begin
      failures++;
      $display("FAIL op=%03b a=%h b=%h result=%h zero=%b expected %h", o, x, y, result, zero, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_t ops[5] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT};
    // directed cases from the document's uses: PC+4, equal and unequal beq
    check(ALU_ADD, 32'h0000_0000, 32'd4);
    check(ALU_SUB, 32'h1234_5678, 32'h1234_5678);   // Zero set when A == B
    check(ALU_SUB, 32'h1234_5678, 32'h1234_5679);
    check(ALU_SLT, 32'hFFFF_FFFF, 32'h0000_0001);   // -1 < 1
    check(ALU_SLT, 32'h0000_0001, 32'hFFFF_FFFF);
    check(ALU_SLT, 32'h8000_0000, 32'h7FFF_FFFF);
    check(ALU_ADD, 32'hFFFF_FFFF, 32'h0000_0001);   // wraps to zero
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] x, y;
      x = $urandom; y = (i % 7 == 0) ? x : $urandom;
      check(ops[i % 5], x, y);
    end
    // unused code
    op = alu_op_t'(3'b011); a = 32'hAAAA_5555; b = 32'h1; #1;
    checks++;
    if (result !== 32'd0 || zero !== 1'b1) begin failures++; $display("FAIL unused code"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
