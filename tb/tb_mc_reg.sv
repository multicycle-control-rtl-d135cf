// tb_mc_reg: self-checking test of the enabled state register.
// Checks reset value, that the register holds while en is low and loads d
// at the rising edge while en is high, against a reference value kept here.
module tb_mc_reg;
  logic clk = 0, rst, en;
  logic [31:0] d, q, ref_q;
  int checks = 0, failures = 0;

  mc_reg #(.WIDTH(32), .RESET_VALUE(32'h0000_0040)) dut (.clk, .rst, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; d = 32'hDEAD_BEEF;
    @(posedge clk); #1;
    checks++;
    if (q !== 32'h40) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 0; ref_q = 32'h40;
    for (int i = 0; i < 500; i++) begin
      en = ($urandom % 2) == 1;
      d  = $urandom;
      @(posedge clk);
      if (en) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL cycle %0d q=%h expected %h", i, q, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
