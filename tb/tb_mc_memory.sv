// tb_mc_memory: self-checking test of the unified memory.
// Fills it through the loader port, then mixes random MemWrite writes and
// MemRead reads at byte addresses and compares with a reference array. Also
// checks that Mem Data is zero while MemRead is low and that byte offset bits
// are ignored. Runs at a reduced size of 64 words.
module tb_mc_memory;
  localparam int unsigned WORDS = 64;
  logic clk = 0, mem_read, mem_write, init_we;
  logic [31:0] addr, wdata, rdata, init_addr, init_wdata;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  mc_memory #(.MEM_WORDS(WORDS), .WIDTH(32)) dut (.clk, .mem_read, .mem_write, .addr, .wdata, .rdata,
                                                 .init_we, .init_addr, .init_wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem_read = 0; mem_write = 0; init_we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      init_we = 1; init_addr = 32'(i * 4); init_wdata = $urandom; model[i] = init_wdata;
      @(posedge clk); #1;
    end
    init_we = 0;
    for (int i = 0; i < WORDS; i++) begin
      mem_read = 1; addr = 32'(i * 4) | 32'($urandom % 4); #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL init word %0d = %h exp %h", i, rdata, model[i]); end
    end
    for (int i = 0; i < 3000; i++) begin
      int unsigned w;
      w = $urandom % WORDS;
      addr = 32'(w * 4);
      if ($urandom % 3 == 0) begin
        mem_read = 0; mem_write = 1; wdata = $urandom;
        #1;
        checks++;
        if (rdata !== 32'd0) begin failures++; $display("FAIL rdata not zero without MemRead"); end
        @(posedge clk); model[w] = wdata; #1;
        mem_write = 0;
      end else begin
        mem_read = 1; #1;
        checks++;
        if (rdata !== model[w]) begin failures++; $display("FAIL read word %0d = %h exp %h", w, rdata, model[w]); end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
