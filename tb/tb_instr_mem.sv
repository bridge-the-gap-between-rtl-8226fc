// tb_instr_mem: writes a pattern and reads it back.
module tb_instr_mem;
  logic clk = 0, we = 0;
  logic [9:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  instr_mem #(.WORDS(1024)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = 32'(i) * 32'h9E37_79B9;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 1024; i++) begin
      raddr = 10'(i); #1;
      checks++;
      if (rdata != 32'(i) * 32'h9E37_79B9) begin failures++; $display("FAIL word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
