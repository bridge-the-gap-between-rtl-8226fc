// tb_gate_op_lut: checks reset contents, writes a set of entries and reads
// them back through both ports.
module tb_gate_op_lut;
  import uqcp_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [7:0] waddr = 0, raddr0 = 0, raddr1 = 0;
  lut_entry_t wdata = '0, rdata0, rdata1;
  lut_entry_t model [256];
  int checks = 0, failures = 0;

  gate_op_lut #(.OPS(256)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i += 17) begin
      raddr0 = 8'(i); #1;
      chk(rdata0.kind == GK_NONE, "reset kind");
    end
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      we = 1;
      waddr = 8'($urandom);
      wdata = '{kind: gate_kind_e'($urandom_range(1, 3)), cw_a: 8'($urandom), cw_b: 8'($urandom)};
      model[waddr] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 256; i++) begin
      raddr0 = 8'(i); raddr1 = 8'(255 - i); #1;
      chk(rdata0 == model[i], "port 0");
      chk(rdata1 == model[255 - i], "port 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
