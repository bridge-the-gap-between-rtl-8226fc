// tb_qmeas_reg: pending is set by issued measurements and cleared by the
// readout, which also stores the result; random traffic against a model.
module tb_qmeas_reg;
  localparam int NQ = 96;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [NQ-1:0] meas_issue = '0, ro_valid = '0, ro_result = '0, results, pending;
  logic [$clog2(NQ)-1:0] rd_qubit = '0;
  logic rd_result, rd_pending, any_pending;
  logic [NQ-1:0] mres = '0, mpend = '0;
  int checks = 0, failures = 0;

  qmeas_reg #(.NQ(NQ)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      chk(results == mres && pending == mpend, "state");
      chk(any_pending == (mpend != 0), "any_pending");
      rd_qubit = 7'($urandom_range(0, NQ - 1)); #1;
      chk(rd_result == mres[rd_qubit] && rd_pending == mpend[rd_qubit], "read port");
      meas_issue = {$urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom};
      ro_valid   = mpend & {$urandom, $urandom, $urandom};
      ro_result  = {$urandom, $urandom, $urandom};
      mres  = (mres & ~ro_valid) | (ro_result & ro_valid);
      mpend = (mpend & ~ro_valid) | meas_issue;
      if (it == 250) begin clear = 1; mres = '0; mpend = '0; end
      @(posedge clk); #1;
      clear = 0; meas_issue = '0; ro_valid = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
