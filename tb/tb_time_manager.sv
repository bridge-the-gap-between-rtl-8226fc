// tb_time_manager: after start, `now` counts cycles; QWAIT and bundle PI
// advance the issue time and bundles get the expected timestamps.
module tb_time_manager;
  import uqcp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, wait_en = 0, bundle_en = 0;
  logic [TS_W-1:0] wait_amt = 0, bundle_ts, now, issue_time;
  logic [2:0] bundle_pi = 0;
  int checks = 0, failures = 0;
  longint exp_issue = 0;

  time_manager dut (.*);
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
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int c = 0; c < 200; c++) begin
      // `now` equals the number of edges after the one that saw start
      chk(now == TS_W'(c), "now counts cycles");
      wait_en = 0; bundle_en = 0;
      case ($urandom_range(0, 3))
        0: begin wait_en = 1; wait_amt = TS_W'($urandom_range(0, 1000)); end
        1: begin bundle_en = 1; bundle_pi = 3'($urandom); end
        default: ;
      endcase
      #1;
      if (bundle_en) chk(bundle_ts == TS_W'(exp_issue + bundle_pi), "bundle timestamp");
      if (wait_en) exp_issue += wait_amt;
      if (bundle_en) exp_issue += bundle_pi;
      @(negedge clk);
      chk(issue_time == TS_W'(exp_issue), "issue time");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
