// tb_channel_ctrl: codewords with increasing timestamps come out exactly
// one cycle after `now` reaches their timestamp; an overdue entry comes out
// at once and raises `late`.
module tb_channel_ctrl;
  import uqcp_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, wr_en = 0;
  logic [TS_W+CW_W-1:0] wr_data = '0;
  logic full, empty, mc_valid, late;
  logic [TS_W-1:0] now = '0;
  logic [CW_W-1:0] mc_cw;
  int checks = 0, failures = 0;
  int exp_cycle [$];
  logic [CW_W-1:0] exp_cw [$];
  bit exp_late [$];
  int cyc = 0, seen = 0;

  channel_ctrl #(.DEPTH(4)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin cyc <= cyc + 1; now <= now + 1'b1; end

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

  // output monitor: `now` equals cyc, output appears the cycle after the match
  always @(negedge clk) if (rst_n) begin
    if (mc_valid) begin
      seen++;
      chk(exp_cycle.size() > 0, "unexpected output");
      if (exp_cycle.size() > 0) begin
        chk(cyc == exp_cycle[0] + 1, $sformatf("release cycle %0d exp %0d", cyc, exp_cycle[0] + 1));
        chk(mc_cw == exp_cw[0], "codeword");
        chk(late == exp_late[0], "late flag");
        void'(exp_cycle.pop_front()); void'(exp_cw.pop_front()); void'(exp_late.pop_front());
      end
    end
  end

  task automatic push(int ts, int cw);
    @(negedge clk);
    while (full) @(negedge clk);
    wr_en = 1; wr_data = {TS_W'(ts), CW_W'(cw)};
    @(negedge clk) wr_en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // spaced operations, queued well ahead of time
    push(40, 1); exp_cycle.push_back(40); exp_cw.push_back(1); exp_late.push_back(0);
    push(41, 2); exp_cycle.push_back(41); exp_cw.push_back(2); exp_late.push_back(0);
    push(60, 3); exp_cycle.push_back(60); exp_cw.push_back(3); exp_late.push_back(0);
    push(100, 4); exp_cycle.push_back(100); exp_cw.push_back(4); exp_late.push_back(0);
    wait (cyc > 110);
    // an overdue entry: popped in the first cycle it sits in the FIFO
    @(negedge clk);
    wr_en = 1; wr_data = {TS_W'(50), CW_W'(9)};
    exp_cycle.push_back(cyc + 1); exp_cw.push_back(9); exp_late.push_back(1);
    @(negedge clk) wr_en = 0;
    repeat (10) @(negedge clk);
    chk(seen == 5 && exp_cycle.size() == 0, "all released");
    chk(empty, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
