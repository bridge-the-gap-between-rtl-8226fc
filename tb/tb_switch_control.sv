// tb_switch_control: neutral-atom commands start their unit only in
// neutral-atom mode and are refused (blocked) in the other modes.
module tb_switch_control;
  import uqcp_pkg::*;
  logic clk = 0, rst_n = 0, mode_we = 0, cmd_valid = 0, na_busy, blocked;
  mode_e mode_wdata = MODE_SC, mode;
  logic [1:0] cmd = 0;
  logic [3:0] na_start, na_unit_busy = '0;
  int checks = 0, failures = 0;

  switch_control dut (.*);
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
    @(negedge clk);
    chk(mode == MODE_SC, "reset mode");
    for (int m = 0; m < 3; m++) begin
      @(negedge clk); mode_we = 1; mode_wdata = mode_e'(m);
      @(negedge clk); mode_we = 0;
      chk(mode == mode_e'(m), "mode written");
      for (int c = 0; c < 4; c++) begin
        cmd_valid = 1; cmd = 2'(c); #1;
        if (m == int'(MODE_NA)) chk(na_start == 4'(1 << c) && !blocked, "start passes in NA mode");
        else                    chk(na_start == 4'b0 && blocked, "start blocked");
      end
      cmd_valid = 0; #1;
      chk(na_start == 0 && !blocked, "idle");
    end
    for (int i = 0; i < 16; i++) begin
      na_unit_busy = 4'(i); #1;
      chk(na_busy == (i != 0), "busy merge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
