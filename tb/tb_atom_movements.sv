// tb_atom_movements: plays a move list and checks the exact AWG command
// sequence (pick, one command per column step, drop) and its spacing.
module tb_atom_movements;
  localparam int SX = 8, SY = 8, STEP = 3, SX_W = 3, SY_W = 3, MV_W = 7;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [MV_W-1:0] n_moves = 0, mv_raddr;
  logic [SY_W+2*SX_W-1:0] mv_rdata;
  logic awg_valid, awg_on;
  logic [SY_W-1:0] awg_row;
  logic [SX_W-1:0] awg_col;
  logic [SY_W+2*SX_W-1:0] list [16];
  int checks = 0, failures = 0, cyc = 0, last_cmd = -1;
  int er [$], ec [$], eo [$];

  atom_movements #(.SITES_X(SX), .SITES_Y(SY), .STEP_CYCLES(STEP)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign mv_rdata = list[mv_raddr[3:0]];

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

  always @(negedge clk) if (awg_valid) begin
    chk(er.size() > 0, "unexpected command");
    if (er.size() > 0) begin
      chk(awg_row == 3'(er[0]) && awg_col == 3'(ec[0]) && awg_on == 1'(eo[0]),
          $sformatf("command row %0d col %0d on %0d", awg_row, awg_col, awg_on));
      void'(er.pop_front()); void'(ec.pop_front()); void'(eo.pop_front());
    end
    if (last_cmd >= 0) chk(cyc - last_cmd == STEP, $sformatf("spacing %0d", cyc - last_cmd));
    last_cmd = cyc;
  end

  task automatic add_move(int i, int r, int f, int t);
    list[i] = {3'(r), 3'(f), 3'(t)};
    er.push_back(r); ec.push_back(f); eo.push_back(1);
    for (int c = f - 1; c >= t; c--) begin er.push_back(r); ec.push_back(c); eo.push_back(1); end
    er.push_back(r); ec.push_back(t); eo.push_back(0);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    add_move(0, 0, 3, 0);
    add_move(1, 0, 5, 1);
    add_move(2, 6, 7, 6);
    n_moves = 3;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    chk(busy, "busy");
    @(posedge done);
    repeat (2) @(negedge clk);
    chk(er.size() == 0, "all commands seen");
    chk(!busy, "idle after last drop");
    // an empty list finishes at once
    n_moves = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    chk(!busy, "empty list");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
