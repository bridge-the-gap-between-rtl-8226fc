// tb_na_special_hw: the neutral-atom initialisation flow end to end. A
// synthetic camera frame of a randomly loaded 8 x 8 array is streamed in,
// detected, sorted and moved; the tweezer commands are applied to a model of
// the atom array, which must end up equal to the planned sorted map with
// the target columns filled.
module tb_na_special_hw;
  localparam int SX = 8, SY = 8, ROI = 4, TC = 4, IW = SX * ROI, NP = IW * SY * ROI;
  logic clk = 0, rst_n = 0;
  logic [3:0] start = '0, busy, done;
  logic [12:0] threshold = 13'd800;
  logic frame_start = 0, pix_valid = 0;
  logic [7:0] pix_data = 0;
  logic awg_valid, awg_on;
  logic [2:0] awg_row, awg_col;
  logic [SX*SY-1:0] occ, sorted, truth, arr;
  logic success;
  logic [6:0] n_moves;
  int checks = 0, failures = 0, held_row = -1, held_col = -1, n_cmds = 0;

  na_special_hw #(.SITES_X(SX), .SITES_Y(SY), .ROI(ROI), .PIX_W(8), .TARGET_COLS(TC),
                  .STEP_CYCLES(2)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the atom array: pick lifts an atom, steps carry it, drop places it
  always @(posedge clk) if (rst_n && awg_valid) begin
    n_cmds++;
    if (awg_on && held_row < 0) begin
      chk(arr[awg_row * SX + awg_col], "pick from an occupied site");
      arr[awg_row * SX + awg_col] = 1'b0;
      held_row = awg_row; held_col = awg_col;
    end else if (awg_on) begin
      chk(awg_row == 3'(held_row) && (int'(awg_col) - held_col == 1 || held_col - int'(awg_col) == 1),
          "step to a neighbouring column");
      chk(!arr[awg_row * SX + awg_col], "path is free");
      held_col = awg_col;
    end else begin
      chk(!arr[awg_row * SX + awg_col], $sformatf("drop on a free site r%0d c%0d held r%0d c%0d", awg_row, awg_col, held_row, held_col));
      arr[awg_row * SX + awg_col] = 1'b1;
      held_row = -1;
    end
  end

  task automatic pulse(int b);
    @(negedge clk) start[b] = 1;
    @(negedge clk) start[b] = 0;
    @(negedge clk);
    while (busy[b]) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      truth = {$urandom, $urandom} | {$urandom, $urandom};
      arr = truth;
      @(negedge clk) start[0] = 1;       // IIF
      @(negedge clk) start[0] = 0;
      frame_start = 1;
      @(negedge clk) frame_start = 0;
      for (int i = 0; i < NP; i++) begin
        pix_valid = 1;
        pix_data = truth[((i / IW) / ROI) * SX + (i % IW) / ROI] ? 8'($urandom_range(60, 90))
                                                                 : 8'($urandom_range(0, 40));
        @(negedge clk);
      end
      pix_valid = 0;
      @(negedge clk);
      chk(busy == 4'b0, "frame stored");
      pulse(1);                          // IAD
      chk(occ == truth, "detected occupancy");
      pulse(2);                          // IAS
      pulse(3);                          // IAM
      repeat (3) @(negedge clk);
      chk(arr == sorted, "array matches the sorted plan");
      begin
        bit all_full;
        all_full = 1;
        for (int y = 0; y < SY; y++) begin
          int cnt;
          cnt = $countones(truth[y * SX +: SX]);
          if (cnt < TC) all_full = 0;
          for (int x = 0; x < SX; x++) chk(arr[y * SX + x] == (x < cnt), "row compacted");
        end
        chk(success == all_full, "success flag");
      end
    end
    $display("moves in last run: %0d, commands: %0d", n_moves, n_cmds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
