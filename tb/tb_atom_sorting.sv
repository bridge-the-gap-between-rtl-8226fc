// tb_atom_sorting: random occupancy maps; the move list, the sorted map
// and the success flag are compared with a row-compaction model.
module tb_atom_sorting;
  localparam int SX = 8, SY = 8, TC = 4, NS = SX * SY;
  localparam int SX_W = 3, SY_W = 3, MV_W = 7;
  logic clk = 0, rst_n = 0, start = 0, busy, done, success;
  logic [NS-1:0] occ = '0, sorted;
  logic [MV_W-1:0] n_moves, mv_raddr = 0;
  logic [SY_W+2*SX_W-1:0] mv_rdata;
  int checks = 0, failures = 0;

  atom_sorting #(.SITES_X(SX), .SITES_Y(SY), .TARGET_COLS(TC)) dut (.*);
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
    logic [SY_W+2*SX_W-1:0] exp_mv [$];
    logic [NS-1:0] exp_sorted;
    bit exp_ok;
    int cycles;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      // about 60 % loading; the last runs use a full and an empty map
      occ = {$urandom, $urandom} | ({$urandom, $urandom} & {$urandom, $urandom});
      if (rep == 18) occ = '1;
      if (rep == 19) occ = '0;
      exp_mv.delete(); exp_sorted = '0; exp_ok = 1;
      for (int y = 0; y < SY; y++) begin
        int nxt;
        nxt = 0;
        for (int x = 0; x < SX; x++) if (occ[y * SX + x]) begin
          if (x != nxt) exp_mv.push_back({3'(y), 3'(x), 3'(nxt)});
          exp_sorted[y * SX + nxt] = 1'b1;
          nxt++;
        end
        if (nxt < TC) exp_ok = 0;
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      chk(cycles == NS + 1, "one site per cycle");
      chk(n_moves == MV_W'(exp_mv.size()), $sformatf("move count %0d exp %0d", n_moves, exp_mv.size()));
      chk(sorted == exp_sorted, "sorted map");
      chk(success == exp_ok, "success flag");
      for (int i = 0; i < exp_mv.size(); i++) begin
        mv_raddr = MV_W'(i); #1;
        chk(mv_rdata == exp_mv[i], $sformatf("move %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
