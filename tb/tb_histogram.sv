// tb_histogram: records a known multiset of states, dumps the top M and
// checks states and counts in descending order; then fills every bin to
// check overflow counting and the zero entries of a short dump.
module tb_histogram;
  localparam int NQ = 96, BINS = 8, M = 4, RE = 16;
  logic clk = 0, rst_n = 0, clear = 0, sample = 0, dump = 0, busy;
  logic [NQ-1:0] state = '0;
  logic [3:0] base = 0, res_raddr = 0;
  logic [15:0] overflow;
  logic [31:0] shots;
  logic [16+NQ-1:0] res_rdata;
  int checks = 0, failures = 0;

  histogram #(.NQ(NQ), .BINS(BINS), .TOP_M(M), .CNT_W(16), .RES_ENTRIES(RE)) dut (.*);
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

  task automatic shot(logic [NQ-1:0] s);
    @(negedge clk); sample = 1; state = s;
    @(negedge clk); sample = 0;
  endtask

  task automatic do_dump(int b);
    int n;
    @(negedge clk); dump = 1; base = 4'(b);
    @(negedge clk); dump = 0;
    n = 0;
    while (busy) begin @(negedge clk); n++; end
    chk(n == M, $sformatf("dump takes M cycles (%0d)", n));
  endtask

  task automatic expect_entry(int a, int cnt, logic [NQ-1:0] s);
    res_raddr = 4'(a); #1;
    chk(res_rdata[16+NQ-1:NQ] == 16'(cnt), $sformatf("count at %0d: %0d exp %0d", a, res_rdata[16+NQ-1:NQ], cnt));
    if (cnt != 0) chk(res_rdata[NQ-1:0] == s, $sformatf("state at %0d", a));
  endtask

  logic [NQ-1:0] s00, s11, s01, sx;
  initial begin
    s00 = '0; s11 = NQ'(3); s01 = NQ'(1); sx = {32'hdead_beef, 64'h1};
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Bell-like statistics: 00 x5, 11 x7, 01 x1, then one rare wide state x2
    for (int i = 0; i < 5; i++) shot(s00);
    for (int i = 0; i < 7; i++) shot(s11);
    shot(s01);
    shot(sx); shot(sx);
    chk(shots == 15, "shots");
    do_dump(2);
    expect_entry(2, 7, s11);
    expect_entry(3, 5, s00);
    expect_entry(4, 2, sx);
    expect_entry(5, 1, s01);
    // fill remaining bins, then overflow
    for (int i = 0; i < BINS - 4; i++) shot(NQ'(100 + i));
    chk(overflow == 0, "no overflow yet");
    shot(NQ'(999)); shot(NQ'(998));
    chk(overflow == 2, "overflow counted");
    shot(s00);
    do_dump(8);
    expect_entry(8, 7, s11);
    expect_entry(9, 6, s00);
    // clear: a dump of an empty histogram writes zero counts
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    chk(shots == 0 && overflow == 0, "clear");
    shot(s01);
    do_dump(0);
    expect_entry(0, 1, s01);
    expect_entry(1, 0, '0);
    expect_entry(3, 0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
