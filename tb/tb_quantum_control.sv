// tb_quantum_control: runs the Bell-state sequence of the design's workflow
// example (H on q0, CNOT q0->q1, measure q0 and q1) through the whole
// quantum path and checks that every micro-code leaves on the right qubit
// at its programmed cycle; then a same-time collision, a train of bundles
// that fills a qubit FIFO (backpressure) and the readout/pending path.
module tb_quantum_control;
  import uqcp_pkg::*;
  import uqcp_asm_pkg::*;
  localparam int NQ = 8;
  localparam int H = 1, CNOT = 2, MZ = 3, X = 4;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_ready;
  logic [31:0] instr = '0;
  logic [LONG_W-1:0] ext = '0;
  logic [XLEN-1:0] rs_val = '0;
  logic lut_we = 0;
  logic [7:0] lut_waddr = 0;
  lut_entry_t lut_wdata = '0;
  logic [NQ-1:0] mc_valid, ro_valid = '0, ro_result = '0, meas_results;
  logic [CW_W-1:0] mc_cw [NQ];
  logic [$clog2(NQ)-1:0] fmr_qubit = 0;
  logic fmr_result, fmr_pending, hist_sample, hist_dump, hist_busy = 0;
  logic [3:0] hist_base;
  logic na_valid, na_busy = 0, idle, illegal, conflict, stall, late;
  logic [1:0] na_cmd;
  logic [TS_W-1:0] now;
  int checks = 0, failures = 0;
  int n_conflict = 0, n_stall = 0, n_late = 0, n_illegal = 0;
  // expected micro-codes: qubit, codeword, timestamp
  int eq [$], ecw [$], ets [$];

  quantum_control #(.NQ(NQ), .OB_DEPTH(4), .CH_DEPTH(4), .RA_W(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    n_conflict += int'(conflict); n_stall += int'(stall);
    n_late += int'(late); n_illegal += int'(illegal);
  end

  // micro-code monitor: output is registered, so it shows while now = ts + 1
  always @(negedge clk) if (rst_n) begin
    for (int q = 0; q < NQ; q++) if (mc_valid[q]) begin
      int idx;
      idx = -1;
      for (int i = 0; i < eq.size(); i++)
        if (idx < 0 && eq[i] == q && ecw[i] == int'(mc_cw[q])) idx = i;
      chk(idx >= 0, $sformatf("unexpected micro-code q%0d cw %h", q, mc_cw[q]));
      if (idx >= 0) begin
        chk(int'(now) - 1 == ets[idx] || (late && int'(now) - 1 > ets[idx]),
            $sformatf("q%0d cw %h at %0d, due %0d", q, mc_cw[q], int'(now) - 1, ets[idx]));
        eq.delete(idx); ecw.delete(idx); ets.delete(idx);
      end
    end
  end

  // readout model: a measurement codeword returns result 1 on even qubits
  // and 0 on odd ones, six cycles later
  int ro_wait [NQ];
  initial for (int q = 0; q < NQ; q++) ro_wait[q] = 0;
  always @(posedge clk) begin
    for (int q = 0; q < NQ; q++) begin
      ro_valid[q] <= 1'b0;
      if (mc_valid[q] && mc_cw[q] == 8'h31) ro_wait[q] <= 6;
      else if (ro_wait[q] > 0) begin
        ro_wait[q] <= ro_wait[q] - 1;
        if (ro_wait[q] == 1) begin
          ro_valid[q]  <= 1'b1;
          ro_result[q] <= (q % 2 == 0);
        end
      end
    end
  end

  task automatic issue(logic [31:0] w);
    @(negedge clk);
    instr = w; in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
  endtask

  task automatic lut(int op, gate_kind_e k, int a, int b);
    @(negedge clk);
    lut_we = 1; lut_waddr = 8'(op); lut_wdata = '{kind: k, cw_a: 8'(a), cw_b: 8'(b)};
    @(negedge clk) lut_we = 0;
  endtask

  task automatic expect_mc(int q, int cw, int ts);
    eq.push_back(q); ecw.push_back(cw); ets.push_back(ts);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    lut(H, GK_SINGLE, 'h11, 0);
    lut(CNOT, GK_TWO, 'h21, 'h22);
    lut(MZ, GK_MEAS, 'h31, 0);
    lut(X, GK_SINGLE, 'h41, 0);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;

    // Bell state: times are relative to the start of the timeline
    issue(qwait(40));
    issue(smso(0, 0, 'b01));          // S0 = {q0}
    issue(bundle(0, H, 0, 0, 0));     expect_mc(0, 'h11, 40);
    issue(sito(0, 0, 0, 1));          // T0 = {(q0, q1)}
    issue(bundle(1, CNOT, 16, 0, 0)); expect_mc(0, 'h21, 41); expect_mc(1, 'h22, 41);
    issue(smso(1, 0, 'b11));          // S1 = {q0, q1}
    issue(bundle(2, MZ, 1, 0, 0));    expect_mc(0, 'h31, 43); expect_mc(1, 'h31, 43);
    fmr_qubit = 0; #1;
    chk(fmr_pending, "measurement pending after issue");
    wait (now > 43);
    repeat (10) @(negedge clk);
    chk(!fmr_pending && fmr_result == 1'b1, "q0 result returned");
    fmr_qubit = 1; #1;
    chk(!fmr_pending && fmr_result == 1'b0, "q1 result returned");
    chk(meas_results[1:0] == 2'b01, "measurement vector");

    // collision: two operations on q0 at the same timestamp
    issue(qwait(20));
    issue(bundle(0, H, 0, X, 0));
    expect_mc(0, 'h11, 63); expect_mc(0, 'h41, 63);   // 40 + 3 + 20
    // an illegal operation: a single-qubit gate on a T register
    issue(bundle(0, H, 16, 0, 0));

    // a train of bundles on q2, 7 cycles apart, fills its FIFO
    issue(smso(2, 2, 'b1));
    issue(qwait(30));
    for (int i = 0; i < 10; i++) begin
      issue(bundle(7, X, 2, 0, 0));
      expect_mc(2, 'h41, 63 + 30 + 7 * (i + 1));
    end
    // long SMSOL: qubits 5..7 through the 96-bit list with offset 5
    ext = {64'd0, 32'b111};
    issue(smsol(3, 5));
    issue(bundle(0, H, 3, 0, 0));
    for (int q = 5; q < 8; q++) expect_mc(q, 'h11, 63 + 30 + 70);
    wait (idle && eq.size() == 0);
    repeat (3) @(negedge clk);
    chk(eq.size() == 0, "every expected micro-code seen");
    chk(n_conflict >= 1, "collision happened");
    chk(n_late >= 1, "late release happened");
    chk(n_stall >= 1, "backpressure happened");
    chk(n_illegal == 1, "one illegal operation");
    $display("conflicts=%0d stalls=%0d late=%0d illegal=%0d", n_conflict, n_stall, n_late, n_illegal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
