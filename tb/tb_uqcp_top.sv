// tb_uqcp_top: the whole processor at its default size (96 qubits), driven
// like the host would drive it, in three programs.
//
//  1. Bell-state shots with feedforward: each shot applies H(q0), CNOT(q0,q1)
//     and measures q0 and q1; FMR reads q0 (stalling until the readout
//     returns), a conditional branch applies X on q0 when it read 1, SRA adds
//     the shot to the histogram. After 8 shots FHR writes the top results,
//     which the host reads back. Every micro-code is checked for qubit,
//     codeword and exact release cycle.
//  2. Addressing and the quantum path's corner cases: a long mask (SMSOL) at
//     the top of the qubit range and three CNOT pairs from SITOL in one
//     bundle, QSET, a same-qubit collision, an illegal operation, a train of
//     operations that fills a qubit FIFO, and a neutral-atom command refused
//     in superconducting mode.
//  3. Neutral-atom mode: IIF, IAD, IAS and IAM take a camera frame of a
//     randomly loaded array to a compacted, defect-free target; the tweezer
//     commands are applied to a model of the atom array.
// Each mechanism is counted, and one that never happens is a failure.
module tb_uqcp_top;
  import uqcp_pkg::*;
  import uqcp_asm_pkg::*;
  localparam int NQ = 96, SX = 8, SY = 8, ROI = 4, IW = SX * ROI;
  localparam int H = 1, CNOT = 2, MZ = 3, X = 4;

  logic clk = 0, rst_n = 0;
  logic imem_we = 0, lut_we = 0, mode_we = 0, start = 0, hist_clear = 0;
  logic [9:0] imem_waddr = 0;
  logic [31:0] imem_wdata = 0;
  logic [7:0] lut_waddr = 0;
  lut_entry_t lut_wdata = '0;
  mode_e mode_wdata = MODE_SC, mode;
  logic running, done, end_pulse;
  logic [7:0] dmem_raddr = 0;
  logic [31:0] dmem_rdata, hist_shots;
  logic [3:0] res_raddr = 0;
  logic [16+NQ-1:0] res_rdata;
  logic [15:0] hist_overflow;
  logic [NQ-1:0] mc_valid, ro_valid = '0, ro_result = '0;
  logic [CW_W-1:0] mc_cw [NQ];
  logic [12:0] na_threshold = 13'd800;
  logic cam_frame_start = 0, cam_pix_valid = 0;
  logic [7:0] cam_pix_data = 0;
  logic awg_valid, awg_on, na_success;
  logic [2:0] awg_row, awg_col;
  logic [SX*SY-1:0] na_occ, na_sorted;
  logic [15:0] cnt_illegal, cnt_conflict, cnt_stall, cnt_late, cnt_fmr_wait, cnt_blocked;

  uqcp_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, t_start = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- micro-code monitor ----------------
  int eq [$], ecw [$], ets [$];
  bit allow_late = 0;
  int n_mc = 0;
  task automatic expect_mc(int q, int cw, int ts);
    eq.push_back(q); ecw.push_back(cw); ets.push_back(ts);
  endtask
  always @(negedge clk) if (rst_n) begin
    for (int q = 0; q < NQ; q++) if (mc_valid[q]) begin
      int idx, rel;
      idx = -1;
      rel = cyc - t_start - 2;     // timeline value the release matched
      for (int i = 0; i < eq.size(); i++)
        if (idx < 0 && eq[i] == q && ecw[i] == int'(mc_cw[q])) idx = i;
      n_mc++;
      chk(idx >= 0, $sformatf("unexpected micro-code q%0d cw %h", q, mc_cw[q]));
      if (idx >= 0) begin
        chk(rel == ets[idx] || (allow_late && rel > ets[idx]),
            $sformatf("q%0d cw %h released at %0d, due %0d", q, mc_cw[q], rel, ets[idx]));
        eq.delete(idx); ecw.delete(idx); ets.delete(idx);
      end
    end
  end

  // ---------------- readout model ----------------
  // a measurement of q0 draws a Bell outcome (00 or 11) for q0 and q1;
  // results return six cycles after the measurement micro-code
  int outcomes [$];
  int ro_wait [NQ];
  bit ro_bit [NQ];
  initial for (int q = 0; q < NQ; q++) begin ro_wait[q] = 0; ro_bit[q] = 0; end
  always @(posedge clk) begin
    for (int q = 0; q < NQ; q++) begin
      ro_valid[q] <= 1'b0;
      if (rst_n && mc_valid[q] && mc_cw[q] == 8'h31) ro_wait[q] <= 6;
      else if (ro_wait[q] > 0) begin
        ro_wait[q] <= ro_wait[q] - 1;
        if (ro_wait[q] == 1) begin ro_valid[q] <= 1'b1; ro_result[q] <= ro_bit[q]; end
      end
    end
    if (rst_n && mc_valid[0] && mc_cw[0] == 8'h31) begin
      automatic int o = int'($urandom_range(0, 1));
      outcomes.push_back(o);
      ro_bit[0] = o[0]; ro_bit[1] = o[0];
    end
  end

  // ---------------- atom array model ----------------
  logic [SX*SY-1:0] arr;
  int held_row = -1, held_col = -1, n_awg = 0;
  always @(posedge clk) if (rst_n && awg_valid) begin
    n_awg++;
    if (awg_on && held_row < 0) begin
      chk(arr[awg_row * SX + awg_col], "pick from an occupied site");
      arr[awg_row * SX + awg_col] = 1'b0;
      held_row = awg_row; held_col = awg_col;
    end else if (awg_on) begin
      chk(!arr[awg_row * SX + awg_col], "tweezer path is free");
      held_col = awg_col;
    end else begin
      chk(!arr[awg_row * SX + awg_col], "drop on a free site");
      arr[awg_row * SX + awg_col] = 1'b1;
      held_row = -1;
    end
  end

  // ---------------- host helpers ----------------
  task automatic load(logic [31:0] p [$]);
    for (int i = 0; i < p.size(); i++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 10'(i); imem_wdata = p[i];
    end
    @(negedge clk) imem_we = 0;
  endtask
  task automatic lut(int op, gate_kind_e k, int a, int b);
    @(negedge clk);
    lut_we = 1; lut_waddr = 8'(op); lut_wdata = '{kind: k, cw_a: 8'(a), cw_b: 8'(b)};
    @(negedge clk) lut_we = 0;
  endtask
  task automatic run_and_wait();
    @(negedge clk) start = 1;
    t_start = cyc;    // the timeline is 0 in the cycle after this edge
    @(negedge clk) start = 0;
    @(posedge end_pulse);
    repeat (2) @(negedge clk);
  endtask
  task automatic set_mode(mode_e m);
    @(negedge clk) mode_we = 1; mode_wdata = m;
    @(negedge clk) mode_we = 0;
  endtask

  // ---------------- the three programs ----------------
  int n_x = 0, n_ones = 0, n_zeros = 0;
  initial begin
    logic [31:0] p [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    lut(H, GK_SINGLE, 'h11, 0);
    lut(CNOT, GK_TWO, 'h21, 'h22);
    lut(MZ, GK_MEAS, 'h31, 0);
    lut(X, GK_SINGLE, 'h41, 0);

    // ===== 1. Bell-state shots with feedforward and histogram =====
    p = '{ ldi(1, 0), ldi(2, 8), ldi(3, 1),
           smso(0, 0, 'b01), sito(0, 0, 0, 1), smso(1, 0, 'b11),
           /* 6: loop */ qwait(60),
           bundle(0, H, 0, 0, 0), bundle(1, CNOT, 16, 0, 0), bundle(1, MZ, 1, 0, 0),
           qwait(20),                 // room for the readout before feedforward
           fmr(4, 0), cmp(4, 3), br(FL_NE, 2), bundle(1, X, 0, 0, 0),
           simple(OP_SRA), r3(OP_ADD, 1, 1, 3), cmp(1, 2), br(FL_LT, -12),
           ldi(5, 2), fhr(5), st(1, 0, 0), endi() };
    load(p);
    // expected micro-codes are added as the outcomes become known
    fork
      begin
        int t;
        t = 0;
        for (int s = 0; s < 8; s++) begin
          t += 60;
          expect_mc(0, 'h11, t);
          expect_mc(0, 'h21, t + 1); expect_mc(1, 'h22, t + 1);
          expect_mc(0, 'h31, t + 2); expect_mc(1, 'h31, t + 2);
          t += 2 + 20;
          wait (outcomes.size() == s + 1);
          if (outcomes[s] == 1) begin t += 1; expect_mc(0, 'h41, t); n_x++; end
        end
      end
    join_none
    run_and_wait();
    chk(eq.size() == 0, "phase 1: all micro-codes released");
    chk(outcomes.size() == 8, "eight shots measured");
    foreach (outcomes[i]) if (outcomes[i] == 1) n_ones++; else n_zeros++;
    dmem_raddr = 0; #1;
    chk(dmem_rdata == 8, "shot counter stored");
    chk(hist_shots == 8, "histogram saw eight shots");
    begin
      int c_first, c_second;
      logic [NQ-1:0] s_first, s_second;
      // bins fill in order of first appearance; ties go to the earlier bin
      s_first  = (outcomes[0] == 1) ? NQ'(3) : NQ'(0);
      s_second = (outcomes[0] == 1) ? NQ'(0) : NQ'(3);
      c_first  = (outcomes[0] == 1) ? n_ones : n_zeros;
      c_second = 8 - c_first;
      res_raddr = 2; #1;
      if (c_first >= c_second) begin
        chk(res_rdata == {16'(c_first), s_first}, "top result");
        res_raddr = 3; #1;
        if (c_second > 0) chk(res_rdata == {16'(c_second), s_second}, "second result");
        else chk(res_rdata == '0, "no second result");
      end else begin
        chk(res_rdata == {16'(c_second), s_second}, "top result");
        res_raddr = 3; #1;
        chk(res_rdata == {16'(c_first), s_first}, "second result");
      end
      res_raddr = 4; #1;
      chk(res_rdata == '0, "only two distinct states");
    end
    chk(cnt_fmr_wait > 0, "FMR waited for the readout");

    // ===== 2. addressing and corner cases =====
    allow_late = 1;
    p = '{ smsol(2, 90), 32'h0000_003F, 32'h0, 32'h0,               // q90..q95
           // pairs (0,1) (2,3) (4,5) at offset 10: (q10,q11) (q12,q13) (q14,q15);
           // pair k sits in payload bits [12k+11:12k], pair 2 spans words 1 and 2
           sitol(1, 10, 3), 32'h0508_3001, 32'h0000_0001, 32'h0,
           smso(0, 0, 'b01),
           qwait(40),
           bundle(0, H, 2, CNOT, 16 + 1),                            // t = 40
           bundle(0, H, 0, X, 0),                                    // q0 twice at 40
           qset(0, 5, 1),                                            // S0 = {q0, q5}
           bundle(3, X, 0, 0, 0),                                    // t = 43
           bundle(0, H, 16 + 1, 0, 0),                               // illegal
           bundle(7, X, 0, 0, 0), bundle(7, X, 0, 0, 0), bundle(7, X, 0, 0, 0),
           bundle(7, X, 0, 0, 0), bundle(7, X, 0, 0, 0), bundle(7, X, 0, 0, 0),
           bundle(7, X, 0, 0, 0), bundle(7, X, 0, 0, 0),
           simple(OP_IIF),                                           // refused in SC mode
           endi() };
    load(p);
    for (int q = 90; q < 96; q++) expect_mc(q, 'h11, 40);
    for (int k = 0; k < 3; k++) begin expect_mc(10 + 2*k, 'h21, 40); expect_mc(11 + 2*k, 'h22, 40); end
    expect_mc(0, 'h11, 40); expect_mc(0, 'h41, 40);
    expect_mc(0, 'h41, 43); expect_mc(5, 'h41, 43);
    for (int i = 1; i <= 8; i++) begin expect_mc(0, 'h41, 43 + 7*i); expect_mc(5, 'h41, 43 + 7*i); end
    run_and_wait();
    chk(eq.size() == 0, "phase 2: all micro-codes released");
    foreach (eq[i]) $display("missing q%0d cw %h ts %0d", eq[i], ecw[i], ets[i]);
    chk(cnt_conflict >= 1, "collision happened");
    chk(cnt_late >= 1, "late release happened");
    chk(cnt_stall >= 1, "dispatcher backpressure happened");
    chk(cnt_illegal == 1, "one illegal operation");
    chk(cnt_blocked == 1, "neutral-atom command refused in SC mode");
    chk(n_awg == 0, "no tweezer commands in SC mode");

    // ===== 3. neutral-atom initialisation =====
    set_mode(MODE_NA);
    chk(mode == MODE_NA, "mode switched");
    p = '{ simple(OP_IIF), simple(OP_IAD), simple(OP_IAS), simple(OP_IAM), endi() };
    load(p);
    begin
      logic [SX*SY-1:0] truth;
      truth = {$urandom, $urandom} | {$urandom, $urandom};
      arr = truth;
      fork
        begin
          repeat (20) @(negedge clk);
          cam_frame_start = 1;
          @(negedge clk) cam_frame_start = 0;
          for (int i = 0; i < IW * SY * ROI; i++) begin
            cam_pix_valid = 1;
            cam_pix_data = truth[((i / IW) / ROI) * SX + (i % IW) / ROI] ? 8'($urandom_range(60, 90))
                                                                         : 8'($urandom_range(0, 40));
            @(negedge clk);
          end
          cam_pix_valid = 0;
        end
      join_none
      run_and_wait();
      chk(na_occ == truth, "atoms detected");
      chk(arr == na_sorted, "atom array rearranged as planned");
      for (int y = 0; y < SY; y++) begin
        int cnt;
        cnt = $countones(truth[y * SX +: SX]);
        for (int x = 0; x < SX; x++) chk(arr[y * SX + x] == (x < cnt), "row compacted");
      end
      chk(n_awg > 0, "tweezer commands sent");
    end

    $display("mechanisms: fmr_wait=%0d feedforward_X=%0d conflicts=%0d late=%0d stalls=%0d illegal=%0d blocked=%0d awg=%0d micro-codes=%0d",
             cnt_fmr_wait, n_x, cnt_conflict, cnt_late, cnt_stall, cnt_illegal, cnt_blocked, n_awg, n_mc);
    chk(n_x > 0 || n_ones == 0, "feedforward branch taken when q0 read 1");
    chk(n_ones > 0 && n_zeros > 0, "both Bell outcomes occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
