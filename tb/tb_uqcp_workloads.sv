// tb_uqcp_workloads: runs the two benchmark circuit families on the
// processor at its default size (96 qubits) and checks every micro-code.
//
//  * Synthetic circuits Syn_D (gate density D percent): a layer of H on all
//    qubits, then five rounds of {X layer; Y on even / Z on odd qubits;
//    CNOT layer on neighbour pairs (odd qubit controls the even one below
//    it); X on even / Y on odd}, then Z on all qubits. In each single-qubit
//    layer only a fraction D of the qubits is driven (qubit q when
//    (q*D) mod 100 < D), and likewise for the CNOT pairs. Masks are loaded
//    once with SMSO or SMSOL and the pairs with SITOL (seven per register).
//  * Grover operator GO: H and X on all qubits, H on qubit 0, a chain of
//    CNOTs with qubit 0 as target and each other qubit as control in turn
//    (each pair written with SITO just before its bundle), H on qubit 0,
//    X and H on all qubits.
// Both end by measuring every qubit. The program runs the circuit for a few
// shots in a classical loop (SRA adds each shot to the histogram) and then
// dumps the top histogram result with FHR. Sizes: Syn_10, Syn_50 and Syn_100
// and GO at 96 qubits (the largest the processor has), and Syn_50 and GO at
// 8, 16, 32 and 64 qubits for the scaling series. The program is built here
// together with a timing model of it: every QWAIT and PI moves the model's
// timeline, and each driven qubit must see its micro-code exactly at the
// modelled cycle, in order, with none late. The readout model returns a
// fixed pattern; the histogram must report it with a count equal to the shot
// count. The program size in bytes is printed for each circuit.
module tb_uqcp_workloads;
  import uqcp_pkg::*;
  import uqcp_asm_pkg::*;
  localparam int NQ = 96, SHOTS = 2, LAYER = 24, LEAD = 400;
  localparam int H = 1, X = 2, Y = 3, Z = 4, CNOT = 5, MZ = 6;
  localparam int CW_MZ = 'h31;

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
  logic [63:0] na_occ, na_sorted;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- expected micro-codes, per qubit in time order ----------------
  int exp_cw [NQ][$];
  int exp_ts [NQ][$];
  int n_mc = 0, n_bad = 0;
  always @(negedge clk) if (rst_n) begin
    for (int q = 0; q < NQ; q++) if (mc_valid[q]) begin
      int rel;
      rel = cyc - t_start - 2;     // timeline value the release matched
      n_mc++;
      if (exp_cw[q].size() == 0) begin
        n_bad++;
        chk(0, $sformatf("unexpected micro-code q%0d cw %h at %0d", q, mc_cw[q], rel));
      end else begin
        if (int'(mc_cw[q]) != exp_cw[q][0] || rel != exp_ts[q][0]) begin
          n_bad++;
          chk(0, $sformatf("q%0d got cw %h at %0d, expected cw %h at %0d",
                           q, mc_cw[q], rel, exp_cw[q][0], exp_ts[q][0]));
        end
        void'(exp_cw[q].pop_front()); void'(exp_ts[q].pop_front());
      end
    end
  end

  // ---------------- readout model ----------------
  // a measured qubit returns pattern bit q (q mod 3 == 0) eight cycles later
  int ro_wait [NQ];
  initial for (int q = 0; q < NQ; q++) ro_wait[q] = 0;
  always @(posedge clk) begin
    for (int q = 0; q < NQ; q++) begin
      ro_valid[q] <= 1'b0;
      if (rst_n && mc_valid[q] && mc_cw[q] == 8'(CW_MZ)) ro_wait[q] <= 8;
      else if (ro_wait[q] > 0) begin
        ro_wait[q] <= ro_wait[q] - 1;
        if (ro_wait[q] == 1) begin ro_valid[q] <= 1'b1; ro_result[q] <= (q % 3 == 0); end
      end
    end
  end

  // ---------------- program builder with timing model ----------------
  logic [31:0] prog [$];
  logic [NQ-1:0] s_model [NQREG];
  int t_src [NQREG][$];
  int t_tgt [NQREG][$];
  int t_model;                 // modelled issue time
  int ev_q [$], ev_cw [$], ev_ts [$];   // events of one loop body
  int cwa [8], cwb [8];

  function automatic void w(logic [31:0] x); prog.push_back(x); endfunction
  function automatic void mq_wait(int n); w(qwait(n)); t_model += n; endfunction

  // load S register sd with mask m: SMSO when the mask spans at most 15 qubits
  function automatic void set_s(int sd, logic [NQ-1:0] m);
    int lo, hi;
    lo = -1; hi = -1;
    for (int q = 0; q < NQ; q++) if (m[q]) begin if (lo < 0) lo = q; hi = q; end
    if (lo < 0) lo = 0;
    if (hi - lo < SLIST_W) w(smso(sd, lo, int'(m >> lo)));
    else begin
      logic [LONG_W-1:0] pl;
      pl = LONG_W'(m);
      w(smsol(sd, 0)); w(pl[31:0]); w(pl[63:32]); w(pl[95:64]);
    end
    s_model[sd] = m;
  endfunction

  // load T register td with up to seven (control, target) pairs
  function automatic void set_t(int td, int src [$], int tgt [$]);
    t_src[td] = src; t_tgt[td] = tgt;
    if (src.size() == 1) w(sito(td, 0, src[0], tgt[0]));
    else begin
      logic [LONG_W-1:0] pl;
      int off;
      off = NQ;
      foreach (src[k]) begin if (src[k] < off) off = src[k]; if (tgt[k] < off) off = tgt[k]; end
      pl = '0;
      foreach (src[k]) pl[12*k +: 12] = {6'(src[k] - off), 6'(tgt[k] - off)};
      w(sitol(td, off, src.size())); w(pl[31:0]); w(pl[63:32]); w(pl[95:64]);
    end
  endfunction

  // one bundle; reg 0..15 = S, 16..31 = T
  function automatic void bun(int pi, int op0, int reg0, int op1, int reg1);
    int ops [2], regs [2];
    w(bundle(pi, op0, reg0, op1, reg1));
    t_model += pi;
    ops[0] = op0; ops[1] = op1; regs[0] = reg0; regs[1] = reg1;
    for (int s = 0; s < 2; s++) if (ops[s] != 0) begin
      if (regs[s] < 16) begin
        for (int q = 0; q < NQ; q++) if (s_model[regs[s]][q]) begin
          ev_q.push_back(q); ev_cw.push_back(cwa[ops[s]]); ev_ts.push_back(t_model);
        end
      end else begin
        foreach (t_src[regs[s] - 16][k]) begin
          ev_q.push_back(t_src[regs[s]-16][k]); ev_cw.push_back(cwa[ops[s]]); ev_ts.push_back(t_model);
          ev_q.push_back(t_tgt[regs[s]-16][k]); ev_cw.push_back(cwb[ops[s]]); ev_ts.push_back(t_model);
        end
      end
    end
  endfunction

  function automatic bit dens(int i, int d);
    return (i * d) % 100 < d;
  endfunction

  // ---------------- circuits ----------------
  // Registers: S0 all qubits; Syn: S1 X layer, S2 Y even, S3 Z odd,
  // S4 X even, S5 Y odd, T0..T6 CNOT pairs; GO: S1 qubit 0, T0 current pair.
  int loop_at;
  function automatic void build(bit is_go, int n, int d);
    logic [NQ-1:0] all, m1, m2, m3, m4, m5;
    int nt;
    prog.delete(); ev_q.delete(); ev_cw.delete(); ev_ts.delete();
    t_model = 0;
    all = '0; m1 = '0; m2 = '0; m3 = '0; m4 = '0; m5 = '0;
    for (int q = 0; q < n; q++) begin
      all[q] = 1'b1;
      if (dens(q, d)) begin
        m1[q] = 1'b1;
        if (q % 2 == 0) begin m2[q] = 1'b1; m4[q] = 1'b1; end
        else            begin m3[q] = 1'b1; m5[q] = 1'b1; end
      end
    end
    w(ldi(1, 0)); w(ldi(2, SHOTS)); w(ldi(3, 1));
    set_s(0, all);
    nt = 0;
    if (is_go) set_s(1, NQ'(1));
    else begin
      int src [$], tgt [$];
      set_s(1, m1); set_s(2, m2); set_s(3, m3); set_s(4, m4); set_s(5, m5);
      // a SITOL register holds seven pairs whose 6-bit relative indices
      // share one offset, so a register is closed when it is full or the
      // next pair lies more than 63 qubits above its first one
      for (int k = 0; k < n / 2; k++) if (dens(k, d)) begin
        if (src.size() > 0 && 2 * k + 1 - tgt[0] > 63) begin
          set_t(nt, src, tgt); nt++; src.delete(); tgt.delete();
        end
        src.push_back(2 * k + 1); tgt.push_back(2 * k);
        if (src.size() == NPAIRS) begin set_t(nt, src, tgt); nt++; src.delete(); tgt.delete(); end
      end
      if (src.size() > 0) begin set_t(nt, src, tgt); nt++; end
    end
    mq_wait(LEAD);
    // loop body: its modelled duration is the same every shot
    loop_at = prog.size();
    t_model = 0;
    mq_wait(LAYER);
    bun(0, H, 0, 0, 0);
    if (is_go) begin
      mq_wait(LAYER); bun(0, X, 0, 0, 0);
      mq_wait(LAYER); bun(0, H, 1, 0, 0);
      for (int k = 1; k < n; k++) begin
        set_t(0, '{k}, '{0});
        bun(6, CNOT, 16, 0, 0);
      end
      mq_wait(LAYER); bun(0, H, 1, 0, 0);
      mq_wait(LAYER); bun(0, X, 0, 0, 0);
      mq_wait(LAYER); bun(0, H, 0, 0, 0);
    end else begin
      for (int r = 0; r < 5; r++) begin
        mq_wait(LAYER); bun(0, X, 1, 0, 0);
        mq_wait(LAYER); bun(0, Y, 2, Z, 3);
        mq_wait(LAYER);
        for (int k = 0; k < nt; k += 2) bun(0, CNOT, 16 + k, (k + 1 < nt) ? CNOT : 0, (k + 1 < nt) ? 16 + k + 1 : 0);
        mq_wait(LAYER); bun(0, X, 4, Y, 5);
      end
      mq_wait(LAYER); bun(0, Z, 0, 0, 0);
    end
    mq_wait(LAYER); bun(0, MZ, 0, 0, 0);
    w(qwait(LAYER)); t_model += LAYER;
    w(simple(OP_SRA)); w(r3(OP_ADD, 1, 1, 3)); w(cmp(1, 2));
    w(br(FL_LT, loop_at - prog.size()));
    w(ldi(5, 0)); w(fhr(5)); w(endi());
  endfunction

  // ---------------- host helpers ----------------
  task automatic load();
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 10'(i); imem_wdata = prog[i];
    end
    @(negedge clk) imem_we = 0;
  endtask
  task automatic lut(int op, gate_kind_e k, int a, int b);
    @(negedge clk);
    lut_we = 1; lut_waddr = 8'(op); lut_wdata = '{kind: k, cw_a: 8'(a), cw_b: 8'(b)};
    @(negedge clk) lut_we = 0;
    cwa[op] = a; cwb[op] = b;
  endtask

  task automatic run_circuit(string name, bit is_go, int n, int d);
    int body, late0, nexp;
    logic [NQ-1:0] pattern;
    build(is_go, n, d);
    body = t_model;
    nexp = 0;
    for (int q = 0; q < NQ; q++) begin exp_cw[q].delete(); exp_ts[q].delete(); end
    for (int s = 0; s < SHOTS; s++)
      foreach (ev_q[i]) begin
        exp_cw[ev_q[i]].push_back(ev_cw[i]);
        exp_ts[ev_q[i]].push_back(LEAD + s * body + ev_ts[i]);
        nexp++;
      end
    chk(prog.size() <= 1024, $sformatf("%s: program fits the instruction memory", name));
    load();
    @(negedge clk) hist_clear = 1;
    @(negedge clk) hist_clear = 0;
    late0 = int'(cnt_late);
    n_mc = 0; n_bad = 0;
    @(negedge clk) start = 1;
    t_start = cyc;
    @(negedge clk) start = 0;
    @(posedge end_pulse);
    repeat (3) @(negedge clk);
    for (int q = 0; q < NQ; q++) chk(exp_cw[q].size() == 0, $sformatf("%s: q%0d got all its micro-codes", name, q));
    chk(n_mc == nexp && n_bad == 0, $sformatf("%s: %0d micro-codes, %0d expected, %0d wrong", name, n_mc, nexp, n_bad));
    chk(int'(cnt_late) == late0, $sformatf("%s: nothing released late", name));
    chk(hist_shots == SHOTS, $sformatf("%s: histogram saw every shot", name));
    pattern = '0;
    for (int q = 0; q < n; q++) pattern[q] = (q % 3 == 0);
    res_raddr = 0; #1;
    chk(res_rdata == {16'(SHOTS), pattern}, $sformatf("%s: top histogram entry", name));
    $display("%-8s %2d qubits: %4d B program, %5d micro-codes, %0d cycles", name, n,
             4 * prog.size(), n_mc, cyc - t_start);
  endtask

  initial begin
    int sizes [4] = '{8, 16, 32, 64};
    repeat (3) @(posedge clk);
    rst_n = 1;
    lut(H, GK_SINGLE, 'h11, 0);
    lut(X, GK_SINGLE, 'h12, 0);
    lut(Y, GK_SINGLE, 'h13, 0);
    lut(Z, GK_SINGLE, 'h14, 0);
    lut(CNOT, GK_TWO, 'h25, 'h26);
    lut(MZ, GK_MEAS, CW_MZ, 0);
    run_circuit("GO", 1, NQ, 100);
    run_circuit("Syn_10", 0, NQ, 10);
    run_circuit("Syn_50", 0, NQ, 50);
    run_circuit("Syn_100", 0, NQ, 100);
    foreach (sizes[i]) begin
      run_circuit("GO", 1, sizes[i], 100);
      run_circuit("Syn_50", 0, sizes[i], 50);
    end
    chk(cnt_illegal == 0 && cnt_conflict == 0, "no illegal operations or collisions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
