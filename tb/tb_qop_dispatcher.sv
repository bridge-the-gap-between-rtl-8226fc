// tb_qop_dispatcher: directed cases for timestamp order, simultaneous
// dispatch, same-qubit conflict and full-FIFO backpressure, then random
// cases checked against a reference written from the merge rules.
module tb_qop_dispatcher;
  import uqcp_pkg::*;
  localparam int NQ = 16;
  logic buf_empty [2];
  logic [TS_W-1:0] buf_ts [2];
  logic [CW_W-1:0] buf_cwa [2], buf_cwb [2];
  logic [NQ-1:0] buf_ma [2], buf_mb [2];
  logic buf_pop [2];
  logic [NQ-1:0] ch_full, ch_we;
  logic [TS_W+CW_W-1:0] ch_wdata [NQ];
  logic conflict, stall;
  int checks = 0, failures = 0;

  qop_dispatcher #(.NQ(NQ)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic set(int b, bit e, int ts, int ma, int mb);
    buf_empty[b] = e; buf_ts[b] = TS_W'(ts);
    buf_ma[b] = NQ'(ma); buf_mb[b] = NQ'(mb);
    buf_cwa[b] = CW_W'(8'h10 + 2 * b); buf_cwb[b] = CW_W'(8'h11 + 2 * b);
  endtask

  // reference: which buffers pop and what each channel receives
  task automatic reference(output bit p0, output bit p1, output bit cf);
    bit c0, c1;
    logic [NQ-1:0] m0, m1;
    m0 = buf_ma[0] | buf_mb[0]; m1 = buf_ma[1] | buf_mb[1];
    c0 = 0; c1 = 0; cf = 0;
    if (!buf_empty[0] && !buf_empty[1]) begin
      if (buf_ts[0] == buf_ts[1]) begin
        c0 = 1; c1 = ((m0 & m1) == 0); cf = !c1;
      end else if (int'(buf_ts[0]) < int'(buf_ts[1])) c0 = 1;
      else c1 = 1;
    end else begin
      c0 = !buf_empty[0]; c1 = !buf_empty[1];
    end
    p0 = c0 && ((m0 & ch_full) == 0);
    p1 = c1 && ((m1 & ch_full) == 0);
    cf = cf && p0;
  endtask

  task automatic check_now(string tag);
    bit p0, p1, cf;
    #1;
    reference(p0, p1, cf);
    chk(buf_pop[0] == p0 && buf_pop[1] == p1, {tag, " pops"});
    chk(conflict == cf, {tag, " conflict"});
    for (int q = 0; q < NQ; q++) begin
      logic we; logic [TS_W+CW_W-1:0] d;
      we = 0; d = '0;
      if (p0 && buf_ma[0][q]) begin we = 1; d = {buf_ts[0], buf_cwa[0]}; end
      else if (p0 && buf_mb[0][q]) begin we = 1; d = {buf_ts[0], buf_cwb[0]}; end
      else if (p1 && buf_ma[1][q]) begin we = 1; d = {buf_ts[1], buf_cwa[1]}; end
      else if (p1 && buf_mb[1][q]) begin we = 1; d = {buf_ts[1], buf_cwb[1]}; end
      chk(ch_we[q] == we && (!we || ch_wdata[q] == d), {tag, " channel"});
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ch_full = '0;
    // earlier timestamp in buffer 2 goes first
    set(0, 0, 20, 'h1, 0); set(1, 0, 10, 'h2, 'h4); #1;
    chk(!buf_pop[0] && buf_pop[1], "older first");
    chk(ch_we == NQ'('h6) && ch_wdata[1] == {TS_W'(10), 8'h12} && ch_wdata[2] == {TS_W'(10), 8'h13},
        "two-qubit codewords");
    // equal timestamps, disjoint qubits: both in one cycle
    set(0, 0, 7, 'h1, 0); set(1, 0, 7, 'h8, 0); #1;
    chk(buf_pop[0] && buf_pop[1] && ch_we == NQ'('h9) && !conflict, "simultaneous");
    // equal timestamps on the same qubit: buffer 1 first, conflict
    set(0, 0, 7, 'h3, 0); set(1, 0, 7, 'h2, 0); #1;
    chk(buf_pop[0] && !buf_pop[1] && conflict, "conflict");
    // a full FIFO blocks the operation that needs it
    ch_full = NQ'('h1);
    set(0, 0, 5, 'h1, 0); set(1, 1, 0, 0, 0); #1;
    chk(!buf_pop[0] && stall && ch_we == '0, "backpressure");
    ch_full = '0;
    for (int it = 0; it < 400; it++) begin
      for (int b = 0; b < 2; b++)
        set(b, 1'($urandom_range(0, 3) == 0), $urandom_range(0, 3), $urandom_range(0, 65535) & $urandom_range(0, 65535),
            $urandom_range(0, 65535) & $urandom_range(0, 65535) & $urandom_range(0, 65535));
      ch_full = NQ'($urandom) & NQ'($urandom) & NQ'($urandom);
      check_now("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
