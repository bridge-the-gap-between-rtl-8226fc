// tb_instr_dispatcher: runs a small program containing classical, quantum,
// long and branch instructions against stand-ins for the two cores that
// accept after random delays; checks the order and contents of what is
// issued, the skipped words after a taken branch, the END drain and the
// two-cycle issue rate of standard instructions.
module tb_instr_dispatcher;
  import uqcp_pkg::*;
  import uqcp_asm_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, running, done, end_pulse;
  logic [9:0] imem_raddr, pc;
  logic [31:0] imem_rdata;
  logic q_valid, q_ready, c_valid, c_done, c_br_taken, drained = 0;
  logic [31:0] q_instr, c_instr;
  logic [LONG_W-1:0] q_ext;
  logic signed [31:0] c_br_offset;
  logic [4:0] rf_raddr;
  logic [31:0] prog [1024];
  int checks = 0, failures = 0;
  bit fast = 0;
  int q_delay = 0, c_delay = 0;
  logic [31:0] trace [$];
  logic [LONG_W-1:0] ext_seen;
  int q_times [$];
  int cyc = 0;

  instr_dispatcher #(.IMEM_WORDS(1024)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign imem_rdata = prog[imem_raddr];

  // core stand-ins
  assign q_ready     = fast || (q_delay == 0);
  assign c_done      = c_valid && (fast || c_delay == 0);
  assign c_br_taken  = (c_instr[31:26] == OP_BR);
  assign c_br_offset = {{10{c_instr[21]}}, c_instr[21:0]};
  always @(posedge clk) begin
    if (q_valid && q_ready) begin
      trace.push_back(q_instr); q_times.push_back(cyc);
      if (is_long(q_instr)) ext_seen <= q_ext;
      q_delay <= $urandom_range(0, 3);
    end else if (q_valid && q_delay > 0) q_delay <= q_delay - 1;
    if (c_done) begin trace.push_back(c_instr); c_delay <= $urandom_range(0, 3); end
    else if (c_valid && c_delay > 0) c_delay <= c_delay - 1;
  end

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

  task automatic run();
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
  endtask

  initial begin
    logic [31:0] exp [$];
    for (int i = 0; i < 1024; i++) prog[i] = endi();
    prog[0] = ldi(1, 7);
    prog[1] = qwait(5);
    prog[2] = smsol(1, 3);
    prog[3] = 32'h1111_1111; prog[4] = 32'h2222_2222; prog[5] = 32'h3333_3333;
    prog[6] = br(FL_ALWAYS, 3);
    prog[7] = ldi(2, 1);
    prog[8] = ldi(3, 1);
    prog[9] = bundle(0, 1, 0, 0, 0);
    prog[10] = fhr(6);
    prog[11] = endi();
    exp = '{prog[0], prog[1], prog[2], prog[6], prog[9], prog[10]};
    repeat (2) @(posedge clk);
    rst_n = 1;
    run();
    wait (running && pc == 10 && rf_raddr == 6);
    chk(1'b1, "FHR passes its rt register");
    wait (dut.state == 3'd4);  // waiting for the drain
    repeat (5) @(negedge clk);
    chk(!done, "END waits for the quantum path to drain");
    drained = 1;
    @(posedge end_pulse);
    @(negedge clk);
    chk(done && !running, "done after END");
    chk(trace.size() == exp.size(), $sformatf("issued %0d instructions", trace.size()));
    for (int i = 0; i < exp.size() && i < trace.size(); i++)
      chk(trace[i] == exp[i], $sformatf("instruction %0d", i));
    chk(ext_seen == {32'h3333_3333, 32'h2222_2222, 32'h1111_1111}, "long payload");

    // rate: a run of standard quantum instructions, all accepted at once
    for (int i = 0; i < 20; i++) prog[i] = qwait(i);
    prog[20] = endi();
    fast = 1; trace.delete(); q_times.delete();
    run();
    @(posedge end_pulse);
    chk(trace.size() == 20, "20 issued");
    for (int i = 1; i < q_times.size(); i++)
      chk(q_times[i] - q_times[i-1] == 2, "two cycles per instruction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
