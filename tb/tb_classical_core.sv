// tb_classical_core: ALU results, LDI sign extension, LD/ST, CMP flags with
// BR and FBR, J offsets, and the FMR stall while a measurement is pending.
module tb_classical_core;
  import uqcp_pkg::*;
  import uqcp_asm_pkg::*;
  localparam int NQ = 96;
  logic clk = 0, rst_n = 0, valid = 0, done, br_taken, fmr_stall;
  logic [31:0] instr = '0;
  logic signed [31:0] br_offset;
  logic [$clog2(NQ)-1:0] fmr_qubit;
  logic fmr_result = 0, fmr_pending = 0;
  logic [4:0] rf_raddr = 0;
  logic [31:0] rf_rdata, dmem_rdata;
  logic [7:0] dmem_raddr = 0;
  int checks = 0, failures = 0;

  classical_core #(.NQ(NQ), .DMEM_WORDS(256)) dut (.*);
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

  task automatic exec(logic [31:0] w);
    @(negedge clk); instr = w; valid = 1;
    @(posedge clk); #1 valid = 0;
  endtask
  task automatic reg_is(int r, logic [31:0] v, string what);
    rf_raddr = 5'(r); #1;
    chk(rf_rdata == v, $sformatf("%s: r%0d=%h exp %h", what, r, rf_rdata, v));
  endtask
  task automatic branch_is(logic [31:0] w, bit taken, int off, string what);
    @(negedge clk); instr = w; valid = 1; #1;
    chk(done && br_taken == taken && (!taken || br_offset == off), what);
    @(posedge clk); #1 valid = 0;
  endtask

  initial begin
    int a, b;
    repeat (2) @(posedge clk);
    rst_n = 1;
    exec(ldi(1, 1000)); reg_is(1, 1000, "LDI");
    exec(ldi(2, -3));   reg_is(2, 32'hFFFF_FFFD, "LDI negative");
    for (int i = 0; i < 20; i++) begin
      a = $urandom_range(0, 1048575) - 524288; b = $urandom_range(0, 1048575) - 524288;
      exec(ldi(3, a)); exec(ldi(4, b));
      exec(r3(OP_ADD, 5, 3, 4)); reg_is(5, 32'(a + b), "ADD");
      exec(r3(OP_SUB, 5, 3, 4)); reg_is(5, 32'(a - b), "SUB");
      exec(r3(OP_AND, 5, 3, 4)); reg_is(5, 32'(a) & 32'(b), "AND");
      exec(r3(OP_OR, 5, 3, 4));  reg_is(5, 32'(a) | 32'(b), "OR");
      exec(r3(OP_XOR, 5, 3, 4)); reg_is(5, 32'(a) ^ 32'(b), "XOR");
      exec(cmp(3, 4));
      branch_is(br(FL_EQ, 5),  a == b, 5, "BR eq");
      branch_is(br(FL_NE, -4), a != b, -4, "BR ne");
      branch_is(br(FL_LT, 7),  a < b, 7, "BR lt");
      branch_is(br(FL_GEU, 9), unsigned'(32'(a)) >= unsigned'(32'(b)), 9, "BR geu");
      exec(fbr(FL_GE, 6)); reg_is(6, 32'(a >= b), "FBR ge");
    end
    branch_is(br(FL_ALWAYS, 3), 1, 3, "BR always");
    branch_is(br(FL_NEVER, 3), 0, 3, "BR never");
    branch_is(jmp(-10), 1, -10, "J");
    // memory
    exec(ldi(7, 12345)); exec(ldi(8, 10));
    exec(st(7, 8, 5));
    dmem_raddr = 15; #1; chk(dmem_rdata == 12345, "ST");
    exec(ld(9, 8, 5)); reg_is(9, 12345, "LD");
    // FMR stalls while pending
    fmr_pending = 1; fmr_result = 1;
    @(negedge clk); instr = fmr(10, 42); valid = 1; #1;
    chk(!done && fmr_stall && fmr_qubit == 42, "FMR waits");
    @(posedge clk); @(negedge clk);
    chk(!done, "FMR still waits");
    fmr_pending = 0; #1;
    chk(done && !fmr_stall, "FMR completes");
    @(posedge clk); #1 valid = 0;
    reg_is(10, 1, "FMR result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
