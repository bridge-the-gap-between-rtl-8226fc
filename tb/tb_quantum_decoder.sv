// tb_quantum_decoder: presents each quantum instruction once and checks the
// control outputs it produces, using a stand-in gate table (op 1 single-
// qubit, 2 two-qubit, 3 measurement) and stand-in register decoders.
module tb_quantum_decoder;
  import uqcp_pkg::*;
  import uqcp_asm_pkg::*;
  localparam int NQ = 96, QI_W = 7, RA_W = 4;
  localparam int OBW = TS_W + 2*CW_W + 2*NQ;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready;
  logic [31:0] instr = '0;
  logic [LONG_W-1:0] ext = '0;
  logic [XLEN-1:0] rs_val = '0;
  logic wait_en, bundle_en;
  logic [TS_W-1:0] wait_amt, bundle_ts;
  logic [2:0] bundle_pi;
  logic [7:0] lut_addr [2];
  lut_entry_t lut_data [2];
  logic [4:0] rsel [2];
  logic [NQ-1:0] dec_ma [2], dec_mb [2];
  logic s_we, t_we, set_we, set_val;
  logic [3:0] s_idx, t_idx;
  logic [NPAIRS-1:0] t_wvalid;
  logic [4:0] set_reg;
  logic [QI_W-1:0] set_bit;
  logic [OFF_W-1:0] off;
  logic off_long;
  logic [SLIST_W-1:0] off_short;
  logic [LONG_W-1:0] off_payload;
  logic [REL_W-1:0] rel_src [NPAIRS], rel_tgt [NPAIRS];
  logic [NPAIRS-1:0] abs_ok = '1;
  logic ob_we [2];
  logic [OBW-1:0] ob_wdata [2];
  logic ob_full [2];
  logic [NQ-1:0] meas_issue;
  logic any_pending = 0, hist_sample, hist_dump, hist_busy = 0;
  logic [RA_W-1:0] hist_base;
  logic na_valid, na_busy = 0, illegal;
  logic [1:0] na_cmd;
  int checks = 0, failures = 0;

  quantum_decoder #(.NQ(NQ), .QI_W(QI_W), .RA_W(RA_W)) dut (.*);
  always #5 clk = ~clk;

  // stand-ins for the table and the register decoders
  assign bundle_ts = 32'd1000 + 32'(bundle_pi);
  always_comb for (int p = 0; p < 2; p++) begin
    unique case (lut_addr[p])
      8'd1:    lut_data[p] = '{kind: GK_SINGLE, cw_a: 8'h11, cw_b: 8'h00};
      8'd2:    lut_data[p] = '{kind: GK_TWO,    cw_a: 8'h21, cw_b: 8'h22};
      8'd3:    lut_data[p] = '{kind: GK_MEAS,   cw_a: 8'h31, cw_b: 8'h00};
      default: lut_data[p] = '{kind: GK_NONE,   cw_a: 8'h00, cw_b: 8'h00};
    endcase
    dec_ma[p] = NQ'(rsel[p]) + NQ'(1);
    dec_mb[p] = rsel[p][4] ? (NQ'(rsel[p]) << 8) : '0;
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

  // present an instruction; outputs are checked by the caller before the edge
  task automatic present(logic [31:0] w);
    @(negedge clk);
    instr = w; in_valid = 1; #1;
  endtask
  task automatic finish_it();
    @(posedge clk); #1 in_valid = 0;
  endtask

  initial begin
    ob_full[0] = 0; ob_full[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    present(qwait(100));
    chk(in_ready && wait_en && wait_amt == 100 && !bundle_en, "QWAIT"); finish_it();
    rs_val = 55;
    present(qwaitr(4));
    chk(wait_en && wait_amt == 55, "QWAITR"); finish_it();

    // H-like gate on S3 and CNOT-like gate on T5 in one bundle, PI = 2
    present(bundle(2, 1, 3, 2, 16 + 5));
    chk(bundle_en && bundle_pi == 2 && ob_we[0] && ob_we[1] && !illegal, "bundle two slots");
    chk(ob_wdata[0] == {32'd1002, 8'h11, 8'h00, NQ'(4), NQ'(0)}, "slot 0 entry");
    chk(ob_wdata[1] == {32'd1002, 8'h21, 8'h22, NQ'(22), NQ'(21) << 8}, "slot 1 entry");
    chk(meas_issue == '0, "no measurement");
    finish_it();

    present(bundle(0, 3, 2, 0, 0));
    chk(ob_we[0] && !ob_we[1] && meas_issue == NQ'(3), "measurement marks pending"); finish_it();

    present(bundle(0, 1, 16 + 1, 0, 0));
    chk(!ob_we[0] && illegal && bundle_en, "single-qubit gate on T register is dropped"); finish_it();

    ob_full[1] = 1;
    present(bundle(0, 1, 0, 0, 0));
    chk(!in_ready && !bundle_en, "full op buffer stalls a bundle");
    ob_full[1] = 0; #1;
    chk(in_ready && bundle_en, "bundle proceeds"); finish_it();

    present(smso(7, 12, 'h5));
    chk(s_we && s_idx == 7 && off == 12 && off_short == 15'h5 && !off_long, "SMSO"); finish_it();
    ext = {32'hAAAA_0000, 32'h0000_5555, 32'h1234_5678};
    present(smsol(9, 3));
    chk(s_we && s_idx == 9 && off == 3 && off_long && off_payload == ext, "SMSOL"); finish_it();

    present(sito(4, 10, 1, 2));
    chk(t_we && t_idx == 4 && t_wvalid == 7'b1 && rel_src[0] == 1 && rel_tgt[0] == 2 && !illegal, "SITO"); finish_it();
    present(sito(5, 0, 95, 0));
    chk(t_we && t_idx == 5 && rel_src[0] == 95 && rel_tgt[0] == 0 && off == 0, "SITO 7-bit fields"); finish_it();
    abs_ok = '0;
    present(sito(4, 95, 1, 2));
    chk(t_we && t_wvalid == '0 && illegal, "SITO out of range"); finish_it();
    abs_ok = '1;
    ext = '0;
    for (int k = 0; k < 3; k++) ext[12*k +: 12] = 12'((k + 1) * 64 + (k + 10));
    present(sitol(2, 0, 3));
    chk(t_we && t_idx == 2 && t_wvalid == 7'b111, "SITOL valid pairs");
    chk(rel_src[1] == 2 && rel_tgt[1] == 11, "SITOL pair fields"); finish_it();

    present(qset(16 + 3, 5, 1));
    chk(set_we && set_reg == 19 && set_bit == 5 && set_val, "QSET"); finish_it();

    any_pending = 1;
    present(simple(OP_SRA));
    chk(!in_ready && !hist_sample, "SRA waits for pending measurements");
    any_pending = 0; #1;
    chk(in_ready && hist_sample, "SRA samples"); finish_it();

    hist_busy = 1; rs_val = 6;
    present(fhr(3));
    chk(!in_ready && !hist_dump, "FHR waits for histogram");
    hist_busy = 0; #1;
    chk(hist_dump && hist_base == 6, "FHR dumps at Rt"); finish_it();

    present(simple(OP_IAS));
    chk(na_valid && na_cmd == 2'd2, "IAS command"); finish_it();
    present(simple(OP_IAM));
    chk(!in_ready, "neutral-atom command waits one cycle after the previous");
    na_busy = 1; @(posedge clk); #1;
    chk(!in_ready, "busy neutral-atom unit blocks");
    na_busy = 0; #1;
    chk(in_ready && na_valid && na_cmd == 2'd3, "IAM command"); finish_it();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
