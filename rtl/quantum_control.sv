// quantum_control: the quantum control part of the processor.
//
// Wires the quantum decoder to the time manager, the gate-op lookup table,
// the Q-register file with its offset control and two Q-register decoders,
// the two operation buffers, the Q-operation dispatcher, one FIFO plus
// time-control unit per qubit and the Q-measure register, as in the block
// diagram of the processor's quantum part. Quantum instructions enter with a
// valid/ready handshake; micro-codes leave per qubit as one-cycle
// (mc_valid, mc_cw) strobes at the cycle their timestamp falls due, towards
// the DACs. Measurement results come back on ro_valid/ro_result. `idle` is
// high when no operation is buffered anywhere in the path. The pulses
// illegal, conflict, stall and late report the decoder's dropped operations,
// the dispatcher's same-qubit collisions and backpressure, and overdue
// micro-codes. Block set and order follow the document; buffer depths are
// this design's choice.
module quantum_control
  import uqcp_pkg::*;
#(
  parameter int unsigned NQ        = 96,
  parameter int unsigned OB_DEPTH  = 8,
  parameter int unsigned CH_DEPTH  = 4,
  parameter int unsigned RA_W      = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  // instructions from the dispatcher
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [31:0]           instr,
  input  logic [LONG_W-1:0]     ext,
  input  logic [XLEN-1:0]       rs_val,
  // gate-op table programming
  input  logic                  lut_we,
  input  logic [7:0]            lut_waddr,
  input  lut_entry_t            lut_wdata,
  // micro-codes and readout
  output logic [NQ-1:0]         mc_valid,
  output logic [CW_W-1:0]       mc_cw [NQ],
  input  logic [NQ-1:0]         ro_valid,
  input  logic [NQ-1:0]         ro_result,
  // FMR port
  input  logic [$clog2(NQ)-1:0] fmr_qubit,
  output logic                  fmr_result,
  output logic                  fmr_pending,
  // histogram
  output logic [NQ-1:0]         meas_results,
  output logic                  hist_sample,
  output logic                  hist_dump,
  output logic [RA_W-1:0]       hist_base,
  input  logic                  hist_busy,
  // neutral-atom commands
  output logic                  na_valid,
  output logic [1:0]            na_cmd,
  input  logic                  na_busy,
  // status
  output logic                  idle,
  output logic [TS_W-1:0]       now,
  output logic                  illegal,
  output logic                  conflict,
  output logic                  stall,
  output logic                  late
);
  localparam int unsigned QI_W = $clog2(NQ);
  localparam int unsigned OB_W = TS_W + 2*CW_W + 2*NQ;

  // time manager
  logic            wait_en, bundle_en;
  logic [TS_W-1:0] wait_amt, bundle_ts, issue_time;
  logic [2:0]      bundle_pi;

  // table, registers
  logic [7:0]        lut_addr [2];
  lut_entry_t        lut_data [2];
  logic [4:0]        rsel     [2];
  logic [NQ-1:0]     r_mask   [2];
  logic [QI_W-1:0]   r_src    [2][NPAIRS];
  logic [QI_W-1:0]   r_tgt    [2][NPAIRS];
  logic [NPAIRS-1:0] r_valid  [2];
  logic [NQ-1:0]     dec_ma   [2];
  logic [NQ-1:0]     dec_mb   [2];
  logic              s_we, t_we, set_we, set_val;
  logic [3:0]        s_idx, t_idx;
  logic [NPAIRS-1:0] t_wvalid;
  logic [4:0]        set_reg;
  logic [QI_W-1:0]   set_bit;

  // offset control
  logic [OFF_W-1:0]   off;
  logic               off_long;
  logic [SLIST_W-1:0] off_short;
  logic [LONG_W-1:0]  off_payload;
  logic [REL_W-1:0]   rel_src [NPAIRS];
  logic [REL_W-1:0]   rel_tgt [NPAIRS];
  logic [NQ-1:0]      off_mask;
  logic [QI_W-1:0]    abs_src [NPAIRS];
  logic [QI_W-1:0]    abs_tgt [NPAIRS];
  logic [NPAIRS-1:0]  abs_ok;

  // buffers and dispatcher
  logic              ob_we    [2];
  logic [OB_W-1:0]   ob_wdata [2];
  logic              ob_full  [2];
  logic              ob_empty [2];
  logic [OB_W-1:0]   ob_head  [2];
  logic              ob_pop   [2];
  logic [TS_W-1:0]   b_ts     [2];
  logic [CW_W-1:0]   b_cwa    [2];
  logic [CW_W-1:0]   b_cwb    [2];
  logic [NQ-1:0]     b_ma     [2];
  logic [NQ-1:0]     b_mb     [2];
  logic [NQ-1:0]     ch_full, ch_empty, ch_we, ch_late;
  logic [TS_W+CW_W-1:0] ch_wdata [NQ];

  logic [NQ-1:0] meas_issue, meas_pending;
  logic          any_pending;

  quantum_decoder #(.NQ(NQ), .QI_W(QI_W), .RA_W(RA_W)) u_dec (
    .clk, .rst_n, .in_valid, .in_ready, .instr, .ext, .rs_val,
    .wait_en, .wait_amt, .bundle_en, .bundle_pi, .bundle_ts,
    .lut_addr, .lut_data, .rsel, .dec_ma, .dec_mb,
    .s_we, .s_idx, .t_we, .t_idx, .t_wvalid,
    .set_we, .set_reg, .set_bit, .set_val,
    .off, .off_long, .off_short, .off_payload, .rel_src, .rel_tgt, .abs_ok,
    .ob_we, .ob_wdata, .ob_full,
    .meas_issue, .any_pending,
    .hist_sample, .hist_dump, .hist_base, .hist_busy,
    .na_valid, .na_cmd, .na_busy, .illegal
  );

  time_manager u_tm (
    .clk, .rst_n, .start, .wait_en, .wait_amt, .bundle_en, .bundle_pi,
    .bundle_ts, .now, .issue_time
  );

  gate_op_lut #(.OPS(256)) u_lut (
    .clk, .rst_n, .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .raddr0(lut_addr[0]), .rdata0(lut_data[0]),
    .raddr1(lut_addr[1]), .rdata1(lut_data[1])
  );

  offset_control #(.NQ(NQ), .QI_W(QI_W)) u_off (
    .offset(off), .long_list(off_long), .short_list(off_short),
    .long_payload(off_payload), .mask(off_mask),
    .rel_src, .rel_tgt, .abs_src, .abs_tgt, .abs_ok
  );

  qreg_file #(.NQ(NQ), .QI_W(QI_W)) u_qrf (
    .clk, .rst_n,
    .s_we, .s_idx, .s_wdata(off_mask),
    .t_we, .t_idx, .t_wsrc(abs_src), .t_wtgt(abs_tgt), .t_wvalid,
    .set_we, .set_reg, .set_bit, .set_val,
    .rsel, .r_mask, .r_src, .r_tgt, .r_valid
  );

  for (genvar p = 0; p < 2; p++) begin : g_slot
    qreg_decoder #(.NQ(NQ), .QI_W(QI_W)) u_qrd (
      .is_t(rsel[p][4]), .s_mask(r_mask[p]),
      .t_src(r_src[p]), .t_tgt(r_tgt[p]), .t_valid(r_valid[p]),
      .mask_a(dec_ma[p]), .mask_b(dec_mb[p])
    );

    logic [$clog2(OB_DEPTH+1)-1:0] ob_count;
    sync_fifo #(.WIDTH(OB_W), .DEPTH(OB_DEPTH)) u_opbuf (
      .clk, .rst_n(rst_n && !start),
      .wr_en(ob_we[p]), .wr_data(ob_wdata[p]),
      .rd_en(ob_pop[p]), .rd_data(ob_head[p]),
      .empty(ob_empty[p]), .full(ob_full[p]), .count(ob_count)
    );
    assign {b_ts[p], b_cwa[p], b_cwb[p], b_ma[p], b_mb[p]} = ob_head[p];
  end

  qop_dispatcher #(.NQ(NQ)) u_disp (
    .buf_empty(ob_empty), .buf_ts(b_ts), .buf_cwa(b_cwa), .buf_cwb(b_cwb),
    .buf_ma(b_ma), .buf_mb(b_mb), .buf_pop(ob_pop),
    .ch_full, .ch_we, .ch_wdata, .conflict, .stall
  );

  for (genvar q = 0; q < NQ; q++) begin : g_ch
    channel_ctrl #(.DEPTH(CH_DEPTH)) u_ch (
      .clk, .rst_n, .flush(start),
      .wr_en(ch_we[q]), .wr_data(ch_wdata[q]),
      .full(ch_full[q]), .empty(ch_empty[q]), .now,
      .mc_valid(mc_valid[q]), .mc_cw(mc_cw[q]), .late(ch_late[q])
    );
  end

  qmeas_reg #(.NQ(NQ)) u_qmr (
    .clk, .rst_n, .clear(start), .meas_issue, .ro_valid, .ro_result,
    .rd_qubit(fmr_qubit), .rd_result(fmr_result), .rd_pending(fmr_pending),
    .results(meas_results), .pending(meas_pending), .any_pending
  );

  assign late = |ch_late;
  assign idle = ob_empty[0] && ob_empty[1] && (&ch_empty);
endmodule
