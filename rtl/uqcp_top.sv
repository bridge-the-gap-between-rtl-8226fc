// uqcp_top: unified quantum control processor.
//
// One control processor for several qubit technologies. A program in the
// hybrid 32/128-bit instruction set is loaded by the processing system
// (host) into the instruction memory; `start` runs it. The instruction
// dispatcher sends classical instructions to the classical core and quantum
// instructions to the quantum control path, which time-stamps the gate
// operations and releases their micro-codes to the per-qubit DAC outputs
// (mc_valid/mc_cw) at the programmed cycle. Measurement results return on
// ro_valid/ro_result, feed FMR (classical feedforward) and the onboard
// histogram, whose top results the host reads from the result memory.
// Technology-specific parts are selected by switch control; for neutral
// atoms, IIF/IAD/IAS/IAM run the camera-to-AWG rearrangement chain. `done`
// (and the one-cycle end_pulse) report END once all queued work has
// drained. The status counters count, since reset, dropped illegal
// operations, same-qubit collisions in the dispatcher, dispatcher stalls,
// micro-codes released late, cycles FMR waited for a measurement and
// neutral-atom commands refused in another mode. The block set follows the
// document's processor diagrams; sizes not given there are this design's
// choice.
module uqcp_top
  import uqcp_pkg::*;
#(
  parameter int unsigned NQ          = 96,
  parameter int unsigned IMEM_WORDS  = 1024,
  parameter int unsigned DMEM_WORDS  = 256,
  parameter int unsigned OB_DEPTH    = 8,
  parameter int unsigned CH_DEPTH    = 4,
  parameter int unsigned HIST_BINS   = 16,
  parameter int unsigned HIST_TOP_M  = 4,
  parameter int unsigned RES_ENTRIES = 16,
  parameter int unsigned SITES_X     = 8,
  parameter int unsigned SITES_Y     = 8,
  parameter int unsigned ROI         = 4,
  parameter int unsigned TARGET_COLS = 4,
  parameter int unsigned STEP_CYCLES = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // host: program, tables, mode, run control
  input  logic                           imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0]  imem_waddr,
  input  logic [31:0]                    imem_wdata,
  input  logic                           lut_we,
  input  logic [7:0]                     lut_waddr,
  input  lut_entry_t                     lut_wdata,
  input  logic                           mode_we,
  input  mode_e                          mode_wdata,
  output mode_e                          mode,
  input  logic                           start,
  output logic                           running,
  output logic                           done,
  output logic                           end_pulse,
  // host: results
  input  logic [$clog2(DMEM_WORDS)-1:0]  dmem_raddr,
  output logic [31:0]                    dmem_rdata,
  input  logic                           hist_clear,
  input  logic [$clog2(RES_ENTRIES)-1:0] res_raddr,
  output logic [16+NQ-1:0]               res_rdata,
  output logic [31:0]                    hist_shots,
  output logic [15:0]                    hist_overflow,
  // micro-codes to the DACs, readout from the ADCs
  output logic [NQ-1:0]                  mc_valid,
  output logic [CW_W-1:0]                mc_cw [NQ],
  input  logic [NQ-1:0]                  ro_valid,
  input  logic [NQ-1:0]                  ro_result,
  // neutral atoms: camera in, AWG out
  input  logic [8+2*$clog2(ROI):0]       na_threshold,
  input  logic                           cam_frame_start,
  input  logic                           cam_pix_valid,
  input  logic [7:0]                     cam_pix_data,
  output logic                           awg_valid,
  output logic [$clog2(SITES_Y)-1:0]     awg_row,
  output logic [$clog2(SITES_X)-1:0]     awg_col,
  output logic                           awg_on,
  output logic [SITES_X*SITES_Y-1:0]     na_occ,
  output logic [SITES_X*SITES_Y-1:0]     na_sorted,
  output logic                           na_success,
  // status counters
  output logic [15:0]                    cnt_illegal,
  output logic [15:0]                    cnt_conflict,
  output logic [15:0]                    cnt_stall,
  output logic [15:0]                    cnt_late,
  output logic [15:0]                    cnt_fmr_wait,
  output logic [15:0]                    cnt_blocked
);
  localparam int unsigned PA_W = $clog2(IMEM_WORDS);
  localparam int unsigned RA_W = $clog2(RES_ENTRIES);
  localparam int unsigned QI_W = $clog2(NQ);
  localparam int unsigned MV_W = $clog2(SITES_X*SITES_Y + 1);

  // dispatcher <-> memories and cores
  logic [PA_W-1:0]   imem_raddr, pc;
  logic [31:0]       imem_rdata;
  logic              q_valid, q_ready, c_valid, c_done, c_br_taken;
  logic [31:0]       q_instr, c_instr;
  logic [LONG_W-1:0] q_ext;
  logic signed [31:0] c_br_offset;
  logic [4:0]        rf_raddr;
  logic [XLEN-1:0]   rf_rdata;
  logic              drained;

  // quantum side
  logic [QI_W-1:0]   fmr_qubit;
  logic              fmr_result, fmr_pending, fmr_stall;
  logic [NQ-1:0]     meas_results;
  logic              hist_sample, hist_dump, hist_busy;
  logic [RA_W-1:0]   hist_base;
  logic              na_valid, na_busy, q_idle;
  logic [1:0]        na_cmd;
  logic [TS_W-1:0]   now;
  logic              illegal, conflict, stall, late, blocked;

  // neutral atoms
  logic [3:0]        na_start, na_unit_busy, na_unit_done;
  logic [MV_W-1:0]   na_moves;

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .raddr(imem_raddr), .rdata(imem_rdata)
  );

  instr_dispatcher #(.IMEM_WORDS(IMEM_WORDS)) u_idisp (
    .clk, .rst_n, .start, .running, .done, .end_pulse,
    .imem_raddr, .imem_rdata,
    .q_valid, .q_ready, .q_instr, .q_ext,
    .c_valid, .c_instr, .c_done, .c_br_taken, .c_br_offset, .rf_raddr,
    .drained, .pc
  );

  classical_core #(.NQ(NQ), .DMEM_WORDS(DMEM_WORDS)) u_ccore (
    .clk, .rst_n, .valid(c_valid), .instr(c_instr), .done(c_done),
    .br_taken(c_br_taken), .br_offset(c_br_offset),
    .fmr_qubit, .fmr_result, .fmr_pending, .fmr_stall,
    .rf_raddr, .rf_rdata, .dmem_raddr, .dmem_rdata
  );

  quantum_control #(.NQ(NQ), .OB_DEPTH(OB_DEPTH), .CH_DEPTH(CH_DEPTH), .RA_W(RA_W)) u_qctl (
    .clk, .rst_n, .start,
    .in_valid(q_valid), .in_ready(q_ready), .instr(q_instr), .ext(q_ext), .rs_val(rf_rdata),
    .lut_we, .lut_waddr, .lut_wdata,
    .mc_valid, .mc_cw, .ro_valid, .ro_result,
    .fmr_qubit, .fmr_result, .fmr_pending,
    .meas_results, .hist_sample, .hist_dump, .hist_base, .hist_busy,
    .na_valid, .na_cmd, .na_busy,
    .idle(q_idle), .now, .illegal, .conflict, .stall, .late
  );

  histogram #(.NQ(NQ), .BINS(HIST_BINS), .TOP_M(HIST_TOP_M), .CNT_W(16),
              .RES_ENTRIES(RES_ENTRIES)) u_hist (
    .clk, .rst_n, .clear(hist_clear), .sample(hist_sample), .state(meas_results),
    .dump(hist_dump), .base(hist_base), .busy(hist_busy),
    .overflow(hist_overflow), .shots(hist_shots), .res_raddr, .res_rdata
  );

  switch_control u_sw (
    .clk, .rst_n, .mode_we, .mode_wdata, .mode,
    .cmd_valid(na_valid), .cmd(na_cmd), .na_start,
    .na_unit_busy, .na_busy, .blocked
  );

  na_special_hw #(.SITES_X(SITES_X), .SITES_Y(SITES_Y), .ROI(ROI), .PIX_W(8),
                  .TARGET_COLS(TARGET_COLS), .STEP_CYCLES(STEP_CYCLES)) u_na (
    .clk, .rst_n, .start(na_start), .busy(na_unit_busy), .done(na_unit_done),
    .threshold(na_threshold),
    .frame_start(cam_frame_start), .pix_valid(cam_pix_valid), .pix_data(cam_pix_data),
    .awg_valid, .awg_row, .awg_col, .awg_on,
    .occ(na_occ), .sorted(na_sorted), .success(na_success), .n_moves(na_moves)
  );

  assign drained = q_idle && !hist_busy && !na_busy;

  // status counters (saturating)
  function automatic logic [15:0] bump(input logic [15:0] c, input logic ev);
    return (ev && c != 16'hFFFF) ? c + 1'b1 : c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_illegal  <= '0;
      cnt_conflict <= '0;
      cnt_stall    <= '0;
      cnt_late     <= '0;
      cnt_fmr_wait <= '0;
      cnt_blocked  <= '0;
    end else begin
      cnt_illegal  <= bump(cnt_illegal,  illegal);
      cnt_conflict <= bump(cnt_conflict, conflict);
      cnt_stall    <= bump(cnt_stall,    stall);
      cnt_late     <= bump(cnt_late,     late);
      cnt_fmr_wait <= bump(cnt_fmr_wait, fmr_stall);
      cnt_blocked  <= bump(cnt_blocked,  blocked);
    end
  end
endmodule
