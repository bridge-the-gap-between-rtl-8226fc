// quantum_decoder: decodes the quantum instructions handed over by the
// instruction dispatcher and drives the blocks of the quantum control path.
//
//   QWAIT / QWAITR   advance the program's timing point in the time manager
//   SMSO / SMSOL     write an S register with an offset-shifted qubit mask
//   SITO / SITOL     write a T register with offset-relative qubit pairs
//   QSET             set or clear one bit of an S or T register
//   bundle           PI, then up to two operations: each looks up the
//                    gate-op table and its target register and is written,
//                    with the bundle's timestamp, into operation buffer 1
//                    (slot 0) or 2 (slot 1); measurements also mark their
//                    qubits pending in the Q-measure register
//   SRA              waits until no measurement is pending, then samples the
//                    measurement vector into the histogram
//   FHR              asks the histogram for its top results at entry rs_val
//   IIF/IAD/IAS/IAM  start the neutral-atom units (through switch control)
//
// Handshake: an instruction is taken in a cycle where in_valid and in_ready
// are both high; all side effects happen at that clock edge. in_ready is low
// while a needed resource is busy (a full operation buffer, a pending
// measurement for SRA, a busy histogram or neutral-atom unit). An operation
// whose table entry does not match its register kind (a single-qubit gate on
// a T register, a two-qubit gate on an S register) is dropped and `illegal`
// pulses. The instruction semantics follow the document's ISA table; the
// encoding (see uqcp_pkg) and the stalling rules are this design's choices.
// Many output bits are instruction fields or register masks that pass
// through unchanged (the masks and codewords written into the operation
// buffers, the long payload, register indices): the decoder's logic lies in
// the enables, the handshake and the checks that gate those fields.
module quantum_decoder
  import uqcp_pkg::*;
#(
  parameter int unsigned NQ   = 96,
  parameter int unsigned QI_W = 7,
  parameter int unsigned RA_W = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [31:0]           instr,
  input  logic [LONG_W-1:0]     ext,
  input  logic [XLEN-1:0]       rs_val,
  // time manager
  output logic                  wait_en,
  output logic [TS_W-1:0]       wait_amt,
  output logic                  bundle_en,
  output logic [2:0]            bundle_pi,
  input  logic [TS_W-1:0]       bundle_ts,
  // gate-op lookup table
  output logic [7:0]            lut_addr [2],
  input  lut_entry_t            lut_data [2],
  // Q-register file and decoders
  output logic [4:0]            rsel     [2],
  input  logic [NQ-1:0]         dec_ma   [2],
  input  logic [NQ-1:0]         dec_mb   [2],
  output logic                  s_we,
  output logic [3:0]            s_idx,
  output logic                  t_we,
  output logic [3:0]            t_idx,
  output logic [NPAIRS-1:0]     t_wvalid,
  output logic                  set_we,
  output logic [4:0]            set_reg,
  output logic [QI_W-1:0]       set_bit,
  output logic                  set_val,
  // offset control
  output logic [OFF_W-1:0]      off,
  output logic                  off_long,
  output logic [SLIST_W-1:0]    off_short,
  output logic [LONG_W-1:0]     off_payload,
  output logic [REL_W-1:0]      rel_src  [NPAIRS],
  output logic [REL_W-1:0]      rel_tgt  [NPAIRS],
  input  logic [NPAIRS-1:0]     abs_ok,
  // operation buffers: {ts, cw_a, cw_b, mask_a, mask_b}
  output logic                  ob_we    [2],
  output logic [TS_W+2*CW_W+2*NQ-1:0] ob_wdata [2],
  input  logic                  ob_full  [2],
  // Q-measure register
  output logic [NQ-1:0]         meas_issue,
  input  logic                  any_pending,
  // histogram
  output logic                  hist_sample,
  output logic                  hist_dump,
  output logic [RA_W-1:0]       hist_base,
  input  logic                  hist_busy,
  // neutral-atom commands
  output logic                  na_valid,
  output logic [1:0]            na_cmd,
  input  logic                  na_busy,
  output logic                  illegal
);
  logic [5:0] op;
  logic       bundle, fire, na_recent;
  logic [7:0] slot_op  [2];
  logic [4:0] slot_reg [2];
  logic       slot_ok  [2];
  logic       slot_bad [2];

  assign bundle = is_bundle(instr);
  assign op     = instr[31:26];

  assign slot_op[0]  = instr[25:18];
  assign slot_reg[0] = instr[17:13];
  assign slot_op[1]  = instr[12:5];
  assign slot_reg[1] = instr[4:0];

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      lut_addr[p] = slot_op[p];
      rsel[p]     = slot_reg[p];
      unique case (lut_data[p].kind)
        GK_SINGLE, GK_MEAS: slot_ok[p] = !slot_reg[p][4];
        GK_TWO:             slot_ok[p] =  slot_reg[p][4];
        default:            slot_ok[p] = 1'b0;
      endcase
      slot_bad[p] = (lut_data[p].kind != GK_NONE) && !slot_ok[p];
      ob_wdata[p] = {bundle_ts, lut_data[p].cw_a, lut_data[p].cw_b, dec_ma[p], dec_mb[p]};
    end
  end

  // readiness per instruction
  always_comb begin
    in_ready = 1'b1;
    if (bundle) in_ready = !ob_full[0] && !ob_full[1];
    else begin
      unique case (op)
        OP_SRA:                          in_ready = !any_pending && !hist_busy;
        OP_FHR:                          in_ready = !hist_busy;
        OP_IIF, OP_IAD, OP_IAS, OP_IAM:  in_ready = !na_busy && !na_recent;
        default:                         in_ready = 1'b1;
      endcase
    end
  end
  assign fire = in_valid && in_ready;

  // offset control operands
  always_comb begin
    off         = instr[21:15];
    off_long    = (op == OP_SMSOL);
    off_short   = instr[14:0];
    off_payload = ext;
    for (int k = 0; k < NPAIRS; k++) begin
      if (op == OP_SITOL) begin
        rel_src[k] = REL_W'(ext[12*k+6 +: 6]);
        rel_tgt[k] = REL_W'(ext[12*k   +: 6]);
      end else begin
        rel_src[k] = instr[13:7];
        rel_tgt[k] = instr[6:0];
      end
    end
  end

  always_comb begin
    wait_en     = 1'b0;
    wait_amt    = '0;
    bundle_en   = 1'b0;
    bundle_pi   = instr[28:26];
    s_we        = 1'b0;
    s_idx       = instr[25:22];
    t_we        = 1'b0;
    t_idx       = instr[25:22];
    t_wvalid    = '0;
    set_we      = 1'b0;
    set_reg     = instr[25:21];
    set_bit     = instr[20:14];
    set_val     = instr[13];
    ob_we[0]    = 1'b0;
    ob_we[1]    = 1'b0;
    meas_issue  = '0;
    hist_sample = 1'b0;
    hist_dump   = 1'b0;
    hist_base   = rs_val[RA_W-1:0];
    na_valid    = 1'b0;
    na_cmd      = op[1:0];
    illegal     = 1'b0;
    if (fire) begin
      if (bundle) begin
        bundle_en = 1'b1;
        for (int p = 0; p < 2; p++) begin
          ob_we[p] = slot_ok[p];
          if (slot_ok[p] && lut_data[p].kind == GK_MEAS) meas_issue = meas_issue | dec_ma[p];
        end
        illegal = slot_bad[0] || slot_bad[1];
      end else begin
        unique case (op)
          OP_QWAIT:  begin wait_en = 1'b1; wait_amt = TS_W'(instr[19:0]); end
          OP_QWAITR: begin wait_en = 1'b1; wait_amt = rs_val; end
          OP_SMSO, OP_SMSOL: s_we = 1'b1;
          OP_SITO: begin
            t_we = 1'b1;
            t_wvalid = NPAIRS'(abs_ok[0]);
            illegal = !abs_ok[0];
          end
          OP_SITOL: begin
            t_we = 1'b1;
            for (int k = 0; k < NPAIRS; k++)
              t_wvalid[k] = (k < int'(instr[14:12])) && abs_ok[k];
            for (int k = 0; k < NPAIRS; k++)
              if (k < int'(instr[14:12]) && !abs_ok[k]) illegal = 1'b1;
          end
          OP_QSET:   set_we = 1'b1;
          OP_SRA:    hist_sample = 1'b1;
          OP_FHR:    hist_dump = 1'b1;
          OP_IIF, OP_IAD, OP_IAS, OP_IAM: na_valid = 1'b1;
          default:   illegal = 1'b1;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) na_recent <= 1'b0;
    else        na_recent <= na_valid;
  end
endmodule
