// qreg_file: quantum target-register file.
//
// Holds NQREG single-qubit target registers S0..S15, each an NQ-bit qubit
// mask, and NQREG two-qubit target registers T0..T15, each a list of up to
// NPAIRS (source, target) qubit pairs with a valid bit per pair. SMSO/SMSOL
// write a whole S register, SITO/SITOL a whole T register (unused pair slots
// become invalid), and QSET changes one bit: a mask bit of an S register, or
// the valid bit of pair slot <bit index> of a T register. Writes take effect
// at the clock edge; the two read ports, one per bundle operation, are
// combinational. A register selector is 5 bits: bit 4 picks T (1) or S (0),
// bits 3:0 the register. Register counts follow eQASM-style practice and are
// this design's choice; the document gives none. Everything resets to zero.
module qreg_file
  import uqcp_pkg::*;
#(
  parameter int unsigned NQ   = 96,
  parameter int unsigned QI_W = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // S register write
  input  logic                 s_we,
  input  logic [3:0]           s_idx,
  input  logic [NQ-1:0]        s_wdata,
  // T register write
  input  logic                 t_we,
  input  logic [3:0]           t_idx,
  input  logic [QI_W-1:0]      t_wsrc [NPAIRS],
  input  logic [QI_W-1:0]      t_wtgt [NPAIRS],
  input  logic [NPAIRS-1:0]    t_wvalid,
  // QSET
  input  logic                 set_we,
  input  logic [4:0]           set_reg,
  input  logic [QI_W-1:0]      set_bit,
  input  logic                 set_val,
  // read ports
  input  logic [4:0]           rsel    [2],
  output logic [NQ-1:0]        r_mask  [2],
  output logic [QI_W-1:0]      r_src   [2][NPAIRS],
  output logic [QI_W-1:0]      r_tgt   [2][NPAIRS],
  output logic [NPAIRS-1:0]    r_valid [2]
);
  logic [NQ-1:0]     s_q     [NQREG];
  logic [QI_W-1:0]   tsrc_q  [NQREG][NPAIRS];
  logic [QI_W-1:0]   ttgt_q  [NQREG][NPAIRS];
  logic [NPAIRS-1:0] tval_q  [NQREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NQREG; r++) begin
        s_q[r]    <= '0;
        tval_q[r] <= '0;
        for (int k = 0; k < NPAIRS; k++) begin
          tsrc_q[r][k] <= '0;
          ttgt_q[r][k] <= '0;
        end
      end
    end else begin
      if (s_we) s_q[s_idx] <= s_wdata;
      if (t_we) begin
        tval_q[t_idx] <= t_wvalid;
        for (int k = 0; k < NPAIRS; k++) begin
          tsrc_q[t_idx][k] <= t_wsrc[k];
          ttgt_q[t_idx][k] <= t_wtgt[k];
        end
      end
      if (set_we) begin
        if (!set_reg[4]) begin
          if (set_bit < QI_W'(NQ)) s_q[set_reg[3:0]][set_bit] <= set_val;
        end else if (set_bit < QI_W'(NPAIRS)) begin
          tval_q[set_reg[3:0]][3'(set_bit)] <= set_val;
        end
      end
    end
  end

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      r_mask[p]  = s_q[rsel[p][3:0]];
      r_valid[p] = tval_q[rsel[p][3:0]];
      for (int k = 0; k < NPAIRS; k++) begin
        r_src[p][k] = tsrc_q[rsel[p][3:0]][k];
        r_tgt[p][k] = ttgt_q[rsel[p][3:0]][k];
      end
    end
  end
endmodule
