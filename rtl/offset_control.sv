// offset_control: turns the immediate operands of the target-register
// instructions into absolute qubit masks and qubit indices (the "sliding
// mask" addressing mode).
//
// For SMSO the 15-bit qubit list, and for SMSOL the 96-bit list, is shifted
// left by the offset so that list bit i addresses qubit offset+i; bits
// shifted past the last qubit are dropped. For SITO (7-bit fields) and
// SITOL (6-bit fields, zero-extended) the source and target indices are
// relative to the offset and are turned into absolute 7-bit indices with a valid bit (an index at or past NQ makes the
// pair invalid). Purely combinational. It sits on the write path of the
// Q-register file, so the registers hold absolute masks and indices; the
// block diagram draws it beside the register file instead, which decodes to
// the same masks. The document names the block and the sliding-mask mode;
// the arithmetic (shift and add) is this design's reading of it.
module offset_control
  import uqcp_pkg::*;
#(
  parameter int unsigned NQ = 96,
  parameter int unsigned QI_W = 7
) (
  input  logic [OFF_W-1:0]         offset,
  input  logic                     long_list,   // 1: SMSOL payload, 0: SMSO list
  input  logic [SLIST_W-1:0]       short_list,
  input  logic [LONG_W-1:0]        long_payload,
  output logic [NQ-1:0]            mask,
  input  logic [REL_W-1:0]         rel_src [NPAIRS],
  input  logic [REL_W-1:0]         rel_tgt [NPAIRS],
  output logic [QI_W-1:0]          abs_src [NPAIRS],
  output logic [QI_W-1:0]          abs_tgt [NPAIRS],
  output logic [NPAIRS-1:0]        abs_ok
);
  localparam int unsigned WIDE = NQ + LONG_W + (1 << OFF_W);

  logic [WIDE-1:0] shifted;

  always_comb begin
    if (long_list) shifted = WIDE'(long_payload) << offset;
    else           shifted = WIDE'(short_list)   << offset;
    mask = shifted[NQ-1:0];
  end

  always_comb begin
    for (int k = 0; k < NPAIRS; k++) begin
      logic [QI_W+1:0] s, t;
      s = (QI_W+2)'(offset) + (QI_W+2)'(rel_src[k]);
      t = (QI_W+2)'(offset) + (QI_W+2)'(rel_tgt[k]);
      abs_src[k] = s[QI_W-1:0];
      abs_tgt[k] = t[QI_W-1:0];
      abs_ok[k]  = (s < (QI_W+2)'(NQ)) && (t < (QI_W+2)'(NQ)) && (s != t);
    end
  end
endmodule
