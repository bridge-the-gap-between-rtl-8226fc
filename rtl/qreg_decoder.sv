// qreg_decoder: Q-register decoder.
//
// Turns the contents of the target register named by one bundle operation
// into per-qubit masks for the operation buffers. For an S register the
// mask is used as it is (mask_a) and mask_b is empty. For a T register every
// valid pair contributes a one-hot bit at its source qubit to mask_a and at
// its target qubit to mask_b. Purely combinational. The document names the
// block; the one-hot decoding is this design's choice.
module qreg_decoder
  import uqcp_pkg::*;
#(
  parameter int unsigned NQ   = 96,
  parameter int unsigned QI_W = 7
) (
  input  logic                 is_t,
  input  logic [NQ-1:0]        s_mask,
  input  logic [QI_W-1:0]      t_src [NPAIRS],
  input  logic [QI_W-1:0]      t_tgt [NPAIRS],
  input  logic [NPAIRS-1:0]    t_valid,
  output logic [NQ-1:0]        mask_a,
  output logic [NQ-1:0]        mask_b
);
  always_comb begin
    if (!is_t) begin
      mask_a = s_mask;
      mask_b = '0;
    end else begin
      mask_a = '0;
      mask_b = '0;
      for (int k = 0; k < NPAIRS; k++) begin
        if (t_valid[k]) begin
          mask_a[t_src[k]] = 1'b1;
          mask_b[t_tgt[k]] = 1'b1;
        end
      end
    end
  end
endmodule
