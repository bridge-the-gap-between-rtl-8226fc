// tb_qreg_decoder: S registers pass through; T registers decode into
// source and target one-hot masks of their valid pairs.
module tb_qreg_decoder;
  import uqcp_pkg::*;
  localparam int NQ = 96, QI_W = 7;
  logic is_t;
  logic [NQ-1:0] s_mask, mask_a, mask_b, ea, eb;
  logic [QI_W-1:0] t_src [NPAIRS], t_tgt [NPAIRS];
  logic [NPAIRS-1:0] t_valid;
  int checks = 0, failures = 0;

  qreg_decoder #(.NQ(NQ), .QI_W(QI_W)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the document's CNOT on q0 (control) and q1: pair (0,1)
    is_t = 1; s_mask = '1; t_valid = 7'b0000001;
    for (int k = 0; k < NPAIRS; k++) begin t_src[k] = 7'(2 * k); t_tgt[k] = 7'(2 * k + 1); end
    #1;
    chk(mask_a == NQ'(1) && mask_b == NQ'(2), "single pair");
    for (int it = 0; it < 300; it++) begin
      is_t = 1'($urandom);
      s_mask = {$urandom, $urandom, $urandom};
      t_valid = NPAIRS'($urandom);
      for (int k = 0; k < NPAIRS; k++) begin
        t_src[k] = QI_W'($urandom_range(0, NQ - 1));
        t_tgt[k] = QI_W'($urandom_range(0, NQ - 1));
      end
      #1;
      ea = '0; eb = '0;
      if (!is_t) ea = s_mask;
      else for (int k = 0; k < NPAIRS; k++) if (t_valid[k]) begin
        ea[t_src[k]] = 1'b1; eb[t_tgt[k]] = 1'b1;
      end
      chk(mask_a == ea, "mask_a");
      chk(mask_b == eb, "mask_b");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
