// tb_qreg_file: random S/T register writes and QSET bit changes against a
// model; both read ports are compared after every write.
module tb_qreg_file;
  import uqcp_pkg::*;
  localparam int NQ = 96, QI_W = 7;
  logic clk = 0, rst_n = 0;
  logic s_we = 0, t_we = 0, set_we = 0, set_val = 0;
  logic [3:0] s_idx = 0, t_idx = 0;
  logic [NQ-1:0] s_wdata = '0;
  logic [QI_W-1:0] t_wsrc [NPAIRS], t_wtgt [NPAIRS];
  logic [NPAIRS-1:0] t_wvalid = '0;
  logic [4:0] set_reg = 0;
  logic [QI_W-1:0] set_bit = 0;
  logic [4:0] rsel [2];
  logic [NQ-1:0] r_mask [2];
  logic [QI_W-1:0] r_src [2][NPAIRS], r_tgt [2][NPAIRS];
  logic [NPAIRS-1:0] r_valid [2];
  logic [NQ-1:0] ms [16];
  logic [QI_W-1:0] msrc [16][NPAIRS], mtgt [16][NPAIRS];
  logic [NPAIRS-1:0] mval [16];
  int checks = 0, failures = 0;

  qreg_file #(.NQ(NQ), .QI_W(QI_W)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int r = 0; r < 16; r++) begin
      rsel[0] = 5'(r); rsel[1] = 5'(16 + r); #1;
      chk(r_mask[0] == ms[r], "S read");
      chk(r_valid[1] == mval[r], "T valid read");
      for (int k = 0; k < NPAIRS; k++)
        if (mval[r][k]) chk(r_src[1][k] == msrc[r][k] && r_tgt[1][k] == mtgt[r][k], "T pair read");
    end
  endtask

  initial begin
    for (int r = 0; r < 16; r++) begin
      ms[r] = '0; mval[r] = '0;
      for (int k = 0; k < NPAIRS; k++) begin msrc[r][k] = '0; mtgt[r][k] = '0; end
    end
    for (int k = 0; k < NPAIRS; k++) begin t_wsrc[k] = '0; t_wtgt[k] = '0; end
    rsel[0] = 0; rsel[1] = 16;
    repeat (2) @(posedge clk);
    rst_n = 1;
    compare_all();
    for (int it = 0; it < 120; it++) begin
      @(negedge clk);
      s_we = 0; t_we = 0; set_we = 0;
      case ($urandom_range(0, 2))
        0: begin
          s_we = 1; s_idx = 4'($urandom); s_wdata = {$urandom, $urandom, $urandom};
          ms[s_idx] = s_wdata;
        end
        1: begin
          t_we = 1; t_idx = 4'($urandom); t_wvalid = NPAIRS'($urandom);
          for (int k = 0; k < NPAIRS; k++) begin
            t_wsrc[k] = QI_W'($urandom_range(0, NQ - 1));
            t_wtgt[k] = QI_W'($urandom_range(0, NQ - 1));
            msrc[t_idx][k] = t_wsrc[k]; mtgt[t_idx][k] = t_wtgt[k];
          end
          mval[t_idx] = t_wvalid;
        end
        default: begin
          set_we = 1; set_reg = 5'($urandom); set_val = 1'($urandom);
          if (!set_reg[4]) begin
            set_bit = QI_W'($urandom_range(0, NQ - 1));
            ms[set_reg[3:0]][set_bit] = set_val;
          end else begin
            set_bit = QI_W'($urandom_range(0, NPAIRS - 1));
            mval[set_reg[3:0]][set_bit] = set_val;
          end
        end
      endcase
      @(posedge clk); #1;
      s_we = 0; t_we = 0; set_we = 0;
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
