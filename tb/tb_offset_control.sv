// tb_offset_control: random offsets, short and long qubit lists and
// relative pairs; the expected masks and indices are built bit by bit.
module tb_offset_control;
  import uqcp_pkg::*;
  localparam int NQ = 96, QI_W = 7;
  logic [OFF_W-1:0] offset;
  logic long_list;
  logic [SLIST_W-1:0] short_list;
  logic [LONG_W-1:0] long_payload;
  logic [NQ-1:0] mask, exp_mask;
  logic [REL_W-1:0] rel_src [NPAIRS], rel_tgt [NPAIRS];
  logic [QI_W-1:0] abs_src [NPAIRS], abs_tgt [NPAIRS];
  logic [NPAIRS-1:0] abs_ok;
  int checks = 0, failures = 0;

  offset_control #(.NQ(NQ), .QI_W(QI_W)) dut (.*);

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
    for (int it = 0; it < 300; it++) begin
      offset = OFF_W'($urandom_range(0, 110));
      long_list = 1'($urandom);
      short_list = SLIST_W'($urandom);
      long_payload = {$urandom, $urandom, $urandom};
      for (int k = 0; k < NPAIRS; k++) begin
        rel_src[k] = REL_W'($urandom);
        rel_tgt[k] = REL_W'($urandom);
      end
      #1;
      exp_mask = '0;
      for (int i = 0; i < NQ; i++) begin
        int j;
        j = i - int'(offset);
        if (j >= 0) begin
          if (long_list && j < LONG_W) exp_mask[i] = long_payload[j];
          if (!long_list && j < SLIST_W) exp_mask[i] = short_list[j];
        end
      end
      chk(mask == exp_mask, "mask");
      for (int k = 0; k < NPAIRS; k++) begin
        int s, t;
        s = int'(offset) + int'(rel_src[k]);
        t = int'(offset) + int'(rel_tgt[k]);
        chk(abs_ok[k] == (s < NQ && t < NQ && s != t), "pair ok");
        if (abs_ok[k]) chk(abs_src[k] == QI_W'(s) && abs_tgt[k] == QI_W'(t), "pair index");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
