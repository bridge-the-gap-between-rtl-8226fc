// tb_atom_detection: a synthetic frame with bright regions at known sites
// and noise elsewhere; checks the binarized map and the scan length.
module tb_atom_detection;
  localparam int SX = 4, SY = 3, ROI = 4, IW = SX * ROI;
  localparam int SUM_W = 8 + 2 * 2 + 1;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [SUM_W-1:0] threshold = 13'd800;
  logic [$clog2(SX*ROI*SY*ROI)-1:0] img_addr;
  logic [7:0] img_data;
  logic [SX*SY-1:0] occ, truth;
  logic [7:0] img [SX*ROI*SY*ROI];
  int checks = 0, failures = 0, cycles = 0;

  atom_detection #(.SITES_X(SX), .SITES_Y(SY), .ROI(ROI), .PIX_W(8)) dut (.*);
  always #5 clk = ~clk;
  assign img_data = img[img_addr];

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

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      truth = (SX*SY)'($urandom);
      for (int y = 0; y < SY * ROI; y++)
        for (int x = 0; x < IW; x++)
          // atom: 16 pixels of 60..90 (sum >= 960); empty: 0..40 (sum <= 640)
          img[y * IW + x] = truth[(y / ROI) * SX + x / ROI] ? 8'($urandom_range(60, 90))
                                                            : 8'($urandom_range(0, 40));
      if (rep == 0) begin
        repeat (2) @(posedge clk);
        rst_n = 1;
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      chk(occ == truth, $sformatf("occupancy %b exp %b", occ, truth));
      chk(cycles == SX * SY * ROI * ROI + 1, $sformatf("scan cycles %0d", cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
