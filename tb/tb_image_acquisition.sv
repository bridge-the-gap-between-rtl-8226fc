// tb_image_acquisition: pixels before the frame start are ignored; after
// arming, a frame with gaps in pix_valid is stored in raster order; done
// pulses once and busy falls.
module tb_image_acquisition;
  localparam int W = 8, H = 4;
  logic clk = 0, rst_n = 0, start = 0, frame_start = 0, pix_valid = 0, busy, done;
  logic [7:0] pix_data = 0, rd_data;
  logic [4:0] rd_addr = 0;
  int checks = 0, failures = 0, dones = 0;

  image_acquisition #(.IMG_W(W), .IMG_H(H), .PIX_W(8)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (done) dones++;

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

  function automatic logic [7:0] pix(int i); return 8'(i * 7 + 3); endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    chk(busy, "armed");
    // stray pixels before the frame start
    pix_valid = 1; pix_data = 8'hEE;
    repeat (3) @(negedge clk);
    pix_valid = 0; frame_start = 1;
    @(negedge clk) frame_start = 0;
    for (int i = 0; i < W * H; i++) begin
      while ($urandom_range(0, 2) == 0) begin pix_valid = 0; @(negedge clk); end
      pix_valid = 1; pix_data = pix(i);
      @(negedge clk);
    end
    pix_valid = 0;
    @(negedge clk);
    chk(!busy && dones == 1, "done once");
    for (int i = 0; i < W * H; i++) begin
      rd_addr = 5'(i); #1;
      chk(rd_data == pix(i), $sformatf("pixel %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
