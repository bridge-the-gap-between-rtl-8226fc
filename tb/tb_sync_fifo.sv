// tb_sync_fifo: random push/pop traffic against a queue model; checks data
// order, empty, full, count and that writes to a full FIFO are refused.
module tb_sync_fifo;
  localparam int W = 12, D = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == D), "full");
      chk(count == model.size(), "count");
      if (model.size() > 0) chk(rd_data == model[0], "head data");
      wr_en   = ($urandom_range(0, 99) < (i < 200 ? 70 : 30));
      rd_en   = ($urandom_range(0, 99) < (i < 200 ? 30 : 70));
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update at the clock edge
  always @(posedge clk) if (rst_n) begin
    automatic bit dr = rd_en && model.size() > 0;
    automatic bit dw = wr_en && model.size() < D;
    if (dr) void'(model.pop_front());
    if (dw) model.push_back(wr_data);
  end
endmodule
