// instr_mem: instruction memory of the processor.
//
// WORDS x 32-bit words. The processing system loads the binary through the
// write port before it raises start; the instruction dispatcher reads one
// word per cycle through a combinational read port. Size is this design's
// choice (4 KiB): the largest program sizes the document reports are about
// 2 KB. Contents are not reset.
module instr_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [31:0]              wdata,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [31:0]              rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end
  assign rdata = mem[raddr];
endmodule
