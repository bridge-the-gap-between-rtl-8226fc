// gate_op_lut: gate-operation lookup table of the quantum control path.
//
// Maps the 8-bit operation code of a quantum-bundle slot to what the
// operation is (single-qubit gate, two-qubit gate or measurement) and to the
// micro-code words sent towards the DAC: cw_a for a single-qubit gate, a
// measurement or the source qubit of a two-qubit gate, cw_b for the target
// qubit of a two-qubit gate. The processing system fills the table through
// the write port before a program runs, which is what lets the same binary
// serve different qubit technologies. Two combinational read ports serve the
// two operations of one bundle. All entries reset to GK_NONE, which the
// decoder treats as "no operation". The entry format is this design's own
// choice; the document gives only the block's name and purpose.
module gate_op_lut
  import uqcp_pkg::*;
#(
  parameter int unsigned OPS = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [$clog2(OPS)-1:0]  waddr,
  input  lut_entry_t              wdata,
  input  logic [$clog2(OPS)-1:0]  raddr0,
  output lut_entry_t              rdata0,
  input  logic [$clog2(OPS)-1:0]  raddr1,
  output lut_entry_t              rdata1
);
  lut_entry_t table_q [OPS];

  assign rdata0 = table_q[raddr0];
  assign rdata1 = table_q[raddr1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < OPS; i++) table_q[i] <= '0;
    end else if (we) begin
      table_q[waddr] <= wdata;
    end
  end
endmodule
