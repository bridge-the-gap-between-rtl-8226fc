// channel_ctrl: one qubit channel, a FIFO followed by a time-control unit.
//
// The Q-operation dispatcher writes {timestamp, codeword} pairs into the
// FIFO. The time control looks at the FIFO head and, in the first cycle in
// which the timeline `now` has reached the timestamp, pops it and drives the
// codeword onto the micro-code output for exactly one cycle (registered, so
// the output appears one cycle after the match). If the head was already
// overdue when it reached the front (now past its timestamp) the `late`
// output pulses with it. Comparison uses the signed difference, so the
// 32-bit timeline may wrap. The FIFO-plus-time-control pair per channel is
// taken from the block diagram; depth and codeword width are this design's
// choice.
module channel_ctrl
  import uqcp_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  flush,
  input  logic                  wr_en,
  input  logic [TS_W+CW_W-1:0]  wr_data,
  output logic                  full,
  output logic                  empty,
  input  logic [TS_W-1:0]       now,
  output logic                  mc_valid,
  output logic [CW_W-1:0]       mc_cw,
  output logic                  late
);
  logic [TS_W+CW_W-1:0] head;
  logic                 fifo_empty, due, pop;
  logic [TS_W-1:0]      head_ts;
  logic [$clog2(DEPTH+1)-1:0] unused_count;

  sync_fifo #(.WIDTH(TS_W+CW_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n(rst_n && !flush),
    .wr_en, .wr_data,
    .rd_en(pop), .rd_data(head),
    .empty(fifo_empty), .full, .count(unused_count)
  );

  assign head_ts = head[TS_W+CW_W-1:CW_W];
  assign due     = $signed(now - head_ts) >= 0;
  assign pop     = !fifo_empty && due;
  assign empty   = fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mc_valid <= 1'b0;
      mc_cw    <= '0;
      late     <= 1'b0;
    end else begin
      mc_valid <= pop;
      mc_cw    <= pop ? head[CW_W-1:0] : '0;
      late     <= pop && (now != head_ts);
    end
  end
endmodule
