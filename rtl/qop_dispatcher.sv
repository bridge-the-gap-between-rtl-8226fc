// qop_dispatcher: Q-operation dispatcher.
//
// Drains operation buffers 1 and 2 (slot 0 and slot 1 of the quantum
// bundles) into the per-qubit FIFOs. Each buffer entry carries a timestamp,
// two codewords and two qubit masks (mask_a gets cw_a, mask_b gets cw_b).
// Timestamps never decrease in program order, so the dispatcher takes the
// head with the smaller timestamp; on equal timestamps it takes both heads
// in the same cycle unless their masks overlap, in which case buffer 1 goes
// first and `conflict` pulses (the second operation on that qubit then comes
// out one cycle late). An entry is only taken when none of the FIFOs it
// writes is full, so a full FIFO stalls the buffers (backpressure). Each
// FIFO write is {timestamp, codeword}. Combinational; the buffers and FIFOs
// hold the state. The document names the block and shows the two buffers
// feeding it; the merge rule is this design's choice.
module qop_dispatcher
  import uqcp_pkg::*;
#(
  parameter int unsigned NQ = 96
) (
  input  logic                  buf_empty [2],
  input  logic [TS_W-1:0]       buf_ts    [2],
  input  logic [CW_W-1:0]       buf_cwa   [2],
  input  logic [CW_W-1:0]       buf_cwb   [2],
  input  logic [NQ-1:0]         buf_ma    [2],
  input  logic [NQ-1:0]         buf_mb    [2],
  output logic                  buf_pop   [2],
  input  logic [NQ-1:0]         ch_full,
  output logic [NQ-1:0]         ch_we,
  output logic [TS_W+CW_W-1:0]  ch_wdata  [NQ],
  output logic                  conflict,
  output logic                  stall
);
  logic [1:0]    cand;
  logic [NQ-1:0] m [2];
  logic [1:0]    fits;

  always_comb begin
    m[0] = buf_ma[0] | buf_mb[0];
    m[1] = buf_ma[1] | buf_mb[1];
    fits[0] = ((m[0] & ch_full) == '0);
    fits[1] = ((m[1] & ch_full) == '0);

    // candidates by timestamp order (signed difference tolerates wrap)
    cand = 2'b00;
    conflict = 1'b0;
    if (!buf_empty[0] && !buf_empty[1]) begin
      if (buf_ts[0] == buf_ts[1]) begin
        if ((m[0] & m[1]) != '0) begin
          cand = 2'b01;
          conflict = 1'b1;
        end else begin
          cand = 2'b11;
        end
      end else if ($signed(buf_ts[0] - buf_ts[1]) < 0) cand = 2'b01;
      else cand = 2'b10;
    end else if (!buf_empty[0]) cand = 2'b01;
    else if (!buf_empty[1])     cand = 2'b10;

    // an operation stalls unless all its FIFOs have room
    buf_pop[0] = cand[0] && fits[0];
    buf_pop[1] = cand[1] && fits[1];
    stall = (cand[0] && !fits[0]) || (cand[1] && !fits[1]);
    conflict = conflict && buf_pop[0];

    ch_we = '0;
    for (int q = 0; q < NQ; q++) begin
      ch_wdata[q] = '0;
      if (buf_pop[0] && buf_ma[0][q]) begin
        ch_we[q] = 1'b1; ch_wdata[q] = {buf_ts[0], buf_cwa[0]};
      end else if (buf_pop[0] && buf_mb[0][q]) begin
        ch_we[q] = 1'b1; ch_wdata[q] = {buf_ts[0], buf_cwb[0]};
      end else if (buf_pop[1] && buf_ma[1][q]) begin
        ch_we[q] = 1'b1; ch_wdata[q] = {buf_ts[1], buf_cwa[1]};
      end else if (buf_pop[1] && buf_mb[1][q]) begin
        ch_we[q] = 1'b1; ch_wdata[q] = {buf_ts[1], buf_cwb[1]};
      end
    end
  end
endmodule
