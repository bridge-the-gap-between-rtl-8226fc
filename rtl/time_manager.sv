// time_manager: timeline of the quantum control path.
//
// Keeps two counters. `now` is the real-time clock of the experiment: it is
// cleared by start and then counts one per clock cycle. `issue_time` is the
// timing point the program has reached: QWAIT/QWAITR add their interval to
// it, and each quantum bundle first adds its pre-interval PI and then takes
// the result as its timestamp (bundle_ts, valid in the same cycle as
// bundle_en). Operations are later released by the time-control units when
// `now` reaches their timestamp, so the program runs ahead of the timeline
// and the operations still come out with exact spacing. The two-counter
// scheme is this design's reading of the block's role; the document gives
// its name and the QWAIT/PI semantics. Both counters are 32 bits and wrap.
module time_manager
  import uqcp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            wait_en,
  input  logic [TS_W-1:0] wait_amt,
  input  logic            bundle_en,
  input  logic [2:0]      bundle_pi,
  output logic [TS_W-1:0] bundle_ts,
  output logic [TS_W-1:0] now,
  output logic [TS_W-1:0] issue_time
);
  assign bundle_ts = issue_time + TS_W'(bundle_pi);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now        <= '0;
      issue_time <= '0;
    end else if (start) begin
      now        <= '0;
      issue_time <= '0;
    end else begin
      now <= now + 1'b1;
      if (wait_en)        issue_time <= issue_time + wait_amt;
      else if (bundle_en) issue_time <= bundle_ts;
    end
  end
endmodule
