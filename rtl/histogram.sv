// histogram: onboard histogram (result processing unit).
//
// Counts how often each measured quantum state occurs over the shots of an
// experiment, so that only the most frequent states, not every shot, travel
// back to the processing system. `sample` (from SRA) records the current
// NQ-bit measurement vector: a bin holding the same state is incremented,
// otherwise the next free bin takes it; when all BINS bins are in use a new
// state is dropped and counted in `overflow`. Counts saturate. `dump` (from
// FHR) writes the TOP_M bins with the highest counts, highest first (ties to
// the lower bin), into the result memory at entries base, base+1, ...,
// one entry per cycle; an entry is {count, state}, and a count of zero marks
// an unused slot. `busy` is high during the dump. The processing system
// reads the result memory through res_raddr/res_rdata and clears the bins
// with `clear`. The block and its SRA/FHR roles come from the document; the
// bin organisation, sizes and sorting method are this design's choice.
module histogram #(
  parameter int unsigned NQ          = 96,
  parameter int unsigned BINS        = 16,
  parameter int unsigned TOP_M       = 4,
  parameter int unsigned CNT_W       = 16,
  parameter int unsigned RES_ENTRIES = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            clear,
  input  logic                            sample,
  input  logic [NQ-1:0]                   state,
  input  logic                            dump,
  input  logic [$clog2(RES_ENTRIES)-1:0]  base,
  output logic                            busy,
  output logic [15:0]                     overflow,
  output logic [31:0]                     shots,
  input  logic [$clog2(RES_ENTRIES)-1:0]  res_raddr,
  output logic [CNT_W+NQ-1:0]             res_rdata
);
  localparam int unsigned BI_W = $clog2(BINS);
  localparam int unsigned RA_W = $clog2(RES_ENTRIES);
  localparam int unsigned M_W  = $clog2(TOP_M + 1);

  logic [NQ-1:0]          bin_state [BINS];
  logic [CNT_W-1:0]       bin_count [BINS];
  logic [BINS-1:0]        bin_used;
  logic [CNT_W+NQ-1:0]    res_mem   [RES_ENTRIES];

  // ---- sample path: match or allocate
  logic            hit, has_free;
  logic [BI_W-1:0] hit_idx, free_idx;
  always_comb begin
    hit = 1'b0; hit_idx = '0;
    has_free = 1'b0; free_idx = '0;
    for (int b = BINS - 1; b >= 0; b--) begin
      if (bin_used[b] && bin_state[b] == state) begin
        hit = 1'b1; hit_idx = BI_W'(b);
      end
      if (!bin_used[b]) begin
        has_free = 1'b1; free_idx = BI_W'(b);
      end
    end
  end

  // ---- dump path: argmax over bins not yet reported
  logic [BINS-1:0]  taken;
  logic [M_W-1:0]   m_cnt;
  logic [RA_W-1:0]  waddr;
  logic [BI_W-1:0]  best_idx;
  logic [CNT_W-1:0] best_cnt;
  always_comb begin
    best_idx = '0; best_cnt = '0;
    for (int b = BINS - 1; b >= 0; b--) begin
      if (bin_used[b] && !taken[b] && bin_count[b] >= best_cnt) begin
        best_idx = BI_W'(b); best_cnt = bin_count[b];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin_used <= '0;
      overflow <= '0;
      shots    <= '0;
      busy     <= 1'b0;
      taken    <= '0;
      m_cnt    <= '0;
      waddr    <= '0;
      for (int b = 0; b < BINS; b++) begin
        bin_state[b] <= '0;
        bin_count[b] <= '0;
      end
    end else if (clear) begin
      bin_used <= '0;
      overflow <= '0;
      shots    <= '0;
      busy     <= 1'b0;
      for (int b = 0; b < BINS; b++) bin_count[b] <= '0;
    end else begin
      if (sample && !busy) begin
        shots <= shots + 1'b1;
        if (hit) begin
          if (bin_count[hit_idx] != '1) bin_count[hit_idx] <= bin_count[hit_idx] + 1'b1;
        end else if (has_free) begin
          bin_used[free_idx]  <= 1'b1;
          bin_state[free_idx] <= state;
          bin_count[free_idx] <= CNT_W'(1);
        end else if (overflow != '1) begin
          overflow <= overflow + 1'b1;
        end
      end
      if (dump && !busy) begin
        busy  <= 1'b1;
        taken <= '0;
        m_cnt <= '0;
        waddr <= base;
      end else if (busy) begin
        taken[best_idx] <= taken[best_idx] | (best_cnt != '0);
        m_cnt <= m_cnt + 1'b1;
        waddr <= waddr + 1'b1;
        if (m_cnt == M_W'(TOP_M - 1)) busy <= 1'b0;
      end
    end
  end

  // result memory: written during a dump, read by the processing system
  always_ff @(posedge clk) begin
    if (busy && !clear)
      res_mem[waddr] <= (best_cnt != '0) ? {best_cnt, bin_state[best_idx]} : '0;
  end
  assign res_rdata = res_mem[res_raddr];

endmodule
