// atom_sorting: plans the rearrangement of loaded atoms into a defect-free
// target.
//
// Loading leaves atoms at random sites. After `start` (instruction IAS) the
// unit scans the occupancy map row by row, one site per cycle, and moves
// every atom of a row to the leftmost free column of that row (row
// compaction), so that the first TARGET_COLS columns become filled wherever
// the row holds enough atoms. Each atom that has to move yields one move
// (row, from column, to column) in the move list; because moves of a row
// are issued left to right and only towards the left, a move never crosses
// an atom that is still waiting. After the scan `n_moves` is the list
// length, `sorted` the occupancy after all moves, and `success` is high if
// every row fills the target columns; `done` pulses once. The move list is
// read by the movement unit through mv_raddr/mv_rdata. The document gives
// the block's purpose (rearrange atoms into a defect-free target); row
// compaction is this design's simple choice of algorithm.
module atom_sorting #(
  parameter int unsigned SITES_X     = 8,
  parameter int unsigned SITES_Y     = 8,
  parameter int unsigned TARGET_COLS = 4,
  parameter int unsigned SX_W        = (SITES_X > 1) ? $clog2(SITES_X) : 1,
  parameter int unsigned SY_W        = (SITES_Y > 1) ? $clog2(SITES_Y) : 1,
  parameter int unsigned MV_W        = $clog2(SITES_X*SITES_Y + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [SITES_X*SITES_Y-1:0]    occ,
  output logic                          busy,
  output logic                          done,
  output logic                          success,
  output logic [MV_W-1:0]               n_moves,
  output logic [SITES_X*SITES_Y-1:0]    sorted,
  input  logic [MV_W-1:0]               mv_raddr,
  output logic [SY_W+2*SX_W-1:0]        mv_rdata   // {row, from, to}
);
  localparam int unsigned NS = SITES_X * SITES_Y;
  localparam int unsigned NS_W = $clog2(NS);

  logic [SY_W+2*SX_W-1:0] moves [NS];
  logic [SX_W-1:0] x;
  logic [SY_W-1:0] y;
  logic [SX_W:0]   next_col;
  logic            here, row_end;
  logic [SX_W:0]   filled;

  assign mv_rdata = moves[mv_raddr];
  assign here     = occ[NS_W'(int'(y) * SITES_X + int'(x))];
  assign row_end  = (x == SX_W'(SITES_X - 1));
  assign filled   = next_col + (SX_W+1)'(here);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; success <= 1'b0;
      n_moves <= '0; sorted <= '0; x <= '0; y <= '0; next_col <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; success <= 1'b1; n_moves <= '0; sorted <= '0;
        x <= '0; y <= '0; next_col <= '0;
      end else if (busy) begin
        if (here) begin
          sorted[NS_W'(int'(y) * SITES_X + int'(next_col))] <= 1'b1;
          if (SX_W'(next_col) != x) begin
            moves[n_moves] <= {y, x, SX_W'(next_col)};
            n_moves <= n_moves + 1'b1;
          end
        end
        if (row_end) begin
          if (filled < (SX_W+1)'(TARGET_COLS)) success <= 1'b0;
          next_col <= '0;
          x <= '0;
          if (y == SY_W'(SITES_Y - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            y <= y + 1'b1;
          end
        end else begin
          next_col <= filled;
          x <= x + 1'b1;
        end
      end
    end
  end
endmodule
