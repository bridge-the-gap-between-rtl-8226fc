// atom_movements: turns the planned moves into tweezer control commands for
// the arbitrary waveform generator (AWG).
//
// After `start` (instruction IAM) the unit reads the move list of the
// sorting unit, entry by entry. For each move it issues a pick command
// (tweezer on at the source site), then one command per column step towards
// the destination, and finally a drop command (tweezer off at the
// destination). Commands are one-cycle strobes on awg_valid with the site in
// awg_row/awg_col and the tweezer state in awg_on, spaced STEP_CYCLES cycles
// apart to let the tweezer settle: the pick of the first move comes one
// cycle after start, and each later command STEP_CYCLES cycles after the one
// before. `busy` is high while moves remain and `done` pulses with the last
// drop; an empty list ends at once. A move of d columns therefore takes
// (d + 2) * STEP_CYCLES cycles from its pick to the next move's pick. The document gives
// the block's name and its output to the AWG; the command format and step
// timing are this design's choice.
module atom_movements #(
  parameter int unsigned SITES_X     = 8,
  parameter int unsigned SITES_Y     = 8,
  parameter int unsigned STEP_CYCLES = 4,
  parameter int unsigned SX_W        = (SITES_X > 1) ? $clog2(SITES_X) : 1,
  parameter int unsigned SY_W        = (SITES_Y > 1) ? $clog2(SITES_Y) : 1,
  parameter int unsigned MV_W        = $clog2(SITES_X*SITES_Y + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [MV_W-1:0]         n_moves,
  output logic [MV_W-1:0]         mv_raddr,
  input  logic [SY_W+2*SX_W-1:0]  mv_rdata,
  output logic                    busy,
  output logic                    done,
  output logic                    awg_valid,
  output logic [SY_W-1:0]         awg_row,
  output logic [SX_W-1:0]         awg_col,
  output logic                    awg_on
);
  localparam int unsigned T_W = $clog2(STEP_CYCLES + 1);

  typedef enum logic [1:0] {M_IDLE, M_PICK, M_STEP} state_e;
  state_e          state;
  logic [MV_W-1:0] k;
  logic [T_W-1:0]  timer;
  logic [SY_W-1:0] row;
  logic [SX_W-1:0] col, to;
  logic            tick;

  assign mv_raddr = k;
  assign busy     = (state != M_IDLE);
  assign tick     = (timer == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M_IDLE; k <= '0; timer <= '0; row <= '0; col <= '0; to <= '0;
      done <= 1'b0; awg_valid <= 1'b0; awg_row <= '0; awg_col <= '0; awg_on <= 1'b0;
    end else begin
      done      <= 1'b0;
      awg_valid <= 1'b0;
      if (state != M_IDLE && !tick) timer <= timer - 1'b1;
      unique case (state)
        M_IDLE: if (start) begin
          k <= '0;
          if (n_moves == '0) done <= 1'b1;
          else begin
            state <= M_PICK;
            timer <= '0;
          end
        end
        M_PICK: if (tick) begin
          {row, col, to} <= mv_rdata;
          awg_valid <= 1'b1;
          {awg_row, awg_col} <= {mv_rdata[SY_W+2*SX_W-1 -: SY_W], mv_rdata[2*SX_W-1 -: SX_W]};
          awg_on <= 1'b1;
          timer  <= T_W'(STEP_CYCLES - 1);
          state  <= M_STEP;
        end
        M_STEP: if (tick) begin
          awg_valid <= 1'b1;
          awg_row   <= row;
          timer     <= T_W'(STEP_CYCLES - 1);
          if (col == to) begin
            // drop at the destination, then the next move or the end
            awg_col <= col;
            awg_on  <= 1'b0;
            if (k == n_moves - 1'b1) begin
              state <= M_IDLE;
              done  <= 1'b1;
            end else begin
              k     <= k + 1'b1;
              state <= M_PICK;
            end
          end else begin
            col     <= (col > to) ? col - 1'b1 : col + 1'b1;
            awg_col <= (col > to) ? col - 1'b1 : col + 1'b1;
            awg_on  <= 1'b1;
          end
        end
        default: state <= M_IDLE;
      endcase
    end
  end
endmodule
