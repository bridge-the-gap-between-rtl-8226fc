// atom_detection: finds which trap sites of the neutral-atom array hold an
// atom.
//
// The frame is divided into SITES_X x SITES_Y square regions of ROI x ROI
// pixels, one per trap site (frame width SITES_X*ROI pixels). After `start`
// (instruction IAD) the unit reads the captured frame one pixel per cycle,
// sums the pixel values of each region and marks the site occupied when the
// sum reaches `threshold`. The result is the binarized image `occ`, bit
// y*SITES_X+x for site (x, y), valid from `done` (a one-cycle pulse) until
// the next start. A full scan takes SITES_X*SITES_Y*ROI*ROI cycles plus one.
// The document gives the block's role (detect atom positions and occupancy,
// producing a binarized image); the region-sum threshold is this design's
// choice.
module atom_detection #(
  parameter int unsigned SITES_X = 8,
  parameter int unsigned SITES_Y = 8,
  parameter int unsigned ROI     = 4,
  parameter int unsigned PIX_W   = 8,
  parameter int unsigned SUM_W   = PIX_W + 2 * $clog2(ROI) + 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic [SUM_W-1:0]               threshold,
  output logic [$clog2(SITES_X*ROI*SITES_Y*ROI)-1:0] img_addr,
  input  logic [PIX_W-1:0]               img_data,
  output logic                           busy,
  output logic                           done,
  output logic [SITES_X*SITES_Y-1:0]     occ
);
  localparam int unsigned IMG_W = SITES_X * ROI;
  localparam int unsigned A_W   = $clog2(SITES_X*ROI*SITES_Y*ROI);
  localparam int unsigned SX_W  = (SITES_X > 1) ? $clog2(SITES_X) : 1;
  localparam int unsigned SY_W  = (SITES_Y > 1) ? $clog2(SITES_Y) : 1;
  localparam int unsigned R_W   = (ROI > 1) ? $clog2(ROI) : 1;

  logic [SX_W-1:0]  sx;
  logic [SY_W-1:0]  sy;
  logic [R_W-1:0]   px, py;
  logic [SUM_W-1:0] sum, sum_next;
  logic             last_pix;

  assign img_addr = A_W'((int'(sy) * ROI + int'(py)) * IMG_W + int'(sx) * ROI + int'(px));
  assign sum_next = sum + SUM_W'(img_data);
  assign last_pix = (px == R_W'(ROI - 1)) && (py == R_W'(ROI - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; occ <= '0;
      sx <= '0; sy <= '0; px <= '0; py <= '0; sum <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        sx <= '0; sy <= '0; px <= '0; py <= '0; sum <= '0;
      end else if (busy) begin
        if (!last_pix) begin
          sum <= sum_next;
          if (px == R_W'(ROI - 1)) begin
            px <= '0;
            py <= py + 1'b1;
          end else begin
            px <= px + 1'b1;
          end
        end else begin
          occ[int'(sy) * SITES_X + int'(sx)] <= (sum_next >= threshold);
          sum <= '0;
          px  <= '0;
          py  <= '0;
          if (sx == SX_W'(SITES_X - 1)) begin
            sx <= '0;
            if (sy == SY_W'(SITES_Y - 1)) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              sy <= sy + 1'b1;
            end
          end else begin
            sx <= sx + 1'b1;
          end
        end
      end
    end
  end
endmodule
