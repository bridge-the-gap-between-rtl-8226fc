// na_special_hw: special hardware for neutral atoms.
//
// Chains the four units of the neutral-atom initialisation flow: image
// acquisition (camera frame into memory), atom detection (frame into a
// binarized occupancy map), atom sorting (occupancy map into a move list
// towards a defect-free target) and movements (move list into tweezer
// commands for the AWG). Each unit has its own start strobe, raised by the
// instructions IIF, IAD, IAS and IAM through switch control, in bit order
// {IAM, IAS, IAD, IIF}; `busy` and the one-cycle `done` pulses report the
// four units in the same order.
// The chain and the camera/AWG end points follow the document; sizes are
// this design's choice.
module na_special_hw #(
  parameter int unsigned SITES_X     = 8,
  parameter int unsigned SITES_Y     = 8,
  parameter int unsigned ROI         = 4,
  parameter int unsigned PIX_W       = 8,
  parameter int unsigned TARGET_COLS = 4,
  parameter int unsigned STEP_CYCLES = 4,
  parameter int unsigned SUM_W       = PIX_W + 2 * $clog2(ROI) + 1,
  parameter int unsigned SX_W        = (SITES_X > 1) ? $clog2(SITES_X) : 1,
  parameter int unsigned SY_W        = (SITES_Y > 1) ? $clog2(SITES_Y) : 1,
  parameter int unsigned MV_W        = $clog2(SITES_X*SITES_Y + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [3:0]                  start,
  output logic [3:0]                  busy,
  output logic [3:0]                  done,
  input  logic [SUM_W-1:0]            threshold,
  // camera pixel stream
  input  logic                        frame_start,
  input  logic                        pix_valid,
  input  logic [PIX_W-1:0]            pix_data,
  // AWG commands
  output logic                        awg_valid,
  output logic [SY_W-1:0]             awg_row,
  output logic [SX_W-1:0]             awg_col,
  output logic                        awg_on,
  // status
  output logic [SITES_X*SITES_Y-1:0]  occ,
  output logic [SITES_X*SITES_Y-1:0]  sorted,
  output logic                        success,
  output logic [MV_W-1:0]             n_moves
);
  localparam int unsigned A_W = $clog2(SITES_X*ROI*SITES_Y*ROI);

  logic [A_W-1:0]          img_addr;
  logic [PIX_W-1:0]        img_data;
  logic [MV_W-1:0]         mv_raddr;
  logic [SY_W+2*SX_W-1:0]  mv_rdata;

  image_acquisition #(.IMG_W(SITES_X*ROI), .IMG_H(SITES_Y*ROI), .PIX_W(PIX_W)) u_acq (
    .clk, .rst_n, .start(start[0]), .frame_start, .pix_valid, .pix_data,
    .busy(busy[0]), .done(done[0]), .rd_addr(img_addr), .rd_data(img_data)
  );

  atom_detection #(.SITES_X(SITES_X), .SITES_Y(SITES_Y), .ROI(ROI), .PIX_W(PIX_W),
                   .SUM_W(SUM_W)) u_det (
    .clk, .rst_n, .start(start[1]), .threshold, .img_addr, .img_data,
    .busy(busy[1]), .done(done[1]), .occ
  );

  atom_sorting #(.SITES_X(SITES_X), .SITES_Y(SITES_Y), .TARGET_COLS(TARGET_COLS)) u_sort (
    .clk, .rst_n, .start(start[2]), .occ, .busy(busy[2]), .done(done[2]),
    .success, .n_moves, .sorted, .mv_raddr, .mv_rdata
  );

  atom_movements #(.SITES_X(SITES_X), .SITES_Y(SITES_Y), .STEP_CYCLES(STEP_CYCLES)) u_mov (
    .clk, .rst_n, .start(start[3]), .n_moves, .mv_raddr, .mv_rdata,
    .busy(busy[3]), .done(done[3]), .awg_valid, .awg_row, .awg_col, .awg_on
  );
endmodule
