// image_acquisition: captures one camera frame of the neutral-atom array.
//
// After `start` (instruction IIF) the unit waits for the next frame-start
// strobe from the camera link and then stores IMG_W*IMG_H pixels, in raster
// order, one per cycle in which pix_valid is high, into its frame memory.
// `busy` is high from start until the last pixel is stored; `done` pulses
// once then. The atom-detection unit reads the memory through the
// combinational read port rd_addr/rd_data. The camera link itself (the
// document names CoaXPress) is outside this block: it is assumed to deliver
// a plain pixel stream. Frame size and pixel width are this design's choice.
module image_acquisition #(
  parameter int unsigned IMG_W = 32,
  parameter int unsigned IMG_H = 32,
  parameter int unsigned PIX_W = 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic                              frame_start,
  input  logic                              pix_valid,
  input  logic [PIX_W-1:0]                  pix_data,
  output logic                              busy,
  output logic                              done,
  input  logic [$clog2(IMG_W*IMG_H)-1:0]    rd_addr,
  output logic [PIX_W-1:0]                  rd_data
);
  localparam int unsigned NPIX = IMG_W * IMG_H;
  localparam int unsigned A_W  = $clog2(NPIX);

  typedef enum logic [1:0] {A_IDLE, A_ARMED, A_CAPTURE} state_e;
  state_e         state;
  logic [A_W-1:0] wptr;
  logic [PIX_W-1:0] frame [NPIX];

  assign busy    = (state != A_IDLE);
  assign rd_data = frame[rd_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= A_IDLE;
      wptr  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        A_IDLE:  if (start) state <= A_ARMED;
        A_ARMED: if (frame_start) begin
          state <= A_CAPTURE;
          wptr  <= '0;
        end
        A_CAPTURE: if (pix_valid) begin
          wptr <= wptr + 1'b1;
          if (wptr == A_W'(NPIX - 1)) begin
            state <= A_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == A_CAPTURE && pix_valid) frame[wptr] <= pix_data;
  end
endmodule
