// frame_buffer: double-buffered store of 4-bit iteration codes for display.
//
// The screen is WIDTH x HEIGHT pixels. The GPU writes NUM_FMA vertically
// adjacent pixels at once: pixel_batch holds the codes of pixels
// (x, y0 .. y0+NUM_FMA-1), pixel i in bits [4i+3:4i], and pixel_batch_addr is
// x * (HEIGHT/NUM_FMA) + y0/NUM_FMA. Two frames are kept: the GPU writes the
// back frame while the display reads the front one, and frame_buffer_swap
// exchanges them, so a frame is shown only once it is complete. At the
// default size the two frames take 2 x 320 x 320 x 4 = 819,200 bits.
//
// Read port: give a pixel (rd_x, rd_y) in cycle t, its code is on rd_code
// from cycle t+2 (two-cycle block-RAM read). front tells which frame is
// shown. The frame size, the 4-bit codes and the dual buffer are the
// original design's; the batch address layout and the read port are this
// design's choice. Reset shows frame 0; the memory starts at zero.
module frame_buffer #(
  parameter int WIDTH   = 320,
  parameter int HEIGHT  = 320,
  parameter int NUM_FMA = 16,
  parameter int BATCHES = WIDTH * HEIGHT / NUM_FMA,   // per frame
  parameter int ADDR_W  = $clog2(BATCHES),
  parameter int X_W     = $clog2(WIDTH),
  parameter int Y_W     = $clog2(HEIGHT)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [ADDR_W-1:0]    pixel_batch_addr,
  input  logic [4*NUM_FMA-1:0] pixel_batch,
  input  logic                 pixel_batch_valid,
  input  logic                 frame_buffer_swap,
  input  logic [X_W-1:0]       rd_x,
  input  logic [Y_W-1:0]       rd_y,
  output logic [3:0]           rd_code,
  output logic                 front
);

  localparam int COLS = HEIGHT / NUM_FMA;   // batches per column
  localparam int LANE_W = $clog2(NUM_FMA);

  logic [4*NUM_FMA-1:0] mem [2*BATCHES];

  logic [ADDR_W:0]       rd_index;
  logic [ADDR_W:0]       rd_index_q;
  logic [LANE_W-1:0]     lane_q, lane_q2;
  logic [4*NUM_FMA-1:0]  rd_word;

  initial for (int i = 0; i < 2*BATCHES; i++) mem[i] = '0;

  always_comb
    rd_index = (ADDR_W+1)'(front) * (ADDR_W+1)'(BATCHES)
             + (ADDR_W+1)'(rd_x) * (ADDR_W+1)'(COLS)
             + (ADDR_W+1)'(rd_y / NUM_FMA);

  always_ff @(posedge clk) begin
    if (pixel_batch_valid && int'(pixel_batch_addr) < BATCHES)
      mem[(ADDR_W+1)'(!front) * (ADDR_W+1)'(BATCHES)
          + (ADDR_W+1)'(pixel_batch_addr)] <= pixel_batch;
    rd_index_q <= rd_index;
    rd_word    <= mem[rd_index_q];
    lane_q     <= LANE_W'(rd_y % NUM_FMA);
    lane_q2    <= lane_q;
  end

  always_ff @(posedge clk) begin
    if (rst) front <= 1'b0;
    else if (frame_buffer_swap) front <= !front;
  end

  assign rd_code = rd_word[4*lane_q2 +: 4];

endmodule
