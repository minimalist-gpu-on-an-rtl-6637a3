// gpu_top: the minimalist GPU, a programmable 16-lane fixed-point SIMD engine.
//
// A program (32-bit instructions) is loaded through prog_* into the
// instruction BRAM and started with start. The controller runs it, one
// instruction per two cycles, and hands memory instructions to the input
// buffer. WRITE sends the input buffer's 768 bits (an A/B/C triplet for
// each of the 16 FMAs) to the FMA blocks; their results collect in the
// output buffer, which after three rounds flushes them back to the input
// buffer's write buffer, from where LOADB can shuffle them into the next
// operands. OR and SENDITERS turn per-lane escape tests into 4-bit pixel
// codes for the dual frame buffer; FBSWAP shows the finished frame.
//
// dbg_sel selects a controller register whose value appears on dbg_value,
// for inspecting a program stopped at a PAUSE.
//
// Display side: the HDMI output is not part of this RTL. A display
// controller gives a pixel (disp_x, disp_y) and receives its colour on
// disp_rgb three cycles later (two-cycle frame-buffer read, one-cycle colour
// table).
//
// Result visibility: a triplet completed by a WRITE can be read by LOADB or
// OR from the second instruction after that WRITE on (one instruction, e.g.
// a NOP, must come between).
module gpu_top
  import gpu_pkg::*;
#(
  parameter int NUM_FMA     = 16,
  parameter int IMEM_DEPTH  = 1024,
  parameter int WIDTH       = 320,
  parameter int HEIGHT      = 320,
  parameter int ITER_SHIFT  = 2,
  parameter int IMEM_ADDR_W = $clog2(IMEM_DEPTH),
  parameter int FB_ADDR_W   = $clog2(WIDTH * HEIGHT / NUM_FMA),
  parameter int X_W         = $clog2(WIDTH),
  parameter int Y_W         = $clog2(HEIGHT)
) (
  input  logic                   clk,
  input  logic                   rst,
  // program loading
  input  logic                   prog_we,
  input  logic [IMEM_ADDR_W-1:0] prog_addr,
  input  logic [31:0]            prog_data,
  // run control
  input  logic                   start,
  input  logic                   resume,   // btn[1]
  output logic                   paused,
  output logic                   done,
  // controller register inspection
  input  logic [3:0]             dbg_sel,
  output logic [WORD_W-1:0]      dbg_value,
  // display read port
  input  logic [X_W-1:0]         disp_x,
  input  logic [Y_W-1:0]         disp_y,
  output logic [23:0]            disp_rgb,
  output logic                   front_frame
);

  localparam int BUF_W = 3 * WORD_W * NUM_FMA;

  logic [IMEM_ADDR_W-1:0] imem_addr;
  logic [31:0]            imem_data;
  instr_t                 mem_instr;
  logic                   mem_instr_valid;
  ctrl_regs_t             controller_regs;

  logic [BUF_W-1:0]            data;
  logic                        data_valid, use_new_c, fma_output_valid;
  logic [WORD_W*NUM_FMA-1:0]   fma_out;
  logic                        fma_out_valid;
  logic [BUF_W-1:0]            write_buffer_to_mem;
  logic                        write_buffer_to_mem_valid;
  logic [FB_ADDR_W-1:0]        pixel_batch_addr;
  logic [4*NUM_FMA-1:0]        pixel_batch;
  logic                        pixel_batch_valid;
  logic                        frame_buffer_swap;
  logic [3:0]                  disp_code;

  instruction_bram #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk    (clk),
    .wr_en  (prog_we),
    .wr_addr(prog_addr),
    .wr_data(prog_data),
    .rd_addr(imem_addr),
    .rd_data(imem_data)
  );

  controller #(.IMEM_ADDR_W(IMEM_ADDR_W)) u_ctrl (
    .clk            (clk),
    .rst            (rst),
    .start          (start),
    .resume         (resume),
    .imem_addr      (imem_addr),
    .imem_data      (imem_data),
    .mem_instr      (mem_instr),
    .mem_instr_valid(mem_instr_valid),
    .controller_regs(controller_regs),
    .paused         (paused),
    .done           (done),
    .dbg_sel        (dbg_sel),
    .dbg_value      (dbg_value)
  );

  input_buffer #(
    .NUM_FMA   (NUM_FMA),
    .FB_ADDR_W (FB_ADDR_W),
    .ITER_SHIFT(ITER_SHIFT)
  ) u_inbuf (
    .clk                      (clk),
    .rst                      (rst),
    .instr                    (mem_instr),
    .instr_valid              (mem_instr_valid),
    .regs                     (controller_regs),
    .write_buffer_to_mem      (write_buffer_to_mem),
    .write_buffer_to_mem_valid(write_buffer_to_mem_valid),
    .data                     (data),
    .data_valid               (data_valid),
    .use_new_c                (use_new_c),
    .fma_output_valid         (fma_output_valid),
    .pixel_batch_addr         (pixel_batch_addr),
    .pixel_batch              (pixel_batch),
    .pixel_batch_valid        (pixel_batch_valid),
    .frame_buffer_swap        (frame_buffer_swap)
  );

  fma_array #(.NUM_FMA(NUM_FMA)) u_fmas (
    .clk             (clk),
    .rst             (rst),
    .data            (data),
    .data_valid      (data_valid),
    .use_new_c       (use_new_c),
    .fma_output_valid(fma_output_valid),
    .fma_out         (fma_out),
    .fma_out_valid   (fma_out_valid)
  );

  output_buffer #(.NUM_FMA(NUM_FMA)) u_outbuf (
    .clk                      (clk),
    .rst                      (rst),
    .fma_out                  (fma_out),
    .fma_out_valid            (fma_out_valid),
    .write_buffer_to_mem      (write_buffer_to_mem),
    .write_buffer_to_mem_valid(write_buffer_to_mem_valid)
  );

  frame_buffer #(
    .WIDTH  (WIDTH),
    .HEIGHT (HEIGHT),
    .NUM_FMA(NUM_FMA)
  ) u_fb (
    .clk              (clk),
    .rst              (rst),
    .pixel_batch_addr (pixel_batch_addr),
    .pixel_batch      (pixel_batch),
    .pixel_batch_valid(pixel_batch_valid),
    .frame_buffer_swap(frame_buffer_swap),
    .rd_x             (disp_x),
    .rd_y             (disp_y),
    .rd_code          (disp_code),
    .front            (front_frame)
  );

  color_lut u_lut (
    .clk (clk),
    .code(disp_code),
    .rgb (disp_rgb)
  );

endmodule
