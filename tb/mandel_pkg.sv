// mandel_pkg: testbench helpers for running the Mandelbrot program on the GPU.
//
// build_program() assembles the column-by-column escape-time program into
// 32-bit instructions: x outer loop, y inner loop in steps of 16 pixels (one
// per FMA), iteration loop inside. Per pixel batch it establishes the
// invariant (x, y, x*x + y*y) in the output buffer, then per iteration
// forms x' = x*x - y*y + x0, y' = 2*x*y + y0 and x*x + y*y with LOADB
// shuffles, records escapes with OR and finally sends the 16 codes with
// SENDITERS. A NOP separates the WRITE that completes a triplet from the OR
// that reads it. After the frame it swaps the frame buffer, pauses, and ends.
//
// ref_code() is an independent model of the same fixed-point arithmetic
// (16-bit words, 10 fraction bits, truncating multiply, wrapping add).
package mandel_pkg;
  import gpu_pkg::*;

  typedef struct {
    int xmin, ymin, dx, dy;   // raw fixed-point values
    int cols, rows;           // pixels rendered (rows a multiple of 16)
    int max_iters;
    int fb_height;            // frame-buffer height, for the batch address
    int shift;                // iteration-count shift of the pixel code
  } mandel_cfg_t;

  // register map of the program
  localparam logic [3:0] R_ZERO = 0, R_XLAST = 1, R_YLAST = 2, R_X = 3, R_Y = 4,
                         R_XVAL = 5, R_YVAL = 6, R_ITLAST = 7, R_ITERS = 8,
                         R_ADDR = 9;
  localparam logic [3:0] SEL_A = 0, SEL_B = 1, SEL_C = 2;
  // shuffle codes {mode, src}
  localparam logic [3:0] SH_X = 4'b0000, SH_Y = 4'b0001, SH_ZERO = 4'b0011,
                         SH_2X = 4'b0100, SH_NEGY = 4'b1001;

  function automatic logic [15:0] fix16(int v);
    return 16'(v);
  endfunction

  function automatic void emit(ref instr_t prog[$], input opcode_e op,
                               input logic [3:0] a, input int imm,
                               input logic [3:0] b, input logic [3:0] c);
    prog.push_back(make_instr(op, a, fix16(imm), b, c));
  endfunction

  function automatic void build_program(ref instr_t prog[$], input mandel_cfg_t cfg);
    int l_outer, l_inner, l_iter;
    prog.delete();
    emit(prog, OP_XOR,  R_ZERO, 0, R_ZERO, 0);
    emit(prog, OP_ADDI, R_XLAST, cfg.cols - 1, R_ZERO, 0);
    emit(prog, OP_ADDI, R_YLAST, cfg.rows - 16, R_ZERO, 0);
    emit(prog, OP_ADDI, R_XVAL, cfg.xmin, R_ZERO, 0);
    emit(prog, OP_ADDI, R_ITLAST, cfg.max_iters - 1, R_ZERO, 0);
    emit(prog, OP_ADDI, R_ADDR, 0, R_ZERO, 0);
    emit(prog, OP_ADDI, R_X, 0, R_ZERO, 0);
    l_outer = prog.size();
    emit(prog, OP_ADDI, R_Y, 0, R_ZERO, 0);
    emit(prog, OP_ADDI, R_YVAL, cfg.ymin, R_ZERO, 0);
    l_inner = prog.size();
    // invariant: x0, y0, x0*x0 + y0*y0
    emit(prog, OP_LOAD,  SEL_C, 0, R_XVAL, 0);
    emit(prog, OP_WRITE, 1, 0, 1, 0);
    emit(prog, OP_LOAD,  SEL_C, cfg.dy, R_YVAL, 0);
    emit(prog, OP_WRITE, 1, 0, 1, 0);
    emit(prog, OP_LOAD,  SEL_A, 0, R_XVAL, 0);
    emit(prog, OP_LOAD,  SEL_B, 0, R_XVAL, 0);
    emit(prog, OP_WRITE, 1, 0, 0, 0);
    emit(prog, OP_LOAD,  SEL_A, cfg.dy, R_YVAL, 0);
    emit(prog, OP_LOAD,  SEL_B, cfg.dy, R_YVAL, 0);
    emit(prog, OP_WRITE, 0, 0, 1, 0);
    emit(prog, OP_ADDI,  R_ITERS, 0, R_ZERO, 0);
    l_iter = prog.size();
    // x' = x*x - y*y + x0
    emit(prog, OP_LOADB, SH_X, 0, SH_X, SH_ZERO);
    emit(prog, OP_LOAD,  SEL_C, 0, R_XVAL, 0);
    emit(prog, OP_WRITE, 1, 0, 0, 0);
    emit(prog, OP_LOADB, SH_NEGY, 0, SH_Y, SH_ZERO);
    emit(prog, OP_WRITE, 0, 0, 1, 0);
    // y' = 2*x*y + y0
    emit(prog, OP_LOADB, SH_2X, 0, SH_Y, SH_ZERO);
    emit(prog, OP_LOAD,  SEL_C, cfg.dy, R_YVAL, 0);
    emit(prog, OP_WRITE, 1, 0, 1, 0);
    // x*x + y*y
    emit(prog, OP_LOADB, SH_X, 0, SH_X, SH_ZERO);
    emit(prog, OP_WRITE, 1, 0, 0, 0);
    emit(prog, OP_LOADB, SH_Y, 0, SH_Y, SH_ZERO);
    emit(prog, OP_WRITE, 0, 0, 1, 0);
    emit(prog, OP_NOP,   0, 0, 0, 0);
    emit(prog, OP_OR,    R_ITERS, 0, 0, 0);
    emit(prog, OP_ADDI,  R_ITERS, 1, R_ITERS, 0);
    emit(prog, OP_BGE,   R_ITLAST, 0, R_ITERS, 0);
    emit(prog, OP_JUMP,  0, l_iter, 0, 0);
    // next 16 pixels down the column
    emit(prog, OP_SENDITERS, R_ADDR, 0, 0, 0);
    emit(prog, OP_ADDI,  R_ADDR, 1, R_ADDR, 0);
    emit(prog, OP_ADDI,  R_Y, 16, R_Y, 0);
    emit(prog, OP_ADDI,  R_YVAL, 16 * cfg.dy, R_YVAL, 0);
    emit(prog, OP_BGE,   R_YLAST, 0, R_Y, 0);
    emit(prog, OP_JUMP,  0, l_inner, 0, 0);
    // next column
    emit(prog, OP_ADDI,  R_XVAL, cfg.dx, R_XVAL, 0);
    emit(prog, OP_ADDI,  R_ADDR, (cfg.fb_height - cfg.rows) / 16, R_ADDR, 0);
    emit(prog, OP_ADDI,  R_X, 1, R_X, 0);
    emit(prog, OP_BGE,   R_XLAST, 0, R_X, 0);
    emit(prog, OP_JUMP,  0, l_outer, 0, 0);
    emit(prog, OP_FBSWAP, 0, 0, 0, 0);
    emit(prog, OP_PAUSE, 0, 0, 0, 0);
    emit(prog, OP_END,   0, 0, 0, 0);
  endfunction

  function automatic logic [15:0] fmul(logic [15:0] a, logic [15:0] b);
    int p;
    p = int'($signed(a)) * int'($signed(b));
    return 16'(p >>> 10);
  endfunction

  // 4-bit code the GPU should store for pixel (x, y); esc reports escape
  function automatic logic [3:0] ref_code(mandel_cfg_t cfg, int px, int py,
                                          output bit esc);
    logic [15:0] x0, y0, xv, yv, m, nx, ny, nm;
    int rec;
    x0 = 16'(cfg.xmin + px * cfg.dx);
    y0 = 16'(cfg.ymin + py * cfg.dy);
    xv = x0;
    yv = y0;
    m  = 16'(fmul(x0, x0) + fmul(y0, y0));
    rec = -1;
    for (int i = 0; i < cfg.max_iters; i++) begin
      nx = 16'(fmul(16'(-yv), yv) + 16'(fmul(xv, xv) + x0));
      ny = 16'(fmul(16'(xv << 1), yv) + y0);
      nm = 16'(fmul(yv, yv) + fmul(xv, xv));
      xv = nx; yv = ny; m = nm;
      if (rec < 0 && $signed(m) > $signed(16'h1000)) rec = i;
    end
    esc = (rec >= 0);
    if (rec < 0 || (rec >> cfg.shift) > 15) return 4'd15;
    return 4'(rec >> cfg.shift);
  endfunction

  function automatic logic [23:0] ref_rgb(logic [3:0] k);
    if (k == 4'd15) return 24'h0;
    return {8'(17 * k), 8'(17 * k), 8'(120 + 9 * k)};
  endfunction

endpackage
