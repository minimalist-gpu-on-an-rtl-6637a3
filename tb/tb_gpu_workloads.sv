// tb_gpu_workloads: the GPU on the two workloads besides the full frame.
//
// 1. 2x2 matrix products: FMA lane 2i+j computes element (i, j) of A*B as a
//    chain of two multiply-adds; three products (A*B, B*A, A*A) fill the
//    three output rounds so the output buffer flushes, and the results are
//    compared with a fixed-point model.
// 2. Mandelbrot with 127 iterations and the matching colour mapping
//    (iteration count >> 3, ITER_SHIFT = 3) on a 6 x 16 pixel window around
//    the boundary of the set, checked pixel by pixel through the display port.
module tb_gpu_workloads;
  import gpu_pkg::*;
  import mandel_pkg::*;

  logic clk = 0, rst = 1;
  logic prog_we = 0;
  logic [9:0] prog_addr = 0;
  logic [31:0] prog_data = 0;
  logic start = 0, resume = 0, paused, done;
  logic [8:0] disp_x = 0, disp_y = 0;
  logic [23:0] disp_rgb;
  logic front_frame;
  logic [3:0] dbg_sel = 0;
  logic [15:0] dbg_value;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gpu_top #(.ITER_SHIFT(3)) dut (.clk, .rst, .prog_we, .prog_addr, .prog_data,
    .start, .resume, .paused, .done, .disp_x, .disp_y, .disp_rgb, .front_frame,
    .dbg_sel, .dbg_value);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic load_and_run(instr_t prog[$], bit want_pause);
    foreach (prog[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 0; start = 1;
    do begin @(negedge clk); start = 0; end while (!(want_pause ? paused : done));
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t prog[$];
    mandel_cfg_t cfg;
    logic [15:0] m [2][2][2];      // m[0] = A, m[1] = B
    logic [15:0] res [3][2][2];
    int pairs [3][2];
    bit esc;
    int n_esc;
    pairs = '{'{0, 1}, '{1, 0}, '{0, 0}};

    repeat (3) @(negedge clk);
    rst = 0;

    // ---------------- 2x2 matrix products ----------------
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) m[s][i][j] = 16'($signed(13'($urandom)));
    m[0][0][0] = 16'h0400; m[0][0][1] = 16'h0800;   // A = [1 2; 3 4]
    m[0][1][0] = 16'h0C00; m[0][1][1] = 16'h1000;
    for (int p = 0; p < 3; p++) begin
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++)
          res[p][i][j] = 16'(fmul(m[pairs[p][0]][i][1], m[pairs[p][1]][1][j])
                           + fmul(m[pairs[p][0]][i][0], m[pairs[p][1]][0][j]));
      for (int k = 0; k < 2; k++) begin
        for (int lane = 0; lane < 4; lane++) begin
          prog.push_back(make_instr(OP_ADDI, 4'd1, 16'(3 * lane), 4'd0, 4'd0));
          prog.push_back(make_instr(OP_LOADI, 4'd1, m[pairs[p][0]][lane / 2][k], 4'd0, 4'd0));
          prog.push_back(make_instr(OP_ADDI, 4'd1, 16'(3 * lane + 1), 4'd0, 4'd0));
          prog.push_back(make_instr(OP_LOADI, 4'd1, m[pairs[p][1]][k][lane % 2], 4'd0, 4'd0));
        end
        prog.push_back(make_instr(OP_WRITE, (k == 0) ? 4'd1 : 4'd0, 16'd0,
                                  (k == 1) ? 4'd1 : 4'd0, 4'd0));
      end
    end
    prog.push_back(make_instr(OP_NOP, 0, 0, 0, 0));
    prog.push_back(make_instr(OP_END, 0, 0, 0, 0));
    load_and_run(prog, 0);
    repeat (4) @(negedge clk);
    // [1 2; 3 4]^2 = [7 10; 15 22]
    check("A*A (0,0) = 7", dut.u_inbuf.write_buf[2] === 16'(7 * 1024));
    check("A*A (1,1) = 22", dut.u_inbuf.write_buf[3 * 3 + 2] === 16'(22 * 1024));
    for (int p = 0; p < 3; p++)
      for (int lane = 0; lane < 4; lane++)
        check($sformatf("2x2 product %0d element %0d", p, lane),
              dut.u_inbuf.write_buf[3 * lane + p] === res[p][lane / 2][lane % 2]);

    // ---------------- Mandelbrot, 127 iterations ----------------
    cfg.xmin = -800; cfg.dx = 24;        // around -0.78 .. -0.64
    cfg.ymin = 96;   cfg.dy = 8;         // around 0.09 .. 0.21
    cfg.cols = 6; cfg.rows = 16; cfg.max_iters = 127; cfg.fb_height = 320; cfg.shift = 3;
    build_program(prog, cfg);
    load_and_run(prog, 1);
    n_esc = 0;
    for (int x = 0; x < cfg.cols; x++)
      for (int y = 0; y < cfg.rows; y++) begin
        logic [3:0] k;
        @(negedge clk);
        disp_x = 9'(x); disp_y = 9'(y);
        repeat (3) @(negedge clk);
        k = ref_code(cfg, x, y, esc);
        if (esc && k != 4'd15) n_esc++;
        check($sformatf("pixel %0d,%0d code %0d", x, y, k), disp_rgb === ref_rgb(k));
      end
    check("coloured escapes in window", n_esc > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
