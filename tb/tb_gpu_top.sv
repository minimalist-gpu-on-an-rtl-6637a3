// tb_gpu_top: end-to-end test of the whole GPU.
//
// 1. Loads the Mandelbrot program (a 10 x 32 pixel window that holds both
//    escaping and bounded points), runs it until its PAUSE, checks the cycle
//    count (two cycles per executed instruction), then reads every rendered
//    pixel back through the display port (frame buffer and colour table) and
//    compares it with an independent fixed-point model. Resumes to END.
// 2. Loads a program that multiplies three pairs of 4x4 fixed-point
//    matrices, one result element per FMA, with LOADI operands and chained
//    WRITEs, and checks the flushed results against a model.
// Counts how often each mechanism occurred (pause stall, taken jump, chained
// write, output-buffer flush, LOADB doubling and negation, LOAD with a
// per-FMA step, escape recorded by OR, SENDITERS, frame swap, LOADI) and
// counts a failure for any that never did.
module tb_gpu_top;
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

  gpu_top dut (.clk, .rst, .prog_we, .prog_addr, .prog_data, .start, .resume,
    .paused, .done, .disp_x, .disp_y, .disp_rgb, .front_frame,
    .dbg_sel, .dbg_value);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_pause, n_jump, n_chain, n_flush, n_x2, n_neg, n_step, n_escape,
      n_send, n_swap, n_loadi;
  initial begin
    n_pause = 0; n_jump = 0; n_chain = 0; n_flush = 0; n_x2 = 0; n_neg = 0;
    n_step = 0; n_escape = 0; n_send = 0; n_swap = 0; n_loadi = 0;
  end
  logic paused_q = 0;
  always @(posedge clk) if (!rst) begin
    instr_t mi;
    mi = dut.mem_instr;
    paused_q <= paused;
    if (paused && !paused_q) n_pause++;
    if (int'(dut.u_ctrl.state) == 2 && dut.u_ctrl.ir.op == OP_JUMP && dut.u_ctrl.compare_reg)
      n_jump++;
    if (dut.data_valid && !dut.use_new_c) n_chain++;
    if (dut.write_buffer_to_mem_valid) n_flush++;
    if (dut.mem_instr_valid) begin
      if (mi.op == OP_LOADB && (mi.reg_a[3:2] == 2'd1 || mi.reg_b[3:2] == 2'd1 || mi.reg_c[3:2] == 2'd1)) n_x2++;
      if (mi.op == OP_LOADB && (mi.reg_a[3:2] == 2'd2 || mi.reg_b[3:2] == 2'd2 || mi.reg_c[3:2] == 2'd2)) n_neg++;
      if (mi.op == OP_LOAD && mi.imm != 0) n_step++;
      if (mi.op == OP_LOADI) n_loadi++;
    end
    if (dut.pixel_batch_valid) n_send++;
    if (dut.frame_buffer_swap) n_swap++;
  end
  // escapes: rising bits of the per-FMA escape flags
  logic [15:0] esc_q = '0;
  always @(posedge clk) begin
    if (!rst) n_escape += $countones(dut.u_inbuf.escaped & ~esc_q);
    esc_q <= dut.u_inbuf.escaped;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_program(instr_t prog[$]);
    foreach (prog[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
  endtask

  // run from start until cond_paused (1) or done (0); return cycles
  task automatic run_until(bit want_pause, output int cycles);
    @(negedge clk);
    start = 1;
    cycles = 0;
    do begin @(negedge clk); start = 0; cycles++; end
    while (!(want_pause ? paused : done));
  endtask

  initial begin
    instr_t prog[$];
    mandel_cfg_t cfg;
    int cycles, n_instr, batches, n_esc_pix, n_in_pix;
    bit esc;

    repeat (3) @(negedge clk);
    rst = 0;

    // ---------------- Mandelbrot window ----------------
    cfg.xmin = -2048; cfg.dx = 256;      // x from -2.0 in steps of 0.25
    cfg.ymin = -1024; cfg.dy = 64;       // y from -1.0 in steps of 1/16
    cfg.cols = 10; cfg.rows = 32; cfg.max_iters = 63; cfg.fb_height = 320; cfg.shift = 2;
    build_program(prog, cfg);
    load_program(prog);
    run_until(1, cycles);
    batches = cfg.rows / 16;
    n_instr = 7 + cfg.cols * (2 + batches * (11 + cfg.max_iters * 17 + 6) + 5) + 2;
    check($sformatf("mandelbrot cycles %0d expected %0d", cycles, 2 * (n_instr - 1) + 3),
          cycles == 2 * (n_instr - 1) + 3);
    check("frame shown after swap", front_frame === 1'b1);
    // registers at the PAUSE checkpoint
    dbg_sel = R_X; #1 check("x counter at end", dbg_value === 16'(cfg.cols));
    dbg_sel = R_XVAL; #1 check("x_val at end", dbg_value === 16'(cfg.xmin + cfg.cols * cfg.dx));
    dbg_sel = R_ADDR; #1 check("batch address at end", dbg_value === 16'(cfg.cols * 20));
    // read every rendered pixel: colour three cycles after the address
    n_esc_pix = 0; n_in_pix = 0;
    for (int x = 0; x < cfg.cols; x++)
      for (int y = 0; y < cfg.rows; y++) begin
        logic [3:0] k;
        @(negedge clk);
        disp_x = 9'(x); disp_y = 9'(y);
        repeat (3) @(negedge clk);
        k = ref_code(cfg, x, y, esc);
        if (esc) n_esc_pix++; else n_in_pix++;
        check($sformatf("pixel %0d,%0d code %0d rgb %h", x, y, k, disp_rgb), disp_rgb === ref_rgb(k));
      end
    check("window has escaping and bounded pixels", n_esc_pix > 0 && n_in_pix > 0);
    check("escape count", n_escape == n_esc_pix);
    // resume after the pause
    repeat (5) @(negedge clk);
    check("stalled in pause", paused && !done);
    resume = 1; @(negedge clk); resume = 0;
    repeat (10) @(negedge clk);
    check("done after resume", done);

    // ---------------- 4x4 matrix products ----------------
    begin
      logic [15:0] ma [3][4][4], mb [3][4][4], mc [3][4][4];
      prog.delete();
      for (int p = 0; p < 3; p++)
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            ma[p][i][j] = 16'($signed(12'($urandom)));
            mb[p][i][j] = 16'($signed(12'($urandom)));
          end
      for (int p = 0; p < 3; p++) begin
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            logic [15:0] acc;
            acc = 0;
            for (int k = 0; k < 4; k++) acc = 16'(fmul(ma[p][i][k], mb[p][k][j]) + acc);
            mc[p][i][j] = acc;
          end
        for (int k = 0; k < 4; k++) begin
          for (int lane = 0; lane < 16; lane++) begin
            prog.push_back(make_instr(OP_ADDI, 4'd1, 16'(3 * lane), 4'd0, 4'd0));
            prog.push_back(make_instr(OP_LOADI, 4'd1, ma[p][lane / 4][k], 4'd0, 4'd0));
            prog.push_back(make_instr(OP_ADDI, 4'd1, 16'(3 * lane + 1), 4'd0, 4'd0));
            prog.push_back(make_instr(OP_LOADI, 4'd1, mb[p][k][lane % 4], 4'd0, 4'd0));
          end
          prog.push_back(make_instr(OP_WRITE, (k == 0) ? 4'd1 : 4'd0, 16'd0,
                                    (k == 3) ? 4'd1 : 4'd0, 4'd0));
        end
      end
      prog.push_back(make_instr(OP_NOP, 0, 0, 0, 0));
      prog.push_back(make_instr(OP_END, 0, 0, 0, 0));
      check("matmul program fits", prog.size() <= 1024);
      load_program(prog);
      run_until(0, cycles);
      check($sformatf("matmul cycles %0d", cycles), cycles == 2 * (prog.size() - 1) + 3);
      repeat (4) @(negedge clk);
      for (int p = 0; p < 3; p++)
        for (int lane = 0; lane < 16; lane++)
          check($sformatf("matmul %0d lane %0d", p, lane),
                dut.u_inbuf.write_buf[3 * lane + p] === mc[p][lane / 4][lane % 4]);
    end

    // ---------------- mechanisms seen ----------------
    $display("mechanisms: pause=%0d jump=%0d chain=%0d flush=%0d x2=%0d neg=%0d step=%0d escape=%0d send=%0d swap=%0d loadi=%0d",
             n_pause, n_jump, n_chain, n_flush, n_x2, n_neg, n_step, n_escape, n_send, n_swap, n_loadi);
    check("pause stall happened", n_pause > 0);
    check("taken jump happened", n_jump > 0);
    check("chained write happened", n_chain > 0);
    check("output flush happened", n_flush > 0);
    check("loadb doubling happened", n_x2 > 0);
    check("loadb negation happened", n_neg > 0);
    check("load with step happened", n_step > 0);
    check("escape recorded", n_escape > 0);
    check("senditers happened", n_send == cfg.cols * cfg.rows / 16);
    check("frame swap happened", n_swap == 1);
    check("loadi happened", n_loadi == 3 * 4 * 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
