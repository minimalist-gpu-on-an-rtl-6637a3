// tb_gpu_full: renders one complete 320 x 320 Mandelbrot frame on the GPU at
// its default parameters, with the window of the original demonstration
// (x from -1.875, y from -1.25, steps of 0.0078125, 63 iterations).
// Checks the cycle count of the frame, then reads all 102,400 pixels back
// through the display port and compares each colour with an independent
// fixed-point model. Prints the frame time at the 74.25 MHz pixel clock.
module tb_gpu_full;
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

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t prog[$];
    mandel_cfg_t cfg;
    int cycles, n_instr, n_esc;
    bit esc;
    logic [3:0] codes [320][320];

    cfg.xmin = -1920; cfg.dx = 8;     // -1.875, 0.0078125
    cfg.ymin = -1280; cfg.dy = 8;     // -1.25,  0.0078125
    cfg.cols = 320; cfg.rows = 320; cfg.max_iters = 63; cfg.fb_height = 320; cfg.shift = 2;
    build_program(prog, cfg);

    repeat (3) @(negedge clk);
    rst = 0;
    foreach (prog[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
    start = 1;
    cycles = 0;
    do begin @(negedge clk); start = 0; cycles++; end while (!paused);
    n_instr = 7 + 320 * (2 + 20 * (11 + 63 * 17 + 6) + 5) + 2;
    $display("frame: %0d cycles, %0.3f s at 74.25 MHz", cycles, real'(cycles) / 74.25e6);
    check($sformatf("frame cycles %0d", cycles), cycles == 2 * (n_instr - 1) + 3);
    check("frame shown", front_frame === 1'b1);

    n_esc = 0;
    for (int x = 0; x < 320; x++)
      for (int y = 0; y < 320; y++) begin
        codes[x][y] = ref_code(cfg, x, y, esc);
        if (esc) n_esc++;
      end
    // pipelined read-out: colour of the address of cycle t at cycle t+3
    for (int n = 0; n < 320 * 320 + 3; n++) begin
      if (n < 320 * 320) begin
        disp_x = 9'(n / 320); disp_y = 9'(n % 320);
      end
      @(negedge clk);
      if (n >= 2) begin
        int m;
        m = n - 2;
        check($sformatf("pixel %0d,%0d", m / 320, m % 320),
              disp_rgb === ref_rgb(codes[m / 320][m % 320]));
      end
      if (n == 320 * 320 + 1) break;
    end
    check("frame has escaping and bounded pixels", n_esc > 0 && n_esc < 320 * 320);
    resume = 1; @(negedge clk); resume = 0;
    repeat (10) @(negedge clk);
    check("done", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
