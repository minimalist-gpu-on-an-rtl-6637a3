// tb_frame_buffer: self-checking test of the dual frame buffer at 320x320.
// Fills the back frame with random pixel batches, checks that the shown
// frame is untouched until the swap, then reads every pixel of the new front
// frame (two-cycle read) and checks it against the written codes.
module tb_frame_buffer;
  localparam int W = 320, H = 320, N = 16, B = W * H / N;

  logic clk = 0, rst = 1;
  logic [12:0] addr = 0;
  logic [63:0] batch = 0;
  logic valid = 0, swap = 0;
  logic [8:0] rd_x = 0, rd_y = 0;
  logic [3:0] rd_code;
  logic front;
  logic [63:0] model [2][B];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  frame_buffer #(.WIDTH(W), .HEIGHT(H), .NUM_FMA(N)) dut (.clk, .rst,
    .pixel_batch_addr(addr), .pixel_batch(batch), .pixel_batch_valid(valid),
    .frame_buffer_swap(swap), .rd_x, .rd_y, .rd_code, .front);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic logic [3:0] expect_code(int f, int x, int y);
    return model[f][x * (H / N) + y / N][4 * (y % N) +: 4];
  endfunction

  // read pixels on a pipelined stream and compare (data two cycles later)
  task automatic read_frame(int f, int step);
    int hx [3], hy [3];
    int n;
    n = 0;
    for (int x = 0; x < W; x += step)
      for (int y = 0; y < H; y++) begin
        rd_x = 9'(x); rd_y = 9'(y);
        hx[2] = hx[1]; hy[2] = hy[1]; hx[1] = hx[0]; hy[1] = hy[0]; hx[0] = x; hy[0] = y;
        @(negedge clk);
        n++;
        if (n >= 2) check($sformatf("pixel %0d,%0d", hx[1], hy[1]),
                          rd_code === expect_code(f, hx[1], hy[1]));
      end
  endtask

  task automatic fill(int f);
    for (int a = 0; a < B; a++) begin
      @(negedge clk);
      addr = 13'(a); batch = {$urandom, $urandom}; valid = 1;
      model[f][a] = batch;
    end
    @(negedge clk);
    valid = 0;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    check("front 0 after reset", front === 1'b0);
    fill(1);                       // back frame is 1
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    check("front 1 after swap", front === 1'b1);
    read_frame(1, 1);
    fill(0);                       // back frame is now 0
    read_frame(1, 7);              // shown frame unchanged while writing the other
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    check("front 0 after second swap", front === 1'b0);
    read_frame(0, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
