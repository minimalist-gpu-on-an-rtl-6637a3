// tb_fma_array: self-checking test of the 16-lane FMA array.
// Drives random 768-bit operand words and checks every lane's result, the
// lane-to-triplet mapping, chaining across all lanes and one-cycle latency.
module tb_fma_array;
  import gpu_pkg::*;
  localparam int N = 16;

  logic clk = 0, rst = 1;
  logic [3*16*N-1:0] data = '0;
  logic data_valid = 0, use_new_c = 0, fov = 0;
  logic [16*N-1:0] fma_out;
  logic fma_out_valid;
  int checks = 0, failures = 0;
  int acc [N];

  always #5 clk = ~clk;

  fma_array #(.NUM_FMA(N)) dut (.clk, .rst, .data, .data_valid, .use_new_c,
    .fma_output_valid(fov), .fma_out, .fma_out_valid);

  function automatic int fmul(int x, int y);
    return (x * y) >>> 10;
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 60; n++) begin
      logic rc, ov;
      rc = (n % 3 == 0); ov = (n % 3 == 2);
      for (int w = 0; w < 3*N; w++) data[16*w +: 16] = 16'($urandom) >> 4;
      // lane i: A = word 3i, B = 3i+1, C = 3i+2
      for (int i = 0; i < N; i++) begin
        int ai, bi, ci, base;
        ai = int'($signed(data[16*(3*i) +: 16]));
        bi = int'($signed(data[16*(3*i+1) +: 16]));
        ci = int'($signed(data[16*(3*i+2) +: 16]));
        base = rc ? ci : acc[i];
        acc[i] = int'($signed(16'(fmul(ai, bi) + base)));
      end
      @(negedge clk);
      use_new_c = rc; fov = ov; data_valid = 1;
      @(negedge clk);
      data_valid = 0;
      check("valid", fma_out_valid === ov);
      if (ov)
        for (int i = 0; i < N; i++)
          check($sformatf("lane %0d", i), fma_out[16*i +: 16] === 16'(acc[i]));
      @(negedge clk);
      check("valid one cycle", fma_out_valid === 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
