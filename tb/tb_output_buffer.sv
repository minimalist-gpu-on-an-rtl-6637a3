// tb_output_buffer: self-checking test of the three-round output buffer.
// Sends rounds of 16 outputs with random gaps and checks that exactly every
// third round produces one flush, one cycle later, with round k of lane i
// in word 3i+k, and nothing in between.
module tb_output_buffer;
  localparam int N = 16;

  logic clk = 0, rst = 1;
  logic [16*N-1:0] fma_out = '0;
  logic fma_out_valid = 0;
  logic [48*N-1:0] wb;
  logic wb_valid;
  int checks = 0, failures = 0;
  int flushes = 0;

  always #5 clk = ~clk;

  output_buffer #(.NUM_FMA(N)) dut (.clk, .rst, .fma_out, .fma_out_valid,
    .write_buffer_to_mem(wb), .write_buffer_to_mem_valid(wb_valid));

  always @(posedge clk) if (wb_valid) flushes++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [48*N-1:0] expected;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 30; t++) begin
      for (int k = 0; k < 3; k++) begin
        for (int i = 0; i < N; i++) begin
          fma_out[16*i +: 16] = 16'($urandom);
          expected[16*(3*i+k) +: 16] = fma_out[16*i +: 16];
        end
        fma_out_valid = 1;
        @(negedge clk);
        fma_out_valid = 0;
        checks++;
        if (wb_valid !== (k == 2)) begin failures++; $display("FAIL flush timing t=%0d k=%0d", t, k); end
        if (k == 2) begin
          checks++;
          if (wb !== expected) begin failures++; $display("FAIL flush data t=%0d", t); end
        end
        repeat ($urandom % 3) begin
          @(negedge clk);
          checks++;
          if (wb_valid !== 1'b0) begin failures++; $display("FAIL spurious flush"); end
        end
      end
    end
    checks++;
    if (flushes != 30) begin failures++; $display("FAIL flush count %0d", flushes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
