// tb_color_lut: checks all sixteen colour entries: code 15 black, the
// others a gradient that gets brighter with the code, with the one-cycle
// registered output.
module tb_color_lut;
  logic clk = 0;
  logic [3:0] code = 0;
  logic [23:0] rgb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  color_lut dut (.clk, .code, .rgb);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] exp_v;
    int prev_sum;
    prev_sum = -1;
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      code = 4'(k);
      @(negedge clk);
      exp_v = (k == 15) ? 24'h0 : {8'(17 * k), 8'(17 * k), 8'(120 + 9 * k)};
      checks++;
      if (rgb !== exp_v) begin failures++; $display("FAIL code %0d: %h", k, rgb); end
      if (k < 15) begin
        checks++;
        if (int'(rgb[23:16]) + int'(rgb[15:8]) + int'(rgb[7:0]) <= prev_sum) begin
          failures++; $display("FAIL gradient not brighter at %0d", k);
        end
        prev_sum = int'(rgb[23:16]) + int'(rgb[15:8]) + int'(rgb[7:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
