// tb_fma: self-checking test of one fused multiply-add unit.
// Checks (A*B)>>>10 + C against an independent integer model for random and
// corner operands, the replace_c chaining of a dot product, the
// output_can_be_valid gating and the one-cycle latency.
module tb_fma;
  import gpu_pkg::*;

  logic clk = 0, rst = 1;
  logic data_valid = 0, replace_c = 0, ocv = 0;
  fixed_t a = 0, b = 0, c = 0;
  logic [15:0] out;
  logic out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fma dut (.clk, .rst, .data_valid, .a, .b, .c, .replace_c,
           .output_can_be_valid(ocv), .out, .out_valid);

  function automatic logic [15:0] model(int ai, int bi, int ci);
    int p;
    p = (ai * bi) >>> 10;
    return 16'(p + ci);
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Present one write, then sample the result one cycle later.
  task automatic do_write(fixed_t ta, fixed_t tb_, fixed_t tc, logic rc, logic ov);
    @(negedge clk);
    a = ta; b = tb_; c = tc; replace_c = rc; ocv = ov; data_valid = 1;
    @(negedge clk);
    data_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_v;
    int acc;
    repeat (3) @(negedge clk);
    rst = 0;
    // single products: random and corners
    for (int n = 0; n < 300; n++) begin
      fixed_t ra, rb, rc;
      ra = fixed_t'($urandom); rb = fixed_t'($urandom); rc = fixed_t'($urandom);
      if (n == 0) begin ra = 16'h8000; rb = 16'h8000; rc = 16'h7fff; end
      if (n == 1) begin ra = 16'hFB00; rb = 16'h0400; rc = 0; end   // -1.25 * 1.0
      if (n < 100) begin ra = ra >>> 4; rb = rb >>> 4; end
      do_write(ra, rb, rc, 1, 1);
      exp_v = model(int'(ra), int'(rb), int'(rc));
      check("single out_valid", out_valid === 1'b1);
      check($sformatf("single %h*%h+%h=%h got %h", ra, rb, rc, exp_v, out), out === exp_v);
    end
    // -1.25 * 1.0 = -1.25 exactly
    do_write(16'hFB00, 16'h0400, 0, 1, 1);
    check("-1.25*1.0", out === 16'hFB00);
    // idle cycle: no valid
    @(negedge clk);
    check("valid drops", out_valid === 1'b0);
    // dot products of length 2..5 with chaining
    for (int n = 0; n < 40; n++) begin
      int len;
      len = 2 + (n % 4);
      acc = 0;
      for (int k = 0; k < len; k++) begin
        fixed_t ra, rb, rc;
        ra = fixed_t'($urandom) >>> 5; rb = fixed_t'($urandom) >>> 5;
        rc = (k == 0) ? fixed_t'($urandom) >>> 3 : fixed_t'($urandom);
        do_write(ra, rb, rc, k == 0, k == len - 1);
        acc = int'(model(int'(ra), int'(rb), (k == 0) ? int'(rc) : int'($signed(16'(acc)))));
        if (k != len - 1) check("chain hides partial", out_valid === 1'b0);
      end
      check("chain valid", out_valid === 1'b1);
      check($sformatf("chain len %0d", len), out === 16'(acc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
