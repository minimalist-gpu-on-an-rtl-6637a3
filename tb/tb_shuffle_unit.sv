// tb_shuffle_unit: exhaustive test of the LOADB shuffle of one FMA.
// For random previous outputs and every source/mode pair of each operand,
// compares A, B and C with an independent model of pick, double and negate.
module tb_shuffle_unit;
  import gpu_pkg::*;

  logic clk = 0;
  logic [47:0] prev;
  shuf_code_t ca, cb, cc;
  logic [47:0] abc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  shuffle_unit dut (.prev, .code_a(ca), .code_b(cb), .code_c(cc), .abc);

  function automatic logic [15:0] model(logic [47:0] p, logic [3:0] code);
    logic [15:0] v;
    v = (code[1:0] == 2'd3) ? 16'd0 : p[16*code[1:0] +: 16];
    if (code[3:2] == 2'd1) v = 16'(v * 2);
    else if (code[3:2] == 2'd2) v = 16'(0 - v);
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      prev = {16'($urandom), 16'($urandom), 16'($urandom)};
      if (n == 0) prev = {16'h8000, 16'h7fff, 16'h0001};
      for (int k = 0; k < 12; k++) begin
        logic [3:0] xa, xb, xc;
        xa = 4'(k); xb = 4'((k + 5) % 12); xc = 4'((k + 7) % 12);
        ca = shuf_code_t'(xa); cb = shuf_code_t'(xb); cc = shuf_code_t'(xc);
        @(negedge clk);
        checks += 3;
        if (abc[15:0]  !== model(prev, xa)) begin failures++; $display("FAIL A code %h", xa); end
        if (abc[31:16] !== model(prev, xb)) begin failures++; $display("FAIL B code %h", xb); end
        if (abc[47:32] !== model(prev, xc)) begin failures++; $display("FAIL C code %h", xc); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
