// shuffle_unit: the LOADB shuffle of one FMA's operands.
//
// prev holds the FMA's last three outputs (word 0 is the first of the round
// of three, word 2 the last). For each of A, B and C a 4-bit shuffle code
// picks one of those words or zero, and passes it unchanged, doubled
// (shift left, wrapping) or negated (two's complement). One LOADB thus
// permutes the previous results, which is how the Mandelbrot loop forms
// x*x, -y*y and 2x*y. That outputs may be permuted, doubled or negated is
// the original design's; the code layout (gpu_pkg::shuf_code_t) and the
// zero source are this design's choice. Purely combinational.
module shuffle_unit
  import gpu_pkg::*;
(
  input  logic [3*WORD_W-1:0] prev,   // {out2, out1, out0}
  input  shuf_code_t          code_a,
  input  shuf_code_t          code_b,
  input  shuf_code_t          code_c,
  output logic [3*WORD_W-1:0] abc     // {C, B, A}
);

  function automatic fixed_t pick(logic [3*WORD_W-1:0] p, shuf_code_t code);
    fixed_t v;
    unique case (code.src)
      SRC_OUT0: v = fixed_t'(p[0*WORD_W +: WORD_W]);
      SRC_OUT1: v = fixed_t'(p[1*WORD_W +: WORD_W]);
      SRC_OUT2: v = fixed_t'(p[2*WORD_W +: WORD_W]);
      default:  v = '0;
    endcase
    case (code.mode)
      MODE_X2:  v = v <<< 1;
      MODE_NEG: v = -v;
      default:  ;
    endcase
    return v;
  endfunction

  always_comb begin
    abc[0*WORD_W +: WORD_W] = pick(prev, code_a);
    abc[1*WORD_W +: WORD_W] = pick(prev, code_b);
    abc[2*WORD_W +: WORD_W] = pick(prev, code_c);
  end

endmodule
