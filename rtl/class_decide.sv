// class_decide: the classification rule applied to the output neuron,
//   OUT <= 1.5 -> F (fusion), 1.5 < OUT <= 2.5 -> V (PVC), 2.5 < OUT -> N.
//
// Combinational. The single-precision value is mapped to an unsigned key that
// orders like the real numbers (sign bit set: all bits inverted; clear: sign
// bit set), and the key is compared with the keys of 1.5 and 2.5. -0 and +0
// both fall in F. A NaN is not "<= 1.5" nor "<= 2.5" and so is read as N.
//
// The thresholds are the document's; carrying out the rule in hardware, the
// class encoding and the NaN reading are this design's choices.
module class_decide
  import fp_pkg::*;
(
  input  fp32_t       out_val,
  output beat_class_e beat_class
);

  function automatic logic [31:0] order_key(input fp32_t v);
    return v[31] ? ~v : {1'b1, v[30:0]};
  endfunction

  logic is_nan;

  always_comb begin
    is_nan = (out_val[30:23] == 8'hFF) && (out_val[22:0] != '0);
    if (!is_nan && order_key(out_val) <= order_key(FP_1P5))      beat_class = CLASS_F;
    else if (!is_nan && order_key(out_val) <= order_key(FP_2P5)) beat_class = CLASS_V;
    else                                                         beat_class = CLASS_N;
  end

endmodule
