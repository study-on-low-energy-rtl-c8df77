// es_xor: N-input XOR combining the entropy-source bits (4-bit XOR).
//
// XOR of N independent sources has bias 2^(N-1) * prod(e_i), so the result
// is dominated by the best source and a single badly mismatched latch can
// no longer pull the output away from 0.5. The document uses N = 4 after
// comparing 2, 4 and 8. Purely combinational.
module es_xor #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] es,
  output logic         xor_out
);

  assign xor_out = ^es;

endmodule
