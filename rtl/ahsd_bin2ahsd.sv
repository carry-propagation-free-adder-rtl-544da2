// ahsd_bin2ahsd -- binary to AHSD(r) converter, r = 2^M (radix 4 by default).
//
// An N-bit unsigned binary number is split, from the LSB upward, into M-bit
// blocks; block j becomes the radix-r digit X_j = sum_k x[Mj+k] * 2^k. For
// radix 4 this is X_j = 2*x[2j+1] + x[2j], the weighted sum formed by the
// original current-mode encoder (a unit current switched by x[2j] and a
// double current switched by x[2j+1], summed on one wire); here it is
// integer arithmetic on the digit word. Every digit produced lies in
// 0..r-1, so the result is a valid "non-negative" operand for the
// carry-propagation-free adder. The generalisation to any M follows the
// number system's definition; radix 4 is the worked configuration.
//
// Interface: bin[N-1:0] in, digits[N/M] out (digits[0] least significant),
// each an (M+1)-bit two's-complement digit. Combinational. N must be a
// multiple of M.
module ahsd_bin2ahsd #(
  parameter int unsigned N = 8,
  parameter int unsigned M = 2
) (
  input  logic [N-1:0]      bin,
  output logic signed [M:0] digits [N/M]
);

  initial assert (M >= 1 && N % M == 0) else $error("ahsd_bin2ahsd: N must be a multiple of M");

  for (genvar j = 0; j < N/M; j++) begin : g_digit
    // Sum of the block's bits, bit k weighted 2^k.
    always_comb begin : weigh
      logic signed [M:0] acc;
      acc = '0;
      for (int k = 0; k < int'(M); k++)
        if (bin[M*j+k]) acc = acc + ((M+1)'(1) << k);
      digits[j] = acc;
    end
  end

endmodule
