// ahsd_to_bin -- AHSD(r) to binary converter, r = 2^M (radix 4 by default).
//
// Converts Q AHSD(r) digits S_j in -1..r-1 into the equivalent MQ-bit
// binary number in two stages:
//   1. A radix-r carry-lookahead stage turns every digit into a plain
//      radix-r digit S_j+ in 0..r-1. A -1 digit must borrow from the digit
//      above, so this is a subtraction of the "-1 positions" from the
//      non-negative digits. Each digit either generates a borrow (S_j = -1),
//      propagates an incoming borrow (S_j = 0) or absorbs it (S_j >= 1).
//      The borrows into all positions are computed by a Kogge-Stone parallel
//      prefix over (generate, propagate) pairs, ceil(log2 Q) levels deep,
//      and S_j+ = (S_j - b_j) mod r.
//   2. The decoder emits the M bits of S_j+ as bits s[Mj+M-1 : Mj] (for
//      radix 4, the quaternary-to-binary decoder: (s[2j+1], s[2j]) = S_j+).
// This is the only stage of the AHSD datapath with a carry chain; the
// lookahead keeps its depth logarithmic in the number of digits. The choice
// of a Kogge-Stone prefix network is this design's own; the two-stage
// structure follows the original radix-4 converter; other radices are a
// generalisation.
//
// Interface: digits[Q] ((M+1)-bit two's complement) in; bin[MQ-1:0] out
// and neg, set when a borrow leaves the top digit (the AHSD value was
// negative; bin is then the value mod r^Q). Combinational. Bits bin[M-1:0]
// are digit 0's low bits unchanged, since no borrow enters digit 0.
module ahsd_to_bin #(
  parameter int unsigned Q = 5,
  parameter int unsigned M = 2
) (
  input  logic signed [M:0] digits [Q],
  output logic [M*Q-1:0]    bin,
  output logic              neg
);

  localparam int unsigned LEVELS = (Q > 1) ? $clog2(Q) : 1;

  logic [Q:0] borrow;     // borrow[j] goes into digit j

  // Kogge-Stone prefix. After level l, gen[j] / prp[j] are the group
  // generate / propagate of digits max(0, j-2^l+1) .. j.
  always_comb begin : prefix
    logic [Q-1:0] gen, prp, gen_n, prp_n;
    for (int j = 0; j < Q; j++) begin
      gen[j] = (digits[j] == '1);
      prp[j] = (digits[j] == '0);
    end
    for (int l = 0; l < LEVELS; l++) begin
      for (int j = 0; j < Q; j++) begin
        if (j >= (1 << l)) begin
          gen_n[j] = gen[j] | (prp[j] & gen[j-(1<<l)]);
          prp_n[j] = prp[j] & prp[j-(1<<l)];
        end else begin
          gen_n[j] = gen[j];
          prp_n[j] = prp[j];
        end
      end
      gen = gen_n;
      prp = prp_n;
    end
    // No borrow enters the least significant digit.
    borrow = {gen, 1'b0};
  end

  // Radix-r digit correction (mod r) and decoding into M bits per digit.
  for (genvar j = 0; j < Q; j++) begin : g_dec
    assign bin[M*j +: M] = digits[j][M-1:0] - M'(borrow[j]);
  end

  assign neg = borrow[Q];

endmodule
