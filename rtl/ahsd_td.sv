// ahsd_td -- threshold detector TD(K).
//
// Compares a digit sum Z with the constant K and reports A = 1 when Z < K and
// A = 0 when Z >= K, the definition of the threshold detector used in the
// self-adjustment stage of the AHSD adder (TD(r-1) and TD(r) there, TD(3)
// and TD(4) for radix 4). The original is a current comparator; here it is
// a signed comparison of the binary-coded digit sum.
//
// Interface: z (signed digit sum, W bits) in, a out. Combinational.
module ahsd_td #(
  parameter int          K = 3,
  parameter int unsigned W = 4
) (
  input  logic signed [W-1:0] z,
  output logic                a
);

  assign a = (int'(z) < K);

endmodule
