// ahsd_cpf_cell -- one digit slice of the AHSD(r) carry-propagation-free
// adder, r = 2^M (radix 4 by default).
//
// The slice performs the three steps of AHSD addition for digit position j:
//   IIS  Z_j = X_j + Y_j                          (Z_j in -1 .. 2(r-1))
//   SA   Z_j = r*C_j + mu_j, with C_j = 1 when Z_j >= r, or when Z_j = r-1
//        and the neighbour below has Z_{j-1} >= r-1; otherwise C_j = 0.
//   AM   S_j = mu_j + C_{j-1}                     (S_j in -1 .. r-1)
// The decision uses two threshold detectors, TD(r-1) giving
// A_j = (Z_j < r-1) and TD(r) giving (Z_j < r). A_j is also sent to the
// slice above, which needs it as its A_{j-1}. The look at the lower
// neighbour is what keeps S_j within the digit set: a slice that keeps
// mu_j = r-1 only does so when the slice below cannot send a carry. No
// signal crosses more than one digit position, so the adder's delay does
// not depend on its width.
//
// X_j must be >= 0 (a digit freshly converted from binary); Y_j may be -1.
// The conversion rule is the number system's; how the TD outputs are
// combined into the carry flag F is written from that rule (the original
// is a current-mode circuit whose gates are not reproduced).
//
// Interface: x, y digits ((M+1)-bit two's complement), a_prev = A_{j-1},
// c_prev = C_{j-1} in; a = A_j, c = C_j, s = S_j out. Combinational.
module ahsd_cpf_cell #(
  parameter int unsigned M = 2
) (
  input  logic signed [M:0] x,
  input  logic signed [M:0] y,
  input  logic              a_prev,
  input  logic              c_prev,
  output logic              a,
  output logic              c,
  output logic signed [M:0] s
);

  localparam int R = 1 << M;
  typedef logic signed [M+1:0] z_t;   // holds -1 .. 2(r-1)

  z_t   z;      // internal individual summation
  logic ltr;    // TD(r): Z_j < r
  logic f;      // carry flag F = C_j
  z_t   mu;     // intermediate sum digit

  assign z = z_t'(x) + z_t'(y);

  ahsd_td #(.K(R-1), .W(M+2)) u_td_rm1 (.z(z), .a(a));
  ahsd_td #(.K(R),   .W(M+2)) u_td_r   (.z(z), .a(ltr));

  // Z_j >= r always carries; Z_j = r-1 carries when the lower neighbour's
  // sum is also >= r-1 (A_{j-1} = 0).
  assign f  = !ltr || (!a && !a_prev);
  assign c  = f;
  // The radix is subtracted when F is set (the r*I current source).
  assign mu = z - (f ? z_t'(R) : z_t'(0));
  // Adjacent modification.
  assign s  = (M+1)'(mu + z_t'(c_prev));

endmodule
