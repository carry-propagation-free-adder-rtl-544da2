// ahsd_pp_gen -- partial products of the AHSD(4) array multiplier.
//
// Forms the N x N partial-product bits p_ij = x_i AND y_j and regroups each
// partial-product row P_j = (p_{N-1,j} .. p_{0,j}), shifted left by j
// places, into AHSD(4) digits: digit k of row j is
//     pp[j][k] = 2*b(2k+1) + b(2k),   b(t) = p_{t-j, j} for 0 <= t-j < N, else 0.
// Row 0 is the operand Y^0 of the first adder row, rows 1..N-1 are X^1..X^(N-1).
// For odd j the lowest digit of a row holds one bit only (2*p_{0,j}), and
// for odd j the highest one holds p_{N-1,j} alone. All digits are in 0..3,
// so every row is a valid non-negative operand for the CPF adder.
//
// The full N x N digit grid is brought out for regular indexing; digits
// outside a row's span and the sign bit of every digit are constant 0 and
// vanish in synthesis.
//
// Interface: x[N-1:0], y[N-1:0] in; pp[N][N] digits out (pp[j][k], digit k
// of row j; digits outside the row's span are 0). Combinational.
module ahsd_pp_gen
  import ahsd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output digit_t       pp [N][N]
);

  initial assert (N % 2 == 0) else $error("ahsd_pp_gen: N must be even");

  // Bit t of row j after the shift by j places.
  function automatic logic row_bit(logic [N-1:0] xv, logic yj, int j, int t);
    if (t - j >= 0 && t - j < int'(N)) return xv[t-j] & yj;
    return 1'b0;
  endfunction

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar k = 0; k < N; k++) begin : g_dig
      logic lo, hi;
      assign lo = row_bit(x, y[j], j, 2*k);
      assign hi = row_bit(x, y[j], j, 2*k+1);
      assign pp[j][k] = digit_t'({1'b0, hi, lo});
    end
  end

endmodule
