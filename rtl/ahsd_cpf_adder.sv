// ahsd_cpf_adder -- Q-digit AHSD(r) carry-propagation-free adder, r = 2^M
// (radix 4 by default).
//
// Adds two AHSD(r) numbers digit by digit with Q copies of ahsd_cpf_cell.
// Each slice talks only to its immediate neighbours (A_j and C_j go one
// position up), so the delay is that of one slice whatever Q is. The sum is
// the Q+1 digit number (c_out, s[Q-1], ..., s[0]) with every s digit in
// -1..r-1 and c_out in 0..1.
//
// Operand x must have all digits >= 0 (for example a number just converted
// from binary); y may hold -1 digits (for example a previous sum). Below the
// lowest slice there is no digit: it is fed C_{-1} = 0 and A_{-1} = 1
// (Z_{-1} taken as 0), a choice of this design that keeps S_0 legal.
//
// The top slice's A_j has no slice above it and is left unconnected.
//
// Interface: x[Q], y[Q] digits ((M+1)-bit two's complement) in; s[Q]
// digits and c_out out. Combinational.
module ahsd_cpf_adder #(
  parameter int unsigned Q = 4,
  parameter int unsigned M = 2
) (
  input  logic signed [M:0] x [Q],
  input  logic signed [M:0] y [Q],
  output logic signed [M:0] s [Q],
  output logic              c_out
);

  for (genvar j = 0; j < Q; j++) begin : g_slice
    logic a_prev, c_prev;   // A_{j-1}, C_{j-1}
    logic a_o, c_o;         // A_j, C_j

    if (j == 0) begin : g_lsd
      assign a_prev = 1'b1;
      assign c_prev = 1'b0;
    end else begin : g_upper
      assign a_prev = g_slice[j-1].a_o;
      assign c_prev = g_slice[j-1].c_o;
    end

    ahsd_cpf_cell #(.M(M)) u_cell (
      .x      (x[j]),
      .y      (y[j]),
      .a_prev (a_prev),
      .c_prev (c_prev),
      .a      (a_o),
      .c      (c_o),
      .s      (s[j])
    );
  end

  assign c_out = g_slice[Q-1].c_o;

  // The conversion rule is only closed when X has no negative digit.
  always_comb begin : chk_x_nonneg
    for (int j = 0; j < Q; j++)
      assert (x[j] >= 0)
        else $error("ahsd_cpf_adder: operand x digit %0d is negative", j);
  end

endmodule
