// ahsd_array_mult -- N x N unsigned array multiplier built from AHSD(4)
// carry-propagation-free adders.
//
// The partial products of ahsd_pp_gen are accumulated by N-1 rows of CPF
// adders. Row j (1 .. N-1) adds partial-product row X^j to the running sum,
// which starts as row Y^0. Row j only spans the digit positions where X^j
// has bits, digits LO(j) = floor(j/2) .. HI(j) = floor((j+N-1)/2); digits
// below LO(j) are already final and pass by. For N = 8 the rows have
// 5,4,5,4,5,4,5 slices, 32 = N^2/2 slices in all.
//
// Carries out of a row: in an odd row the top digit sum is at most 2 (one
// partial-product bit plus a carry digit 0..1), so its carry out is always
// 0. In an even row the carry out C_HI becomes the running-sum digit HI+1,
// which is exactly the top position of the next (odd) row. Each row is one
// CPF adder delay, so the product is ready after N-1 slice delays, with no
// carry chain anywhere. Product digit k leaves the array from row
// min(2k+1, N-1).
//
// The result is the AHSD(4) number (S_{N-1} .. S_0), digits in -1..3; an
// ahsd_to_bin converter outside turns it into binary when needed.
//
// Interface: x[N-1:0], y[N-1:0] in; digits[N] out. Combinational. N even.
module ahsd_array_mult
  import ahsd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output digit_t       digits [N]
);

  digit_t pp [N][N];

  ahsd_pp_gen #(.N(N)) u_pp (.x(x), .y(y), .pp(pp));

  for (genvar j = 1; j < N; j++) begin : g_row
    localparam int unsigned LO = j / 2;
    localparam int unsigned HI = (j + N - 1) / 2;
    localparam int unsigned W  = HI - LO + 1;

    digit_t run_in  [N];   // running sum entering this row
    digit_t run_out [N];   // running sum after this row
    digit_t xa [W];
    digit_t ya [W];
    digit_t sa [W];
    logic   cout;

    if (j == 1) begin : g_first
      assign run_in = pp[0];
    end else begin : g_next
      assign run_in = g_row[j-1].run_out;
    end

    for (genvar k = 0; k < W; k++) begin : g_in
      assign xa[k] = pp[j][LO+k];
      assign ya[k] = run_in[LO+k];
    end

    ahsd_cpf_adder #(.Q(W)) u_cpf (.x(xa), .y(ya), .s(sa), .c_out(cout));

    for (genvar k = 0; k < N; k++) begin : g_out
      if (k < LO) begin : g_final
        assign run_out[k] = run_in[k];
      end else if (k <= HI) begin : g_sum
        assign run_out[k] = sa[k-LO];
      end else if (k == HI + 1) begin : g_carry
        assign run_out[k] = digit_t'({2'b00, cout});
      end else begin : g_above
        assign run_out[k] = run_in[k];
      end
    end

    // An odd row never carries out; neither does the last row.
    if ((j % 2 == 1) || (HI + 1 >= N)) begin : g_chk
      always_comb begin : chk_no_carry
        assert (!cout) else $error("ahsd_array_mult: row %0d carries out", j);
      end
    end
  end

  assign digits = g_row[N-1].run_out;

endmodule
