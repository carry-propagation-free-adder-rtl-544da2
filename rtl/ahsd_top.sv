// ahsd_top -- AHSD(4) arithmetic unit: two-operand carry-propagation-free
// adder, sequential multi-operand adder and array multiplier.
//
// Three independent datapaths share the AHSD(4) number system (digits
// -1..3 in radix 4) and its carry-propagation-free adder:
//   * Adder: two ADD_N-bit binary operands are converted to AHSD(r),
//     r = 2^ADD_M (radix 4 by default), added by one CPF adder of
//     ADD_N/ADD_M slices, and the (ADD_N/ADD_M+1)-digit sum is converted
//     back to binary by a radix-r lookahead converter.
//   * Sequential adder: a stream of SEQ_N-bit operands, one per clock, is
//     accumulated in AHSD(4) form (ahsd_seq_adder), with the running sum
//     also given in binary.
//   * Multiplier: MUL_N x MUL_N array multiplier of CPF adder rows
//     (ahsd_array_mult); the AHSD(4) product is converted to binary.
// The adder and the multiplier are combinational; the sequential adder is
// clocked by clk with synchronous active-low reset rst_n. The AHSD(4) forms
// of the sums and of the product are brought out next to the binary ones.
module ahsd_top
  import ahsd_pkg::*;
#(
  parameter int unsigned ADD_N       = 8,
  parameter int unsigned ADD_M       = 2,
  parameter int unsigned SEQ_N       = 8,
  parameter int unsigned SEQ_MAX_OPS = 16,
  parameter int unsigned MUL_N       = 8,
  localparam int unsigned ADD_Q      = ADD_N / ADD_M,
  localparam int unsigned SEQ_QA     = (SEQ_N + $clog2(SEQ_MAX_OPS) + 2) / 2
) (
  input  logic                clk,
  input  logic                rst_n,
  // Two-operand adder
  input  logic [ADD_N-1:0]    add_x,
  input  logic [ADD_N-1:0]    add_y,
  output logic signed [ADD_M:0]   add_digits [ADD_Q+1],
  output logic [ADD_M*(ADD_Q+1)-1:0] add_sum,
  // Sequential adder
  input  logic                seq_in_valid,
  input  logic                seq_in_first,
  input  logic [SEQ_N-1:0]    seq_in_data,
  output digit_t              seq_acc_digits [SEQ_QA],
  output logic [2*SEQ_QA-1:0] seq_sum,
  output logic [15:0]         seq_count,
  output logic                seq_sum_valid,
  // Array multiplier
  input  logic [MUL_N-1:0]    mul_x,
  input  logic [MUL_N-1:0]    mul_y,
  output digit_t              mul_digits [MUL_N],
  output logic [2*MUL_N-1:0]  mul_product
);

  // ---------------- two-operand adder ----------------
  logic signed [ADD_M:0] ax [ADD_Q];
  logic signed [ADD_M:0] ay [ADD_Q];
  logic signed [ADD_M:0] as [ADD_Q];
  logic   ac;
  logic   add_neg;

  ahsd_bin2ahsd  #(.N(ADD_N), .M(ADD_M)) u_add_b2a_x (.bin(add_x), .digits(ax));
  ahsd_bin2ahsd  #(.N(ADD_N), .M(ADD_M)) u_add_b2a_y (.bin(add_y), .digits(ay));
  ahsd_cpf_adder #(.Q(ADD_Q), .M(ADD_M)) u_add_cpf   (.x(ax), .y(ay), .s(as), .c_out(ac));

  for (genvar k = 0; k < ADD_Q; k++) begin : g_add_digits
    assign add_digits[k] = as[k];
  end
  assign add_digits[ADD_Q] = (ADD_M+1)'(ac);

  ahsd_to_bin #(.Q(ADD_Q+1), .M(ADD_M)) u_add_a2b (.digits(add_digits), .bin(add_sum), .neg(add_neg));

  // ---------------- sequential adder ----------------
  ahsd_seq_adder #(.N(SEQ_N), .MAX_OPS(SEQ_MAX_OPS)) u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (seq_in_valid),
    .in_first   (seq_in_first),
    .in_data    (seq_in_data),
    .acc_digits (seq_acc_digits),
    .sum        (seq_sum),
    .count      (seq_count),
    .sum_valid  (seq_sum_valid)
  );

  // ---------------- array multiplier ----------------
  logic mul_neg;

  ahsd_array_mult #(.N(MUL_N)) u_mul (.x(mul_x), .y(mul_y), .digits(mul_digits));
  ahsd_to_bin     #(.Q(MUL_N)) u_mul_a2b (.digits(mul_digits), .bin(mul_product), .neg(mul_neg));

  // Sums and products of unsigned operands are never negative.
  always_comb begin : chk_nonneg
    assert (!add_neg) else $error("ahsd_top: negative adder result");
    assert (!mul_neg) else $error("ahsd_top: negative product");
  end

endmodule
