// ahsd_seq_adder -- sequential multi-operand adder on AHSD(4).
//
// Sums a stream of N-bit unsigned binary operands, one per clock. Each
// operand is latched in an input register and converted to AHSD(4) digits;
// the CPF adder then adds it to the running sum, which is itself held in
// AHSD(4) form in the accumulator register. Because the CPF adder has no
// carry chain, the clock period is set by one digit slice, not by the
// operand width. Only the final binary value needs a (lookahead) carry
// chain: ahsd_to_bin converts the accumulator continuously.
//
// Pipeline (this design's own choice of registers around the adder):
//   cycle t    : operand k on in_data with in_valid
//   cycle t+1  : operand k in the input latch; the CPF adder adds it
//   cycle t+2  : accumulator, sum and count include operand k
// The operand that carries in_first replaces the running sum instead of
// being added to it. A throughput of one operand per clock is kept, so a
// sum of K operands is complete two cycles after the last one is offered.
//
// Width: the accumulator has QA = (N + clog2(MAX_OPS) + 2) / 2 digits.
// A non-negative AHSD(4) value whose top non-zero digit is at position p is
// at least (2*4^p+1)/3, so with QA digits the adder's carry out of the top
// slice stays 0 for any sum of up to MAX_OPS operands (asserted below).
//
// Interface: clk, rst_n (synchronous, active low); in_valid, in_first,
// in_data[N-1:0]; acc_digits[QA], sum[2QA-1:0], count[15:0] (operands
// accumulated since the last in_first), sum_valid (at least one operand).
module ahsd_seq_adder
  import ahsd_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned MAX_OPS = 16,
  localparam int unsigned QA     = (N + $clog2(MAX_OPS) + 2) / 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic            in_first,
  input  logic [N-1:0]    in_data,
  output digit_t          acc_digits [QA],
  output logic [2*QA-1:0] sum,
  output logic [15:0]     count,
  output logic            sum_valid
);

  // Input latch.
  logic [N-1:0] lat_data;
  logic         lat_valid;
  logic         lat_first;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lat_valid <= 1'b0;
      lat_first <= 1'b0;
      lat_data  <= '0;
    end else begin
      lat_valid <= in_valid;
      lat_first <= in_valid && in_first;
      if (in_valid) lat_data <= in_data;
    end
  end

  // Binary to AHSD(4), zero-extended to the accumulator width.
  digit_t op_digits [N/2];
  digit_t op_ext    [QA];

  ahsd_bin2ahsd #(.N(N)) u_b2a (.bin(lat_data), .digits(op_digits));

  always_comb begin
    for (int k = 0; k < QA; k++)
      op_ext[k] = (k < N/2) ? op_digits[k] : digit_t'(0);
  end

  // CPF addition to the running sum (the accumulator may hold -1 digits,
  // the operand never does, as the adder requires).
  digit_t acc       [QA];
  digit_t acc_plus  [QA];
  logic   acc_cout;

  ahsd_cpf_adder #(.Q(QA)) u_add (
    .x     (op_ext),
    .y     (acc),
    .s     (acc_plus),
    .c_out (acc_cout)
  );

  logic [15:0] cnt;
  logic        have;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < QA; k++) acc[k] <= digit_t'(0);
      cnt  <= '0;
      have <= 1'b0;
    end else if (lat_valid) begin
      if (lat_first) begin
        acc  <= op_ext;
        cnt  <= 16'd1;
      end else begin
        acc  <= acc_plus;
        cnt  <= cnt + 16'd1;
      end
      have <= 1'b1;
    end
  end

  // The accumulator is sized so that the top carry never leaves it.
  always_ff @(posedge clk) begin : chk_no_overflow
    if (rst_n && lat_valid && !lat_first)
      assert (!acc_cout)
        else $error("ahsd_seq_adder: running sum exceeds %0d digits", QA);
  end

  // AHSD(4) to binary for the running sum, which is never negative.
  logic sum_neg;
  ahsd_to_bin #(.Q(QA)) u_a2b (.digits(acc), .bin(sum), .neg(sum_neg));

  always_comb begin : chk_nonneg
    assert (!sum_neg) else $error("ahsd_seq_adder: negative running sum");
  end

  assign acc_digits = acc;
  assign count      = cnt;
  assign sum_valid  = have;

endmodule
