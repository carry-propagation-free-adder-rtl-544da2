// tb_ahsd_top -- end-to-end testbench of the AHSD(4) arithmetic unit at its
// default sizes (8-bit adder, 8-bit sequential adder with up to 16
// operands, 8x8 multiplier).
//
// Adder and multiplier: every operand pair of the adder and 20000 random
// plus corner pairs of the multiplier are applied; binary results are
// compared with x + y and x * y and the AHSD(4) outputs with the same
// values. The sequential adder receives random sums of 1..16 operands.
//
// A reference model of the AHSD(4) conversion rule, written separately from
// the RTL, replays each addition to count how often each mechanism of the
// design occurred; a mechanism that never occurs counts as a failure:
//   carry from Z >= 4, carry from Z = 3 decided by the lower neighbour
//   (Z_{j-1} >= 3), Z = 3 kept as digit 3 (Z_{j-1} < 3), a -1 sum digit
//   (borrow in the binary converter), a borrow passed on through a 0 digit,
//   a carry out of an even multiplier row into the next row, a -1 digit in
//   the product, a sequential sum restarted by in_first, and a running sum
//   holding a -1 digit.
module tb_ahsd_top;
  import ahsd_pkg::*;

  localparam int N  = 8;
  localparam int Q  = N / 2;
  localparam int QA = (N + $clog2(16) + 2) / 2;

  int checks = 0, failures = 0, cycles = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] add_x = '0, add_y = '0, mul_x = '0, mul_y = '0;
  digit_t add_digits [Q+1];
  logic [2*Q+1:0] add_sum;
  logic seq_in_valid = 1'b0, seq_in_first = 1'b0;
  logic [N-1:0] seq_in_data = '0;
  digit_t seq_acc_digits [QA];
  logic [2*QA-1:0] seq_sum;
  logic [15:0] seq_count;
  logic seq_sum_valid;
  digit_t mul_digits [N];
  logic [2*N-1:0] mul_product;

  ahsd_top dut (
    .clk(clk), .rst_n(rst_n),
    .add_x(add_x), .add_y(add_y), .add_digits(add_digits), .add_sum(add_sum),
    .seq_in_valid(seq_in_valid), .seq_in_first(seq_in_first), .seq_in_data(seq_in_data),
    .seq_acc_digits(seq_acc_digits), .seq_sum(seq_sum), .seq_count(seq_count),
    .seq_sum_valid(seq_sum_valid),
    .mul_x(mul_x), .mul_y(mul_y), .mul_digits(mul_digits), .mul_product(mul_product));

  always #5 clk = !clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_carry_ge4 = 0, n_carry_eq3 = 0, n_keep3 = 0, n_minus1 = 0, n_borrow_prop = 0;
  int n_row_carry = 0, n_mul_minus1 = 0, n_seq_restart = 0, n_seq_minus1 = 0;

  // Reference CPF addition over W digits with conversion-table counting.
  // Digits are ints; returns the W+1 digit sum in s.
  function automatic void ref_add(input int x [], input int y [], output int s [],
                                  input bit count_it);
    automatic int w = x.size();
    automatic int z [] = new[w];
    automatic int c [] = new[w];
    s = new[w+1];
    for (int j = 0; j < w; j++) z[j] = x[j] + y[j];
    for (int j = 0; j < w; j++) begin
      automatic int zl = (j == 0) ? 0 : z[j-1];
      if (z[j] >= 4) begin c[j] = 1; if (count_it) n_carry_ge4++; end
      else if (z[j] == 3 && zl >= 3) begin c[j] = 1; if (count_it) n_carry_eq3++; end
      else begin c[j] = 0; if (count_it && z[j] == 3) n_keep3++; end
    end
    for (int j = 0; j < w; j++) s[j] = z[j] - 4*c[j] + ((j == 0) ? 0 : c[j-1]);
    s[w] = c[w-1];
  endfunction

  function automatic int dval(digit_t d []);
    automatic int v = 0;
    for (int k = d.size()-1; k >= 0; k--) v = v * 4 + int'(d[k]);
    return v;
  endfunction

  task automatic check_add(int xv, int yv);
    automatic int xd [] = new[Q];
    automatic int yd [] = new[Q];
    automatic int sd [];
    automatic digit_t got [] = new[Q+1];
    automatic bit digits_match = 1;
    add_x = N'(xv); add_y = N'(yv);
    #1;
    for (int k = 0; k < Q; k++) begin xd[k] = (xv >> 2*k) & 3; yd[k] = (yv >> 2*k) & 3; end
    ref_add(xd, yd, sd, 1);
    for (int k = 0; k <= Q; k++) begin
      got[k] = add_digits[k];
      if (int'(add_digits[k]) != sd[k]) digits_match = 0;
      if (sd[k] == -1) begin
        n_minus1++;
        if (k + 1 <= Q && sd[k+1] == 0) n_borrow_prop++;
      end
    end
    checks += 2;
    if (int'(add_sum) != xv + yv || dval(got) != xv + yv) begin
      failures++;
      if (failures < 10) $display("add %0d + %0d = %0d (digits %0d)", xv, yv, add_sum, dval(got));
    end
    if (!digits_match) begin
      failures++;
      if (failures < 10) $display("add %0d + %0d: digits differ from the conversion rule", xv, yv);
    end
  endtask

  // Reference array multiplication, counting carries between rows.
  task automatic check_mul(int xv, int yv);
    automatic int run [] = new[N];
    automatic digit_t got [] = new[N];
    automatic bit ok = 1;
    mul_x = N'(xv); mul_y = N'(yv);
    #1;
    for (int k = 0; k < N; k++) run[k] = 0;
    for (int t = 0; t < N; t++) if ((yv & 1) && ((xv >> t) & 1)) run[t/2] += (1 << (t % 2));
    for (int j = 1; j < N; j++) begin
      automatic int lo = j / 2, hi = (j + N - 1) / 2;
      automatic int xa [] = new[hi-lo+1];
      automatic int ya [] = new[hi-lo+1];
      automatic int sa [];
      for (int k = lo; k <= hi; k++) begin
        automatic int t0 = 2*k - j, t1 = 2*k + 1 - j;
        automatic int b0 = (t0 >= 0 && t0 < N) ? ((xv >> t0) & (yv >> j) & 1) : 0;
        automatic int b1 = (t1 >= 0 && t1 < N) ? ((xv >> t1) & (yv >> j) & 1) : 0;
        xa[k-lo] = 2*b1 + b0;
        ya[k-lo] = run[k];
      end
      ref_add(xa, ya, sa, 0);
      for (int k = lo; k <= hi; k++) run[k] = sa[k-lo];
      if (sa[hi-lo+1] != 0) begin
        n_row_carry++;
        if (hi + 1 < N) run[hi+1] = sa[hi-lo+1];
        else ok = 0;
      end
    end
    for (int k = 0; k < N; k++) begin
      got[k] = mul_digits[k];
      if (int'(mul_digits[k]) != run[k]) ok = 0;
      if (run[k] == -1) n_mul_minus1++;
    end
    checks += 2;
    if (int'(mul_product) != xv * yv || dval(got) != xv * yv) begin
      failures++;
      if (failures < 10) $display("mul %0d * %0d = %0d (digits %0d)", xv, yv, mul_product, dval(got));
    end
    if (!ok) begin
      failures++;
      if (failures < 10) $display("mul %0d * %0d: digits differ from the reference array", xv, yv);
    end
  endtask

  // Sequential adder scoreboard (two-cycle latency).
  int exp_sum [3] = '{0, 0, 0};
  int exp_cnt [3] = '{0, 0, 0};
  int ref_sum = 0, ref_cnt = 0;

  task automatic seq_step(input bit v, input bit f, input int d);
    automatic digit_t got [] = new[QA];
    seq_in_valid <= v; seq_in_first <= f; seq_in_data <= N'(d);
    if (v) begin
      if (f) begin ref_sum = d; ref_cnt = 1; n_seq_restart++; end
      else begin ref_sum += d; ref_cnt++; end
    end
    @(posedge clk);
    #1;
    exp_sum[2] = exp_sum[1]; exp_cnt[2] = exp_cnt[1];
    exp_sum[1] = ref_sum;    exp_cnt[1] = ref_cnt;
    for (int k = 0; k < QA; k++) begin
      got[k] = seq_acc_digits[k];
      if (seq_acc_digits[k] == digit_t'(-1)) n_seq_minus1++;
    end
    checks++;
    if (int'(seq_sum) != exp_sum[2] || int'(seq_count) != exp_cnt[2] || dval(got) != exp_sum[2]) begin
      failures++;
      if (failures < 10) $display("seq cycle %0d: sum=%0d count=%0d expected %0d/%0d",
                                  cycles, seq_sum, seq_count, exp_sum[2], exp_cnt[2]);
    end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    $display("mechanism %-36s seen %0d times", what, n);
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
  endtask

  initial begin
    // Two-operand adder: every pair, including the worked example.
    check_add(8'hFF, 8'h01);
    for (int xv = 0; xv < 256; xv++)
      for (int yv = 0; yv < 256; yv++) check_add(xv, yv);

    // Multiplier: corners and random pairs.
    check_mul(255, 255); check_mul(0, 0); check_mul(255, 1); check_mul(170, 85);
    for (int i = 0; i < 20000; i++) check_mul(int'($urandom_range(255)), int'($urandom_range(255)));

    // Sequential adder.
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    for (int s = 0; s < 500; s++) begin
      automatic int len = 1 + int'($urandom_range(15));
      for (int i = 0; i < len; i++) begin
        if ($urandom_range(4) == 0) seq_step(0, 0, 0);
        seq_step(1, i == 0, (s % 7 == 0) ? 255 : int'($urandom_range(255)));
      end
    end
    seq_step(0, 0, 0);
    seq_step(0, 0, 0);

    expect_seen("carry from Z >= 4", n_carry_ge4);
    expect_seen("carry from Z = 3 with Z(j-1) >= 3", n_carry_eq3);
    expect_seen("Z = 3 kept (Z(j-1) < 3)", n_keep3);
    expect_seen("-1 sum digit (converter borrow)", n_minus1);
    expect_seen("borrow passed through a 0 digit", n_borrow_prop);
    expect_seen("carry between multiplier rows", n_row_carry);
    expect_seen("-1 digit in a product", n_mul_minus1);
    expect_seen("sequential sum restarted", n_seq_restart);
    expect_seen("-1 digit in the running sum", n_seq_minus1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
