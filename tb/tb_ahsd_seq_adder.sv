// tb_ahsd_seq_adder -- self-checking testbench of the sequential
// multi-operand AHSD(4) adder (8-bit operands, up to 16 per sum).
// Sends sums of random length (1..16 operands, one per clock, including
// all-ones worst cases and gaps without in_valid). A scoreboard delayed by
// the two-cycle latency predicts count and binary sum; every cycle the
// running sum is compared in binary and as the value of its AHSD(4) digits,
// which must all be legal digits.
module tb_ahsd_seq_adder;
  import ahsd_pkg::*;

  localparam int N = 8;
  localparam int MAX_OPS = 16;
  localparam int QA = (N + $clog2(MAX_OPS) + 2) / 2;

  int checks = 0, failures = 0, cycles = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_first = 1'b0;
  logic [N-1:0] in_data = '0;
  digit_t acc_digits [QA];
  logic [2*QA-1:0] sum;
  logic [15:0] count;
  logic sum_valid;

  ahsd_seq_adder #(.N(N), .MAX_OPS(MAX_OPS)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first), .in_data(in_data),
    .acc_digits(acc_digits), .sum(sum), .count(count), .sum_valid(sum_valid));

  always #5 clk = !clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: expected sum/count after each input cycle, two cycles late.
  int exp_sum [3] = '{0, 0, 0};
  int exp_cnt [3] = '{0, 0, 0};
  int ref_sum = 0, ref_cnt = 0;

  task automatic drive(input bit v, input bit f, input int d);
    in_valid <= v; in_first <= f; in_data <= N'(d);
    if (v) begin
      if (f) begin ref_sum = d; ref_cnt = 1; end
      else begin ref_sum += d; ref_cnt++; end
    end
    @(posedge clk);
    #1;
    // After this edge the input is in the latch; the accumulator holds
    // what was offered up to the previous cycle.
    exp_sum[2] = exp_sum[1]; exp_cnt[2] = exp_cnt[1];
    exp_sum[1] = ref_sum;    exp_cnt[1] = ref_cnt;
    check();
  endtask

  function automatic void check();
    automatic int v = 0;
    automatic bit ok = 1;
    for (int k = QA-1; k >= 0; k--) begin
      v = v * 4 + int'(acc_digits[k]);
      if (!digit_ok(acc_digits[k])) ok = 0;
    end
    checks++;
    if (int'(sum) != exp_sum[2] || int'(count) != exp_cnt[2] || v != exp_sum[2] || !ok) begin
      failures++;
      if (failures < 10)
        $display("cycle %0d: sum=%0d digits=%0d count=%0d, expected %0d/%0d",
                 cycles, sum, v, count, exp_sum[2], exp_cnt[2]);
    end
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    // Latency check: one operand, visible exactly two clocks later.
    in_valid <= 1'b1; in_first <= 1'b1; in_data <= N'(77);
    @(posedge clk); #1;
    in_valid <= 1'b0; in_first <= 1'b0;
    checks++;
    if (sum_valid) begin failures++; $display("sum_valid one cycle after the operand"); end
    @(posedge clk); #1;
    checks++;
    if (!sum_valid || sum != 77 || count != 1) begin
      failures++; $display("latency: sum=%0d count=%0d valid=%0b", sum, count, sum_valid);
    end
    ref_sum = 77; ref_cnt = 1;
    exp_sum = '{77, 77, 77}; exp_cnt = '{1, 1, 1};
    // Worst case: MAX_OPS all-ones operands.
    for (int i = 0; i < MAX_OPS; i++) drive(1, i == 0, (1 << N) - 1);
    // Random sums with gaps.
    for (int s = 0; s < 2000; s++) begin
      automatic int len = 1 + int'($urandom_range(MAX_OPS - 1));
      for (int i = 0; i < len; i++) begin
        if ($urandom_range(3) == 0) drive(0, 0, int'($urandom));
        drive(1, i == 0, int'($urandom_range((1 << N) - 1)));
      end
    end
    drive(0, 0, 0);
    drive(0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
