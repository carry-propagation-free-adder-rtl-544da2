// tb_ahsd_cpf_adder -- self-checking testbench of the 4-digit AHSD(4) CPF
// adder. Runs the worked example 11111111 + 00000001 (the longest carry
// chain of a binary adder; expected sum digits (1,0,0,0,0)), then every
// non-negative X (0..255 as converted binary) against every Y with digits
// in -1..3. Checks that the sum's value equals X + Y and that every sum
// digit is a legal AHSD(4) digit. A 3-digit radix-16 adder (M = 4) is then
// run on random operands against the same value and range checks.
module tb_ahsd_cpf_adder;
  import ahsd_pkg::*;

  localparam int Q = 4;
  int checks = 0, failures = 0;
  digit_t x [Q] = '{default: '0};
  digit_t y [Q] = '{default: '0};
  digit_t s [Q];
  logic   c_out;

  logic signed [4:0] x16 [3] = '{default: '0};
  logic signed [4:0] y16 [3] = '{default: '0};
  logic signed [4:0] s16 [3];
  logic c16;

  ahsd_cpf_adder #(.Q(3), .M(4)) dut16 (.x(x16), .y(y16), .s(s16), .c_out(c16));

  ahsd_cpf_adder #(.Q(Q)) dut (.x(x), .y(y), .s(s), .c_out(c_out));

  function automatic int value(digit_t d [Q], int top);
    automatic int v = top;
    for (int k = Q-1; k >= 0; k--) v = v * 4 + int'(d[k]);
    return v;
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: X = (3,3,3,3), Y = (0,0,0,1).
    x = '{3, 3, 3, 3};
    y = '{1, 0, 0, 0};
    #1;
    checks++;
    if (!(c_out == 1'b1 && s[3] == 0 && s[2] == 0 && s[1] == 0 && s[0] == 0)) begin
      failures++;
      $display("example: c=%0b s=%0d %0d %0d %0d", c_out, s[3], s[2], s[1], s[0]);
    end
    for (int xv = 0; xv < 256; xv++) begin
      for (int yc = 0; yc < 625; yc++) begin
        automatic int t = yc;
        for (int k = 0; k < Q; k++) begin
          x[k] = digit_t'((xv >> (2*k)) & 3);
          y[k] = digit_t'((t % 5) - 1);
          t = t / 5;
        end
        #1;
        checks++;
        if (value(s, int'(c_out)) != value(x, 0) + value(y, 0)) begin
          failures++;
          if (failures < 10) $display("x=%0d y=%0d: sum %0d", value(x, 0), value(y, 0), value(s, int'(c_out)));
        end
        for (int k = 0; k < Q; k++) begin
          checks++;
          if (!digit_ok(s[k])) begin failures++; if (failures < 10) $display("digit %0d out of range", k); end
        end
      end
    end
    for (int i = 0; i < 100000; i++) begin
      automatic int xv = 0, yv = 0, sv = 0;
      for (int k = 2; k >= 0; k--) begin
        x16[k] = 5'($urandom_range(15));
        y16[k] = 5'(int'($urandom_range(16)) - 1);
        xv = xv * 16 + int'(x16[k]);
        yv = yv * 16 + int'(y16[k]);
      end
      #1;
      sv = int'(c16);
      for (int k = 2; k >= 0; k--) begin
        sv = sv * 16 + int'(s16[k]);
        checks++;
        if (s16[k] < -1 || s16[k] > 15) begin failures++; if (failures < 10) $display("r16 digit out of range"); end
      end
      checks++;
      if (sv != xv + yv) begin failures++; if (failures < 10) $display("r16 %0d + %0d = %0d", xv, yv, sv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
