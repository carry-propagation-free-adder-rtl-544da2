// tb_ahsd_bin2ahsd -- self-checking testbench of the binary to AHSD(4)
// converter. Every 8-bit input is converted; each digit must equal the
// matching bit pair read as a number 0..3, and the digits' radix-4 value
// must equal the input. A radix-16 converter (M = 4) is checked on the
// same inputs.
module tb_ahsd_bin2ahsd;
  import ahsd_pkg::*;

  localparam int N = 8;
  int checks = 0, failures = 0;
  logic [N-1:0] bin = '0;
  digit_t digits [N/2];

  logic signed [4:0] digits16 [N/4];

  ahsd_bin2ahsd #(.N(N), .M(4)) dut16 (.bin(bin), .digits(digits16));

  ahsd_bin2ahsd #(.N(N)) dut (.bin(bin), .digits(digits));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      int value;
      bin = N'(v);
      #1;
      value = 0;
      for (int k = N/2-1; k >= 0; k--) begin
        checks++;
        if (int'(digits[k]) != ((v >> (2*k)) & 3)) begin
          failures++;
          $display("bin=%0h digit %0d = %0d", v, k, digits[k]);
        end
        value = value * 4 + int'(digits[k]);
      end
      for (int k = 0; k < N/4; k++) begin
        checks++;
        if (int'(digits16[k]) != ((v >> (4*k)) & 15)) begin
          failures++;
          $display("r16 bin=%0h digit %0d = %0d", v, k, digits16[k]);
        end
      end
      checks++;
      if (value != v) begin failures++; $display("bin=%0h value %0d", v, value); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
