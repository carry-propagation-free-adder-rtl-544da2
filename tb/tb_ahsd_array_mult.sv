// tb_ahsd_array_mult -- self-checking testbench of the 8x8 AHSD(4) array
// multiplier. Every pair of 8-bit operands is multiplied; the product
// digits must be legal AHSD(4) digits whose value is x * y.
module tb_ahsd_array_mult;
  import ahsd_pkg::*;

  localparam int N = 8;
  int checks = 0, failures = 0;
  logic [N-1:0] x = '0, y = '0;
  digit_t digits [N];

  ahsd_array_mult #(.N(N)) dut (.x(x), .y(y), .digits(digits));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = 0; xv < 256; xv++)
      for (int yv = 0; yv < 256; yv++) begin
        automatic int v = 0;
        automatic bit ok = 1;
        x = N'(xv); y = N'(yv);
        #1;
        for (int k = N-1; k >= 0; k--) begin
          v = v * 4 + int'(digits[k]);
          if (!digit_ok(digits[k])) ok = 0;
        end
        checks++;
        if (!ok || v != xv * yv) begin
          failures++;
          if (failures < 10) $display("%0d * %0d = %0d", xv, yv, v);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
