// tb_ahsd_to_bin -- self-checking testbench of the AHSD(4) to binary
// converter (5 digits). Every one of the 5^5 digit vectors with digits in
// -1..3 is converted; the binary output must equal the vector's value mod
// 4^5 and neg must be set exactly when the value is negative. A 6-digit
// radix-8 converter (M = 3) is then run on random digit vectors.
module tb_ahsd_to_bin;
  import ahsd_pkg::*;

  localparam int Q = 5;
  int checks = 0, failures = 0;
  digit_t d [Q] = '{default: '0};
  logic [2*Q-1:0] bin;
  logic neg;

  logic signed [3:0] d8 [6] = '{default: '0};
  logic [17:0] bin8;
  logic neg8;

  ahsd_to_bin #(.Q(6), .M(3)) dut8 (.digits(d8), .bin(bin8), .neg(neg8));

  ahsd_to_bin #(.Q(Q)) dut (.digits(d), .bin(bin), .neg(neg));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int total = 1;
    for (int k = 0; k < Q; k++) total *= 5;
    for (int c = 0; c < total; c++) begin
      automatic int t = c, v = 0;
      for (int k = 0; k < Q; k++) begin
        d[k] = digit_t'((t % 5) - 1);
        t = t / 5;
      end
      for (int k = Q-1; k >= 0; k--) v = v * 4 + int'(d[k]);
      #1;
      checks += 2;
      if (int'(bin) != (v & ((1 << 2*Q) - 1))) begin
        failures++;
        if (failures < 10) $display("value %0d: bin=%0d", v, bin);
      end
      if (neg !== (v < 0)) begin
        failures++;
        if (failures < 10) $display("value %0d: neg=%0b", v, neg);
      end
    end
    for (int i = 0; i < 50000; i++) begin
      automatic int v = 0;
      for (int k = 5; k >= 0; k--) begin
        // Bias towards -1 and 0 so that long borrow chains occur.
        automatic int r = int'($urandom_range(11));
        d8[k] = 4'((r < 3) ? -1 : (r < 6) ? 0 : r - 5);
        v = v * 8 + int'(d8[k]);
      end
      #1;
      checks += 2;
      if (int'(bin8) != (v & ((1 << 18) - 1))) begin failures++; if (failures < 10) $display("r8 value %0d: bin=%0d", v, bin8); end
      if (neg8 !== (v < 0)) begin failures++; if (failures < 10) $display("r8 value %0d: neg=%0b", v, neg8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
