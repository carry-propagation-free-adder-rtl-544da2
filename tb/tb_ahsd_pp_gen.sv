// tb_ahsd_pp_gen -- self-checking testbench of the partial-product
// generator. For every pair of 8-bit operands, row j's AHSD(4) digits must
// be in 0..3, be 0 outside digits floor(j/2)..floor((j+7)/2), and have the
// value (x * y_j) << j.
module tb_ahsd_pp_gen;
  import ahsd_pkg::*;

  localparam int N = 8;
  int checks = 0, failures = 0;
  logic [N-1:0] x = '0, y = '0;
  digit_t pp [N][N];

  ahsd_pp_gen #(.N(N)) dut (.x(x), .y(y), .pp(pp));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = 0; xv < 256; xv++)
      for (int yv = 0; yv < 256; yv++) begin
        x = N'(xv); y = N'(yv);
        #1;
        for (int j = 0; j < N; j++) begin
          automatic int v = 0;
          automatic bit ok = 1;
          for (int k = N-1; k >= 0; k--) begin
            v = v * 4 + int'(pp[j][k]);
            if (pp[j][k] < 0 || pp[j][k] > 3) ok = 0;
            if ((k < j/2 || k > (j+N-1)/2) && pp[j][k] != 0) ok = 0;
          end
          checks++;
          if (!ok || v != ((xv * ((yv >> j) & 1)) << j)) begin
            failures++;
            if (failures < 10) $display("x=%0d y=%0d row %0d value %0d", xv, yv, j, v);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
