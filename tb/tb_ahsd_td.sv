// tb_ahsd_td -- self-checking testbench of the threshold detector TD(K).
// Sweeps every digit sum -1..6 through a TD(3) and a TD(4) and compares the
// output with "1 when z < K, else 0".
module tb_ahsd_td;
  import ahsd_pkg::*;

  int checks = 0, failures = 0;
  logic signed [3:0] z = '0;
  logic  a3, a4;

  ahsd_td #(.K(3)) dut3 (.z(z), .a(a3));
  ahsd_td #(.K(4)) dut4 (.z(z), .a(a4));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -1; v <= 6; v++) begin
      z = 4'(v);
      #1;
      checks += 2;
      if (a3 !== (v < 3)) begin failures++; $display("TD(3) z=%0d a=%0b", v, a3); end
      if (a4 !== (v < 4)) begin failures++; $display("TD(4) z=%0d a=%0b", v, a4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
