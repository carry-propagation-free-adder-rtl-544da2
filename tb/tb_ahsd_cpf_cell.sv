// tb_ahsd_cpf_cell -- self-checking testbench of one CPF adder digit slice.
// Runs every X in 0..3, Y in -1..3 and every consistent pair (A_{j-1},
// C_{j-1}) and compares C_j, A_j and S_j with the AHSD(4) conversion table:
// carry for Z >= 4, carry for Z = 3 only when the lower sum is >= 3,
// S_j = Z - 4*C_j + C_{j-1}, which must lie in -1..3. A radix-8 slice
// (M = 3) is swept the same way against the general rule with r = 8.
module tb_ahsd_cpf_cell;
  import ahsd_pkg::*;

  int checks = 0, failures = 0;
  digit_t x = '0, y = '0, s;
  logic   a_prev = 1'b1, c_prev = 1'b0, a, c;

  logic signed [3:0] x8 = '0, y8 = '0, s8;
  logic a8, c8;

  ahsd_cpf_cell #(.M(3)) dut8 (.x(x8), .y(y8), .a_prev(a_prev), .c_prev(c_prev), .a(a8), .c(c8), .s(s8));

  ahsd_cpf_cell dut (.x(x), .y(y), .a_prev(a_prev), .c_prev(c_prev), .a(a), .c(c), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = 0; xv <= 3; xv++)
      for (int yv = -1; yv <= 3; yv++)
        for (int ap = 0; ap <= 1; ap++)
          for (int cp = 0; cp <= 1; cp++) begin
            int zv, ce, se;
            // A lower sum below 3 never produces a carry.
            if (ap == 1 && cp == 1) continue;
            x = digit_t'(xv); y = digit_t'(yv);
            a_prev = ap[0]; c_prev = cp[0];
            #1;
            zv = xv + yv;
            ce = (zv >= 4 || (zv == 3 && ap == 0)) ? 1 : 0;
            se = zv - 4*ce + cp;
            checks += 4;
            if (c !== ce[0])       begin failures++; $display("x=%0d y=%0d ap=%0d cp=%0d: c=%0b", xv, yv, ap, cp, c); end
            if (a !== (zv < 3))    begin failures++; $display("x=%0d y=%0d: a=%0b", xv, yv, a); end
            if (int'(s) != se)     begin failures++; $display("x=%0d y=%0d ap=%0d cp=%0d: s=%0d exp %0d", xv, yv, ap, cp, s, se); end
            if (!digit_ok(s))      begin failures++; $display("x=%0d y=%0d: s=%0d out of range", xv, yv, s); end
          end
    for (int xv = 0; xv <= 7; xv++)
      for (int yv = -1; yv <= 7; yv++)
        for (int ap = 0; ap <= 1; ap++)
          for (int cp = 0; cp <= 1; cp++) begin
            int zv, ce, se;
            if (ap == 1 && cp == 1) continue;
            x8 = 4'(xv); y8 = 4'(yv);
            a_prev = ap[0]; c_prev = cp[0];
            #1;
            zv = xv + yv;
            ce = (zv >= 8 || (zv == 7 && ap == 0)) ? 1 : 0;
            se = zv - 8*ce + cp;
            checks += 4;
            if (c8 !== ce[0])      begin failures++; $display("r8 x=%0d y=%0d: c=%0b", xv, yv, c8); end
            if (a8 !== (zv < 7))   begin failures++; $display("r8 x=%0d y=%0d: a=%0b", xv, yv, a8); end
            if (int'(s8) != se)    begin failures++; $display("r8 x=%0d y=%0d: s=%0d exp %0d", xv, yv, s8, se); end
            if (se < -1 || se > 7) begin failures++; $display("r8 rule out of range"); end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
