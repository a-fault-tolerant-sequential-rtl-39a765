// tb_k1_comb: exhaustive check of K1, the self-checking combinational part.
// Every (x, present state) pair is applied; y', z' are compared with an
// up/down modulo-8 counter worked out here from integers, and the check bits
// with the zeros count of {y', z'}. Every output word must also be accepted by
// the same count rule, i.e. be a code word.
module tb_k1_comb;
  import ft_fsm_pkg::*;

  x_t   x;
  z_t   z_q;
  y_t   y;
  chk_t chk;
  z_t   z_nx;

  int checks = 0;
  int failures = 0;

  k1_comb dut (.x(x), .z_q(z_q), .y(y), .chk(chk), .z_nx(z_nx));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st, en, up, nx, carry, borrow, zeros;
    for (int xi = 0; xi < 4; xi++) begin
      for (st = 0; st < 8; st++) begin
        x = x_t'(xi);
        z_q = z_t'(st);
        #1;
        en = xi % 2;
        up = xi / 2;
        nx = (en == 0) ? st : (up == 1 ? (st + 1) % 8 : (st + 7) % 8);
        carry  = (en == 1 && up == 1 && st == 7) ? 1 : 0;
        borrow = (en == 1 && up == 0 && st == 0) ? 1 : 0;
        zeros = 5 - $countones({y, z_nx});
        checks++;
        if (int'(z_nx) != nx) begin
          failures++;
          $display("x=%0d z=%0d: next state %0d, expected %0d", xi, st, z_nx, nx);
        end
        checks++;
        if (int'(y[0]) != carry || int'(y[1]) != borrow) begin
          failures++;
          $display("x=%0d z=%0d: y=%b, expected carry %0d borrow %0d", xi, st, y, carry, borrow);
        end
        checks++;
        if (int'(chk) != (5 - ((nx % 2) + ((nx / 2) % 2) + (nx / 4) + carry + borrow))) begin
          failures++;
          $display("x=%0d z=%0d: check bits %0d wrong", xi, st, chk);
        end
        checks++;
        if (int'(chk) != zeros) begin
          failures++;
          $display("x=%0d z=%0d: output word is not a code word", xi, st);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
