// tb_k2_comb: exhaustive check of K2, the unprotected combinational part,
// against an up/down modulo-8 counter worked out here from integers.
module tb_k2_comb;
  import ft_fsm_pkg::*;

  x_t x;
  z_t z_q;
  y_t y;
  z_t z_nx;

  int checks = 0;
  int failures = 0;

  k2_comb dut (.x(x), .z_q(z_q), .y(y), .z_nx(z_nx));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st, en, up, nx, carry, borrow;
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
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
