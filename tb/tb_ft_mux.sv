// tb_ft_mux: checks the output multiplexer. For all four values of u1 u2 and
// random, distinct data on the two sources, y and z must carry K1's lines
// when u1 u2 = 1 0 and K2's lines for 0 0, 0 1 and 1 1.
module tb_ft_mux;
  import ft_fsm_pkg::*;

  logic u1, u2;
  y_t   y_a, y_b, y;
  z_t   z_a, z_b, z;

  int checks = 0;
  int failures = 0;

  ft_mux dut (.u1(u1), .u2(u2), .y_a(y_a), .z_a(z_a), .y_b(y_b), .z_b(z_b), .y(y), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit take_a;
    for (int i = 0; i < 400; i++) begin
      {u1, u2} = 2'(i % 4);
      y_a = y_t'($urandom);
      z_a = z_t'($urandom);
      y_b = ~y_a;
      z_b = ~z_a;
      #1;
      take_a = (u1 == 1'b1 && u2 == 1'b0);
      checks++;
      if (take_a ? (y !== y_a || z !== z_a) : (y !== y_b || z !== z_b)) begin
        failures++;
        $display("u=%b%b: y=%b z=%b, expected the %s lines", u1, u2, y, z, take_a ? "K1" : "K2");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
