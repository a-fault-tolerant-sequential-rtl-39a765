// tb_sc2: checks the unprotected sequential circuit SC2 (K2 plus d'').
// The state flip-flops must load z_fb, not K2's own next state: the test
// feeds z_fb with K2's z'' most of the time and with an unrelated random state
// otherwise, and tracks the present state itself. Each cycle y'' and z''
// are compared with a counter model worked out from integers.
module tb_sc2;
  import ft_fsm_pkg::*;

  logic clk;
  logic rst_n;
  x_t   x;
  z_t   z_fb;
  y_t   y;
  z_t   z_nx;

  int checks = 0;
  int failures = 0;
  int st;

  sc2 dut (.clk(clk), .rst_n(rst_n), .x(x), .z_fb(z_fb), .y(y), .z_nx(z_nx));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    int en, up, nx, carry, borrow;
    en = int'(x[0]);
    up = int'(x[1]);
    nx = (en == 0) ? st : (up == 1 ? (st + 1) % 8 : (st + 7) % 8);
    carry  = (en == 1 && up == 1 && st == 7) ? 1 : 0;
    borrow = (en == 1 && up == 0 && st == 0) ? 1 : 0;
    checks++;
    if (int'(z_nx) != nx || int'(y[0]) != carry || int'(y[1]) != borrow) begin
      failures++;
      $display("state %0d x=%b: z'=%0d y'=%b, expected z'=%0d carry=%0d borrow=%0d",
               st, x, z_nx, y, nx, carry, borrow);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    x = '0;
    z_fb = '0;
    st = 0;
    #12;
    check_outputs();
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      x = x_t'($urandom);
      #1;
      check_outputs();
      z_fb = ($urandom % 4 == 0) ? z_t'($urandom) : z_nx;
      @(posedge clk);
      st = int'(z_fb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
