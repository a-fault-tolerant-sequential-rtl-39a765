// tb_berger_checker: checks the code checker Ch.
// Part 1 applies all 256 words {y', z', check bits}: u1 u2 must be 1 0 exactly
// when the check bits equal the number of zeros among the five information
// bits, and 0 1 otherwise; there must be 32 code words. Part 2 takes every
// code word and every unidirectional error on it (any non-empty set of its
// 0 bits turned to 1, or of its 1 bits turned to 0) and requires 0 1.
module tb_berger_checker;
  import ft_fsm_pkg::*;

  y_t   y;
  chk_t chk;
  z_t   z;
  logic u1, u2;

  int checks = 0;
  int failures = 0;
  int codewords = 0;
  int uni_errors = 0;

  berger_checker dut (.y(y), .chk(chk), .z(z), .u1(u1), .u2(u2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_code(input logic [7:0] w);
    // w = {y(2), z(3), chk(3)}
    return int'(w[2:0]) == 5 - $countones(w[7:3]);
  endfunction

  task automatic apply(input logic [7:0] w);
    {y, z, chk} = w;
    #1;
  endtask

  initial begin
    logic [7:0] w, e;
    for (int i = 0; i < 256; i++) begin
      w = 8'(i);
      apply(w);
      checks++;
      if (is_code(w)) begin
        codewords++;
        if (!(u1 == 1'b1 && u2 == 1'b0)) begin
          failures++;
          $display("code word %b: u=%b%b, expected 10", w, u1, u2);
        end
      end else if (!(u1 == 1'b0 && u2 == 1'b1)) begin
        failures++;
        $display("non-code word %b: u=%b%b, expected 01", w, u1, u2);
      end
    end
    checks++;
    if (codewords != 32) begin
      failures++;
      $display("%0d code words, expected 32", codewords);
    end
    for (int i = 0; i < 256; i++) begin
      w = 8'(i);
      if (!is_code(w)) continue;
      for (int m = 1; m < 256; m++) begin
        // 0 -> 1 errors on the 0 bits selected by m
        if ((8'(m) & w) == 8'h00) begin
          e = w | 8'(m);
          apply(e);
          uni_errors++;
          checks++;
          if (!(u1 == 1'b0 && u2 == 1'b1)) begin
            failures++;
            $display("0->1 error %b on %b not detected", 8'(m), w);
          end
        end
        // 1 -> 0 errors on the 1 bits selected by m
        if ((8'(m) & ~w) == 8'h00) begin
          e = w & ~8'(m);
          apply(e);
          uni_errors++;
          checks++;
          if (!(u1 == 1'b0 && u2 == 1'b1)) begin
            failures++;
            $display("1->0 error %b on %b not detected", 8'(m), w);
          end
        end
      end
    end
    $display("%0d unidirectional errors applied", uni_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
