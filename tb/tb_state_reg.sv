// tb_state_reg: checks the state flip-flops. The asynchronous reset must load
// the reset value at once, without a clock edge; afterwards q must show, after
// each rising edge, the d applied before it (one cycle of latency). A second
// instance checks a non-zero reset value.
module tb_state_reg;
  logic       clk;
  logic       rst_n;
  logic [2:0] d;
  logic [2:0] q, q5;
  logic [2:0] expected;
  logic [2:0] prev;

  int checks = 0;
  int failures = 0;

  state_reg #(.P_STATE(3)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));
  state_reg #(.P_STATE(3), .RESET_STATE(3'd5)) dut5 (.clk(clk), .rst_n(rst_n), .d(d), .q(q5));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [2:0] got, input logic [2:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: q=%0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b1;
    d = 3'd6;
    @(posedge clk);
    @(negedge clk);
    rst_n = 1'b0;          // asynchronous: no edge needed
    #1;
    check(q, 3'd0, "async reset");
    check(q5, 3'd5, "async reset to 5");
    @(posedge clk);
    #1;
    check(q, 3'd0, "held in reset");
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      prev = q;
      d = 3'($urandom);
      expected = d;
      #1;
      check(q, prev, "no change before the clock edge");
      @(posedge clk);
      #1;
      check(q, expected, "load");
      check(q5, expected, "load (second instance)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
