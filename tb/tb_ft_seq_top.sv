// tb_ft_seq_top: end-to-end test of the fault-tolerant sequential circuit at
// its default sizes.
//
// Random inputs drive the machine for NCYC cycles. A model of the up/down
// modulo-8 counter, written here from integers, gives the expected outputs y
// and next state z each cycle. Faults are injected by forcing internal nets
// during one clock cycle, or a run of 2-4 cycles for an intermittent fault,
// and at most one module is faulty at a time:
//   SAF_K1  a stuck-at fault in SCSC1: a random set of K1's output bits
//           (y', z', check bits) forced to the same value, 0 or 1, i.e. a
//           unidirectional error;
//   PDF_K1  a path delay fault in SCSC1: one K1 output bit whose value changed
//           since the previous cycle still shows its previous value;
//   SC2     an arbitrary error on K2's outputs y'', z'';
//   SC2_FF  an upset of SC2's state flip-flops d'' (their outputs forced to a
//           wrong state);
//   CH      the checker outputs u1 u2 forced to an arbitrary value;
//   MUX     the multiplexer's select forced the wrong way.
// Every cycle the outputs must match the model, and both state registers must
// hold the model's state after the clock edge (a copy that computed a wrong
// next state is resynchronised). For K1 faults the error flag must be raised
// whenever the forced word differs from the correct one. Each mechanism must
// occur at least once: selecting K2 by the checker, each fault class having a
// visible effect, and resynchronisation of SCSC1's state after a K1 error and
// of SC2's state after a flip-flop upset. Faults in SCSC1's own flip-flops d'
// are not injected: with the example machine and an RTL-level K1 they give a
// valid code word for the wrong state, which the scheme cannot mask.
module tb_ft_seq_top;
  import ft_fsm_pkg::*;

  localparam int NCYC = 4000;

  typedef enum int { F_NONE, F_SAF_K1, F_PDF_K1, F_SC2, F_SC2_FF, F_CH, F_MUX } fault_e;

  logic clk;
  logic rst_n;
  x_t   x;
  y_t   y;
  z_t   z;
  logic err;

  int checks = 0;
  int failures = 0;
  int st;                       // model state

  // how often each mechanism happened
  int n_k1_selected = 0;
  int n_k2_selected = 0;
  int n_saf = 0;
  int n_pdf = 0;
  int n_sc2 = 0;
  int n_ch = 0;
  int n_mux = 0;
  int n_resync = 0;
  int n_sc2_ff = 0;
  int n_sc2_resync = 0;

  ft_seq_top dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y), .z(z), .err(err));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("cycle state %0d x=%b: %s", st, x, what);
    end
  endtask

  task automatic release_all();
    release dut.k1_y;
    release dut.k1_z;
    release dut.k1_chk;
    release dut.k2_y;
    release dut.k2_z;
    release dut.u1;
    release dut.u2;
    release dut.u_mux.sel_k1;
    release dut.u_sc2.z_q;
  endtask

  initial begin
    fault_e     mode;
    int         run_left;
    logic [7:0] word, prev_word, mask, bad;
    logic       stuck_val;
    logic [4:0] k2_mask;
    logic [1:0] u_val;
    bit         k1_wrong;
    bit         sc2_upset;
    int         en, up, nx, carry, borrow;

    rst_n = 1'b0;
    x = '0;
    st = 0;
    mode = F_NONE;
    run_left = 0;
    mask = '0;
    stuck_val = 1'b0;
    k2_mask = '0;
    u_val = '0;
    prev_word = '0;
    sc2_upset = 1'b0;
    #12;
    rst_n = 1'b1;

    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      release_all();
      x = x_t'($urandom);
      #1;
      // fault-free K1 word of this cycle: {y', z', check bits}
      word = {dut.k1_y, dut.k1_z, dut.k1_chk};

      // choose a new fault, or continue an intermittent one. An upset
      // flip-flop keeps its wrong value until the next clock edge after the
      // force is lifted, so that cycle is kept free of other faults.
      if (run_left == 0 && mode == F_SC2_FF) begin
        mode = F_NONE;
        run_left = 1;
      end else if (run_left == 0) begin
        case ($urandom % 9)
          0, 1, 2: mode = F_NONE;
          3:       mode = F_SAF_K1;
          4:       mode = F_PDF_K1;
          5:       mode = F_SC2;
          6:       mode = F_SC2_FF;
          7:       mode = F_CH;
          default: mode = F_MUX;
        endcase
        run_left  = ($urandom % 4 == 0) ? 2 + int'($urandom % 3) : 1;
        mask      = 8'($urandom) | 8'(1 << ($urandom % 8));
        stuck_val = 1'($urandom);
        k2_mask   = 5'($urandom) | 5'(1 << ($urandom % 5));
        u_val     = 2'($urandom);
      end
      run_left--;

      k1_wrong = 1'b0;
      case (mode)
        F_SAF_K1: begin
          bad = stuck_val ? (word | mask) : (word & ~mask);
          force dut.k1_y   = bad[7:6];
          force dut.k1_z   = bad[5:3];
          force dut.k1_chk = bad[2:0];
          k1_wrong = (bad != word);
          if (k1_wrong) n_saf++;
        end
        F_PDF_K1: begin
          // the first bit that changed since the previous cycle lags behind
          bad = word;
          for (int b = 0; b < 8; b++) begin
            if (word[b] != prev_word[b]) begin
              bad[b] = prev_word[b];
              break;
            end
          end
          force dut.k1_y   = bad[7:6];
          force dut.k1_z   = bad[5:3];
          force dut.k1_chk = bad[2:0];
          k1_wrong = (bad != word);
          if (k1_wrong) n_pdf++;
        end
        F_SC2: begin
          force dut.k2_y = dut.k2_y ^ k2_mask[4:3];
          force dut.k2_z = dut.k2_z ^ k2_mask[2:0];
          n_sc2++;
        end
        F_SC2_FF: begin
          force dut.u_sc2.z_q = z_t'(st) ^ k2_mask[2:0];
          n_sc2_ff++;
        end
        F_CH: begin
          force dut.u1 = u_val[1];
          force dut.u2 = u_val[0];
          n_ch++;
        end
        F_MUX: begin
          force dut.u_mux.sel_k1 = 1'b0;
          n_mux++;
        end
        default: ;
      endcase
      prev_word = word;
      #1;

      // expected behaviour from the model
      en = int'(x[0]);
      up = int'(x[1]);
      nx = (en == 0) ? st : (up == 1 ? (st + 1) % 8 : (st + 7) % 8);
      carry  = (en == 1 && up == 1 && st == 7) ? 1 : 0;
      borrow = (en == 1 && up == 0 && st == 0) ? 1 : 0;

      check(int'(z) == nx, $sformatf("next state z=%0d, expected %0d (fault %s)", z, nx, mode.name()));
      check(int'(y[0]) == carry && int'(y[1]) == borrow,
            $sformatf("y=%b, expected carry %0d borrow %0d (fault %s)", y, carry, borrow, mode.name()));
      if (k1_wrong) check(err == 1'b1, $sformatf("K1 error not flagged (fault %s)", mode.name()));
      if (mode == F_NONE || mode == F_SC2 || mode == F_SC2_FF) check(err == 1'b0, "error flagged with K1 fault-free");
      if (err) n_k2_selected++;
      else     n_k1_selected++;

      @(posedge clk);
      #1;
      st = nx;
      check(int'(dut.u_scsc1.z_q) == st, "SCSC1 state register not on the model state");
      if (mode == F_SC2_FF) begin
        // the upset flip-flops are still forced; they reload at the next edge
        sc2_upset = 1'b1;
      end else begin
        check(int'(dut.u_sc2.z_q) == st, "SC2 state register not on the model state");
        if (sc2_upset) n_sc2_resync++;
        sc2_upset = 1'b0;
      end
      if (k1_wrong && bad[5:3] != word[5:3] && int'(dut.u_scsc1.z_q) == st) n_resync++;
    end
    release_all();

    $display("K1 selected %0d, K2 selected %0d, SAF in K1 %0d, PDF in K1 %0d",
             n_k1_selected, n_k2_selected, n_saf, n_pdf);
    $display("SC2 faults %0d, checker faults %0d, MUX faults %0d, SCSC1 resynchronised %0d",
             n_sc2, n_ch, n_mux, n_resync);
    $display("SC2 flip-flop upsets %0d, SC2 resynchronised %0d", n_sc2_ff, n_sc2_resync);
    check(n_k1_selected > 0, "K1 never selected");
    check(n_k2_selected > 0, "K2 never selected");
    check(n_saf > 0, "no stuck-at fault in K1 took effect");
    check(n_pdf > 0, "no path delay fault in K1 took effect");
    check(n_sc2 > 0, "no SC2 fault injected");
    check(n_sc2_ff > 0, "no SC2 flip-flop upset injected");
    check(n_sc2_resync > 0, "SC2 never resynchronised after a flip-flop upset");
    check(n_ch > 0, "no checker fault injected");
    check(n_mux > 0, "no MUX fault injected");
    check(n_resync > 0, "SCSC1 never resynchronised after a wrong next state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
