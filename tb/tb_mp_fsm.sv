// tb_mp_fsm: two microprogrammable FSMs, one per code, run on random
// inputs. Every clock the state must follow the reference Gray counter and
// the signature must equal the reference compression (long division, or
// base-4 value modulo 3) of all states since the last clear. Then one
// control store word is reprogrammed and the FSM must follow the new word.
module tb_mp_fsm;
  import esa_pkg::*;
  import esa_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       clear = 1'b0;
  logic [0:0] x = '0;
  logic [1:0] y_alg, y_ari, sig_alg, sig_ari;
  logic       prog_we = 1'b0;
  cs_addr_t   prog_addr = '0;
  cs_word_t   prog_data = '0;
  int         checks = 0;
  int         failures = 0;

  mp_fsm #(.CODE(CODE_ALGEBRAIC)) dut_alg (
    .clk, .rst_n, .clear, .x, .y(y_alg), .sig(sig_alg), .prog_we, .prog_addr, .prog_data);
  mp_fsm #(.CODE(CODE_ARITHMETIC)) dut_ari (
    .clk, .rst_n, .clear, .x, .y(y_ari), .sig(sig_ari), .prog_we, .prog_addr, .prog_data);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] hist [];
    logic [1:0] y_exp;
    hist = new[300];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      int n;
      n = 1 + ($urandom % 250);
      @(negedge clk);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      y_exp = 2'b00;
      for (int i = 0; i < n; i++) begin
        hist[i] = y_exp;
        x = 1'($urandom);
        y_exp = ref_fsm(x[0], y_exp);
        @(negedge clk);
        checks++;
        if (y_alg !== y_exp || y_ari !== y_exp ||
            sig_alg !== poly_sig(hist, i + 1) || sig_ari !== mod3_sig(hist, i + 1)) begin
          failures++;
          $display("FAIL step %0d: y=%b/%b exp %b sig=%b/%b exp %b/%b", i, y_alg, y_ari,
                   y_exp, sig_alg, sig_ari, poly_sig(hist, i + 1), mod3_sig(hist, i + 1));
        end
      end
    end
    // Reprogram state 00, signature 00, input 1 to go to state 10 with
    // signature 11, and take that transition.
    @(negedge clk);
    prog_we   = 1'b1;
    prog_addr = '{x: 1'b1, y: 2'b00, s: 2'b00};
    prog_data = '{y_next: 2'b10, s_next: 2'b11};
    clear     = 1'b1;
    @(negedge clk);
    prog_we = 1'b0;
    clear   = 1'b0;
    x       = 1'b1;
    @(negedge clk);
    checks++;
    if (y_alg !== 2'b10 || sig_alg !== 2'b11 || y_ari !== 2'b10 || sig_ari !== 2'b11) begin
      failures++;
      $display("FAIL reprogrammed word: y=%b sig=%b", y_alg, sig_alg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
