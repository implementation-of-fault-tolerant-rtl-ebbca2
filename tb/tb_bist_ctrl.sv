// tb_bist_ctrl: the controller alone, with a signature input the testbench
// drives. Checks the CLEAR / RUN sequencing of test_mode and fsm_clear, the
// test pattern against the reference LFSR, the latency from start to done
// (TEST_LEN + 3 rising edges), and the pass/fail verdict for a matching and
// a mismatching signature. Run at the default and at a short test length.
module tb_bist_ctrl;
  import esa_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  logic [1:0] ref_sig = '0;
  logic [1:0] sig = '0;
  logic       tm16, clr16, x16, busy16, done16, pass16, fail16;
  logic       tm5, clr5, x5, busy5, done5, pass5, fail5;
  int         checks = 0;
  int         failures = 0;

  bist_ctrl dut16 (
    .clk, .rst_n, .start, .ref_sig, .sig, .test_mode(tm16), .fsm_clear(clr16),
    .tpg_x(x16), .busy(busy16), .done(done16), .pass(pass16), .fail(fail16));
  bist_ctrl #(.TEST_LEN(5)) dut5 (
    .clk, .rst_n, .start, .ref_sig, .sig, .test_mode(tm5), .fsm_clear(clr5),
    .tpg_x(x5), .busy(busy5), .done(done5), .pass(pass5), .fail(fail5));

  always #5 clk = ~clk;

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One test on both controllers; sig equals ref_sig when match = 1.
  task automatic run_test(input logic match);
    int edges;
    ref_sig = 2'($urandom);
    sig     = match ? ref_sig : ~ref_sig;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);          // edge 0 took start
    start = 1'b0;
    edges = 1;
    // CLEAR cycle
    expect_bit(clr16, 1'b1, "clear16");
    expect_bit(tm16, 1'b1, "mode16");
    expect_bit(clr5, 1'b1, "clear5");
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      edges++;
      expect_bit(clr16, 1'b0, "no clear16");
      expect_bit(tm16, 1'b1, "run mode16");
      expect_bit(x16, tpg_bit(k), "pattern16");
      if (k < 5) begin
        expect_bit(tm5, 1'b1, "run mode5");
        expect_bit(x5, tpg_bit(k), "pattern5");
      end else if (k == 6) begin
        expect_bit(done5, 1'b1, "done5 latency");
        expect_bit(pass5, match, "pass5");
        expect_bit(fail5, !match, "fail5");
      end else begin
        expect_bit(done5, 1'b0, "done5 only once");
      end
    end
    // CHECK cycle, then done.
    @(negedge clk);
    edges++;
    expect_bit(tm16, 1'b0, "mode16 off");
    expect_bit(done16, 1'b0, "done16 early");
    @(negedge clk);
    edges++;
    checks++;
    if (edges != 16 + 3) begin
      failures++;
      $display("FAIL latency %0d", edges);
    end
    expect_bit(done16, 1'b1, "done16 latency");
    expect_bit(pass16, match, "pass16");
    expect_bit(fail16, !match, "fail16");
    expect_bit(busy16, 1'b0, "idle16");
    sig = ~sig;               // verdict must hold after the test
    @(negedge clk);
    expect_bit(done16, 1'b0, "done16 pulse");
    expect_bit(pass16, match, "pass16 held");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_bit(busy16, 1'b0, "idle after reset");
    expect_bit(tm16, 1'b0, "normal mode after reset");
    for (int i = 0; i < 6; i++) run_test(1'(i % 2 == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
