// tb_mod_br1_residue: the default generator (b = 2, r = 2, g = 3) and a
// second one with b = 4, r = 2 (g = 15) take random word streams; after
// every word the residue must equal the stream read as a base-2^W number,
// modulo g, computed by multiply-and-add integer arithmetic.
module tb_mod_br1_residue;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       clear = 1'b0;
  logic       en = 1'b0;
  logic [1:0] d3 = '0;
  logic [3:0] d15 = '0;
  logic [1:0] res3;
  logic [3:0] res15;
  int         checks = 0;
  int         failures = 0;

  mod_br1_residue dut3 (.clk, .rst_n, .clear, .en, .d(d3), .residue(res3));
  mod_br1_residue #(.B_BITS(2), .R(2)) dut15 (.clk, .rst_n, .clear, .en, .d(d15), .residue(res15));

  always #5 clk = ~clk;

  task automatic check(input int unsigned v3, input int unsigned v15, input string what);
    checks++;
    if (res3 !== 2'(v3) || res15 !== 4'(v15)) begin
      failures++;
      $display("FAIL %s: res3=%0d exp %0d, res15=%0d exp %0d", what, res3, v3, res15, v15);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(0, 0, "after reset");
    for (int t = 0; t < 200; t++) begin
      int unsigned v3, v15;
      int n;
      n = 1 + ($urandom % 30);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      check(0, 0, "after clear");
      v3 = 0;
      v15 = 0;
      for (int i = 0; i < n; i++) begin
        // Bias towards all-ones words to exercise the end-around carry.
        d3  = ($urandom % 3 == 0) ? 2'b11 : 2'($urandom);
        d15 = ($urandom % 3 == 0) ? 4'hf : 4'($urandom);
        en  = 1'b1;
        v3  = (v3 * 4 + d3) % 3;
        v15 = (v15 * 16 + d15) % 15;
        @(negedge clk);
        check(v3, v15, "word");
      end
      en = 1'b0;
      @(negedge clk);
      check(v3, v15, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
