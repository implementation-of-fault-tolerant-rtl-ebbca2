// tb_mod5_parallel: the default generator (3-bit digits, modulo 5) gets an
// exhaustive sweep of one step (every residue 0..4 followed by every digit
// 0..7) and random numbers of 1 to 21 octal digits, most significant digit
// first. Two other configurations, 4-bit digits modulo 7 and 2-bit digits
// modulo 9, take their own random digits alongside. After every digit each
// residue must equal (number so far) % G, computed with integer arithmetic.
module tb_mod5_parallel;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       clear = 1'b0;
  logic       en = 1'b0;
  logic [2:0] d = '0;
  logic [3:0] d7 = '0;
  logic [1:0] d9 = '0;
  logic [2:0] residue, residue7;
  logic [3:0] residue9;
  int         checks = 0;
  int         failures = 0;

  mod5_parallel dut (.clk, .rst_n, .clear, .en, .d, .residue);
  mod5_parallel #(.G(7), .K(4)) dut7 (.clk, .rst_n, .clear, .en, .d(d7), .residue(residue7));
  mod5_parallel #(.G(9), .K(2)) dut9 (.clk, .rst_n, .clear, .en, .d(d9), .residue(residue9));

  always #5 clk = ~clk;

  task automatic check(input longint unsigned v, input longint unsigned v7,
                       input longint unsigned v9, input string what);
    checks++;
    if (residue !== 3'(v % 5) || residue7 !== 3'(v7 % 7) || residue9 !== 4'(v9 % 9)) begin
      failures++;
      $display("FAIL %s: residues %0d %0d %0d expected %0d %0d %0d", what, residue, residue7,
               residue9, v % 5, v7 % 7, v9 % 9);
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
    check(0, 0, 0, "after reset");
    // Exhaustive single step of the default generator from each residue.
    for (int r = 0; r < 5; r++) begin
      for (int dig = 0; dig < 8; dig++) begin
        clear = 1'b1;
        @(negedge clk);
        clear = 1'b0;
        en = 1'b1;
        d  = 3'(r);
        d7 = 4'(r);
        d9 = 2'(r % 4);
        @(negedge clk);
        d  = 3'(dig);
        d7 = 4'(dig);
        d9 = 2'(dig);
        @(negedge clk);
        en = 1'b0;
        check(longint'(8 * r + dig), longint'(16 * r + dig), longint'(4 * (r % 4) + dig % 4),
              "step");
      end
    end
    for (int t = 0; t < 200; t++) begin
      longint unsigned v, v7, v9;
      int n;
      n = 1 + ($urandom % 15);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      check(0, 0, 0, "after clear");
      v = 0;
      v7 = 0;
      v9 = 0;
      for (int i = 0; i < n; i++) begin
        d  = 3'($urandom);
        d7 = 4'($urandom);
        d9 = 2'($urandom);
        en = 1'b1;
        v  = 8 * v + d;
        v7 = 16 * v7 + d7;
        v9 = 4 * v9 + d9;
        @(negedge clk);
        check(v, v7, v9, "digit");
      end
      en = 1'b0;
      d  = 3'd7;
      @(negedge clk);
      check(v, v7, v9, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
