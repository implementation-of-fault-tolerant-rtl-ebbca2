// tb_mod5_serial: random numbers of 1 to 60 bits fed most significant bit
// first into the default mod-5 generator and into a mod-7 one; after every
// bit each residue must equal (number so far) % G, computed with integer
// arithmetic. Each bit costs exactly one clock.
module tb_mod5_serial;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       clear = 1'b0;
  logic       en = 1'b0;
  logic       u = 1'b0;
  logic [2:0] residue;
  logic [2:0] residue7;
  int         checks = 0;
  int         failures = 0;

  mod5_serial dut (.clk, .rst_n, .clear, .en, .u, .residue);
  mod5_serial #(.G(7)) dut7 (.clk, .rst_n, .clear, .en, .u, .residue(residue7));

  always #5 clk = ~clk;

  task automatic check(input longint unsigned v, input string what);
    checks++;
    if (residue !== 3'(v % 5) || residue7 !== 3'(v % 7)) begin
      failures++;
      $display("FAIL %s: residue=%0d/%0d value=%0d expected %0d/%0d", what, residue,
               residue7, v, v % 5, v % 7);
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
    check(0, "after reset");
    for (int t = 0; t < 200; t++) begin
      longint unsigned num, v;
      int n;
      n   = 1 + ($urandom % 60);
      num = {$urandom, $urandom};
      if (n < 64) num &= (64'd1 << n) - 1;
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      check(0, "after clear");
      v = 0;
      for (int i = n - 1; i >= 0; i--) begin
        u  = num[i];
        en = 1'b1;
        v  = 2 * v + num[i];
        @(negedge clk);
        check(v, "bit");
      end
      en = 1'b0;
      u  = 1'b1;
      @(negedge clk);
      check(v, "hold");
      checks++;
      if (v != num) begin
        failures++;
        $display("FAIL model");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
