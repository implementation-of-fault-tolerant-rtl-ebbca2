// tb_sig_analyzer2: random response streams into the 2-bit parallel
// signature analyzer; after every word the register must equal the
// remainder of the stream polynomial modulo x^2 + x + 1 (long division in
// the reference package). Also checks hold (en = 0) and clear.
module tb_sig_analyzer2;
  import esa_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       clear = 1'b0;
  logic       en = 1'b0;
  logic [1:0] d = '0;
  logic [1:0] sig;
  int         checks = 0;
  int         failures = 0;

  sig_analyzer2 dut (.clk, .rst_n, .clear, .en, .d, .sig);

  always #5 clk = ~clk;

  task automatic check(input logic [1:0] exp, input string what);
    checks++;
    if (sig !== exp) begin
      failures++;
      $display("FAIL %s: sig=%b expected %b", what, sig, exp);
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
    logic [1:0] w [];
    w = new[64];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(2'b00, "after reset");
    for (int t = 0; t < 60; t++) begin
      int n;
      n = 1 + ($urandom % 40);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      check(2'b00, "after clear");
      for (int i = 0; i < n; i++) begin
        w[i] = 2'($urandom);
        d  = w[i];
        en = 1'b1;
        @(negedge clk);
        check(poly_sig(w, i + 1), "stream");
        // Idle clocks in between must not change the signature.
        if ($urandom % 4 == 0) begin
          en = 1'b0;
          d  = 2'($urandom);
          @(negedge clk);
          check(poly_sig(w, i + 1), "hold");
        end
      end
      en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
