// tb_esa_top: end-to-end test of the whole design at its default
// parameters.
//
// Main design: the FSM runs in normal mode on random inputs (state and
// signature checked every clock); a self-test with the correct reference
// signature must pass; a fault written into a control store word on the
// test path must make the self-test fail; rewriting the whole control store
// with the modulo-3 image must switch the analyzer to the arithmetic code,
// and a self-test with the modulo-3 reference must pass, and the self-test
// latency must be TEST_LEN + 3 clocks. Stand-alone blocks: the serial and
// parallel mod-5 generators must agree with each other and with integer
// arithmetic on the same numbers, the mod-3 generator likewise, and the
// stand-alone analyzer must match long division. Each mechanism is counted
// and one that never happened counts as a failure.
module tb_esa_top;
  import esa_pkg::*;
  import esa_ref_pkg::*;

  localparam int TLEN = 16;   // default test length of the design

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [0:0] x_in = '0;
  logic [1:0] fsm_y, fsm_sig;
  logic       prog_we = 1'b0;
  cs_addr_t   prog_addr = '0;
  cs_word_t   prog_data = '0;
  logic       test_start = 1'b0;
  logic [1:0] ref_sig = '0;
  logic       test_busy, test_done, test_pass, test_fail;
  logic       sa_clear = 1'b0, sa_en = 1'b0;
  logic [1:0] sa_d = '0, sa_sig;
  logic       m5s_clear = 1'b0, m5s_en = 1'b0, m5s_u = 1'b0;
  logic [2:0] m5s_residue;
  logic       m5p_clear = 1'b0, m5p_en = 1'b0;
  logic [2:0] m5p_d = '0, m5p_residue;
  logic       mg_clear = 1'b0, mg_en = 1'b0;
  logic [1:0] mg_d = '0, mg_residue;

  int checks = 0;
  int failures = 0;
  int n_normal = 0, n_pass = 0, n_detect = 0, n_switch = 0, n_reprog = 0;
  int n_sa = 0, n_mod5 = 0, n_modg = 0;

  esa_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference control store: next state and analyzer step per address.
  cs_word_t img [CS_DEPTH];

  function automatic cs_word_t ref_word(input bit arith, input cs_addr_t a);
    logic [1:0] w [];
    w = new[2];
    w[0] = a.s;
    w[1] = a.y;
    return '{y_next: ref_fsm(a.x[0], a.y),
             s_next: arith ? mod3_sig(w, 2) : poly_sig(w, 2)};
  endfunction

  // Signature the self-test leaves with control store image img.
  function automatic logic [1:0] test_signature();
    cs_addr_t a;
    a = '0;
    for (int k = 0; k < TLEN; k++) begin
      cs_word_t w;
      a.x = tpg_bit(k);
      w   = img[a];
      a.y = w.y_next;
      a.s = w.s_next;
    end
    return a.s;
  endfunction

  task automatic run_self_test(input logic [1:0] rs, input bit expect_pass);
    int cyc;
    ref_sig = rs;
    @(negedge clk);
    test_start = 1'b1;
    @(negedge clk);
    test_start = 1'b0;
    cyc = 1;
    while (!test_done && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == TLEN + 3, $sformatf("self-test latency %0d", cyc));
    check(test_pass == expect_pass && test_fail == !expect_pass, "self-test verdict");
  endtask

  task automatic program_word(input cs_addr_t a, input cs_word_t w);
    @(negedge clk);
    prog_we   = 1'b1;
    prog_addr = a;
    prog_data = w;
    @(negedge clk);
    prog_we = 1'b0;
    img[a] = w;
  endtask

  initial begin
    logic [1:0] hist [];
    logic [1:0] y_exp, golden;
    hist = new[300];
    for (int a = 0; a < CS_DEPTH; a++) img[a] = ref_word(1'b0, cs_addr_t'(a));
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // Normal mode from reset.
    y_exp = 2'b00;
    for (int i = 0; i < 200; i++) begin
      hist[i] = y_exp;
      x_in  = 1'($urandom);
      y_exp = ref_fsm(x_in[0], y_exp);
      @(negedge clk);
      check(fsm_y == y_exp && fsm_sig == poly_sig(hist, i + 1), "normal mode");
      n_normal++;
    end

    // Self-test of the fault-free FSM.
    golden = test_signature();
    run_self_test(golden, 1'b1);
    n_pass++;
    run_self_test(~golden, 1'b0);

    // Fault in the first word the test reads: a wrong next state.
    begin
      cs_addr_t a0;
      cs_word_t good, bad;
      bit found;
      a0 = '{x: tpg_bit(0), y: 2'b00, s: 2'b00};
      good = img[a0];
      found = 0;
      for (int v = 0; v < 4 && !found; v++) begin
        if (2'(v) != good.y_next) begin
          img[a0] = '{y_next: 2'(v), s_next: good.s_next};
          if (test_signature() != golden) begin
            found = 1;
            bad = img[a0];
          end
        end
      end
      img[a0] = good;
      check(found, "a detectable fault exists");
      program_word(a0, bad);
      n_reprog++;
      run_self_test(golden, 1'b0);
      if (test_fail) n_detect++;
      program_word(a0, good);
      run_self_test(golden, 1'b1);
    end

    // Switch the embedded analyzer to the modulo-3 residue code.
    for (int a = 0; a < CS_DEPTH; a++) program_word(cs_addr_t'(a), ref_word(1'b1, cs_addr_t'(a)));
    golden = test_signature();
    run_self_test(golden, 1'b1);
    if (test_pass) n_switch++;
    run_self_test(~golden, 1'b0);

    // Reset restores the default image.
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < CS_DEPTH; a++) img[a] = ref_word(1'b0, cs_addr_t'(a));
    run_self_test(test_signature(), 1'b1);

    // Stand-alone 2-bit analyzer.
    @(negedge clk);
    sa_clear = 1'b1;
    @(negedge clk);
    sa_clear = 1'b0;
    for (int i = 0; i < 40; i++) begin
      hist[i] = 2'($urandom);
      sa_d  = hist[i];
      sa_en = 1'b1;
      @(negedge clk);
      check(sa_sig == poly_sig(hist, i + 1), "stand-alone analyzer");
      n_sa++;
    end
    sa_en = 1'b0;

    // Residue generators on the same numbers.
    for (int t = 0; t < 30; t++) begin
      longint unsigned num;
      num = {$urandom, $urandom} & 64'h0fff_ffff_ffff_ffff;   // 60 bits
      @(negedge clk);
      m5s_clear = 1'b1;
      m5p_clear = 1'b1;
      mg_clear  = 1'b1;
      @(negedge clk);
      m5s_clear = 1'b0;
      m5p_clear = 1'b0;
      mg_clear  = 1'b0;
      for (int i = 59; i >= 0; i--) begin
        m5s_u  = num[i];
        m5s_en = 1'b1;
        m5p_en = (i % 3 == 0);
        m5p_d  = 3'(num >> i);
        mg_en  = (i % 2 == 0);
        mg_d   = 2'(num >> i);
        @(negedge clk);
      end
      m5s_en = 1'b0;
      m5p_en = 1'b0;
      mg_en  = 1'b0;
      check(m5s_residue == 3'(num % 5) && m5p_residue == 3'(num % 5), "mod 5 residues");
      check(mg_residue == 2'(num % 3), "mod 3 residue");
      n_mod5++;
      n_modg++;
    end

    $display("mechanisms: normal=%0d test_pass=%0d fault_detected=%0d reprogram=%0d code_switch=%0d sa=%0d mod5=%0d modg=%0d",
             n_normal, n_pass, n_detect, n_reprog, n_switch, n_sa, n_mod5, n_modg);
    check(n_normal > 0, "normal mode happened");
    check(n_pass > 0, "passing self-test happened");
    check(n_detect > 0, "fault detection happened");
    check(n_reprog > 0, "reprogramming happened");
    check(n_switch > 0, "code switch happened");
    check(n_sa > 0, "stand-alone analyzer used");
    check(n_mod5 > 0, "mod 5 generators used");
    check(n_modg > 0, "mod g generator used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
