// tb_control_store: after reset every word of both images (polynomial
// division and modulo-3 residue) must hold the reference FSM's next state
// and the reference analyzer step; then random words are written through
// the write port and read back, and a second reset must restore the image.
module tb_control_store;
  import esa_pkg::*;
  import esa_ref_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  cs_addr_t raddr = '0;
  cs_word_t rd_alg, rd_ari;
  logic     we = 1'b0;
  cs_addr_t waddr = '0;
  cs_word_t wdata = '0;
  int       checks = 0;
  int       failures = 0;

  control_store #(.CODE(CODE_ALGEBRAIC)) dut_alg (
    .clk, .rst_n, .raddr, .rdata(rd_alg), .we, .waddr, .wdata);
  control_store #(.CODE(CODE_ARITHMETIC)) dut_ari (
    .clk, .rst_n, .raddr, .rdata(rd_ari), .we, .waddr, .wdata);

  always #5 clk = ~clk;

  task automatic check_image(input string what);
    logic [1:0] w [];
    w = new[2];
    for (int a = 0; a < CS_DEPTH; a++) begin
      logic [1:0] yn;
      raddr = cs_addr_t'(a);
      #1;
      w[0] = raddr.s;
      w[1] = raddr.y;
      yn = ref_fsm(raddr.x[0], raddr.y);
      checks++;
      if (rd_alg !== {yn, poly_sig(w, 2)} || rd_ari !== {yn, mod3_sig(w, 2)}) begin
        failures++;
        $display("FAIL %s addr %0d: alg=%b ari=%b", what, a, rd_alg, rd_ari);
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cs_word_t shadow [CS_DEPTH];
    cs_word_t shadow_ari [CS_DEPTH];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_image("after reset");
    for (int a = 0; a < CS_DEPTH; a++) begin
      raddr = cs_addr_t'(a);
      #1;
      shadow[a]     = rd_alg;
      shadow_ari[a] = rd_ari;
    end
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      we    = 1'b1;
      waddr = cs_addr_t'($urandom);
      wdata = cs_word_t'($urandom);
      shadow[waddr]     = wdata;
      shadow_ari[waddr] = wdata;
      @(negedge clk);
      we = 1'b0;
      for (int a = 0; a < CS_DEPTH; a++) begin
        raddr = cs_addr_t'(a);
        #1;
        checks++;
        if (rd_alg !== shadow[a] || rd_ari !== shadow_ari[a]) begin
          failures++;
          $display("FAIL write addr %0d: %b %b expected %b %b", a, rd_alg, rd_ari,
                   shadow[a], shadow_ari[a]);
        end
      end
    end
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_image("after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
