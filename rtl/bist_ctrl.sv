// bist_ctrl: built-in self-test controller of the microprogrammable FSM.
//
// A self-test stimulates the circuit under test with a test input
// sequence, lets its responses be compressed into a signature and compares
// that signature with the one of the fault-free circuit; the circuit passes
// when they match. This controller does the sequencing: on start it clears
// the FSM and its signature (CLEAR, one clock), then drives the FSM inputs
// from a 4-bit maximal-length LFSR (x^4 + x^3 + 1, seed 0001) for TEST_LEN
// clocks (RUN), then compares the signature with ref_sig (CHECK). The LFSR,
// the test length and the handshake are this design's choices.
//
// Interface: start is taken in IDLE only. test_mode is high during CLEAR and
// RUN and selects tpg_x as the FSM input; fsm_clear is high during CLEAR.
// done is high for one clock, sampled at the (TEST_LEN + 3)th rising edge
// after the edge that took start; pass and fail then hold the verdict until
// the next start.
module bist_ctrl #(
  parameter int unsigned TEST_LEN = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [esa_pkg::SIG_W-1:0] ref_sig,
  input  logic [esa_pkg::SIG_W-1:0] sig,
  output logic                      test_mode,
  output logic                      fsm_clear,
  output logic                      tpg_x,
  output logic                      busy,
  output logic                      done,
  output logic                      pass,
  output logic                      fail
);
  typedef enum logic [1:0] {IDLE, CLEAR, RUN, CHECK} state_e;

  localparam int unsigned CW = $clog2(TEST_LEN + 1);

  state_e        state;
  logic [CW-1:0] count;
  logic [3:0]    lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      count <= '0;
      lfsr  <= 4'b0001;
      done  <= 1'b0;
      pass  <= 1'b0;
      fail  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state <= CLEAR;
          pass  <= 1'b0;
          fail  <= 1'b0;
        end
        CLEAR: begin
          state <= RUN;
          count <= '0;
          lfsr  <= 4'b0001;
        end
        RUN: begin
          lfsr <= {lfsr[2:0], lfsr[3] ^ lfsr[2]};
          if (count == CW'(TEST_LEN - 1)) state <= CHECK;
          count <= count + 1'b1;
        end
        CHECK: begin
          state <= IDLE;
          done  <= 1'b1;
          pass  <= (sig == ref_sig);
          fail  <= (sig != ref_sig);
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign test_mode = (state == CLEAR) || (state == RUN);
  assign fsm_clear = (state == CLEAR);
  assign tpg_x     = lfsr[0];
  assign busy      = (state != IDLE);

  // The verdict is never both pass and fail.
  a_verdict: assert property (@(posedge clk) disable iff (!rst_n) !(pass && fail));
  // A test always takes the same number of clocks.
  a_done: assert property (@(posedge clk) disable iff (!rst_n)
                           (state == IDLE && start) |-> ##(TEST_LEN + 3) done);

endmodule
