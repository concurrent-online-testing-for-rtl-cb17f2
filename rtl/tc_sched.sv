// tc_sched: scheduling state machine of the distributed test controller.
//
// Tiles are chained into token rings; a tile may test its own core only while
// it holds its ring's token, so the number of tokens bounds how many cores are
// under test at once. The states follow the protocol of the document:
//   WAIT_TOKEN  - no token; a token arriving on token_in is latched.
//   INIT_TEST   - token held and a test is wanted: ask the system to move the
//                 core's task away (isolate), wait for isolate_ack.
//   IN_PROG     - test vectors are fetched and applied (start pulse given).
//   COMPLETE    - test finished; pass or fail decided from test_pass.
//   FT_RESP     - failed: the core is disabled (sticky core_disabled).
//   WAIT_SEND   - ready to hand the token on; it leaves on the next `step`.
// A tile that receives the token without a pending test request goes
// straight to WAIT_SEND. Test requests come from the ATTU or from software
// (test_want) and stay pending until a test starts; periodic testing is the
// case where software keeps test_want high.
//
// Token hand-over is this design's choice: `step` is a system-wide pulse that
// moves every waiting token one tile along its ring in the same cycle, so that
// tokens stay on tiles of one interleaving colour (code-division scheduling).
// token_out is a one-cycle pulse in the cycle `step` is seen in WAIT_SEND.
// has_token is high from the cycle after a token arrives until it leaves;
// ready_to_pass is high in WAIT_SEND. A tile with core_disabled set no longer
// tests but still passes the token on.
module tc_sched (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  init_token,   // this tile holds a token after reset
  input  logic                  token_in,
  input  logic                  step,
  output logic                  token_out,
  input  logic                  test_want,
  input  logic                  isolate_ack,
  input  logic                  test_done,
  input  logic                  test_pass,
  output logic                  start_test,
  output logic                  isolate,
  output logic                  core_disabled,
  output logic                  has_token,
  output logic                  ready_to_pass,
  output colt_pkg::tc_state_t   state,
  output logic [15:0]           tests_run,
  output logic [15:0]           tests_failed
);
  import colt_pkg::*;

  logic tok;       // token latched while in WAIT_TOKEN
  logic pending;   // a test has been asked for and not yet started

  assign has_token     = tok || (state != TC_WAIT_TOKEN);
  assign ready_to_pass = (state == TC_WAIT_SEND);
  assign token_out     = (state == TC_WAIT_SEND) && step;
  assign isolate       = (state == TC_INIT_TEST) || (state == TC_IN_PROG) ||
                         (state == TC_COMPLETE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= TC_WAIT_TOKEN;
      tok           <= init_token;
      pending       <= 1'b0;
      start_test    <= 1'b0;
      core_disabled <= 1'b0;
      tests_run     <= '0;
      tests_failed  <= '0;
    end else begin
      start_test <= 1'b0;
      if (test_want) pending <= 1'b1;
      unique case (state)
        TC_WAIT_TOKEN: begin
          if (token_in) tok <= 1'b1;
          if (tok) begin
            tok   <= 1'b0;
            state <= (pending && !core_disabled) ? TC_INIT_TEST : TC_WAIT_SEND;
          end
        end
        TC_INIT_TEST: if (isolate_ack) begin
          start_test <= 1'b1;
          pending    <= 1'b0;
          state      <= TC_IN_PROG;
        end
        TC_IN_PROG: if (test_done) state <= TC_COMPLETE;
        TC_COMPLETE: begin
          tests_run <= tests_run + 1'b1;
          if (test_pass) begin
            state <= TC_WAIT_SEND;
          end else begin
            tests_failed <= tests_failed + 1'b1;
            state        <= TC_FT_RESP;
          end
        end
        TC_FT_RESP: begin
          core_disabled <= 1'b1;
          state         <= TC_WAIT_SEND;
        end
        TC_WAIT_SEND: if (step) state <= TC_WAIT_TOKEN;
        default: state <= TC_WAIT_TOKEN;
      endcase
    end
  end

endmodule
