// tb_tc_sched: walks the scheduling state machine through a token that
// passes straight through (no test wanted), a passing test, and a failing
// test that ends in the fault-tolerance response; checks that the token
// only leaves on `step` and that isolation brackets the test.
module tb_tc_sched;
  import colt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init_token, token_in, step, token_out, test_want, isolate_ack, test_done, test_pass;
  logic start_test, isolate, core_disabled, has_token, ready_to_pass;
  tc_state_t state;
  logic [15:0] tests_run, tests_failed;

  tc_sched dut (.*);

  task automatic chk(logic c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic pass_token();
    @(negedge clk); chk(ready_to_pass && state == TC_WAIT_SEND, "ready");
    chk(!token_out, "no token_out without step");
    step = 1; #1; chk(token_out, "token_out on step");
    @(negedge clk); step = 0; chk(state == TC_WAIT_TOKEN && !has_token, "token gone");
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    init_token = 0; token_in = 0; step = 0; test_want = 0; isolate_ack = 0;
    test_done = 0; test_pass = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    chk(state == TC_WAIT_TOKEN && !has_token, "idle without token");
    // token with nothing to test
    token_in = 1; @(negedge clk); token_in = 0;
    chk(has_token, "has token");
    @(negedge clk);
    pass_token();
    // test wanted before the token arrives
    test_want = 1; @(negedge clk); test_want = 0;
    repeat (3) @(negedge clk);
    chk(state == TC_WAIT_TOKEN, "waits for token");
    token_in = 1; @(negedge clk); token_in = 0;
    @(negedge clk); chk(state == TC_INIT_TEST && isolate, "init test, isolate");
    repeat (2) @(negedge clk); chk(state == TC_INIT_TEST, "waits for isolate ack");
    isolate_ack = 1; #1; @(posedge clk); #1 chk(start_test, "start pulse");
    @(negedge clk); isolate_ack = 0; chk(state == TC_IN_PROG, "in progress");
    @(negedge clk); chk(!start_test, "start is a pulse");
    repeat (5) @(negedge clk);
    test_pass = 1; test_done = 1; @(negedge clk); test_done = 0;
    chk(state == TC_COMPLETE, "complete");
    @(negedge clk);
    pass_token();
    chk(tests_run == 1 && tests_failed == 0 && !core_disabled, "pass counted");
    // failing test
    test_want = 1; token_in = 1; @(negedge clk); token_in = 0; test_want = 0;
    isolate_ack = 1;
    repeat (3) @(negedge clk); isolate_ack = 0;
    test_pass = 0; test_done = 1; @(negedge clk); test_done = 0;
    @(negedge clk); chk(state == TC_FT_RESP, "FT response");
    @(negedge clk); chk(core_disabled, "core disabled");
    pass_token();
    chk(tests_run == 2 && tests_failed == 1, "fail counted");
    // a disabled core is not tested again
    test_want = 1; token_in = 1; @(negedge clk); token_in = 0; test_want = 0;
    @(negedge clk); chk(state == TC_WAIT_SEND, "disabled core skips test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
