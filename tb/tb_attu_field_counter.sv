// tb_attu_field_counter: per-value counters of the ATTU. Trains values 3, 7
// and 50 (value 9 twenty times, to cross the 4-bit counter's range), then
// checks in monitor mode that trained values are normal, untrained values
// and out-of-range values (>= VALUES) are anomalies, that the result comes
// one cycle after the observation, and that `clear` forgets everything.
// A second instance with THRESH = 3 checks the threshold rule.
module tb_attu_field_counter;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n, clear, train, obs_valid, anomaly, anomaly3;
  logic [6:0] obs_val;

  attu_field_counter #(.VALUES(100), .CW(4), .THRESH(1)) dut (
    .clk, .rst_n, .clear, .train, .obs_valid, .obs_val, .anomaly);
  attu_field_counter #(.VALUES(100), .CW(4), .THRESH(3)) dut3 (
    .clk, .rst_n, .clear, .train, .obs_valid, .obs_val, .anomaly(anomaly3));

  task automatic observe(int v);
    obs_valid <= 1; obs_val <= 7'(v);
    @(posedge clk);
    obs_valid <= 0;
    @(negedge clk);
  endtask

  task automatic expect_mon(int v, bit exp1, bit exp3);
    observe(v);
    checks++;
    if (anomaly !== exp1 || anomaly3 !== exp3) begin
      failures++;
      $display("FAIL value %0d: anomaly=%b/%b expected %b/%b", v, anomaly, anomaly3, exp1, exp3);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 0; clear = 0; train = 1; obs_valid = 0; obs_val = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    observe(3); observe(7); observe(7); observe(50); observe(50); observe(50);
    for (int i = 0; i < 20; i++) observe(9);
    checks++; if (anomaly) failures++;   // never flagged while training
    train <= 0;
    expect_mon(3, 0, 1);
    expect_mon(7, 0, 1);
    expect_mon(50, 0, 0);
    expect_mon(9, 0, 0);
    expect_mon(4, 1, 1);
    expect_mon(99, 1, 1);
    expect_mon(120, 1, 1);
    for (int i = 0; i < 100; i++) begin
      int v;
      v = $urandom % 128;
      expect_mon(v, !(v inside {3, 7, 9, 50}), !(v inside {9, 50}));
    end
    @(negedge clk);
    checks++; if (anomaly) failures++;   // nothing without obs_valid
    clear <= 1; @(posedge clk); clear <= 0;
    expect_mon(50, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
