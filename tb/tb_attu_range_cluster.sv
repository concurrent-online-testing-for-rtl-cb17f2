// tb_attu_range_cluster: address range learning of the ATTU with 4 rows.
// Part 1, a hand-worked case: train 10, 20, 100, 200 (rows fill), then 110
// (nearest pair [10]-[20] merges) and 1000 ([100]-[110] merges); in monitor
// mode 15, 105, 200, 1000 must hit and 5, 21, 150, 201 must be anomalies.
// Part 2: 300 random training values against a reference model written here
// as a sorted queue, then 500 random monitor values compared one by one.
// Also checks the one-cycle result latency and `clear`.
module tb_attu_range_cluster;
  localparam int ROWS = 4;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, clear, train, obs_valid, anomaly, hit;
  logic [31:0] obs_val;
  logic [2:0]  used;
  logic [15:0] merges;

  attu_range_cluster #(.ROWS(ROWS), .AW(32)) dut (
    .clk, .rst_n, .clear, .train, .obs_valid, .obs_val, .anomaly, .hit, .used, .merges);

  // reference: list of [lo, hi] kept sorted
  logic [31:0] rlo[$], rhi[$];
  int          rmerges;

  function automatic bit ref_cover(logic [31:0] v);
    foreach (rlo[i]) if (rlo[i] <= v && v <= rhi[i]) return 1;
    return 0;
  endfunction

  function automatic void ref_train(logic [31:0] v);
    int p, m; logic [31:0] gmin;
    if (ref_cover(v)) return;
    p = 0;
    foreach (rlo[i]) if (rlo[i] < v) p = i + 1;
    rlo.insert(p, v); rhi.insert(p, v);
    if (rlo.size() > ROWS) begin
      gmin = '1; m = 0;
      for (int i = 0; i + 1 < rlo.size(); i++)
        if (rlo[i+1] - rhi[i] < gmin) begin gmin = rlo[i+1] - rhi[i]; m = i; end
      rhi[m] = rhi[m+1];
      rlo.delete(m + 1); rhi.delete(m + 1);
      rmerges++;
    end
  endfunction

  task automatic observe(logic [31:0] v);
    obs_valid <= 1; obs_val <= v;
    @(posedge clk);
    obs_valid <= 0;
    @(negedge clk);   // results are registered: visible one cycle later
  endtask

  task automatic expect_mon(logic [31:0] v, bit exp_anom);
    observe(v);
    checks++;
    if (anomaly !== exp_anom || hit !== !exp_anom) begin
      failures++;
      $display("FAIL value %0d: anomaly=%b hit=%b expected anomaly=%b", v, anomaly, hit, exp_anom);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 0; clear = 0; train = 1; obs_valid = 0; obs_val = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // ---- part 1 ----
    observe(10); observe(20); observe(100); observe(200);
    checks++; if (used != 4 || merges != 0) begin failures++; $display("FAIL fill used=%0d", used); end
    observe(110);
    checks++; if (merges != 1) begin failures++; $display("FAIL merge 1"); end
    observe(1000);
    checks++; if (merges != 2 || used != 4) begin failures++; $display("FAIL merge 2"); end
    train <= 0;
    expect_mon(15, 0);  expect_mon(105, 0); expect_mon(200, 0); expect_mon(1000, 0);
    expect_mon(5, 1);   expect_mon(21, 1);  expect_mon(150, 1); expect_mon(201, 1);
    // no result without obs_valid
    @(negedge clk);
    checks++; if (anomaly || hit) failures++;
    // ---- clear ----
    clear <= 1; @(posedge clk); clear <= 0; @(negedge clk);
    checks++; if (used != 0) failures++;
    expect_mon(15, 1);
    // ---- part 2: random against the reference ----
    rlo.delete(); rhi.delete(); rmerges = 0;
    train <= 1;
    for (int i = 0; i < 300; i++) begin
      logic [31:0] v;
      v = 32'h4000_0000 + ($urandom % 32'h0001_0000) * (($urandom % 4 == 0) ? 32'd4096 : 32'd1);
      ref_train(v);
      observe(v);
    end
    checks++; if (int'(used) != rlo.size()) begin failures++; $display("FAIL used %0d vs %0d", used, rlo.size()); end
    checks++; if (int'(merges) - 2 != rmerges) begin failures++; $display("FAIL merges %0d vs %0d", merges, rmerges); end
    train <= 0;
    for (int i = 0; i < 500; i++) begin
      logic [31:0] v;
      v = 32'h4000_0000 + ($urandom % 32'h0001_0000) * (($urandom % 4 == 0) ? 32'd4096 : 32'd1);
      if (i % 3 == 0) v = rlo[i % rlo.size()] + (rhi[i % rlo.size()] - rlo[i % rlo.size()]) / 2;
      expect_mon(v, !ref_cover(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
