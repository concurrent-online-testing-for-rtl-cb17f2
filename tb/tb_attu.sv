// tb_attu: the n-anomaly test triggering unit with 16 nodes, 4 address rows
// and N_ANOM = 4. Trains on "normal" traffic (sources 1-2, destination 5,
// read/write, addresses 0x1000-0x10FF), then checks that normal traffic in
// monitor mode raises nothing, that each anomalous field alone counts one
// anomaly, that trig_req rises exactly two cycles after the 4th anomalous
// message (anomaly registered, then trigger), holds until trig_ack, that
// counting restarts after a trigger, and that `enable` low stops counting.
module tb_attu;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, enable, train, clear, obs_valid, anomaly, trig_req, trig_ack;
  logic [7:0]  obs_src, obs_dst;
  logic [2:0]  obs_cmd;
  logic [31:0] obs_addr;
  logic [15:0] anomalies, triggers, merges;

  attu #(.NODES(16), .ROWS(4), .AW(32), .N_ANOM(4)) dut (
    .clk, .rst_n, .enable, .train, .clear, .obs_valid, .obs_src, .obs_dst, .obs_cmd,
    .obs_addr, .anomaly, .trig_req, .trig_ack, .anomalies, .triggers, .merges);

  task automatic send(int src, int dst, int cmd, int addr);
    obs_valid = 1; obs_src = 8'(src); obs_dst = 8'(dst); obs_cmd = 3'(cmd);
    obs_addr = 32'(addr);
    @(posedge clk);
    #1 obs_valid = 0;
  endtask

  task automatic normal();
    send(1 + $urandom % 2, 5, 1 + $urandom % 2, 32'h1000 + $urandom % 256);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int a0;
    rst_n = 0; enable = 1; train = 1; clear = 0; obs_valid = 0; trig_ack = 0;
    obs_src = 0; obs_dst = 0; obs_cmd = 0; obs_addr = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // training: cover the whole normal address block densely
    for (int a = 0; a < 256; a++) send(1 + a % 2, 5, 1 + a % 2, 32'h1000 + a);
    for (int i = 0; i < 50; i++) normal();
    @(negedge clk);
    checks++; if (anomalies != 0 || trig_req) failures++;
    checks++; if (merges == 0) begin failures++; $display("FAIL no merges in training"); end
    train <= 0;
    @(posedge clk);
    for (int i = 0; i < 200; i++) normal();
    repeat (2) @(negedge clk);
    checks++; if (anomalies != 0 || trig_req) begin failures++; $display("FAIL normal traffic flagged %0d", anomalies); end
    // one anomalous field at a time
    send(9, 5, 1, 32'h1010);   // unknown source
    send(1, 9, 1, 32'h1010);   // unknown destination
    send(1, 5, 4, 32'h1010);   // unknown command
    repeat (2) @(negedge clk);
    checks++; if (anomalies != 3 || trig_req) begin failures++; $display("FAIL 3 anomalies: %0d", anomalies); end
    send(1, 5, 1, 32'h8000);   // address outside all ranges: 4th anomaly
    // the 4th message was sampled at this edge; anomaly next edge, trig_req the one after
    @(negedge clk);
    checks++; if (trig_req) failures++;
    @(negedge clk);
    checks++; if (!trig_req || triggers != 1) begin failures++; $display("FAIL no trigger"); end
    repeat (5) @(negedge clk);
    checks++; if (!trig_req) failures++;  // held until acknowledged
    trig_ack <= 1; @(posedge clk); trig_ack <= 0; @(negedge clk);
    checks++; if (trig_req) failures++;
    // counting restarted: 3 more anomalies do not trigger
    a0 = anomalies;
    for (int i = 0; i < 3; i++) send(12, 5, 1, 32'h1000);
    repeat (3) @(negedge clk);
    checks++; if (trig_req || anomalies != a0 + 3) failures++;
    // disabled: anomalies are seen but not counted
    enable <= 0;
    for (int i = 0; i < 6; i++) send(12, 13, 5, 32'h9000);
    repeat (3) @(negedge clk);
    checks++; if (trig_req || anomalies != a0 + 3) failures++;
    enable <= 1;
    send(12, 5, 1, 32'h1000);
    repeat (3) @(negedge clk);
    checks++; if (!trig_req || triggers != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
