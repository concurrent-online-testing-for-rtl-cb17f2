// tb_colt_soc_full: the SoC at its default size (10x10 torus, five 8192-word
// segments = 256 KB test set plus parity, 10 ATTU rows), no parameter
// overrides. Loads all 100 TVMs over the load bus (5 x 8192 cycles), then
// software asks for a test on the ten colour-0 tiles, one per row ring,
// which the tokens already hold after reset, so all ten run concurrently.
// The core of tile 50 is faulty. Checks: every test applies exactly
// 32768 patterns, takes at least 32768*34 cycles and at most that plus 32
// plus 120 cycles of fetching per 8-word group; 50 fails and is disabled,
// the other nine pass; tested tiles are at least 3 hops apart.
module tb_colt_soc_full;
  import colt_pkg::*;
  localparam int N = 10, SEGS = 5, K = 4, DEPTH = 8192, NN = N * N;
  localparam logic [31:0] CFG = 32'hFFFF_0000;
  localparam int BAD = 50;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t      [NN-1:0]       net_out, net_in;
  logic       [NN-1:0]       net_out_valid, net_out_ready, net_in_valid, net_in_ready;
  ocp_cmd_t   [NN-1:0]       ocp_mcmd;
  logic [NN-1:0][31:0]       ocp_maddr, ocp_mdata, cfg_rdata;
  logic [NN-1:0][ID_W-1:0]   msg_src, msg_dst;
  logic       [NN-1:0]       cfg_rvalid, core_isolate, isolate_ack, core_disabled;
  logic       [NN-1:0]       scan_en, scan_in, capture, scan_out, has_token, fault;
  logic                      step, load_valid;
  logic [SEG_W-1:0]          load_seg;
  logic [12:0]               load_addr;
  logic [63:0]               load_data;
  tc_state_t  [NN-1:0]       tc_state;
  cfg_t       [NN-1:0]       cfg;
  tile_stat_t [NN-1:0]       stat;
  longint                    flit_hops, packets;

  colt_soc dut (
    .clk, .rst_n, .net_out, .net_out_valid, .net_out_ready, .net_in, .net_in_valid,
    .net_in_ready, .ocp_mcmd, .ocp_maddr, .ocp_mdata, .msg_src, .msg_dst, .cfg_rdata,
    .cfg_rvalid, .load_valid, .load_seg, .load_addr, .load_data, .core_isolate,
    .isolate_ack, .core_disabled, .scan_en, .scan_in, .capture, .scan_out, .has_token,
    .step, .tc_state, .cfg, .stat);

  noc_model #(.N(N), .HOP_LAT(3)) u_noc (
    .clk, .rst_n, .net_out, .net_out_valid, .net_out_ready, .net_in, .net_in_valid, .net_in_ready,
    .slow_src(-1), .slow_lat(0), .flit_hops, .packets);

  for (genvar i = 0; i < NN; i++) begin : g_core
    scan_core_model u_core (.clk, .fault(fault[i]), .scan_en(scan_en[i]), .scan_in(scan_in[i]),
                            .capture(capture[i]), .scan_out(scan_out[i]));
    always @(posedge clk) isolate_ack[i] <= core_isolate[i];
    initial isolate_ack[i] = 0;
  end

  function automatic int lee(int a, int b);
    int dx, dy;
    dx = (a % N - b % N + N) % N; dy = (a / N - b / N + N) % N;
    if (N - dx < dx) dx = N - dx;
    if (N - dy < dy) dy = N - dy;
    return dx + dy;
  endfunction

  int        tiles [N];
  int        captures [NN];
  longint    t_start [NN], t_len [NN];
  longint    cyc = 0;
  tc_state_t prev_state [NN];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int i = 0; i < NN; i++) begin
        if (capture[i]) captures[i]++;
        if (tc_state[i] == TC_IN_PROG && prev_state[i] != TC_IN_PROG) begin
          t_start[i] = cyc;
          for (int j = 0; j < NN; j++)
            if (j != i && tc_state[j] == TC_IN_PROG && lee(i, j) < 3) begin
              failures++; $display("FAIL %0d and %0d tested together", i, j);
            end
        end
        if (tc_state[i] == TC_COMPLETE && prev_state[i] == TC_IN_PROG) t_len[i] = cyc - t_start[i];
        prev_state[i] = tc_state[i];
      end
    end
  end

  initial begin
    repeat (1_400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    for (int y = 0; y < N; y++)
      $display("tile %0d: state %0d, %0d patterns", tiles[y], tc_state[tiles[y]], captures[tiles[y]]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint lo, hi;
    ocp_mcmd = '{default: OCP_IDLE}; ocp_maddr = '0; ocp_mdata = '0; msg_src = '0; msg_dst = '0;
    load_valid = 0; load_seg = '0; load_addr = '0; load_data = '0;
    fault = '0; fault[BAD] = 1'b1;
    for (int i = 0; i < NN; i++) begin captures[i] = 0; t_len[i] = 0; prev_state[i] = TC_WAIT_TOKEN; end
    for (int y = 0; y < N; y++) tiles[y] = y * N + (SEGS - (3 * y) % SEGS) % SEGS;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < SEGS; s++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        load_valid = 1; load_seg = SEG_W'(s); load_addr = 13'(a);
        load_data = seg_word(s, a, K);
      end
    @(negedge clk);
    load_valid = 0;
    // all ten requests in the same cycle: redundancy and blocking on
    for (int y = 0; y < N; y++) begin
      ocp_mcmd[tiles[y]] = OCP_WR; ocp_maddr[tiles[y]] = CFG; ocp_mdata[tiles[y]] = 32'h2A;
    end
    @(negedge clk);
    ocp_mcmd = '{default: OCP_IDLE};
    for (int y = 0; y < N; y++)
      while (stat[tiles[y]].tests_run == 0) @(posedge clk);
    @(negedge clk);
    lo = longint'(K * DEPTH) * (SCAN_LEN + 2);
    hi = lo + SCAN_LEN + 120 * (K * DEPTH / PKT_WORDS);
    for (int y = 0; y < N; y++) begin
      int t;
      t = tiles[y];
      checks++;
      if (captures[t] != K * DEPTH) begin failures++; $display("FAIL tile %0d: %0d patterns", t, captures[t]); end
      checks++;
      if (t_len[t] < lo || t_len[t] > hi) begin
        failures++; $display("FAIL tile %0d: %0d cycles, expected %0d..%0d", t, t_len[t], lo, hi);
      end
      checks++;
      if ((stat[t].tests_failed != 0) != (t == BAD) || core_disabled[t] != (t == BAD)) begin
        failures++; $display("FAIL tile %0d: verdict", t);
      end
      $display("tile %0d: %0d patterns in %0d cycles, %s", t, captures[t], t_len[t],
               stat[t].tests_failed != 0 ? "failed, core disabled" : "passed");
    end
    $display("network: %0d packets, %0d flit-hops", packets, flit_hops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
