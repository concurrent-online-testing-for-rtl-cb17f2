// tb_colt_soc: end-to-end test of the COLT SoC on a 5x5 torus (5 segments,
// 16 words per segment, 4 ATTU address rows), with the behavioural torus
// (noc_model), 25 behavioural scan cores (scan_core_model, the core of tile 6
// faulty) and an isolation hand-shake answered after 3 cycles.
//
// Sequence:
//   1. load every TVM over the broadcast load bus (5 x 16 cycles);
//   2. train tile 12's ATTU on normal OCP traffic, then arm it;
//   3. software test of tile 0 with all sources free (pass); replies of
//      source 1 are delayed 1500 cycles, so they arrive late and are dropped;
//   4. ATTU-triggered test of tile 12 while tile 11 (a data source) runs
//      safety-critical code: refusal (NACK), word rebuilt from parity;
//   5. software test of tile 6 (faulty core) while data sources 7 and 1 are
//      safety-critical with blocking: two refusals, forced re-request to 7,
//      delivery deferred until the testbench ends 7's section; the test fails,
//      FT response disables the core;
//   6. test of tile 18 while sources 17 and 23 are safety-critical without
//      blocking: forced re-request served during the section (interference);
//   7. tiles 7, 14 and 16 (one colour, three rows) request at once; 16 has
//      storage redundancy off (every request must be forced). They run
//      concurrently.
// Checked throughout: one token per row ring, all tokens on one colour,
// cores under test at least 3 hops apart. Checked per test: pass/fail,
// exactly 64 scan patterns (capture pulses), test time at least 64*34 cycles
// and, for tests with free sources, at most 64*34 + 32 plus a fetch budget
// of 120 cycles per 8-word group. Each mechanism is counted and must occur.
module tb_colt_soc;
  import colt_pkg::*;
  localparam int N = 5, SEGS = 5, K = 4, DEPTH = 16, NN = N * N;
  localparam logic [31:0] CFG = 32'hFFFF_0000;

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
  logic [3:0]                load_addr;
  logic [63:0]               load_data;
  tc_state_t  [NN-1:0]       tc_state;
  cfg_t       [NN-1:0]       cfg;
  tile_stat_t [NN-1:0]       stat;
  longint                    flit_hops, packets;
  int                        slow_src = -1, slow_lat = 0;
  logic [31:0]               trained [60];
  int                        req16_forced = 0, req16_free = 0;

  colt_soc #(.N(N), .SEGS(SEGS), .K(K), .MULT(3), .RADIUS(1), .DEPTH(DEPTH), .ROWS(4),
             .N_ANOM(4)) dut (
    .clk, .rst_n, .net_out, .net_out_valid, .net_out_ready, .net_in, .net_in_valid,
    .net_in_ready, .ocp_mcmd, .ocp_maddr, .ocp_mdata, .msg_src, .msg_dst, .cfg_rdata,
    .cfg_rvalid, .load_valid, .load_seg, .load_addr, .load_data, .core_isolate,
    .isolate_ack, .core_disabled, .scan_en, .scan_in, .capture, .scan_out, .has_token,
    .step, .tc_state, .cfg, .stat);

  noc_model #(.N(N), .HOP_LAT(3)) u_noc (
    .clk, .rst_n, .net_out, .net_out_valid, .net_out_ready, .net_in, .net_in_valid, .net_in_ready,
    .slow_src, .slow_lat, .flit_hops, .packets);

  // requests sent by tile 16 (no redundancy: all must be forced)
  always @(posedge clk) begin
    hdr_t h;
    h = hdr_t'(net_out[16].data);
    if (rst_n && net_out_valid[16] && net_out[16].head && h.mtype == MSG_REQ) begin
      if (h.force_) req16_forced++;
      else          req16_free++;
    end
  end

  for (genvar i = 0; i < NN; i++) begin : g_core
    scan_core_model u_core (.clk, .fault(fault[i]), .scan_en(scan_en[i]), .scan_in(scan_in[i]),
                            .capture(capture[i]), .scan_out(scan_out[i]));
    logic [2:0] d;
    always @(posedge clk) begin
      d <= {d[1:0], core_isolate[i]};
      isolate_ack[i] <= d[2] && core_isolate[i];
    end
    initial begin d = '0; isolate_ack[i] = 0; end
  end

  function automatic int colour(int id);
    return (id % N + 3 * (id / N)) % SEGS;
  endfunction

  function automatic int lee(int a, int b);
    int dx, dy;
    dx = (a % N - b % N + N) % N; dy = (a / N - b / N + N) % N;
    if (N - dx < dx) dx = N - dx;
    if (N - dy < dy) dy = N - dy;
    return dx + dy;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_load, n_steps, n_token_moves, n_isolate, n_pass, n_fail, n_disabled, n_concurrent;
  int captures [NN];
  int t_start  [NN];
  int t_len    [NN];
  longint cyc = 0;
  tc_state_t prev_state [NN];

  always @(posedge clk) begin
    int holders, c0, maxc;
    cyc <= cyc + 1;
    if (rst_n) begin
      if (step) n_steps++;
      holders = 0; maxc = 0;
      for (int y = 0; y < N; y++) begin
        int cnt;
        cnt = 0;
        for (int x = 0; x < N; x++) cnt += has_token[y * N + x];
        if (cnt > 1) begin
          failures++;
          $display("FAIL %0d tokens in row %0d at cycle %0d", cnt, y, cyc);
        end
      end
      c0 = -1;
      for (int i = 0; i < NN; i++) begin
        if (has_token[i]) begin
          if (c0 < 0) c0 = colour(i);
          else if (colour(i) != c0) begin
            failures++;
            $display("FAIL tokens on colours %0d and %0d at cycle %0d", c0, colour(i), cyc);
          end
        end
        if (tc_state[i] == TC_IN_PROG) begin
          maxc++;
          for (int j = 0; j < i; j++)
            if (tc_state[j] == TC_IN_PROG && lee(i, j) < 3) begin
              failures++;
              $display("FAIL tiles %0d and %0d tested together, %0d hops apart", i, j, lee(i, j));
            end
        end
        if (capture[i]) captures[i]++;
        if (tc_state[i] == TC_IN_PROG && prev_state[i] != TC_IN_PROG) t_start[i] = int'(cyc);
        if (tc_state[i] == TC_COMPLETE && prev_state[i] == TC_IN_PROG)
          t_len[i] = int'(cyc) - t_start[i];
        if (tc_state[i] == TC_INIT_TEST && prev_state[i] != TC_INIT_TEST) n_isolate++;
        if (has_token[i] && tc_state[i] == TC_WAIT_SEND && step) n_token_moves++;
        prev_state[i] = tc_state[i];
      end
      if (maxc > n_concurrent) n_concurrent = maxc;
    end
  end

  // ---------------- stimulus helpers ----------------
  task automatic ocp(int tile, ocp_cmd_t cmd, logic [31:0] addr, logic [31:0] data,
                     int src = 0, int dst = 0);
    @(negedge clk);
    ocp_mcmd[tile] = cmd; ocp_maddr[tile] = addr; ocp_mdata[tile] = data;
    msg_src[tile] = ID_W'(src); msg_dst[tile] = ID_W'(dst);
    @(negedge clk);
    ocp_mcmd[tile] = OCP_IDLE; ocp_maddr[tile] = '0;
  endtask

  task automatic cfg_write(int tile, logic [5:0] v);
    ocp(tile, OCP_WR, CFG, 32'(v));
  endtask

  task automatic wait_test(int tile, int runs);
    while (int'(stat[tile].tests_run) < runs) @(posedge clk);
    @(negedge clk);
  endtask

  task automatic check_test(string name, int tile, bit exp_fail, bit bounded);
    int lo, hi;
    lo = K * DEPTH * (SCAN_LEN + 2);
    hi = lo + SCAN_LEN + 120 * (K * DEPTH / PKT_WORDS);
    checks++;
    if (bit'(stat[tile].tests_failed != 0) != exp_fail) begin
      failures++; $display("FAIL %s: tests_failed=%0d", name, stat[tile].tests_failed);
    end
    checks++;
    if (core_disabled[tile] != exp_fail) begin
      failures++; $display("FAIL %s: core_disabled=%b", name, core_disabled[tile]);
    end
    checks++;
    if (captures[tile] != K * DEPTH) begin
      failures++; $display("FAIL %s: %0d scan patterns", name, captures[tile]);
    end
    checks++;
    if (t_len[tile] < lo || (bounded && t_len[tile] > hi)) begin
      failures++; $display("FAIL %s: test took %0d cycles (%0d..%0d)", name, t_len[tile], lo, hi);
    end
    $display("%s: tile %0d, %0d patterns in %0d cycles, %s", name, tile, captures[tile],
             t_len[tile], stat[tile].tests_failed != 0 ? "FAIL -> core disabled" : "pass");
    if (exp_fail) n_fail++; else n_pass++;
    if (core_disabled[tile]) n_disabled++;
  endtask

  function automatic longint sum(string f);
    longint s;
    s = 0;
    for (int i = 0; i < NN; i++)
      case (f)
        "served":    s += stat[i].served;
        "nacked":    s += stat[i].nacked;
        "blocked":   s += stat[i].blocked_cycles;
        "interfere": s += stat[i].interfere_cycles;
        "nack_rx":   s += stat[i].nack_rx;
        "forced":    s += stat[i].forced;
        "rebuilt":   s += stat[i].rebuilt;
        "stale":     s += stat[i].stale;
        default:     s += 0;
      endcase
    return s;
  endfunction

  task automatic need(string name, longint v);
    checks++;
    if (v < 1) begin failures++; $display("FAIL mechanism never happened: %s", name); end
    $display("  %-28s %0d", name, v);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ocp_mcmd = '{default: OCP_IDLE}; ocp_maddr = '0; ocp_mdata = '0; msg_src = '0; msg_dst = '0;
    load_valid = 0; load_seg = '0; load_addr = '0; load_data = '0;
    fault = '0; fault[6] = 1'b1;
    for (int i = 0; i < NN; i++) begin captures[i] = 0; t_len[i] = 0; prev_state[i] = TC_WAIT_TOKEN; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. load the test set
    for (int s = 0; s < SEGS; s++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        load_valid = 1; load_seg = SEG_W'(s); load_addr = 4'(a);
        load_data = seg_word(s, a, K);
        n_load++;
      end
    @(negedge clk);
    load_valid = 0;
    checks++;
    if (dut.g_row[2].g_col[3].u_tile.u_tvm.mem[5] != seg_word(colour(13), 5, K)) begin
      failures++; $display("FAIL TVM load");
    end

    // 2. ATTU of tile 12: train on normal traffic, then arm
    for (int i = 0; i < 60; i++) begin
      trained[i] = 32'h2000 + $urandom % 256;
      ocp(12, ($urandom % 2) ? OCP_RD : OCP_WR, trained[i], $urandom, 12, ($urandom % 2) ? 3 : 7);
    end
    cfg_write(12, 6'b110010);  // redundancy, ATTU on, training off, blocking

    // 3. software-requested test of tile 0, all sources free; the path from
    //    source 1 is congested, so its replies come after the group was
    //    completed from parity and are dropped as stale
    slow_src = 1; slow_lat = 1500;
    cfg_write(0, 6'b101010);
    wait_test(0, 1);
    repeat (1600) @(negedge clk);
    slow_src = -1; slow_lat = 0;
    check_test("test tile 0", 0, 0, 1);

    // 4. ATTU-triggered test of tile 12, data source 11 safety-critical
    cfg_write(11, 6'b100011);
    for (int i = 0; i < 20; i++)
      ocp(12, OCP_RD, trained[$urandom % 60], 0, 12, 3);   // normal: no anomaly
    checks++;
    if (stat[12].anomalies != 0) begin failures++; $display("FAIL false anomaly"); end
    for (int i = 0; i < 4; i++) ocp(12, OCP_WR, 32'h9000 + i, 0, 12, 20);
    wait_test(12, 1);
    cfg_write(11, 6'b100010);
    check_test("ATTU test tile 12", 12, 0, 0);

    // 5. faulty core 6; sources 7 and 1 safety-critical with blocking
    cfg_write(7, 6'b100011);
    cfg_write(1, 6'b100011);
    cfg_write(6, 6'b101010);
    while (stat[7].blocked_cycles < 100) @(posedge clk);
    cfg_write(7, 6'b100010);   // 7 leaves its section: deferred packets go out
    wait_test(6, 1);
    cfg_write(1, 6'b100010);
    check_test("test tile 6 (faulty core)", 6, 1, 0);

    // 6. sources 17 and 23 safety-critical without blocking
    cfg_write(17, 6'b100001);
    cfg_write(23, 6'b100001);
    cfg_write(18, 6'b101010);
    wait_test(18, 1);
    cfg_write(17, 6'b100010);
    cfg_write(23, 6'b100010);
    check_test("test tile 18 (interference)", 18, 0, 0);

    // 7. three concurrent tests on one colour; 16 without redundancy
    begin
      for (int i = 0; i < NN; i++) captures[i] = 0;
      cfg_write(7, 6'b101010);
      cfg_write(14, 6'b101010);
      cfg_write(16, 6'b001010);
      wait_test(7, 1); wait_test(14, 1); wait_test(16, 1);
      check_test("concurrent test tile 7", 7, 0, 1);
      check_test("concurrent test tile 14", 14, 0, 1);
      check_test("concurrent test tile 16 (no redundancy)", 16, 0, 1);
      checks++;
      if (req16_free != 0 || req16_forced == 0) begin
        failures++; $display("FAIL tile 16 requests: %0d forced, %0d unforced", req16_forced, req16_free);
      end
    end

    // configuration register read-back
    fork
      ocp(7, OCP_RD, CFG, 0);
      begin @(posedge cfg_rvalid[7]); @(negedge clk); end
    join
    checks++;
    if (cfg_rdata[7][5:0] != 6'b100010) begin failures++; $display("FAIL cfg read %h", cfg_rdata[7]); end

    $display("mechanisms:");
    need("TVM words loaded", n_load);
    need("ATTU range merges", stat[12].merges);
    need("ATTU anomalies", stat[12].anomalies);
    need("ATTU test triggers", stat[12].triggers);
    need("token steps", n_steps);
    need("token hand-overs", n_token_moves);
    need("core isolations", n_isolate);
    need("tests passed", n_pass);
    need("tests failed", n_fail);
    need("cores disabled (FT response)", n_disabled);
    need("packets served", sum("served"));
    need("requests refused (NACK)", sum("nacked"));
    need("NACKs received", sum("nack_rx"));
    need("words rebuilt from parity", sum("rebuilt"));
    need("forced requests", sum("forced"));
    need("blocked cycles", sum("blocked"));
    need("interference cycles", sum("interfere"));
    need("stale replies dropped", sum("stale"));
    need("max concurrent tests >= 3", n_concurrent >= 3 ? n_concurrent : 0);
    $display("  network: %0d packets, %0d flit-hops", packets, flit_hops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
