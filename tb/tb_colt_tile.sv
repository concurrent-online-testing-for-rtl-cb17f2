// tb_colt_tile: one tile (5x5 torus position (0,0), colour 0, 16-word
// segments) with the rest of the chip played by the testbench: a responder
// answers the tile's requests with DATA packets of the requested segment
// (built from colt_pkg::seg_word, after 10 cycles), a scan core model sits on
// the scan port, and the tile's token ring is closed on itself through one
// register. Checks:
//   - the TVM loads over the load bus only for this tile's segment;
//   - a software test (test_req) fetches from the four other segments'
//     sources given by the placement, applies 64 patterns and passes;
//   - the server answers a request for this tile's segment with a 9-flit
//     packet of the right words, and refuses (NACK) while safety-critical;
//   - outgoing packets are never interleaved (header, 8 payload, tail);
//   - the configuration register reads back over OCP;
//   - four anomalous OCP messages after training trigger a second test.
module tb_colt_tile;
  import colt_pkg::*;
  localparam int N = 5, K = 4, DEPTH = 16;
  localparam logic [31:0] CFG = 32'hFFFF_0000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t      net_out, net_in;
  logic       net_out_valid, net_in_valid, net_in_ready;
  ocp_cmd_t   ocp_mcmd;
  logic [31:0] ocp_maddr, ocp_mdata, cfg_rdata;
  logic [7:0] msg_src, msg_dst;
  logic       cfg_rvalid, load_valid, token_out, has_token, ready_to_pass;
  logic       core_isolate, isolate_ack, core_disabled, scan_en, scan_in, capture, scan_out;
  logic [SEG_W-1:0] load_seg;
  logic [3:0] load_addr;
  logic [63:0] load_data;
  tc_state_t  tc_state;
  cfg_t       cfg;
  tile_stat_t stat;

  // ring of one tile: the token comes back one cycle after it leaves
  logic token_back = 1'b0;
  always @(posedge clk) token_back <= token_out;

  colt_tile #(.N(N), .X(0), .Y(0), .SEGS(5), .K(K), .MULT(3), .RADIUS(1), .DEPTH(DEPTH),
              .ROWS(4), .N_ANOM(4)) dut (
    .clk, .rst_n, .net_out, .net_out_valid, .net_out_ready(1'b1), .net_in, .net_in_valid,
    .net_in_ready, .ocp_mcmd, .ocp_maddr, .ocp_mdata, .msg_src, .msg_dst, .cfg_rdata,
    .cfg_rvalid, .load_valid, .load_seg, .load_addr, .load_data,
    .init_token(1'b1), .token_in(token_back), .step(!has_token || ready_to_pass), .token_out,
    .has_token, .ready_to_pass, .core_isolate, .isolate_ack, .core_disabled, .scan_en,
    .scan_in, .capture, .scan_out, .tc_state, .cfg, .stat);

  scan_core_model u_core (.clk, .fault(1'b0), .scan_en, .scan_in, .capture, .scan_out);
  always @(posedge clk) isolate_ack <= core_isolate;


  // ---------------- the rest of the chip ----------------
  flit_t  inq [$];
  longint cyc = 0;
  int     captures = 0, reqs_seen = 0, bad_dst = 0, rx_data_words = 0, rx_bad = 0, nacks = 0;
  int     in_pkt = 0;    // payload flits still expected of the current outgoing packet
  int     srv_seg_req = 0;
  logic [ID_W-1:0] want_src [5];

  // expected source of each segment for tile 0 on the 5x5 torus
  initial begin
    want_src[0] = 0;  want_src[1] = 1;  want_src[2] = 20;  want_src[3] = 5;  want_src[4] = 4;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && capture) captures++;
    if (rst_n && net_out_valid) begin
      hdr_t h;
      h = hdr_t'(net_out.data);
      if (net_out.head) begin
        if (in_pkt != 0) begin rx_bad++; $display("FAIL packet interleaved"); end
        if (h.mtype == MSG_REQ) begin
          flit_t f;
          hdr_t  r;
          reqs_seen++;
          if (h.dst != want_src[h.seg]) bad_dst++;
          // answer with a data packet after a short delay
          r = '0; r.mtype = MSG_DATA; r.src = h.dst; r.dst = h.src; r.seg = h.seg; r.pkt = h.pkt;
          fork
            automatic hdr_t rr = r;
            begin
              flit_t ff;
              repeat (10) @(posedge clk);
              ff = '{head: 1'b1, tail: 1'b0, data: rr};
              inq.push_back(ff);
              for (int i = 0; i < PKT_WORDS; i++) begin
                ff = '{head: 1'b0, tail: (i == PKT_WORDS - 1),
                       data: seg_word(rr.seg, rr.pkt * PKT_WORDS + i, K)};
                inq.push_back(ff);
              end
            end
          join_none
        end else if (h.mtype == MSG_DATA) begin
          in_pkt = PKT_WORDS;
          srv_seg_req = int'(h.pkt);
        end else if (h.mtype == MSG_NACK) begin
          nacks++;
        end
      end else begin
        if (in_pkt == 0) rx_bad++;
        else begin
          if (net_out.data != seg_word(0, srv_seg_req * PKT_WORDS + PKT_WORDS - in_pkt, K)) rx_bad++;
          if (net_out.tail != (in_pkt == 1)) rx_bad++;
          rx_data_words++;
          in_pkt--;
        end
      end
    end
  end

  // drive queued flits into the tile, one per cycle, honouring ready
  always @(posedge clk) begin
    if (!rst_n) begin
      net_in_valid <= 0;
    end else begin
      if (net_in_valid && net_in_ready) void'(inq.pop_front());
      if (inq.size() > (net_in_valid && net_in_ready ? 1 : 0)) begin
        net_in       <= inq[(net_in_valid && net_in_ready) ? 1 : 0];
        net_in_valid <= 1'b1;
      end else begin
        net_in_valid <= 1'b0;
      end
    end
  end

  task automatic ocp(ocp_cmd_t cmd, logic [31:0] addr, logic [31:0] data, int dst = 3);
    @(negedge clk);
    ocp_mcmd = cmd; ocp_maddr = addr; ocp_mdata = data; msg_src = 0; msg_dst = 8'(dst);
    @(negedge clk);
    ocp_mcmd = OCP_IDLE;
  endtask

  task automatic send_req(int seg, int pkt, bit force_);
    hdr_t h;
    h = '0; h.mtype = MSG_REQ; h.src = 8'd7; h.dst = 8'd0; h.seg = SEG_W'(seg);
    h.pkt = 16'(pkt); h.force_ = force_;
    inq.push_back('{head: 1'b1, tail: 1'b1, data: h});
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    net_in = '0; net_in_valid = 0; ocp_mcmd = OCP_IDLE; ocp_maddr = 0; ocp_mdata = 0;
    msg_src = 0; msg_dst = 0; load_valid = 0; load_seg = 0; load_addr = 0; load_data = 0;
    isolate_ack = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load: segment 0 is this tile's; other segments must be ignored
    for (int s = 0; s < 5; s++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        load_valid = 1; load_seg = SEG_W'(s); load_addr = 4'(a); load_data = seg_word(s, a, K);
      end
    @(negedge clk);
    load_valid = 0;
    checks++;
    if (dut.u_tvm.mem[3] != seg_word(0, 3, K)) begin failures++; $display("FAIL load"); end

    // ATTU training on normal traffic
    for (int i = 0; i < 30; i++) ocp(OCP_RD, 32'h100 + 4 * (i % 8), 0);

    // software test, redundancy off: the three remote data segments only
    ocp(OCP_WR, CFG, 32'h0A);
    while (stat.tests_run == 0) @(posedge clk);
    @(negedge clk);
    checks++; if (stat.tests_failed != 0 || core_disabled) begin failures++; $display("FAIL verdict"); end
    checks++; if (captures != K * DEPTH) begin failures++; $display("FAIL %0d patterns", captures); end
    checks++; if (reqs_seen != 3 * (DEPTH / PKT_WORDS)) begin failures++; $display("FAIL %0d requests", reqs_seen); end
    checks++; if (bad_dst != 0) begin failures++; $display("FAIL %0d requests to wrong tiles", bad_dst); end

    // server: request packet 1 of segment 0
    send_req(0, 1, 0);
    repeat (60) @(negedge clk);
    checks++; if (rx_data_words != PKT_WORDS || stat.served != 1) begin
      failures++; $display("FAIL served %0d words", rx_data_words);
    end
    // safety-critical: refusal
    ocp(OCP_WR, CFG, 32'h23);
    send_req(0, 0, 0);
    repeat (30) @(negedge clk);
    checks++; if (nacks != 1 || stat.nacked != 1) begin failures++; $display("FAIL nack"); end
    // config read-back
    fork
      ocp(OCP_RD, CFG, 0);
      begin @(posedge cfg_rvalid); @(negedge clk); end
    join
    checks++; if (cfg_rdata[5:0] != 6'h23) begin failures++; $display("FAIL cfg read %h", cfg_rdata); end

    // ATTU on: four unknown destinations trigger a test (redundancy on now,
    // the responder also answers the parity request)
    ocp(OCP_WR, CFG, 32'h32);
    captures = 0;
    for (int i = 0; i < 4; i++) ocp(OCP_WR, 32'h100, 0, 20);
    while (stat.tests_run < 2) @(posedge clk);
    @(negedge clk);
    checks++; if (stat.triggers != 1 || stat.anomalies != 4) begin failures++; $display("FAIL ATTU %0d/%0d", stat.triggers, stat.anomalies); end
    checks++; if (captures != K * DEPTH || stat.tests_failed != 0) begin failures++; $display("FAIL second test"); end
    checks++; if (rx_bad != 0) begin failures++; $display("FAIL %0d bad outgoing flits", rx_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
