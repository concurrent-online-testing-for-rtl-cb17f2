// colt_tile: the COLT hardware of one NoC tile, inside its core-network
// interface (CNI).
//
// A tile of the many-core SoC holds a processing core wrapped in a scan chain,
// a router and a CNI. This module is the test part of the CNI plus the tile's
// Test Vector Memory:
//   - tc_sched: token-ring scheduling state machine of the test controller;
//   - tv_fetch + scan_apply: when this core is under test, gather the test
//     set from the Lee sphere around the tile and apply it through the scan
//     chain, comparing responses;
//   - tv_server: answer other tiles' requests for this tile's segment, with
//     delivery blocking and refusals during safety-critical code;
//   - tvm: this tile's segment, chosen by the t-interleaving colour of (X, Y);
//   - attu: watches the core's traffic and requests a test on anomalies;
//   - test_cfg_reg: memory-mapped configuration register on the core's OCP
//     port (safety-critical flag and mode bits).
// Network side: one flit port in and one out (valid-ready, packets contiguous,
// header flit first); a router would connect here. Incoming request headers
// go to the server, everything else to the fetcher; outgoing packets of the
// two are merged packet by packet, server first. The TVM has one port: the
// test set load bus wins, then the fetcher's local reads, then the server.
// The load bus writes a word when load_seg equals this tile's segment.
//
// A test is wanted when the ATTU fires (if cfg.attu_en) or software writes
// cfg.test_req; it starts when the ring's token reaches the tile and
// isolate_ack confirms the core's work was moved. A failing test disables the
// core (core_disabled). Parameters default to the 10x10 torus, 3-interleaving
// with five segments (four data, one parity) of a 256 KB test set.
module colt_tile #(
  parameter int          N        = 10,
  parameter int          X        = 0,
  parameter int          Y        = 0,
  parameter int          SEGS     = 5,
  parameter int          K        = 4,
  parameter int          MULT     = 3,
  parameter int          RADIUS   = 1,
  parameter int          DEPTH    = 8192,
  parameter int          ROWS     = 10,
  parameter int          N_ANOM   = 4,
  parameter logic [31:0] CFG_BASE = 32'hFFFF_0000
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // network port (to/from the router)
  output colt_pkg::flit_t             net_out,
  output logic                        net_out_valid,
  input  logic                        net_out_ready,
  input  colt_pkg::flit_t             net_in,
  input  logic                        net_in_valid,
  output logic                        net_in_ready,
  // core OCP requests seen by the CNI, with their network-layer ids
  input  colt_pkg::ocp_cmd_t          ocp_mcmd,
  input  logic [31:0]                 ocp_maddr,
  input  logic [31:0]                 ocp_mdata,
  input  logic [colt_pkg::ID_W-1:0]   msg_src,
  input  logic [colt_pkg::ID_W-1:0]   msg_dst,
  output logic [31:0]                 cfg_rdata,
  output logic                        cfg_rvalid,
  // test set load bus (boot time): word load_addr of segment load_seg
  input  logic                        load_valid,
  input  logic [colt_pkg::SEG_W-1:0]  load_seg,
  input  logic [$clog2(DEPTH)-1:0]    load_addr,
  input  logic [63:0]                 load_data,
  // token ring
  input  logic                        init_token,
  input  logic                        token_in,
  input  logic                        step,
  output logic                        token_out,
  output logic                        has_token,
  output logic                        ready_to_pass,
  // core under test
  output logic                        core_isolate,
  input  logic                        isolate_ack,
  output logic                        core_disabled,
  output logic                        scan_en,
  output logic                        scan_in,
  output logic                        capture,
  input  logic                        scan_out,
  // status
  output colt_pkg::tc_state_t         tc_state,
  output colt_pkg::cfg_t              cfg,
  output colt_pkg::tile_stat_t        stat
);
  import colt_pkg::*;

  localparam int          AW     = $clog2(DEPTH);
  localparam int          PARITY = SEGS - K;
  localparam int unsigned OWN    = (X + MULT * Y) % SEGS;
  localparam logic [ID_W-1:0] MY_ID = ID_W'(Y * N + X);

  // ---------------- placement ----------------
  logic [SEG_W-1:0]            own_seg;
  logic [SEGS-1:0][ID_W-1:0]   src_id;
  logic [SEGS-1:0][3:0]        src_hops;
  logic                        map_ok;

  dtvs_map #(.N(N), .SEGS(SEGS), .MULT(MULT), .RADIUS(RADIUS)) u_map (
    .x(4'(X)), .y(4'(Y)), .own_seg, .src_id, .src_hops, .ok(map_ok));

  // ---------------- configuration register ----------------
  test_cfg_reg #(.BASE(CFG_BASE)) u_cfg (
    .clk, .rst_n, .mcmd(ocp_mcmd), .maddr(ocp_maddr), .mdata(ocp_mdata),
    .rdata(cfg_rdata), .rvalid(cfg_rvalid), .cfg);

  // ---------------- ATTU ----------------
  logic trig_req, anomaly;
  logic obs_valid;
  assign obs_valid = (ocp_mcmd != OCP_IDLE) && (ocp_maddr != CFG_BASE);

  attu #(.NODES(N * N), .ROWS(ROWS), .N_ANOM(N_ANOM)) u_attu (
    .clk, .rst_n, .enable(cfg.attu_en), .train(cfg.attu_train), .clear(1'b0),
    .obs_valid, .obs_src(msg_src), .obs_dst(msg_dst), .obs_cmd(ocp_mcmd),
    .obs_addr(ocp_maddr), .anomaly, .trig_req, .trig_ack(trig_req),
    .anomalies(stat.anomalies), .triggers(stat.triggers), .merges(stat.merges));

  // ---------------- scheduling ----------------
  logic start_test, test_done, scan_fail;
  logic [31:0] mismatches;

  tc_sched u_sched (
    .clk, .rst_n, .init_token, .token_in, .step, .token_out,
    .test_want(trig_req || cfg.test_req), .isolate_ack,
    .test_done, .test_pass(!scan_fail && map_ok), .start_test, .isolate(core_isolate),
    .core_disabled, .has_token, .ready_to_pass, .state(tc_state),
    .tests_run(stat.tests_run), .tests_failed(stat.tests_failed));

  // ---------------- test vector memory and its arbiter ----------------
  logic          f_tvm_req, s_tvm_req, f_gnt, s_gnt;
  logic [AW-1:0] f_tvm_addr, s_tvm_addr;
  logic [63:0]   tvm_rdata;

  logic          ld;

  assign ld    = load_valid && load_seg == SEG_W'(OWN);
  assign f_gnt = f_tvm_req && !ld;
  assign s_gnt = s_tvm_req && !f_tvm_req && !ld;

  tvm #(.DEPTH(DEPTH), .K(K), .SEG(OWN)) u_tvm (
    .clk, .en(ld || f_gnt || s_gnt), .we(ld),
    .addr(ld ? load_addr : f_gnt ? f_tvm_addr : s_tvm_addr),
    .wdata(load_data), .rdata(tvm_rdata));

  // ---------------- network input demux ----------------
  hdr_t in_hdr;
  logic is_req, srv_req_ready;
  assign in_hdr       = hdr_t'(net_in.data);
  assign is_req       = net_in.head && in_hdr.mtype == MSG_REQ;
  assign net_in_ready = is_req ? srv_req_ready : 1'b1;

  // ---------------- fetcher and scan interface ----------------
  flit_t       f_flit;
  logic        f_valid, f_ready, f_busy;
  logic [63:0] word;
  logic        word_valid, word_last, word_ready;

  tv_fetch #(.K(K), .PARITY(PARITY), .DEPTH(DEPTH)) u_fetch (
    .clk, .rst_n, .my_id(MY_ID), .own_seg, .src_id, .redund_en(cfg.redund_en),
    .start(start_test), .busy(f_busy),
    .req_flit(f_flit), .req_valid(f_valid), .req_ready(f_ready),
    .rx_flit(net_in), .rx_valid(net_in_valid && !is_req),
    .tvm_req(f_tvm_req), .tvm_addr(f_tvm_addr), .tvm_gnt(f_gnt), .tvm_rdata,
    .word, .word_valid, .word_last, .word_ready,
    .nack_cnt(stat.nack_rx), .forced_cnt(stat.forced), .rebuilt_cnt(stat.rebuilt),
    .stale_cnt(stat.stale));

  scan_apply u_scan (
    .clk, .rst_n, .clear(start_test), .word, .word_valid, .word_last, .word_ready,
    .scan_en, .scan_in, .capture, .scan_out, .done(test_done), .fail(scan_fail),
    .mismatches);

  // ---------------- server ----------------
  flit_t s_flit;
  logic  s_valid, s_ready;

  tv_server #(.DEPTH(DEPTH)) u_server (
    .clk, .rst_n, .my_id(MY_ID), .safety_critical(cfg.safety_critical),
    .block_en(cfg.block_en), .req_hdr(in_hdr), .req_valid(net_in_valid && is_req),
    .req_ready(srv_req_ready), .tvm_req(s_tvm_req), .tvm_addr(s_tvm_addr), .tvm_gnt(s_gnt),
    .tvm_rdata, .out_flit(s_flit), .out_valid(s_valid), .out_ready(s_ready),
    .served(stat.served), .nacked(stat.nacked), .blocked_cycles(stat.blocked_cycles),
    .interfere_cycles(stat.interfere_cycles));

  // ---------------- network output merge (packet-atomic) ----------------
  logic lock, lock_srv, pick_srv;
  assign pick_srv      = lock ? lock_srv : s_valid;
  assign net_out       = pick_srv ? s_flit : f_flit;
  assign net_out_valid = pick_srv ? s_valid : f_valid;
  assign s_ready       = pick_srv && net_out_ready;
  assign f_ready       = !pick_srv && net_out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock     <= 1'b0;
      lock_srv <= 1'b0;
    end else if (net_out_valid && net_out_ready) begin
      lock     <= !net_out.tail;
      lock_srv <= pick_srv;
    end
  end

endmodule
