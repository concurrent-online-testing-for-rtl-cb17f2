// colt_soc: many-core SoC with distributed concurrent online testing.
//
// N x N tiles on a 2D torus. Each tile's CNI carries the COLT hardware
// (colt_tile): a test controller, a Test Vector Memory holding one segment
// of the test set placed by t-interleaving, an anomaly-based test trigger and
// a software-visible configuration register. Any core can gather the complete
// test set from the tiles at most RADIUS hops away, so the cost of testing a
// core no longer depends on where it sits.
//
// Test scheduling: every row of the torus is one token ring (tile x passes to
// tile x+1, wrapping), so N cores can be under test at once. The token of row
// y starts at the tile of interleaving colour 0 in that row, and all tokens
// advance together on a common `step`, issued when every token holder is
// ready to pass. Since colours rise by one along a row, all tokens always sit
// on tiles of the same colour: cores tested together belong to one Lee code
// and are at least 2*RADIUS+1 hops apart, so their Lee spheres never share a
// source tile (code-division core test scheduling). Row rings and the common
// step are this design's way of meeting that rule.
//
// What is not inside: the routers and links of the torus (each tile's flit
// ports are brought out, index id = y*N + x), the processing cores with their
// scan chains (scan and isolation ports brought out), and the address map
// that tells the CNI a message's source and destination (msg_src/msg_dst
// inputs). The test set is written after power-up over a broadcast load bus
// (load_*): one word of segment load_seg per cycle goes into every TVM of
// that colour, so SEGS*DEPTH cycles fill the whole chip. Defaults: 10x10 torus, 5 segments (4 data + 1 parity), 8192 words
// of 64 bits per segment (a 256 KB test set), 10 ATTU address rows.
module colt_soc #(
  parameter int N      = 10,
  parameter int SEGS   = 5,
  parameter int K      = 4,
  parameter int MULT   = 3,
  parameter int RADIUS = 1,
  parameter int DEPTH  = 8192,
  parameter int ROWS   = 10,
  parameter int N_ANOM = 4
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  output colt_pkg::flit_t      [N*N-1:0]       net_out,
  output logic                 [N*N-1:0]       net_out_valid,
  input  logic                 [N*N-1:0]       net_out_ready,
  input  colt_pkg::flit_t      [N*N-1:0]       net_in,
  input  logic                 [N*N-1:0]       net_in_valid,
  output logic                 [N*N-1:0]       net_in_ready,
  input  colt_pkg::ocp_cmd_t   [N*N-1:0]       ocp_mcmd,
  input  logic [N*N-1:0][31:0]                 ocp_maddr,
  input  logic [N*N-1:0][31:0]                 ocp_mdata,
  input  logic [N*N-1:0][colt_pkg::ID_W-1:0]   msg_src,
  input  logic [N*N-1:0][colt_pkg::ID_W-1:0]   msg_dst,
  output logic [N*N-1:0][31:0]                 cfg_rdata,
  output logic                 [N*N-1:0]       cfg_rvalid,
  input  logic                                 load_valid,
  input  logic [colt_pkg::SEG_W-1:0]           load_seg,
  input  logic [$clog2(DEPTH)-1:0]             load_addr,
  input  logic [63:0]                          load_data,
  output logic                 [N*N-1:0]       core_isolate,
  input  logic                 [N*N-1:0]       isolate_ack,
  output logic                 [N*N-1:0]       core_disabled,
  output logic                 [N*N-1:0]       scan_en,
  output logic                 [N*N-1:0]       scan_in,
  output logic                 [N*N-1:0]       capture,
  input  logic                 [N*N-1:0]       scan_out,
  output logic                 [N*N-1:0]       has_token,
  output logic                                 step,
  output colt_pkg::tc_state_t  [N*N-1:0]       tc_state,
  output colt_pkg::cfg_t       [N*N-1:0]       cfg,
  output colt_pkg::tile_stat_t [N*N-1:0]       stat
);
  import colt_pkg::*;

  logic [N*N-1:0] token_out, ready_to_pass;

  // All tokens move together once every holder is ready to pass.
  assign step = &(~has_token | ready_to_pass);

  for (genvar y = 0; y < N; y++) begin : g_row
    for (genvar x = 0; x < N; x++) begin : g_col
      localparam int ID   = y * N + x;
      localparam int PREV = y * N + ((x + N - 1) % N);
      localparam int X0   = (SEGS - ((MULT * y) % SEGS)) % SEGS;

      colt_tile #(
        .N(N), .X(x), .Y(y), .SEGS(SEGS), .K(K), .MULT(MULT), .RADIUS(RADIUS),
        .DEPTH(DEPTH), .ROWS(ROWS), .N_ANOM(N_ANOM)
      ) u_tile (
        .clk, .rst_n,
        .net_out(net_out[ID]), .net_out_valid(net_out_valid[ID]),
        .net_out_ready(net_out_ready[ID]),
        .net_in(net_in[ID]), .net_in_valid(net_in_valid[ID]), .net_in_ready(net_in_ready[ID]),
        .ocp_mcmd(ocp_mcmd[ID]), .ocp_maddr(ocp_maddr[ID]), .ocp_mdata(ocp_mdata[ID]),
        .msg_src(msg_src[ID]), .msg_dst(msg_dst[ID]),
        .cfg_rdata(cfg_rdata[ID]), .cfg_rvalid(cfg_rvalid[ID]),
        .load_valid, .load_seg, .load_addr, .load_data,
        .init_token(x == X0), .token_in(token_out[PREV]), .step,
        .token_out(token_out[ID]), .has_token(has_token[ID]),
        .ready_to_pass(ready_to_pass[ID]),
        .core_isolate(core_isolate[ID]), .isolate_ack(isolate_ack[ID]),
        .core_disabled(core_disabled[ID]),
        .scan_en(scan_en[ID]), .scan_in(scan_in[ID]), .capture(capture[ID]),
        .scan_out(scan_out[ID]),
        .tc_state(tc_state[ID]), .cfg(cfg[ID]), .stat(stat[ID]));
    end
  end

endmodule
