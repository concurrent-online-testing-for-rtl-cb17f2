// noc_model: behavioural model of the 2D-torus network for testbenches.
//
// Stands in for the routers and links. Every tile's outgoing flits are
// always accepted; when a packet's tail arrives the whole packet is queued
// for its destination (header flit field dst) and becomes deliverable after
// HOP_LAT cycles per hop of Lee distance on the N x N torus, plus one cycle
// per flit. Each destination receives whole packets one after another, one
// flit per cycle, respecting the tile's net_in_ready. Packets leaving tile
// slow_src get slow_lat extra cycles (a congested path); a packet that
// becomes ready earlier overtakes it, so one slow packet does not hold up
// the others. It also counts the flit-hops carried, the network load measure
// of the evaluation. Outputs of the tiles are ignored while rst_n is low.
module noc_model #(
  parameter int N       = 5,
  parameter int HOP_LAT = 3
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  colt_pkg::flit_t [N*N-1:0]          net_out,
  input  logic            [N*N-1:0]          net_out_valid,
  output logic            [N*N-1:0]          net_out_ready,
  output colt_pkg::flit_t [N*N-1:0]          net_in,
  output logic            [N*N-1:0]          net_in_valid,
  input  logic            [N*N-1:0]          net_in_ready,
  input  int                                 slow_src,
  input  int                                 slow_lat,
  output longint                             flit_hops,
  output longint                             packets
);
  import colt_pkg::*;
  localparam int NN = N * N;

  flit_t   sb [NN][$];
  flit_t   dq [NN][$];
  longint  dt [NN][$];
  longint  now = 0;

  assign net_out_ready = '1;

  function automatic int lee(int a, int b);
    int ax, ay, bx, by, dx, dy;
    ax = a % N; ay = a / N; bx = b % N; by = b / N;
    dx = (ax - bx + N) % N; dy = (ay - by + N) % N;
    if (N - dx < dx) dx = N - dx;
    if (N - dy < dy) dy = N - dy;
    return dx + dy;
  endfunction

  initial begin
    flit_hops = 0;
    packets   = 0;
    net_in    = '0;
    net_in_valid = '0;
  end

  always @(posedge clk) begin
    now <= now + 1;
    for (int s = 0; s < NN; s++) begin
      if (rst_n && net_out_valid[s]) begin
        sb[s].push_back(net_out[s]);
        if (net_out[s].tail) begin
          hdr_t h;
          int d, hops, at;
          longint t0;
          h    = hdr_t'(sb[s][0].data);
          d    = int'(h.dst);
          hops = lee(s, d);
          t0   = now + longint'(hops * HOP_LAT) + ((s == slow_src) ? longint'(slow_lat) : 0);
          at   = dq[d].size();
          // insert before the first later packet not already on net_in
          for (int i = dq[d].size() - 1; i >= 0; i--)
            if (dq[d][i].head && dt[d][i] > t0 + 1 && (i > 0 || !net_in_valid[d])) at = i;
          for (int i = 0; i < sb[s].size(); i++) begin
            dq[d].insert(at + i, sb[s][i]);
            dt[d].insert(at + i, t0 + longint'(i + 1));
          end
          flit_hops += longint'(hops * sb[s].size());
          packets   += 1;
          sb[s].delete();
        end
      end
    end
    for (int d = 0; d < NN; d++) begin
      if (net_in_valid[d] && net_in_ready[d]) begin
        void'(dq[d].pop_front());
        void'(dt[d].pop_front());
      end
      if (dq[d].size() > 0 && dt[d][0] <= now) begin
        net_in[d]       <= dq[d][0];
        net_in_valid[d] <= 1'b1;
      end else begin
        net_in_valid[d] <= 1'b0;
      end
    end
  end
endmodule
