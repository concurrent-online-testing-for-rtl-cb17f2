// dtvs_map: placement of test vector segments by t-interleaving on a 2D torus.
//
// Every tile (x, y) of an N x N torus stores one segment, its colour
//   colour(x, y) = (x + MULT*y) mod SEGS,
// a perfect Lee-metric code colouring: tiles of the same colour are at least
// 2*RADIUS+1 hops apart, and the Lee sphere of radius RADIUS around any tile
// holds every colour exactly once. For each segment s the block finds the tile
// inside that sphere that stores s, and returns its node id (y*N + x) and its
// hop count (Lee distance, eq. 1). The test controller of a core under test
// sends its requests to those tiles.
//
// Defaults: 3-interleaving (RADIUS 1, SEGS 5) on the 10x10 torus of the
// application-aware experiments; SEGS = 5 = (t^2+1)/2 for t = 3 (eq. 3).
// The closed form of the colouring, with MULT = 2*RADIUS+1 for odd t, is this
// design's choice of a perfect interleaving; other sizes (8 segments with
// MULT 3 and RADIUS 2 on 8x8, 13 segments with MULT 5 and RADIUS 2 on 13x13)
// are reached through the parameters. SEGS must divide N.
//
// Purely combinational: coordinates in, placement out. `ok` is low if some
// segment is not within RADIUS hops, i.e. the parameters are not an
// interleaving.
module dtvs_map #(
  parameter int N      = 10,
  parameter int SEGS   = 5,
  parameter int MULT   = 3,
  parameter int RADIUS = 1
) (
  input  logic [3:0]                          x,
  input  logic [3:0]                          y,
  output logic [colt_pkg::SEG_W-1:0]          own_seg,
  output logic [SEGS-1:0][colt_pkg::ID_W-1:0] src_id,
  output logic [SEGS-1:0][3:0]                src_hops,
  output logic                                ok
);
  import colt_pkg::*;

  logic [SEGS-1:0] found;

  always_comb begin
    int unsigned cx, cy, col, h;
    own_seg  = SEG_W'(({28'd0, x} + MULT * {28'd0, y}) % SEGS);
    src_id   = '0;
    src_hops = '0;
    found    = '0;
    for (int dy = -RADIUS; dy <= RADIUS; dy++) begin
      for (int dx = -RADIUS; dx <= RADIUS; dx++) begin
        h = (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
        if (h <= RADIUS) begin
          cx  = ({28'd0, x} + N + dx) % N;
          cy  = ({28'd0, y} + N + dy) % N;
          col = (cx + MULT * cy) % SEGS;
          for (int s = 0; s < SEGS; s++) begin
            if (col == s && (!found[s] || h < src_hops[s])) begin
              found[s]    = 1'b1;
              src_id[s]   = ID_W'(cy * N + cx);
              src_hops[s] = 4'(h);
            end
          end
        end
      end
    end
    ok = &found;
  end

endmodule
