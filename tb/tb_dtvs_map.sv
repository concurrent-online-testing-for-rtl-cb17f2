// tb_dtvs_map: checks the t-interleaving placement for the three perfect
// interleavings of the evaluation: 3-interleaving on 10x10 (5 segments),
// 4-interleaving on 8x8 (8 segments) and 5-interleaving on 13x13
// (13 segments). For every tile it checks that each segment is found at a
// distinct tile within the Lee radius, that the tile's own segment is its
// own, and that tiles storing the same segment are at least t hops apart
// (computed here by sweeping all tile pairs).
module tb_dtvs_map;
  import colt_pkg::*;
  int checks = 0, failures = 0;

  function automatic int lee(int ax, int ay, int bx, int by, int n);
    int dx, dy;
    dx = (ax - bx + n) % n; dy = (ay - by + n) % n;
    if (n - dx < dx) dx = n - dx;
    if (n - dy < dy) dy = n - dy;
    return dx + dy;
  endfunction

  `define DTVS_CASE(TAG, NN, SS, MM, RR, TT) \
  logic [3:0] x_``TAG, y_``TAG; \
  logic [SEG_W-1:0] own_``TAG; \
  logic [SS-1:0][ID_W-1:0] sid_``TAG; \
  logic [SS-1:0][3:0] hop_``TAG; \
  logic ok_``TAG; \
  dtvs_map #(.N(NN), .SEGS(SS), .MULT(MM), .RADIUS(RR)) u_``TAG ( \
    .x(x_``TAG), .y(y_``TAG), .own_seg(own_``TAG), .src_id(sid_``TAG), \
    .src_hops(hop_``TAG), .ok(ok_``TAG)); \
  task automatic run_``TAG(); \
    int col [NN][NN]; \
    for (int y = 0; y < NN; y++) for (int x = 0; x < NN; x++) begin \
      x_``TAG = 4'(x); y_``TAG = 4'(y); #1; \
      col[x][y] = int'(own_``TAG); \
      checks++; if (!ok_``TAG) failures++; \
      checks++; if (int'(sid_``TAG[own_``TAG]) != y*NN + x) failures++; \
      for (int s = 0; s < SS; s++) begin \
        int sx, sy; sx = int'(sid_``TAG[s]) % NN; sy = int'(sid_``TAG[s]) / NN; \
        checks++; if (lee(x, y, sx, sy, NN) > RR || int'(hop_``TAG[s]) != lee(x, y, sx, sy, NN)) failures++; \
        for (int s2 = s + 1; s2 < SS; s2++) begin checks++; if (sid_``TAG[s] == sid_``TAG[s2]) failures++; end \
      end \
    end \
    for (int a = 0; a < NN*NN; a++) for (int b = a + 1; b < NN*NN; b++) \
      if (col[a%NN][a/NN] == col[b%NN][b/NN]) begin \
        checks++; if (lee(a%NN, a/NN, b%NN, b/NN, NN) < TT) failures++; \
      end \
  endtask

  `DTVS_CASE(t3, 10, 5, 3, 1, 3)
  `DTVS_CASE(t4, 8, 8, 3, 2, 4)
  `DTVS_CASE(t5, 13, 13, 5, 2, 5)

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_t3();
    run_t4();
    run_t5();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
