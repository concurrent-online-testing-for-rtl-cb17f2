// tvm: Test Vector Memory of one tile.
//
// Holds the tile's segment of the distributed test vector set: segment SEG of
// a set striped over K data segments (SEG == K selects the parity segment).
// With the defaults a 256 KB set is split into four 64 KB data segments and
// one parity segment, so each TVM keeps DEPTH = 8192 words of 64 bits.
//
// Single-ported synchronous RAM: a read presented with `en` and `we` low
// returns its word on `rdata` one cycle later; a write stores `wdata`. The
// memory has no reset and no initial contents: the test set is written
// through the write port after power-up (in colt_soc, by a broadcast load bus
// that fills every TVM of one interleaving colour at once). Reads before the
// load return undefined data; the test controller only reads after loading.
module tvm #(
  parameter int          DEPTH = 8192,
  parameter int          K     = 4,
  parameter int unsigned SEG   = 0
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [63:0]              wdata,
  output logic [63:0]              rdata
);
  logic [63:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
