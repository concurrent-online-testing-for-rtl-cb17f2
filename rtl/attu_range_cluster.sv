// attu_range_cluster: address clustering of the anomaly-based test triggering
// unit (ATTU).
//
// High-cardinality fields such as the OCP address cannot have a counter per
// value, so the ATTU learns a fixed number ROWS of address ranges (clusters
// in one dimension, each row holding a lower and an upper bound, the "TCAM
// rows" of the document). During training every observed value not yet
// inside a range is stored: first in an empty row, and once all rows are in
// use the two nearest neighbouring ranges are merged so the value still gets
// a row. After training any value outside every range is an anomaly.
//
// Implementation (this design's choice): the rows are kept sorted and
// disjoint. A new value is inserted at its sorted place, giving ROWS+1
// ranges when the rows were full; then the adjacent pair with the smallest
// gap (lower bound of the upper range minus upper bound of the lower range,
// first pair on ties) is merged into one row. The new value itself is a
// range of width zero, so "nearest neighbour" covers both joining the value
// to its closest range and merging two older ranges. All of this happens in
// the cycle of the observation, so one value per cycle is accepted.
//
// Timing: obs_valid/obs_val sampled at the clock edge; `anomaly` and `hit`
// are registered and valid the following cycle. `train` selects learning;
// `clear` empties all rows. `used` is the number of rows in use, `merges`
// counts merges.
module attu_range_cluster #(
  parameter int ROWS = 10,   // address ranges; 10 matches the reported unit size
  parameter int AW   = 32    // OCP address width
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      train,
  input  logic                      obs_valid,
  input  logic [AW-1:0]             obs_val,
  output logic                      anomaly,
  output logic                      hit,
  output logic [$clog2(ROWS+1)-1:0] used,
  output logic [15:0]               merges
);
  typedef struct packed {
    logic [AW-1:0] lo;
    logic [AW-1:0] hi;
  } range_t;

  range_t                      rows     [ROWS];
  range_t                      ins      [ROWS+1];
  range_t                      rows_nxt [ROWS];
  logic [$clog2(ROWS+1)-1:0]   used_nxt;
  logic                        covered, do_merge;

  always_comb begin
    int unsigned   pos, m;
    logic [AW-1:0] g, gmin;
    covered = 1'b0;
    pos     = 0;
    for (int i = 0; i < ROWS; i++) begin
      if (i < int'(used)) begin
        if (rows[i].lo <= obs_val && obs_val <= rows[i].hi) covered = 1'b1;
        if (rows[i].lo < obs_val) pos = i + 1;
      end
    end
    // sorted insertion of [obs_val, obs_val]
    for (int i = 0; i <= ROWS; i++) begin
      if (i < int'(pos))       ins[i] = rows[i];
      else if (i == int'(pos)) ins[i] = '{lo: obs_val, hi: obs_val};
      else                     ins[i] = rows[i-1];
    end
    // nearest adjacent pair among ROWS+1 ranges
    m    = 0;
    gmin = '1;
    for (int i = 0; i < ROWS; i++) begin
      g = ins[i+1].lo - ins[i].hi;
      if (g < gmin) begin
        gmin = g;
        m    = i;
      end
    end
    do_merge = (int'(used) == ROWS);
    for (int i = 0; i < ROWS; i++) begin
      if (!do_merge)      rows_nxt[i] = ins[i];
      else if (i < int'(m)) rows_nxt[i] = ins[i];
      else if (i == int'(m)) rows_nxt[i] = '{lo: ins[i].lo, hi: ins[i+1].hi};
      else                rows_nxt[i] = ins[i+1];
    end
    used_nxt = do_merge ? used : used + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ROWS; i++) rows[i] <= '0;
      used    <= '0;
      merges  <= '0;
      anomaly <= 1'b0;
      hit     <= 1'b0;
    end else begin
      anomaly <= obs_valid && !train && !covered;
      hit     <= obs_valid && covered;
      if (clear) begin
        used <= '0;
      end else if (obs_valid && train && !covered) begin
        for (int i = 0; i < ROWS; i++) rows[i] <= rows_nxt[i];
        used <= used_nxt;
        if (do_merge) merges <= merges + 1'b1;
      end
    end
  end

endmodule
