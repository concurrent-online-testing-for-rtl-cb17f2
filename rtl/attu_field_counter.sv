// attu_field_counter: event counters of the ATTU for a low-cardinality field.
//
// Fields such as source node, destination node or OCP command can take only
// a few values, so the ATTU keeps one small saturating counter per value.
// During training each observation increments the counter of its value.
// Afterwards a value whose trained count is below THRESH is an anomaly
// (with THRESH = 1: a value never seen while training). The per-value
// counter and the threshold rule follow the document's "count events and
// establish threshold values"; the counter width and the threshold are this
// design's choices.
//
// Timing: observation sampled at the clock edge; `anomaly` registered, valid
// the next cycle. `clear` zeroes all counters.
module attu_field_counter #(
  parameter int VALUES = 100,  // distinct values of the field (tiles of the SoC)
  parameter int CW     = 4,    // counter width
  parameter int THRESH = 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic                          train,
  input  logic                          obs_valid,
  input  logic [$clog2(VALUES)-1:0]     obs_val,
  output logic                          anomaly
);
  logic [CW-1:0] cnt [VALUES];
  logic          in_range;

  assign in_range = int'(obs_val) < VALUES;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < VALUES; i++) cnt[i] <= '0;
      anomaly <= 1'b0;
    end else begin
      anomaly <= obs_valid && !train &&
                 (!in_range || int'(cnt[obs_val]) < THRESH);
      if (clear) begin
        for (int i = 0; i < VALUES; i++) cnt[i] <= '0;
      end else if (obs_valid && train && in_range && cnt[obs_val] != '1) begin
        cnt[obs_val] <= cnt[obs_val] + 1'b1;
      end
    end
  end

endmodule
