// attu: n-Anomaly Test Triggering Unit, placed in the core-network interface.
//
// Instead of testing a core periodically, the ATTU watches the messages the
// core exchanges with the network and asks for a test when that traffic looks
// abnormal. It sees network-layer fields (source, destination) and
// transport-layer fields (OCP command, address) of every message:
//   - source, destination and command: per-value counters
//     (attu_field_counter); a value seen too rarely in training is anomalous;
//   - address: ROWS learned ranges (attu_range_cluster); an address outside
//     all ranges is anomalous.
// The unit first trains (train high) on fault-free operation, then monitors.
// Each observed message with at least one anomalous field counts as one
// anomaly; after N_ANOM anomalies it raises trig_req, which stays high until
// the test controller takes it with trig_ack, and the count restarts.
//
// Timing: one message per cycle on obs_*; field anomalies are registered, so
// `anomaly` is high the cycle after the message and trig_req the cycle
// after the N_ANOM-th anomaly. `enable` low ignores anomalies (no counting).
// The OR of the fields and the hand-shake with the controller are this
// design's choices; the training, range clustering and n-anomaly rule are
// the document's.
module attu #(
  parameter int NODES  = 100,  // tiles in the SoC (values of source/destination)
  parameter int ROWS   = 10,   // address range rows
  parameter int AW     = 32,
  parameter int N_ANOM = 4     // anomalies before a test is requested
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        enable,
  input  logic                        train,
  input  logic                        clear,
  input  logic                        obs_valid,
  input  logic [colt_pkg::ID_W-1:0]   obs_src,
  input  logic [colt_pkg::ID_W-1:0]   obs_dst,
  input  logic [2:0]                  obs_cmd,
  input  logic [AW-1:0]               obs_addr,
  output logic                        anomaly,
  output logic                        trig_req,
  input  logic                        trig_ack,
  output logic [15:0]                 anomalies,
  output logic [15:0]                 triggers,
  output logic [15:0]                 merges
);
  localparam int IW = $clog2(NODES);

  logic a_src, a_dst, a_cmd, a_addr, hit;
  logic [$clog2(ROWS+1)-1:0] used;
  logic [$clog2(N_ANOM+1)-1:0] acnt;

  attu_field_counter #(.VALUES(NODES)) u_src (
    .clk, .rst_n, .clear, .train, .obs_valid, .obs_val(obs_src[IW-1:0]), .anomaly(a_src));
  attu_field_counter #(.VALUES(NODES)) u_dst (
    .clk, .rst_n, .clear, .train, .obs_valid, .obs_val(obs_dst[IW-1:0]), .anomaly(a_dst));
  attu_field_counter #(.VALUES(8)) u_cmd (
    .clk, .rst_n, .clear, .train, .obs_valid, .obs_val(obs_cmd), .anomaly(a_cmd));
  attu_range_cluster #(.ROWS(ROWS), .AW(AW)) u_addr (
    .clk, .rst_n, .clear, .train, .obs_valid, .obs_val(obs_addr),
    .anomaly(a_addr), .hit, .used, .merges);

  assign anomaly = a_src || a_dst || a_cmd || a_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acnt      <= '0;
      trig_req  <= 1'b0;
      anomalies <= '0;
      triggers  <= '0;
    end else begin
      if (trig_ack) trig_req <= 1'b0;
      if (clear) begin
        acnt <= '0;
      end else if (anomaly && enable) begin
        anomalies <= anomalies + 1'b1;
        if (acnt == $bits(acnt)'(N_ANOM - 1)) begin
          acnt     <= '0;
          trig_req <= 1'b1;
          triggers <= triggers + 1'b1;
        end else begin
          acnt <= acnt + 1'b1;
        end
      end
    end
  end

endmodule
