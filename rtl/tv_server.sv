// tv_server: source side of the distributed test controller.
//
// A core under test asks the tiles around it for their test vector segments,
// one 64-byte packet at a time. This block answers those requests from the
// tile's Test Vector Memory. It implements the application-aware rules:
//   - not in a safety-critical section: serve at once;
//   - safety-critical and the request is not forced: answer NACK, so that a
//     requester using storage redundancy rebuilds the segment from parity;
//   - safety-critical, forced, blocking disabled: serve anyway (best effort;
//     these cycles are counted as interference);
//   - safety-critical, forced, blocking enabled: hold the request until the
//     safety-critical flag clears (test vector delivery blocking).
// The NACK reply and the `force` bit are how this design lets the requester
// tell "use parity" from "must have this segment"; the document describes the
// two behaviours but not the messages.
//
// Requests arrive as single-flit headers on req_* (valid-ready) and queue in a
// two-entry FIFO. A served request becomes one header flit (MSG_DATA) and
// PKT_WORDS payload flits read from the TVM at pkt*PKT_WORDS + i; a TVM read
// is requested with tvm_req, granted with tvm_gnt and its data is taken from
// tvm_rdata the cycle after the grant. Replies leave on out_* (valid-ready),
// packet-atomic, tail set on the last flit.
module tv_server #(
  parameter int DEPTH = 8192
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [colt_pkg::ID_W-1:0]    my_id,
  input  logic                         safety_critical,
  input  logic                         block_en,
  input  colt_pkg::hdr_t               req_hdr,
  input  logic                         req_valid,
  output logic                         req_ready,
  output logic                         tvm_req,
  output logic [$clog2(DEPTH)-1:0]     tvm_addr,
  input  logic                         tvm_gnt,
  input  logic [63:0]                  tvm_rdata,
  output colt_pkg::flit_t              out_flit,
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic [31:0]                  served,
  output logic [31:0]                  nacked,
  output logic [31:0]                  blocked_cycles,
  output logic [31:0]                  interfere_cycles
);
  import colt_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_DECIDE, S_HDR, S_NACK, S_RD, S_WAITRD, S_SEND} st_t;

  st_t         st;
  hdr_t        q [2];
  logic [1:0]  q_cnt;
  logic        q_rd_ptr, q_wr_ptr;
  hdr_t        cur;
  logic [2:0]  idx;
  logic [63:0] word;
  logic        pop;
  hdr_t        reply;

  assign req_ready = (q_cnt != 2'd2);
  assign pop       = (st == S_NACK && out_ready) ||
                     (st == S_SEND && out_ready && idx == 3'(PKT_WORDS - 1));

  always_comb begin
    reply        = '0;
    reply.dst    = cur.src;
    reply.src    = my_id;
    reply.seg    = cur.seg;
    reply.pkt    = cur.pkt;
    reply.mtype  = (st == S_NACK) ? MSG_NACK : MSG_DATA;
    out_valid    = (st == S_HDR) || (st == S_NACK) || (st == S_SEND);
    out_flit     = '0;
    unique case (st)
      S_HDR:   out_flit = '{head: 1'b1, tail: 1'b0, data: reply};
      S_NACK:  out_flit = '{head: 1'b1, tail: 1'b1, data: reply};
      S_SEND:  out_flit = '{head: 1'b0, tail: (idx == 3'(PKT_WORDS - 1)), data: word};
      default: out_flit = '0;
    endcase
  end

  assign tvm_req  = (st == S_RD);
  assign tvm_addr = $clog2(DEPTH)'({cur.pkt, idx});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st               <= S_IDLE;
      q_cnt            <= '0;
      q_rd_ptr         <= 1'b0;
      q_wr_ptr         <= 1'b0;
      q[0]             <= '0;
      q[1]             <= '0;
      cur              <= '0;
      idx              <= '0;
      word             <= '0;
      served           <= '0;
      nacked           <= '0;
      blocked_cycles   <= '0;
      interfere_cycles <= '0;
    end else begin
      if (req_valid && req_ready) begin
        q[q_wr_ptr] <= req_hdr;
        q_wr_ptr    <= ~q_wr_ptr;
      end
      if (pop) q_rd_ptr <= ~q_rd_ptr;
      q_cnt <= q_cnt + {1'b0, req_valid && req_ready} - {1'b0, pop};

      if (safety_critical && (st == S_HDR || st == S_RD || st == S_WAITRD || st == S_SEND))
        interfere_cycles <= interfere_cycles + 1'b1;

      unique case (st)
        S_IDLE: if (q_cnt != 0) begin
          cur <= q[q_rd_ptr];
          st  <= S_DECIDE;
        end
        S_DECIDE: begin
          if (!safety_critical) st <= S_HDR;
          else if (!cur.force_) st <= S_NACK;
          else if (!block_en)   st <= S_HDR;
          else blocked_cycles <= blocked_cycles + 1'b1;
        end
        S_HDR: if (out_ready) begin
          idx <= '0;
          st  <= S_RD;
        end
        S_NACK: if (out_ready) begin
          nacked <= nacked + 1'b1;
          st     <= S_IDLE;
        end
        S_RD:     if (tvm_gnt) st <= S_WAITRD;
        S_WAITRD: begin
          word <= tvm_rdata;
          st   <= S_SEND;
        end
        S_SEND: if (out_ready) begin
          if (idx == 3'(PKT_WORDS - 1)) begin
            served <= served + 1'b1;
            st     <= S_IDLE;
          end else begin
            idx <= idx + 1'b1;
            st  <= S_RD;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
