// tv_fetch: core-under-test side of the distributed test controller.
//
// With distributed test vector storage the complete test set of a core is
// spread over the tiles of one Lee sphere around it: the tile's own TVM holds
// one segment and each neighbour named by src_id[] (from dtvs_map) holds
// another. This block collects the set packet group by packet group and feeds
// it, word by word and in test order, to the scan interface.
//
// Group p covers PKT_WORDS stripes: for every segment s it needs packet p of
// s (words p*PKT_WORDS .. p*PKT_WORDS+7 of that segment). For one group it
//   1. sends a single-flit MSG_REQ to the tile holding each remote segment and
//      reads the local segment's packet straight from the TVM;
//   2. stores arriving MSG_DATA payloads in a small buffer (one packet per
//      segment) and notes MSG_NACK refusals;
//   3. is complete when every data segment is there or, with storage
//      redundancy (redund_en), when all but one data segment and the parity
//      segment are there; the missing one is rebuilt by parity_recon;
//   4. if it cannot complete and nothing is outstanding (two or more
//      refusals), re-requests with the force bit set from every refusing tile
//      but one (the highest segment index, so the parity segment is the one
//      given up first), which then serve at once or, with delivery blocking,
//      after their safety-critical section;
//   5. hands the K*PKT_WORDS data words of the group to the scan interface,
//      word j = stripe*K + segment, and moves to group p+1.
// Without redundancy every request is forced from the start and the parity
// segment is never asked for. Replies for an older group (a late answer to a
// request that was no longer needed) are dropped. Fetching of group p+1
// starts after group p is applied: a single buffer, this design's choice to
// keep the "nominal amount of buffers" small.
//
// Ports: start pulse; req_* single-flit requests out (valid-ready); rx_* reply
// flits in (always accepted); tvm_* local TVM read (grant, data one cycle
// later); word_* stream to scan_apply (valid-ready, word_last on the final
// word). busy is high from start until the last word is handed over.
module tv_fetch #(
  parameter int K      = 4,      // data segments
  parameter int PARITY = 1,      // 1: a parity segment exists (index K)
  parameter int DEPTH  = 8192    // words per segment
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [colt_pkg::ID_W-1:0]             my_id,
  input  logic [colt_pkg::SEG_W-1:0]            own_seg,
  input  logic [K+PARITY-1:0][colt_pkg::ID_W-1:0] src_id,
  input  logic                                  redund_en,
  input  logic                                  start,
  output logic                                  busy,
  output colt_pkg::flit_t                       req_flit,
  output logic                                  req_valid,
  input  logic                                  req_ready,
  input  colt_pkg::flit_t                       rx_flit,
  input  logic                                  rx_valid,
  output logic                                  tvm_req,
  output logic [$clog2(DEPTH)-1:0]              tvm_addr,
  input  logic                                  tvm_gnt,
  input  logic [63:0]                           tvm_rdata,
  output logic [63:0]                           word,
  output logic                                  word_valid,
  output logic                                  word_last,
  input  logic                                  word_ready,
  output logic [31:0]                           nack_cnt,
  output logic [31:0]                           forced_cnt,
  output logic [31:0]                           rebuilt_cnt,
  output logic [31:0]                           stale_cnt
);
  import colt_pkg::*;

  localparam int NSEG = K + PARITY;
  localparam int NPKT = DEPTH / PKT_WORDS;
  localparam int SW   = $clog2(NSEG + 1);
  localparam int DW   = (K > 1) ? $clog2(K) : 1;

  typedef enum logic [1:0] {SS_NONE, SS_WAIT, SS_GOT, SS_NACK} seg_st_t;
  typedef enum logic [1:0] {P_IDLE, P_ISSUE, P_COLLECT, P_APPLY} phase_t;

  phase_t                      phase;
  seg_st_t                     sst [1 << SEG_W];
  logic [NSEG-1:0][63:0]       buf_w [PKT_WORDS];
  logic [PKT_W-1:0]            p;
  logic [SW-1:0]               s_ptr;
  logic                        force_round;
  // local TVM loader
  logic                        loc_busy, loc_rd;
  logic [2:0]                  loc_i, loc_i_d;
  // reply receiver
  logic                        rx_on, rx_keep;
  logic [SEG_W-1:0]            rx_seg;
  logic [2:0]                  rx_i;
  // apply
  logic [2:0]                  ap_i;
  logic [DW-1:0]               ap_d;

  hdr_t            rx_hdr;
  logic [K:0]      have;
  logic [K:0][63:0] stripe;
  logic            rec_rebuilt, rec_ok;
  logic            need_req;
  logic            complete, outstanding;
  int unsigned     got_data, n_nack;
  logic [SW-1:0]   skip_seg;

  assign rx_hdr = hdr_t'(rx_flit.data);
  assign busy   = (phase != P_IDLE);

  // Which segments this group still has to ask for.
  always_comb begin
    need_req = 1'b0;
    for (int s = 0; s < NSEG; s++)
      if (s_ptr == SW'(s))
        need_req = (s_ptr != SW'(own_seg)) && (sst[s] == SS_NONE) && (redund_en || s < K);
  end

  always_comb begin
    hdr_t h;
    h        = '0;
    h.mtype  = MSG_REQ;
    h.dst    = src_id[s_ptr < SW'(NSEG) ? s_ptr : '0];
    h.src    = my_id;
    h.seg    = SEG_W'(s_ptr);
    h.force_ = !redund_en || force_round;
    h.pkt    = p;
    req_flit = '{head: 1'b1, tail: 1'b1, data: h};
  end
  assign req_valid = (phase == P_ISSUE) && need_req;

  // Completion test of the current group.
  always_comb begin
    got_data    = 0;
    n_nack      = 0;
    outstanding = loc_busy;
    skip_seg    = '0;
    for (int s = 0; s < NSEG; s++) begin
      if (s < K && sst[s] == SS_GOT) got_data++;
      if (sst[s] == SS_NACK) begin
        n_nack++;
        skip_seg = SW'(s);
      end
      if (sst[s] == SS_WAIT) outstanding = 1'b1;
    end
    complete = (got_data == K) ||
               (PARITY != 0 && redund_en && got_data == K - 1 && sst[NSEG-1] == SS_GOT);
  end

  // Stripe ap_i of the buffer, for the erasure decoder.
  always_comb begin
    stripe = '0;
    have   = '0;
    for (int s = 0; s < NSEG; s++) begin
      stripe[s] = buf_w[ap_i][s];
      have[s]   = (sst[s] == SS_GOT);
    end
  end

  parity_recon #(.K(K), .W(64)) u_recon (
    .words(stripe), .have(have), .sel(ap_d),
    .data(word), .rebuilt(rec_rebuilt), .ok(rec_ok)
  );

  assign word_valid = (phase == P_APPLY) && rec_ok;
  assign word_last  = (p == PKT_W'(NPKT - 1)) && (ap_i == 3'(PKT_WORDS - 1)) &&
                      (ap_d == DW'(K - 1));

  assign tvm_req  = loc_busy && !loc_rd;
  assign tvm_addr = $clog2(DEPTH)'({p, loc_i});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= P_IDLE;
      for (int s = 0; s < (1 << SEG_W); s++) sst[s] <= SS_NONE;
      for (int i = 0; i < PKT_WORDS; i++) buf_w[i] <= '0;
      p           <= '0;
      s_ptr       <= '0;
      force_round <= 1'b0;
      loc_busy    <= 1'b0;
      loc_rd      <= 1'b0;
      loc_i       <= '0;
      loc_i_d     <= '0;
      rx_on       <= 1'b0;
      rx_keep     <= 1'b0;
      rx_seg      <= '0;
      rx_i        <= '0;
      ap_i        <= '0;
      ap_d        <= '0;
      nack_cnt    <= '0;
      forced_cnt  <= '0;
      rebuilt_cnt <= '0;
      stale_cnt   <= '0;
    end else begin
      // ---------------- local segment loader ----------------
      loc_rd <= 1'b0;
      if (tvm_req && tvm_gnt) begin
        loc_rd  <= 1'b1;
        loc_i_d <= loc_i;
        loc_i   <= loc_i + 1'b1;
      end
      if (loc_rd) begin
        buf_w[loc_i_d][own_seg] <= tvm_rdata;
        if (loc_i_d == 3'(PKT_WORDS - 1)) begin
          loc_busy     <= 1'b0;
          sst[own_seg] <= SS_GOT;
        end
      end

      // ---------------- reply receiver ----------------
      if (rx_valid) begin
        if (rx_flit.head) begin
          if (rx_hdr.mtype == MSG_DATA || rx_hdr.mtype == MSG_NACK) begin
            logic fresh;
            fresh = busy && rx_hdr.pkt == p && int'(rx_hdr.seg) < NSEG &&
                    sst[rx_hdr.seg] == SS_WAIT;
            if (!fresh) stale_cnt <= stale_cnt + 1'b1;
            if (rx_hdr.mtype == MSG_NACK) begin
              if (fresh) begin
                sst[rx_hdr.seg] <= SS_NACK;
                nack_cnt        <= nack_cnt + 1'b1;
              end
            end else begin
              rx_on   <= 1'b1;
              rx_keep <= fresh;
              rx_seg  <= rx_hdr.seg;
              rx_i    <= '0;
            end
          end
        end else if (rx_on) begin
          if (rx_keep) buf_w[rx_i][rx_seg] <= rx_flit.data;
          rx_i <= rx_i + 1'b1;
          if (rx_flit.tail) begin
            rx_on <= 1'b0;
            if (rx_keep && sst[rx_seg] == SS_WAIT) sst[rx_seg] <= SS_GOT;
          end
        end
      end

      // ---------------- group sequencing ----------------
      unique case (phase)
        P_IDLE: if (start) begin
          p           <= '0;
          s_ptr       <= '0;
          force_round <= 1'b0;
          phase       <= P_ISSUE;
          for (int s = 0; s < NSEG; s++) sst[s] <= SS_NONE;
        end
        P_ISSUE: begin
          if (s_ptr == SW'(own_seg) && sst[own_seg] == SS_NONE) begin
            sst[own_seg] <= SS_WAIT;
            loc_busy     <= 1'b1;
            loc_i        <= '0;
          end
          if (req_valid) begin
            if (req_ready) begin
              sst[s_ptr] <= SS_WAIT;
              if (force_round) forced_cnt <= forced_cnt + 1'b1;
              s_ptr <= s_ptr + 1'b1;
            end
          end else begin
            s_ptr <= s_ptr + 1'b1;
          end
          if (s_ptr == SW'(NSEG - 1) && (!req_valid || req_ready)) phase <= P_COLLECT;
        end
        P_COLLECT: begin
          if (complete) begin
            ap_i  <= '0;
            ap_d  <= '0;
            phase <= P_APPLY;
          end else if (!outstanding && redund_en) begin
            for (int s = 0; s < NSEG; s++)
              if (sst[s] == SS_NACK && SW'(s) != skip_seg) sst[s] <= SS_NONE;
            force_round <= 1'b1;
            s_ptr       <= '0;
            phase       <= P_ISSUE;
          end
        end
        P_APPLY: if (word_valid && word_ready) begin
          if (rec_rebuilt) rebuilt_cnt <= rebuilt_cnt + 1'b1;
          if (ap_d == DW'(K - 1)) begin
            ap_d <= '0;
            if (ap_i == 3'(PKT_WORDS - 1)) begin
              if (word_last) begin
                phase <= P_IDLE;
              end else begin
                p           <= p + 1'b1;
                s_ptr       <= '0;
                force_round <= 1'b0;
                phase       <= P_ISSUE;
                for (int s = 0; s < NSEG; s++) sst[s] <= SS_NONE;
              end
            end else begin
              ap_i <= ap_i + 1'b1;
            end
          end else begin
            ap_d <= ap_d + 1'b1;
          end
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

endmodule
