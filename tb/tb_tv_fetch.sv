// tb_tv_fetch: the fetcher of a core under test at node 12 holding segment 2
// of a five-segment set (4 data + parity, 16 words per segment), with the
// four remote sources modelled here. Each source answers a request after a
// random delay with its packet, or refuses it (NACK) when marked busy and the
// request is not forced. Scenarios: standard mode; redundancy with one busy
// source (parity rebuild); two busy sources (one forced re-request); busy
// data and parity sources (parity given up); all sources free. In every
// scenario the 64 test words must come out in order and equal the test set
// computed here, and the refusal / force / rebuild counters must match.
module tb_tv_fetch;
  import colt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0][7:0] src_id;
  logic        redund_en, start, busy, req_valid, req_ready, rx_valid;
  flit_t       req_flit, rx_flit;
  logic        tvm_req, tvm_gnt;
  logic [3:0]  tvm_addr;
  logic [63:0] tvm_rdata, word;
  logic        word_valid, word_last, word_ready;
  logic [31:0] nack_cnt, forced_cnt, rebuilt_cnt, stale_cnt;
  logic [4:0]  src_busy;

  tv_fetch #(.K(4), .PARITY(1), .DEPTH(16)) dut (.clk, .rst_n, .my_id(8'd12), .own_seg(4'd2),
    .src_id, .redund_en, .start, .busy, .req_flit, .req_valid, .req_ready, .rx_flit, .rx_valid,
    .tvm_req, .tvm_addr, .tvm_gnt, .tvm_rdata, .word, .word_valid, .word_last, .word_ready,
    .nack_cnt, .forced_cnt, .rebuilt_cnt, .stale_cnt);

  function automatic logic [63:0] ref_word(int j);
    logic [31:0] s; logic [15:0] a, b;
    s = 32'(j + 1) * 32'h9E3779B1; a = s[31:16]; b = s[15:0];
    return {s, a ^ b, 16'(a + b)};
  endfunction
  function automatic logic [63:0] ref_seg(int seg, int idx);
    if (seg < 4) return ref_word(idx * 4 + seg);
    return ref_word(idx*4) ^ ref_word(idx*4+1) ^ ref_word(idx*4+2) ^ ref_word(idx*4+3);
  endfunction

  // local TVM: segment 2
  always @(posedge clk) if (tvm_req && tvm_gnt) tvm_rdata <= ref_seg(2, int'(tvm_addr));
  always @(negedge clk) begin
    tvm_gnt    = tvm_req && ($urandom_range(0, 3) != 0);
    req_ready  = ($urandom_range(0, 3) != 0);
    word_ready = ($urandom_range(0, 1) != 0);
  end

  // remote sources
  hdr_t   rq [$];
  longint rt [$];
  longint now = 0;
  int     req_seen [5];
  always @(posedge clk) begin
    now <= now + 1;
    if (req_valid && req_ready) begin
      hdr_t h; h = hdr_t'(req_flit.data);
      rq.push_back(h); rt.push_back(now + longint'($urandom_range(2, 40)));
      req_seen[h.seg]++;
      checks++; if (h.mtype != MSG_REQ || h.src != 8'd12 || h.dst != src_id[h.seg] || h.seg == 4'd2) failures++;
    end
  end
  initial begin
    rx_valid = 0; rx_flit = '0;
    forever begin
      @(posedge clk);
      rx_valid <= 0;
      if (rq.size() > 0 && rt[0] <= now) begin
        hdr_t h, r;
        h = rq.pop_front(); void'(rt.pop_front());
        r = '0; r.dst = h.src; r.src = src_id[h.seg]; r.seg = h.seg; r.pkt = h.pkt;
        if (src_busy[h.seg] && !h.force_) begin
          r.mtype = MSG_NACK;
          rx_flit <= '{head: 1, tail: 1, data: r}; rx_valid <= 1;
        end else begin
          r.mtype = MSG_DATA;
          rx_flit <= '{head: 1, tail: 0, data: r}; rx_valid <= 1;
          for (int i = 0; i < 8; i++) begin
            @(posedge clk);
            rx_flit <= '{head: 0, tail: (i == 7), data: ref_seg(int'(h.seg), int'(h.pkt) * 8 + i)};
            rx_valid <= 1;
          end
        end
      end
    end
  end

  task automatic scenario(string name, logic red, logic [4:0] bsy, int exp_nack,
                          int exp_forced, int exp_rebuilt);
    int n; logic [31:0] n0, f0, r0;
    redund_en = red; src_busy = bsy;
    n0 = nack_cnt; f0 = forced_cnt; r0 = rebuilt_cnt;
    for (int s = 0; s < 5; s++) req_seen[s] = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    n = 0;
    while (1) begin
      @(posedge clk);
      if (word_valid && word_ready) begin
        checks++;
        if (word != ref_word(n)) begin failures++; $display("%s word %0d bad", name, n); end
        checks++; if (word_last != (n == 63)) failures++;
        n++;
        if (n == 64) break;
      end
    end
    @(negedge clk);
    checks++; if (busy) failures++;
    checks++; if (nack_cnt - n0 != 32'(exp_nack)) begin failures++; $display("%s nacks %0d", name, nack_cnt - n0); end
    checks++; if (forced_cnt - f0 != 32'(exp_forced)) begin failures++; $display("%s forced %0d", name, forced_cnt - f0); end
    if (exp_rebuilt >= 0) checks++;
    if (exp_rebuilt >= 0 && rebuilt_cnt - r0 != 32'(exp_rebuilt)) begin failures++; $display("%s rebuilt %0d", name, rebuilt_cnt - r0); end
    if (!red) begin checks++; if (req_seen[4] != 0) failures++; end
    repeat (100) @(posedge clk);   // let late replies drain
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    src_id = {8'd14, 8'd13, 8'd12, 8'd11, 8'd10};
    start = 0; redund_en = 0; src_busy = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    scenario("standard", 0, 5'b00000, 0, 0, 0);
    scenario("one busy", 1, 5'b00010, 2, 0, 16);
    scenario("two busy", 1, 5'b01010, 4, 2, 16);
    scenario("data+parity busy", 1, 5'b10001, 4, 2, 0);
    scenario("all free", 1, 5'b00000, 0, 0, -1);  // rebuild depends on arrival order
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
