// tb_tv_server: sends packet requests to the server and checks the replies
// against a TVM model held here: a normal request returns a header and 8
// payload words in order; a non-forced request during safety-critical code
// is refused; a forced one with blocking enabled is held until the flag
// clears (and its blocked cycles counted); with blocking disabled it is
// served at once and the interference is counted. Output stalls are applied
// at random.
module tb_tv_server;
  import colt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        safety_critical, block_en, req_valid, req_ready, tvm_req, tvm_gnt;
  hdr_t        req_hdr;
  logic [6:0]  tvm_addr;
  logic [63:0] tvm_rdata;
  flit_t       out_flit;
  logic        out_valid, out_ready;
  logic [31:0] served, nacked, blocked_cycles, interfere_cycles;
  logic [63:0] mem [128];

  tv_server #(.DEPTH(128)) dut (.clk, .rst_n, .my_id(8'd7), .safety_critical, .block_en,
    .req_hdr, .req_valid, .req_ready, .tvm_req, .tvm_addr, .tvm_gnt, .tvm_rdata,
    .out_flit, .out_valid, .out_ready, .served, .nacked, .blocked_cycles, .interfere_cycles);

  // TVM model with random grant delays
  always @(posedge clk) begin
    if (tvm_req && tvm_gnt) tvm_rdata <= mem[tvm_addr];
    tvm_gnt   <= 1'b0;
  end
  always @(negedge clk) tvm_gnt = tvm_req && ($urandom_range(0, 2) != 0);
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  task automatic chk(logic c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic send_req(int src, int pkt, logic force_);
    hdr_t h; h = '0; h.mtype = MSG_REQ; h.src = 8'(src); h.dst = 8'd7; h.seg = 4'd2;
    h.pkt = 16'(pkt); h.force_ = force_;
    @(negedge clk); req_hdr = h; req_valid = 1;
    do @(posedge clk); while (!req_ready);
    #1 req_valid = 0;
  endtask

  // collect one reply packet; returns 1 for data, 0 for nack
  task automatic get_reply(int src, int pkt, output logic is_data, output int waited);
    hdr_t h; int i;
    waited = 0;
    while (1) begin @(posedge clk); waited++; if (out_valid && out_ready) break; end
    h = hdr_t'(out_flit.data);
    chk(out_flit.head && h.dst == 8'(src) && h.src == 8'd7 && h.pkt == 16'(pkt) && h.seg == 4'd2, "reply header");
    is_data = (h.mtype == MSG_DATA);
    if (!is_data) begin chk(h.mtype == MSG_NACK && out_flit.tail, "nack single flit"); return; end
    for (i = 0; i < 8; i++) begin
      do @(posedge clk); while (!(out_valid && out_ready));
      chk(!out_flit.head && out_flit.data == mem[pkt*8 + i] && out_flit.tail == (i == 7), "payload");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic d; int w; logic [31:0] ic0;
    for (int i = 0; i < 128; i++) mem[i] = {$urandom, $urandom};
    safety_critical = 0; block_en = 1; req_valid = 0; req_hdr = '0; tvm_rdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // plain requests, two queued back to back
    fork send_req(11, 3, 0); join
    send_req(12, 9, 0);
    get_reply(11, 3, d, w); chk(d, "served 1");
    get_reply(12, 9, d, w); chk(d, "served 2");
    // safety-critical, not forced: NACK
    safety_critical = 1;
    send_req(13, 5, 0);
    get_reply(13, 5, d, w); chk(!d, "refused");
    // forced with blocking: held until the section ends
    ic0 = interfere_cycles;
    send_req(14, 6, 1);
    repeat (50) @(posedge clk);
    chk(!out_valid, "held back");
    safety_critical = 0;
    get_reply(14, 6, d, w); chk(d, "served after section");
    chk(blocked_cycles >= 45, "blocked cycles counted");
    chk(interfere_cycles == ic0, $sformatf("no interference with blocking %0d", interfere_cycles - ic0));
    // forced without blocking: served during the section, interference counted
    block_en = 0; safety_critical = 1;
    send_req(15, 15, 1);
    get_reply(15, 15, d, w); chk(d, "best-effort serve");
    chk(interfere_cycles > 0, "interference counted");
    safety_critical = 0;
    repeat (3) @(posedge clk);
    chk(served == 4 && nacked == 1, "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
