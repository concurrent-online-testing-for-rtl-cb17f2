// colt_pkg: types, constants and functions shared by the concurrent online
// test (COLT) blocks.
//
// Network messages travel as 64-bit flits. A packet starts with a header flit
// (hdr_t) and, for test vector data, carries PKT_WORDS payload flits behind
// it, so a data packet moves 64 bytes of test vectors, as in the evaluated
// NoC. Requests and refusals (NACK) are single-flit packets. The header layout,
// the node numbering (id = y*N + x) and the single-flit request protocol are
// this design's own choices; the document only fixes 64-bit flits and 64-byte
// packets.
//
// A test vector word is 64 bits: the scan stimulus in [63:32] and the expected
// scan response in [31:0], for a core with one 32-flop scan chain. The set is
// striped over K data segments: word j lives in segment j mod K at index
// j div K; an optional parity segment holds the XOR of the K data words of the
// same index (the erasure code of the storage-redundancy scheme).
//
// tv_word() produces a deterministic stand-in test set so that the test vector
// memories have defined contents in simulation; a real chip would load ATPG
// output instead. The stimulus of word j is (j+1)*0x9E3779B1 (32-bit wrap) and
// the expected response is the reference function core_ref() of that stimulus.
package colt_pkg;

  localparam int FLIT_W    = 64;  // flit width (document: 64-bit flits)
  localparam int PKT_WORDS = 8;   // payload flits per data packet (64 bytes)
  localparam int ID_W      = 8;   // node id width, up to 256 tiles
  localparam int SEG_W     = 4;   // segment index width, up to 16 segments
  localparam int PKT_W     = 16;  // packet index width inside one segment
  localparam int SCAN_LEN  = 32;  // flops in the core's single scan chain

  typedef enum logic [1:0] {
    MSG_REQ  = 2'd0,  // request one packet of a segment
    MSG_DATA = 2'd1,  // header of a data packet, PKT_WORDS payload flits follow
    MSG_NACK = 2'd2,  // source declines: it is running safety-critical code
    MSG_RSVD = 2'd3
  } msg_t;

  typedef struct packed {
    msg_t             mtype;   // [63:62]
    logic [ID_W-1:0]  dst;     // [61:54]
    logic [ID_W-1:0]  src;     // [53:46]
    logic [SEG_W-1:0] seg;     // [45:42]
    logic             force_;  // [41] serve even in a safety-critical section
    logic [24:0]      rsvd;    // [40:16]
    logic [PKT_W-1:0] pkt;     // [15:0] packet index within the segment
  } hdr_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // OCP command codes observed by the ATTU and used for the config register.
  typedef enum logic [2:0] {
    OCP_IDLE = 3'd0,
    OCP_WR   = 3'd1,
    OCP_RD   = 3'd2
  } ocp_cmd_t;

  // Test configuration register fields (software view, see test_cfg_reg).
  typedef struct packed {
    logic redund_en;        // [5] use the parity segment (storage redundancy)
    logic attu_en;          // [4] ATTU may raise test requests
    logic test_req;         // [3] software asks for a test of this core
    logic attu_train;       // [2] ATTU records traffic (training period)
    logic block_en;         // [1] test vector delivery blocking enabled
    logic safety_critical;  // [0] tile is inside a safety-critical section
  } cfg_t;

  // Activity counters of one tile, for software and for testbenches.
  typedef struct packed {
    logic [15:0] tests_run;         // tests completed by this tile's core
    logic [15:0] tests_failed;      // tests that ended in FT response
    logic [31:0] served;            // data packets sent to cores under test
    logic [31:0] nacked;            // requests refused (safety-critical)
    logic [31:0] blocked_cycles;    // cycles a forced request was held back
    logic [31:0] interfere_cycles;  // cycles serving during safety-critical code
    logic [31:0] nack_rx;           // refusals received while testing
    logic [31:0] forced;            // forced re-requests sent
    logic [31:0] rebuilt;           // test words rebuilt from parity
    logic [31:0] stale;             // late replies dropped
    logic [15:0] anomalies;         // ATTU anomalies counted
    logic [15:0] triggers;          // ATTU test requests raised
    logic [15:0] merges;            // ATTU range merges
  } tile_stat_t;

  // Test controller states (scheduling protocol state machine).
  typedef enum logic [2:0] {
    TC_WAIT_TOKEN = 3'd0,
    TC_INIT_TEST  = 3'd1,
    TC_IN_PROG    = 3'd2,
    TC_COMPLETE   = 3'd3,
    TC_FT_RESP    = 3'd4,
    TC_WAIT_SEND  = 3'd5
  } tc_state_t;

  // Golden response of the stand-in core: what its 32 scan flops capture
  // when loaded with stimulus s.
  function automatic logic [31:0] core_ref(input logic [31:0] s);
    return {s[15:0] ^ s[31:16], s[31:16] + s[15:0]};
  endfunction

  // Word j of the stand-in test vector set.
  function automatic logic [63:0] tv_word(input int unsigned j);
    logic [31:0] stim;
    stim = (j + 32'd1) * 32'h9E37_79B1;
    return {stim, core_ref(stim)};
  endfunction

  // Word `idx` of segment `seg` for a set striped over k data segments;
  // seg == k is the parity segment.
  function automatic logic [63:0] seg_word(input int unsigned seg, input int unsigned idx,
                                           input int unsigned k);
    logic [63:0] w;
    if (seg < k) return tv_word(idx * k + seg);
    w = '0;
    for (int unsigned d = 0; d < k; d++) w ^= tv_word(idx * k + d);
    return w;
  endfunction

  // Lee weight of a coordinate difference on a ring of size n (eq. 1, one term).
  function automatic int lee1(input int a, input int n);
    int m;
    m = ((a % n) + n) % n;
    return (m < n - m) ? m : n - m;
  endfunction

endpackage
