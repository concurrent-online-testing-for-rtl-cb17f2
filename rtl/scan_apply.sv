// scan_apply: SCAN test interface between the test controller and the core
// under test.
//
// The core under test has one scan chain of SCAN_LEN flops (one chain per
// core, as in the evaluated cores). Each test word carries a stimulus in
// [63:32] and the expected captured response in [31:0]. For every word the
// block shifts the stimulus in, LSB first, for SCAN_LEN cycles with scan_en
// high, then pulses capture for one cycle (functional clock with scan_en
// low). The response captured for one pattern is shifted out, bit 0 first,
// while the next stimulus is shifted in, and compared with that pattern's
// expected value. After the word flagged `last` a final unload shift brings
// out the last response. Each pattern costs SCAN_LEN+2 cycles (accept,
// shift, capture), so a test of P patterns takes P*(SCAN_LEN+2) + SCAN_LEN
// cycles from the first word to `done` when words arrive on time.
//
// Interface: word/word_valid/word_last/word_ready is a valid-ready stream
// (taken when both are high). `done` pulses once after the last compare;
// `fail` is sticky from the first mismatch until `clear`; `mismatches`
// counts failing patterns. The compare and the overlap of unload with load
// are this design's choices; the document only says that the controller
// applies SCAN tests and compares the responses.
module scan_apply #(
  parameter int SCAN_LEN = colt_pkg::SCAN_LEN
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic [63:0] word,
  input  logic        word_valid,
  input  logic        word_last,
  output logic        word_ready,
  output logic        scan_en,
  output logic        scan_in,
  output logic        capture,
  input  logic        scan_out,
  output logic        done,
  output logic        fail,
  output logic [31:0] mismatches
);
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_CAPTURE, S_UNLOAD} st_t;

  st_t                       st;
  logic [SCAN_LEN-1:0]       stim;       // stimulus being shifted in
  logic [SCAN_LEN-1:0]       resp;       // response being shifted out
  logic [SCAN_LEN-1:0]       exp_prev;   // expected value of the pattern in the chain
  logic [SCAN_LEN-1:0]       exp_cur;    // expected value of the pattern being loaded
  logic                      prev_valid; // chain holds a captured response
  logic                      cur_last;
  logic [$clog2(SCAN_LEN):0] cnt;

  assign word_ready = (st == S_IDLE);
  assign scan_en    = (st == S_SHIFT) || (st == S_UNLOAD);
  assign scan_in    = (st == S_SHIFT) ? stim[0] : 1'b0;
  assign capture    = (st == S_CAPTURE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      stim       <= '0;
      resp       <= '0;
      exp_prev   <= '0;
      exp_cur    <= '0;
      prev_valid <= 1'b0;
      cur_last   <= 1'b0;
      cnt        <= '0;
      done       <= 1'b0;
      fail       <= 1'b0;
      mismatches <= '0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        fail       <= 1'b0;
        mismatches <= '0;
        prev_valid <= 1'b0;
      end
      unique case (st)
        S_IDLE: if (word_valid) begin
          stim     <= word[63:32];
          exp_cur  <= word[31:0];
          cur_last <= word_last;
          cnt      <= '0;
          st       <= S_SHIFT;
        end
        S_SHIFT, S_UNLOAD: begin
          stim <= stim >> 1;
          resp <= {scan_out, resp[SCAN_LEN-1:1]};
          cnt  <= cnt + 1'b1;
          if (cnt == SCAN_LEN - 1) begin
            if (prev_valid && {scan_out, resp[SCAN_LEN-1:1]} != exp_prev) begin
              fail       <= 1'b1;
              mismatches <= mismatches + 1'b1;
            end
            if (st == S_SHIFT) begin
              st <= S_CAPTURE;
            end else begin
              prev_valid <= 1'b0;
              done       <= 1'b1;
              st         <= S_IDLE;
            end
          end
        end
        S_CAPTURE: begin
          exp_prev   <= exp_cur;
          prev_valid <= 1'b1;
          cnt        <= '0;
          st         <= cur_last ? S_UNLOAD : S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
