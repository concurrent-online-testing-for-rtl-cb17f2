// tb_tvm: loads a data-segment and a parity-segment TVM through the write
// port with colt_pkg::seg_word(), then reads every word back and compares it
// with the stand-in test set computed here from its definition (stimulus
// (j+1)*0x9E3779B1, response = {a^b, a+b}, parity = XOR of the four data
// words). Also checks the one-cycle read latency, that rdata holds while
// `en` is low, and overwriting a word.
module tb_tvm;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        en, we;
  logic [5:0]  addr;
  logic [63:0] wd1, wd4, rd1, rd4;

  tvm #(.DEPTH(64), .K(4), .SEG(1)) u_d (.clk, .en, .we, .addr, .wdata(wd1), .rdata(rd1));
  tvm #(.DEPTH(64), .K(4), .SEG(4)) u_p (.clk, .en, .we, .addr, .wdata(wd4), .rdata(rd4));

  function automatic logic [63:0] ref_word(int j);
    logic [31:0] s; logic [15:0] a, b;
    s = 32'(j + 1) * 32'h9E3779B1; a = s[31:16]; b = s[15:0];
    return {s, a ^ b, 16'(a + b)};
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] held;
    en = 0; we = 0; addr = 0; wd1 = 0; wd4 = 0;
    @(posedge clk);
    for (int i = 0; i < 64; i++) begin
      en <= 1; we <= 1; addr <= 6'(i);
      wd1 <= colt_pkg::seg_word(1, i, 4);
      wd4 <= colt_pkg::seg_word(4, i, 4);
      @(posedge clk);
    end
    en <= 0; we <= 0;
    @(posedge clk);
    for (int i = 0; i < 64; i++) begin
      en <= 1; addr <= 6'(i);
      @(posedge clk); en <= 0;
      @(negedge clk);
      checks++; if (rd1 != ref_word(4*i + 1)) failures++;
      checks++; if (rd4 != (ref_word(4*i) ^ ref_word(4*i+1) ^ ref_word(4*i+2) ^ ref_word(4*i+3))) failures++;
    end
    // rdata holds while en is low
    held = rd1;
    addr <= 6'd3;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++; if (rd1 != held) failures++;
    // overwrite, then read: data appears exactly one cycle after the read edge
    en <= 1; we <= 1; addr <= 6'd7; wd1 <= 64'h0123_4567_89AB_CDEF;
    @(posedge clk); we <= 0; addr <= 6'd7;
    @(posedge clk); en <= 0;
    @(negedge clk);
    checks++; if (rd1 != 64'h0123_4567_89AB_CDEF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
