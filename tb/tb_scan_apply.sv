// tb_scan_apply: applies 40 patterns of the stand-in test set to the
// behavioural scan core, first fault-free (no mismatch, done after exactly
// 40*34 + 32 cycles from the first word) and then with a stuck-at bit in
// the core (every pattern whose response has bit 5 clear must mismatch).
module tb_scan_apply;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        clear, word_valid, word_last, word_ready;
  logic [63:0] word;
  logic        scan_en, scan_in, capture, scan_out, done, fail, fault;
  logic [31:0] mismatches;

  scan_apply dut (.clk, .rst_n, .clear, .word, .word_valid, .word_last, .word_ready,
                  .scan_en, .scan_in, .capture, .scan_out, .done, .fail, .mismatches);
  scan_core_model core (.clk, .fault, .scan_en, .scan_in, .capture, .scan_out);

  function automatic logic [63:0] ref_word(int j);
    logic [31:0] s; logic [15:0] a, b;
    s = 32'(j + 1) * 32'h9E3779B1; a = s[31:16]; b = s[15:0];
    return {s, a ^ b, 16'(a + b)};
  endfunction

  task automatic run(int p, output int cycles);
    int t0;
    int i;
    clear <= 1; @(posedge clk); clear <= 0;
    i = 0; t0 = -1; cycles = 0;
    word_valid <= 1; word <= ref_word(0); word_last <= (p == 1);
    while (1) begin
      @(posedge clk);
      cycles++;
      if (word_valid && word_ready) begin
        i++;
        if (i == p) word_valid <= 0;
        else begin word <= ref_word(i); word_last <= (i == p - 1); end
      end
      if (done) break;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc, expect_mis;
    clear = 0; word_valid = 0; word_last = 0; word = 0; fault = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(40, cyc);
    checks++; if (fail || mismatches != 0) failures++;
    checks++; if (cyc != 40 * 34 + 32 + 1) begin failures++; $display("cycles %0d", cyc); end
    fault = 1;
    run(40, cyc);
    expect_mis = 0;
    for (int j = 0; j < 40; j++) if (!ref_word(j)[5]) expect_mis++;
    checks++; if (!fail) failures++;
    checks++; if (mismatches != 32'(expect_mis)) begin failures++; $display("mis %0d exp %0d", mismatches, expect_mis); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
