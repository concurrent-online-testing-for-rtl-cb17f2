// tb_parity_recon: random stripes of four data words plus their XOR parity;
// checks pass-through when the word is present, rebuild when exactly one is
// missing, and refusal when two are missing.
module tb_parity_recon;
  int checks = 0, failures = 0;
  logic [4:0][63:0] words;
  logic [4:0]       have;
  logic [1:0]       sel;
  logic [63:0]      data;
  logic             rebuilt, ok;

  parity_recon #(.K(4), .W(64)) dut (.words, .have, .sel, .data, .rebuilt, .ok);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] d [4];
    for (int it = 0; it < 200; it++) begin
      for (int i = 0; i < 4; i++) d[i] = {$urandom, $urandom};
      for (int i = 0; i < 4; i++) words[i] = d[i];
      words[4] = d[0] ^ d[1] ^ d[2] ^ d[3];
      have = '1;
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        // drop one segment at random (maybe the selected one, maybe parity)
        have = '1; have[$urandom_range(0, 4)] = 1'b0;
        words[s] = have[s] ? d[s] : 64'hDEAD_BEEF_DEAD_BEEF;
        #1;
        checks++; if (!ok || data != d[s]) failures++;
        checks++; if (rebuilt != !have[s]) failures++;
        words[s] = d[s];
        // two missing including the selected one: cannot rebuild
        have = '1; have[s] = 1'b0; have[(s + 1) % 5] = 1'b0;
        #1;
        checks++; if (ok) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
