// parity_recon: erasure decoder of the test vector storage redundancy scheme.
//
// The test set is split into K data segments plus one parity segment that is
// the XOR of the K data words of the same index (a parity erasure code of
// length K+1). Any K of the K+1 words give back all data words: the missing
// one is the XOR of the other K. This block takes the K+1 words of one stripe
// with a mask of which ones arrived, and returns data word `sel` either as
// received or, when it is missing, rebuilt from the others.
//
// `ok` is low when `sel` cannot be produced (it and at least one other word
// are missing). `rebuilt` is high when the output came from the parity
// equation. Combinational.
module parity_recon #(
  parameter int K = 4,   // data segments (document: 4 data + 1 parity)
  parameter int W = 64
) (
  input  logic [K:0][W-1:0]     words,  // [0..K-1] data, [K] parity
  input  logic [K:0]            have,
  input  logic [$clog2(K)-1:0]  sel,
  output logic [W-1:0]          data,
  output logic                  rebuilt,
  output logic                  ok
);
  always_comb begin
    logic [W-1:0] acc;
    int unsigned  missing;
    acc     = '0;
    missing = 0;
    for (int s = 0; s <= K; s++) begin
      if (s != int'(sel)) begin
        acc ^= words[s];
        if (!have[s]) missing++;
      end
    end
    if (have[sel]) begin
      data    = words[sel];
      rebuilt = 1'b0;
      ok      = 1'b1;
    end else begin
      data    = acc;
      rebuilt = 1'b1;
      ok      = (missing == 0);
    end
  end

endmodule
