// scan_core_model: behavioural stand-in for a processing core wrapped in one
// 32-flop scan chain, for testbenches only.
//
// With scan_en high the chain shifts towards bit 0 (scan_in enters at bit 31,
// scan_out is bit 0). A capture pulse loads the chain with the core's
// combinational response to the chain's contents: upper half = a XOR b,
// lower half = a + b, where a and b are the upper and lower halves. With
// `fault` high, bit 5 of the captured value is stuck at 1, modelling a
// wear-out defect that the scan test must find.
module scan_core_model (
  input  logic clk,
  input  logic fault,
  input  logic scan_en,
  input  logic scan_in,
  input  logic capture,
  output logic scan_out
);
  logic [31:0] chain = '0;
  logic [15:0] a, b;
  logic [31:0] resp;

  assign a        = chain[31:16];
  assign b        = chain[15:0];
  assign resp     = {a ^ b, 16'(a + b)} | (fault ? 32'h20 : 32'h0);
  assign scan_out = chain[0];

  always @(posedge clk) begin
    if (scan_en)      chain <= {scan_in, chain[31:1]};
    else if (capture) chain <= resp;
  end
endmodule
