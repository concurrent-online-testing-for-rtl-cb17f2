// test_cfg_reg: memory-mapped test configuration register of the CNI.
//
// Software running on the tile's core reaches it with ordinary OCP writes and
// reads at address BASE. Its main field is the safety-critical flag: set on
// entry to a safety-critical section and cleared on exit, it tells the tile's
// test vector server to withhold (or refuse) test vectors so the test traffic
// does not disturb that code. The other fields (block_en, attu_train,
// test_req, attu_en; layout in colt_pkg::cfg_t) are this design's additions
// to control the other COLT mechanisms from software; redund_en selects
// whether a test of this core uses the parity segment.
//
// Timing: a write takes effect at the next clock edge; test_req is a
// write-one pulse that reads back as zero. A read returns the register in
// the following cycle on rdata with rvalid. Reset: redund_en, block_en and
// attu_train set, everything else clear.
module test_cfg_reg #(
  parameter logic [31:0] BASE = 32'hFFFF_0000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  colt_pkg::ocp_cmd_t  mcmd,
  input  logic [31:0]         maddr,
  input  logic [31:0]         mdata,
  output logic [31:0]         rdata,
  output logic                rvalid,
  output colt_pkg::cfg_t      cfg
);
  import colt_pkg::*;

  localparam cfg_t RESET_VAL = '{redund_en: 1'b1, attu_en: 1'b0, test_req: 1'b0, attu_train: 1'b1,
                                 block_en: 1'b1, safety_critical: 1'b0};

  logic hit;
  assign hit = (maddr == BASE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg    <= RESET_VAL;
      rdata  <= '0;
      rvalid <= 1'b0;
    end else begin
      cfg.test_req <= 1'b0;
      rvalid       <= 1'b0;
      if (hit && mcmd == OCP_WR) begin
        cfg <= cfg_t'(mdata[$bits(cfg_t)-1:0]);
      end
      if (hit && mcmd == OCP_RD) begin
        rdata  <= {{(32 - $bits(cfg_t)){1'b0}}, cfg};
        rvalid <= 1'b1;
      end
    end
  end

endmodule
