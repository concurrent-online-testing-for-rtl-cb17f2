// tb_test_cfg_reg: reset value, write and read-back at the register address,
// no effect from other addresses, and the self-clearing test request bit.
module tb_test_cfg_reg;
  import colt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ocp_cmd_t    mcmd;
  logic [31:0] maddr, mdata, rdata;
  logic        rvalid;
  cfg_t        cfg;

  test_cfg_reg #(.BASE(32'hFFFF_0000)) dut (.clk, .rst_n, .mcmd, .maddr, .mdata, .rdata, .rvalid, .cfg);

  task automatic op(ocp_cmd_t c, logic [31:0] a, logic [31:0] d);
    mcmd <= c; maddr <= a; mdata <= d;
    @(posedge clk);
    mcmd <= OCP_IDLE;
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    mcmd = OCP_IDLE; maddr = 0; mdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    checks++; if (cfg != 6'b100110) failures++;
    op(OCP_WR, 32'hFFFF_0000, 32'h1);          // enter safety-critical section
    @(negedge clk);
    checks++; if (!cfg.safety_critical || cfg.block_en) failures++;
    op(OCP_WR, 32'h0000_1000, 32'h3F);         // other address: ignored
    @(negedge clk);
    checks++; if (cfg != 6'b000001) failures++;
    op(OCP_WR, 32'hFFFF_0000, 32'h0A);         // block_en + test_req
    @(negedge clk);
    checks++; if (!cfg.test_req || !cfg.block_en || cfg.safety_critical) failures++;
    @(negedge clk);
    checks++; if (cfg.test_req) failures++;     // pulse only
    op(OCP_RD, 32'hFFFF_0000, 32'h0);
    @(negedge clk);
    checks++; if (!rvalid || rdata != 32'h02) failures++;
    @(negedge clk);
    checks++; if (rvalid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
