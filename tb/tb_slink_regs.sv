// tb_slink_regs: checks the function registers: reset values, read back of
// the configuration registers, a one-clock START pulse only when
// SOFT_RESETN is written as 1 and no operation is running, BUSY from START
// until the operation ends, DONE, the retry and CRC-error counters and
// their clearing at START, LINK_UP, and BUSY cleared by a soft reset.
module tb_slink_regs;
  import slink_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        reg_we = 0;
  logic [4:0]  reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic        soft_resetn, gtps, start;
  logic [31:0] hdr_lo, remote_addr, local_addr;
  logic        op_done = 0, link_up = 0, retry = 0, crc_err = 0;
  int checks = 0, failures = 0;
  int n_start = 0;

  slink_regs dut (.*);

  always @(posedge clk) if (start) n_start++;

  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic rd(input logic [4:0] a, output logic [31:0] v);
    reg_addr = a;
    #1;
    v = reg_rdata;
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, r0, r1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    rd(REG_CTRL, r0);
    check(soft_resetn && !gtps && r0 == 32'h1, "CTRL reset value");
    rd(REG_STATUS, r0);
    check(r0 == 32'h0, "STATUS reset value");
    // the programming sequence
    wr(REG_HDR, 32'h0000_2851);
    wr(REG_RADDR, 32'hCAFE_0000);
    wr(REG_LADDR, 32'h0000_BEE0);
    rd(REG_HDR, r0);
    check(r0 == 32'h0000_2851 && hdr_lo == 32'h0000_2851, "HDR read back");
    rd(REG_RADDR, r0);
    check(r0 == 32'hCAFE_0000 && remote_addr == 32'hCAFE_0000, "RADDR read back");
    rd(REG_LADDR, r0);
    check(r0 == 32'h0000_BEE0 && local_addr == 32'h0000_BEE0, "LADDR read back");
    wr(REG_CTRL, 32'h13);   // GTPS + SOFT_RESETN + START
    @(negedge clk);
    check(n_start == 1 && gtps && soft_resetn, "START pulse or GTPS");
    rd(REG_CTRL, r0);
    check(r0 == 32'h3, "START reads back as 0");
    rd(REG_STATUS, r0);
    check(r0[0] == 1'b1, "BUSY not set by START");
    wr(REG_CTRL, 32'h13);   // ignored while busy
    check(n_start == 1, "START accepted while busy");
    pulse(retry); pulse(retry); pulse(crc_err);
    link_up = 1;
    pulse(op_done);
    rd(REG_STATUS, r0);
    v = r0;
    check(v[0] == 0 && v[1] == 1 && v[2] == 1, "BUSY/DONE/LINK_UP after the operation");
    check(v[15:8] == 8'd2 && v[23:16] == 8'd1, "retry / CRC error counters");
    wr(REG_CTRL, 32'h11);
    @(negedge clk);
    rd(REG_STATUS, r0);
    v = r0;
    check(n_start == 2 && v[0] == 1 && v[1] == 0 && v[15:8] == 0 && v[23:16] == 0, "second START did not clear status");
    // soft reset clears BUSY; START with SOFT_RESETN = 0 is ignored
    wr(REG_CTRL, 32'h0);
    @(negedge clk);
    rd(REG_STATUS, r0);
    check(!soft_resetn && r0[0] == 1'b0, "soft reset did not clear BUSY");
    wr(REG_CTRL, 32'h10);
    check(n_start == 2, "START accepted in soft reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
