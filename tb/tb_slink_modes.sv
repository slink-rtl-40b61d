// tb_slink_modes: runs every transaction mode of the link with a 512-byte
// (64-word) transfer between two back-to-back SLink controllers S0 and S1.
//
// The 24 modes are request type (write, read) x CRC (off, on) x lane rate
// (2.5, 5 Gbps) x lane count (x1, x2, x4). Destination memory is checked
// as soon as STATUS.BUSY clears, except for a write without CRC, which ends
// when its packet has been sent. Both ends are given the lane
// rate through CTRL.GTPS and reset together before each rate, as a rate
// change requires. Every destination word is compared with the source.
// The transfer time T runs from the first AXI read of the source to the
// last AXI write of the destination, the latency from that read to the
// first AXI write of the destination. One clock carries two symbols per
// lane, so the clock is the lane rate / 20: 125 MHz at 2.5 Gbps and 250 MHz
// at 5 Gbps, and the printed bandwidth is 64 bits x words / T at that clock.
// Rate check: x1 without CRC must move its 64 words in at most
// 256 / 0.78 clocks, i.e. reach 78 % of the lane's payload rate, the figure
// reported for one lane at 5 Gbps. Each x-mode must also not take more
// clocks than the next narrower one. Finally the largest packet the header
// can describe, 65535 words (512 KB less 8 bytes), is written with CRC and
// read without, both x4 at 5 Gbps, filling the 512 KB buffers.
// All slink_top parameters are default.
module tb_slink_modes;
  import slink_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // register ports
  logic        s0_we, s1_we;
  logic [4:0]  s0_addr, s1_addr;
  logic [31:0] s0_wdata, s1_wdata, s0_rdata, s1_rdata;

  // lanes
  logic [NUM_LANES-1:0][19:0] s0_tx, s1_tx, s0_rx, s1_rx;
  logic s0_rate, s1_rate, s0_up, s1_up;

  // AXI wires
  `define AXI_WIRES(p) \
    logic [31:0] p``araddr, p``awaddr; logic [3:0] p``arlen, p``awlen; \
    logic [2:0] p``arsize, p``awsize; logic [1:0] p``arburst, p``awburst, p``rresp, p``bresp; \
    logic p``arvalid, p``arready, p``rlast, p``rvalid, p``rready, p``awvalid, p``awready; \
    logic [63:0] p``rdata, p``wdata; logic [7:0] p``wstrb; \
    logic p``wlast, p``wvalid, p``wready, p``bvalid, p``bready; int p``berr;
  `AXI_WIRES(a0_)
  `AXI_WIRES(a1_)

  `define SLINK(inst, p, a, tx, rx, rate, up) \
  slink_top inst ( \
    .clk, .rst_n, .reg_we(p``we), .reg_addr(p``addr), .reg_wdata(p``wdata), .reg_rdata(p``rdata), \
    .m_araddr(a``araddr), .m_arlen(a``arlen), .m_arsize(a``arsize), .m_arburst(a``arburst), \
    .m_arvalid(a``arvalid), .m_arready(a``arready), .m_rdata(a``rdata), .m_rresp(a``rresp), \
    .m_rlast(a``rlast), .m_rvalid(a``rvalid), .m_rready(a``rready), \
    .m_awaddr(a``awaddr), .m_awlen(a``awlen), .m_awsize(a``awsize), .m_awburst(a``awburst), \
    .m_awvalid(a``awvalid), .m_awready(a``awready), .m_wdata(a``wdata), .m_wstrb(a``wstrb), \
    .m_wlast(a``wlast), .m_wvalid(a``wvalid), .m_wready(a``wready), .m_bresp(a``bresp), \
    .m_bvalid(a``bvalid), .m_bready(a``bready), \
    .tx_sym(tx), .rx_sym(rx), .phy_rate(rate), .link_up(up));

  `define MEM(inst, a) \
  tb_axi_mem inst ( \
    .clk, .rst_n, .araddr(a``araddr), .arlen(a``arlen), .arvalid(a``arvalid), .arready(a``arready), \
    .rdata(a``rdata), .rresp(a``rresp), .rlast(a``rlast), .rvalid(a``rvalid), .rready(a``rready), \
    .awaddr(a``awaddr), .awlen(a``awlen), .awvalid(a``awvalid), .awready(a``awready), \
    .wdata(a``wdata), .wlast(a``wlast), .wvalid(a``wvalid), .wready(a``wready), \
    .bresp(a``bresp), .bvalid(a``bvalid), .bready(a``bready), .burst_errors(a``berr));

  `SLINK(u_s0, s0_, a0_, s0_tx, s0_rx, s0_rate, s0_up)
  `SLINK(u_s1, s1_, a1_, s1_tx, s1_rx, s1_rate, s1_up)
  `MEM(u_m0, a0_)
  `MEM(u_m1, a1_)

  always_ff @(posedge clk) begin
    s1_rx <= s0_tx;
    s0_rx <= s1_tx;
  end

  // transfer time: first source read to last destination write
  int cyc_now = 0, t_first = -1, t_last = -1, t_wfirst = -1;
  bit cur_read = 1'b0;
  always_ff @(posedge clk) begin
    cyc_now <= cyc_now + 1;
    if (!cur_read && a0_arvalid && a0_arready && t_first < 0) t_first <= cyc_now;
    if ( cur_read && a1_arvalid && a1_arready && t_first < 0) t_first <= cyc_now;
    if (!cur_read && a1_wvalid && a1_wready && t_wfirst < 0) t_wfirst <= cyc_now;
    if ( cur_read && a0_wvalid && a0_wready && t_wfirst < 0) t_wfirst <= cyc_now;
    if (!cur_read && a1_wvalid && a1_wready && a1_wlast) t_last <= cyc_now;
    if ( cur_read && a0_wvalid && a0_wready && a0_wlast) t_last <= cyc_now;
  end

  task automatic wr0(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); s0_we = 1'b1; s0_addr = a; s0_wdata = d;
    @(negedge clk); s0_we = 1'b0;
  endtask

  task automatic wr1(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); s1_we = 1'b1; s1_addr = a; s1_wdata = d;
    @(negedge clk); s1_we = 1'b0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [63:0] pattern(int seed, int i);
    return {32'(seed * 32'h2545F491 + i), 32'(i * 32'h9E3779B9 ^ seed)};
  endfunction

  localparam int N = 64;         // 512 bytes
  localparam int NMAX = 65535;   // largest length the header can carry

  // bring both ends out of soft reset at the given lane rate
  task automatic set_rate(input bit gtps);
    int c;
    wr0(REG_CTRL, 32'h0);
    wr1(REG_CTRL, 32'h0);
    repeat (4) @(posedge clk);
    wr0(REG_CTRL, 32'h1 | (32'(gtps) << 1));
    wr1(REG_CTRL, 32'h1 | (32'(gtps) << 1));
    check(s0_rate == gtps && s1_rate == gtps, "lane rate not applied");
    repeat (3) @(posedge clk);
    c = 0;
    while (!(s0_up && s1_up) && c < 2000) begin @(posedge clk); c++; end
    check(s0_up && s1_up, "link did not train");
    repeat (60) @(posedge clk);
  endtask

  task automatic run_mode(input bit read, input bit crc, input bit gtps, input int xmode,
                          input int n, input logic [31:0] laddr, input logic [31:0] raddr,
                          output int t);
    int seed, bad, c;
    seed = $urandom;
    for (int i = 0; i < n; i++) begin
      if (!read) u_m0.mem[(laddr >> 3) + i] = pattern(seed, i);
      else       u_m1.mem[(raddr >> 3) + i] = pattern(seed, i);
      if (!read) u_m1.mem[(raddr >> 3) + i] = 64'hDEAD_BEEF_0000_0000 | 64'(i);
      else       u_m0.mem[(laddr >> 3) + i] = 64'hDEAD_BEEF_0000_0000 | 64'(i);
    end
    cur_read = read;
    t_first = -1;
    t_last = -1;
    t_wfirst = -1;
    wr0(REG_HDR, 32'(read) | (32'(crc) << 4) | (32'(xmode) << 5) | (32'(n) << 8));
    wr0(REG_RADDR, raddr);
    wr0(REG_LADDR, laddr);
    wr0(REG_CTRL, 32'h11 | (32'(gtps) << 1));
    s0_addr = REG_STATUS;
    #1;
    c = 0;
    while (s0_rdata[0] && c < 40 * n + 2000) begin @(negedge clk); s0_addr = REG_STATUS; #1; c++; end
    // a write without CRC ends when its last symbol has left S0; every other
    // operation ends only once all its data are in the destination memory
    if (!read && !crc) repeat (100) @(posedge clk);
    bad = 0;
    for (int i = 0; i < n; i++)
      if ((read ? u_m0.mem[(laddr >> 3) + i] : u_m1.mem[(raddr >> 3) + i]) != pattern(seed, i)) bad++;
    check(bad == 0, $sformatf("%s crc=%0d gtps=%0d xmode=%0d n=%0d: %0d words wrong",
                              read ? "read" : "write", crc, gtps, xmode, n, bad));
    check(t_first >= 0 && t_last > t_first, "transfer not timed");
    t = t_last - t_first + 1;
    check(t_wfirst > t_first && t_wfirst <= t_last, "latency not measured");
    $display("%-5s crc=%0d %s x%0d %0d words: latency %0d clocks = %0d ns, T=%0d clocks = %0d ns, %0d Mbit/s",
             read ? "read" : "write", crc, gtps ? "5.0G" : "2.5G", 1 << xmode, n,
             t_wfirst - t_first, (t_wfirst - t_first) * (gtps ? 4 : 8), t,
             t * (gtps ? 4 : 8), longint'(n) * 64 * 1000 / (longint'(t) * (gtps ? 4 : 8)));
  endtask

  initial begin : watchdog
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t [2][2][3];
    s0_we = 0; s1_we = 0; s0_addr = 0; s1_addr = 0; s0_wdata = 0; s1_wdata = 0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < 2; g++) begin
      set_rate(g[0]);
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++)
          for (int x = 0; x < 3; x++) begin
            int tt;
            run_mode(r[0], c[0], g[0], x, N, 32'h0000_4000 + 32'(x) * 32'h800,
                     32'h0000_8000 + 32'(x) * 32'h800, tt);
            t[r][c][x] = tt;
          end
      // the clock count does not depend on the rate; check it once per rate
      check(t[0][0][0] <= 328, $sformatf("x1 write takes %0d clocks for 256 of payload", t[0][0][0]));
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++)
          check(t[r][c][2] <= t[r][c][1] && t[r][c][1] <= t[r][c][0], "wider link is not faster");
    end
    // the largest packet: 65535 words, just under 512 KB, in both directions
    begin
      int tt;
      run_mode(1'b0, 1'b1, 1'b1, 2, NMAX, 32'h0, 32'h0, tt);
      check(tt >= NMAX, "maximum write faster than one word per clock");
      run_mode(1'b1, 1'b0, 1'b1, 2, NMAX, 32'h0, 32'h0, tt);
      check(tt >= NMAX, "maximum read faster than one word per clock");
    end
    check(a0_berr == 0 && a1_berr == 0, "an AXI burst crossed a 4 KB boundary");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
