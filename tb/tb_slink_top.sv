// tb_slink_top: end-to-end test of two SLink controllers joined back to
// back, as two chips S0 and S1 each with its own AXI memory.
//
// The SerDes is replaced by a straight symbol connection with one clock of
// delay per direction, which can flip one bit of one data symbol to force a
// CRC error. S0 is programmed through its register port exactly as the
// programming sequence prescribes (header word, remote and local address,
// then CTRL with SOFT_RESETN and START, then polling STATUS bit 0). The
// test runs writes and reads in x1, x2 and x4 with and without CRC, a
// corrupted write and a corrupted read answer (each must be retransmitted
// once and arrive intact), a transfer that crosses a 4 KB page, and a lane
// rate change that resets S0 alone and retrains the link, then eight
// operations in random modes started back to back. Every memory word
// is compared with the expected contents. Mechanisms are counted and each
// must occur: CRC RIGHT and ERROR responses, retransmission, PAD fill,
// each lane mode at the receiver, a 4 KB burst split, and retraining.
// All parameters of slink_top are left at their defaults.
module tb_slink_top;
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

  // fault injection on the S0 -> S1 or S1 -> S0 direction
  logic inj_01 = 1'b0, inj_10 = 1'b0;
  int   inj_cnt_01 = 0, inj_cnt_10 = 0;
  logic [NUM_LANES-1:0][1:0] k01_d, k10_d;

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

  // channel: one clock of flight time, optional single-bit error on lane 0
  always_ff @(posedge clk) begin
    k01_d <= u_s0.d_k;
    k10_d <= u_s1.d_k;
    s1_rx <= s0_tx;
    s0_rx <= s1_tx;
    if (inj_01 && k01_d[0] == 2'b00) begin
      inj_cnt_01 <= inj_cnt_01 + 1;
      if (inj_cnt_01 == 6) begin
        s1_rx[0]   <= s0_tx[0] ^ 20'h00010;
        inj_01     <= 1'b0;
        inj_cnt_01 <= 0;
      end
    end
    if (inj_10 && k10_d[0] == 2'b00) begin
      inj_cnt_10 <= inj_cnt_10 + 1;
      if (inj_cnt_10 == 6) begin
        s0_rx[0]   <= s1_tx[0] ^ 20'h00010;
        inj_10     <= 1'b0;
        inj_cnt_10 <= 0;
      end
    end
  end

  // ------------------------------------------------ mechanism counters
  int n_right = 0, n_error = 0, n_retry = 0, n_pad = 0, n_x1 = 0, n_x2 = 0, n_x4 = 0;
  int n_split = 0, n_retrain = 0;
  logic s1_synced_q = 1'b0;
  always_ff @(posedge clk) if (rst_n) begin
    if (u_s0.peer_rsp_valid && u_s0.peer_rsp_ok)  n_right <= n_right + 1;
    if (u_s1.peer_rsp_valid && u_s1.peer_rsp_ok)  n_right <= n_right + 1;
    if (u_s0.peer_rsp_valid && !u_s0.peer_rsp_ok) n_error <= n_error + 1;
    if (u_s1.peer_rsp_valid && !u_s1.peer_rsp_ok) n_error <= n_error + 1;
    if (u_s0.retry || u_s1.retry) n_retry <= n_retry + 1;
    if ((u_s0.lw_ready && u_s0.lw.is_k && u_s0.lw.kcode == K_PAD) ||
        (u_s1.lw_ready && u_s1.lw.is_k && u_s1.lw.kcode == K_PAD)) n_pad <= n_pad + 1;
    if (u_s1.a_valid && u_s1.a_first) begin
      if (u_s1.a_lanes == XMODE_X1) n_x1 <= n_x1 + 1;
      if (u_s1.a_lanes == XMODE_X2) n_x2 <= n_x2 + 1;
      if (u_s1.a_lanes == XMODE_X4) n_x4 <= n_x4 + 1;
    end
    if ((a1_arvalid && a1_arready && a1_araddr[11:0] == 12'h000 && u_s1.u_dma.r_rem != u_s1.u_dma.rd_go_len) ||
        (a0_awvalid && a0_awready && a0_awaddr[11:0] == 12'h000 && u_s0.u_dma.w_rem != {1'b0, u_s0.u_dma.rx_hdr.data_len}))
      n_split <= n_split + 1;
    s1_synced_q <= u_s1.link_up;
    if (s1_synced_q && !u_s1.link_up) n_retrain <= n_retrain + 1;
  end

  // ------------------------------------------------------------ helpers
  task automatic wr0(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); s0_we = 1'b1; s0_addr = a; s0_wdata = d;
    @(negedge clk); s0_we = 1'b0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [63:0] pattern(int seed, int i);
    return {32'(seed * 32'h9E3779B9 + i), 32'(i * 32'h85EBCA6B ^ seed)};
  endfunction

  // One operation with the programming sequence; returns the cycles taken.
  task automatic run_op(input bit read, input int n, input int xmode, input bit crc,
                        input logic [31:0] raddr, input logic [31:0] laddr,
                        output int cycles, output logic [31:0] status);
    int t;
    wr0(REG_HDR, 32'(read) | (32'(crc) << 4) | (32'(xmode) << 5) | (32'(n) << 8));
    wr0(REG_RADDR, raddr);
    wr0(REG_LADDR, laddr);
    wr0(REG_CTRL, 32'h11);
    t = 0;
    s0_addr = REG_STATUS;
    #1;
    while (s0_rdata[0]) begin
      @(negedge clk);
      s0_addr = REG_STATUS;
      #1;
      t++;
    end
    status = s0_rdata;
    cycles = t;
  endtask

  task automatic do_transfer(input string name, input bit read, input int n, input int xmode,
                             input bit crc, input logic [31:0] raddr, input logic [31:0] laddr,
                             input int exp_retry);
    int cyc, seed, bad;
    logic [31:0] st;
    seed = $urandom;
    // source memory: S0 for a write, S1 for a read
    for (int i = 0; i < n; i++) begin
      if (!read) u_m0.mem[(laddr >> 3) + i] = pattern(seed, i);
      else       u_m1.mem[(raddr >> 3) + i] = pattern(seed, i);
    end
    // poison the destination plus one word beyond
    for (int i = 0; i <= n; i++) begin
      if (!read) u_m1.mem[(raddr >> 3) + i] = 64'hDEAD_BEEF_0000_0000 | 64'(i);
      else       u_m0.mem[(laddr >> 3) + i] = 64'hDEAD_BEEF_0000_0000 | 64'(i);
    end
    run_op(read, n, xmode, crc, raddr, laddr, cyc, st);
    // a write without CRC ends when the packet is sent; let memory settle
    repeat (200) @(posedge clk);
    bad = 0;
    for (int i = 0; i < n; i++) begin
      logic [63:0] got;
      got = read ? u_m0.mem[(laddr >> 3) + i] : u_m1.mem[(raddr >> 3) + i];
      if (got != pattern(seed, i)) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d of %0d words wrong", name, bad, n));
    check((read ? u_m0.mem[(laddr >> 3) + n] : u_m1.mem[(raddr >> 3) + n]) ==
          (64'hDEAD_BEEF_0000_0000 | 64'(n)), $sformatf("%s: word after the block overwritten", name));
    check(st[1] == 1'b1, $sformatf("%s: DONE not set", name));
    // S0 counts its own retransmissions (write) or the CRC errors its
    // receiver found, each of which makes S1 retransmit (read)
    if (!read) check(st[15:8] == 8'(exp_retry), $sformatf("%s: %0d retransmissions, expected %0d", name, st[15:8], exp_retry));
    else       check(st[23:16] == 8'(exp_retry), $sformatf("%s: %0d CRC errors, expected %0d", name, st[23:16], exp_retry));
    $display("%s: %0d words, %0d cycles from START to idle status, retries %0d, CRC errors %0d",
             name, n, cyc, st[15:8], st[23:16]);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [31:0] st;
    s0_we = 0; s1_we = 0; s0_addr = 0; s1_addr = 0; s0_wdata = 0; s1_wdata = 0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!(s0_up && s1_up) && cyc < 1000) begin @(posedge clk); cyc++; end
    check(s0_up && s1_up, "link did not come up");
    repeat (40) @(posedge clk);

    do_transfer("write x4",          0, 40, 2, 0, 32'h0000_2000, 32'h0000_1000, 0);
    do_transfer("write x1 crc",      0, 20, 0, 1, 32'h0000_3000, 32'h0000_1800, 0);
    do_transfer("write x2",          0, 17, 1, 0, 32'h0000_3400, 32'h0000_1C00, 0);
    inj_01 = 1;
    do_transfer("write x2 crc+error",0, 30, 1, 1, 32'h0000_4000, 32'h0000_5000, 1);
    do_transfer("read x4 crc 4KB",   1, 33, 2, 1, 32'h0000_6FC0, 32'h0000_7FE0, 0);
    do_transfer("read x1",           1, 5,  0, 0, 32'h0000_8000, 32'h0000_9000, 0);
    inj_10 = 1;
    do_transfer("read x4 crc+error", 1, 24, 2, 1, 32'h0000_A000, 32'h0000_B000, 1);

    // lane-rate change: S0 is reset alone and the link retrains
    wr0(REG_CTRL, 32'h0);
    repeat (5) @(posedge clk);
    wr0(REG_CTRL, 32'h3);
    check(s0_rate == 1'b1, "GTPS did not reach phy_rate");
    cyc = 0;
    repeat (3) @(posedge clk);
    while (!(s0_up && s1_up) && cyc < 2000) begin @(posedge clk); cyc++; end
    check(s0_up && s1_up, "link did not retrain after soft reset");
    repeat (60) @(posedge clk);
    do_transfer("write x4 crc after retrain", 0, 64, 2, 1, 32'h0000_C000, 32'h0000_D000, 0);

    // back-to-back operations in random modes, each started as soon as the
    // previous one has cleared BUSY; all destinations are checked at the end
    begin
      int seeds [8], lens [8];
      bit rds [8];
      logic [31:0] st2;
      for (int k = 0; k < 8; k++) begin
        logic [31:0] la, ra;
        seeds[k] = $urandom;
        lens[k]  = 1 + ($urandom % 120);
        rds[k]   = 1'($urandom % 2);
        la = 32'h0001_0000 + 32'(k) * 32'h1000;
        ra = 32'h0002_0000 + 32'(k) * 32'h1000;
        for (int i = 0; i < lens[k]; i++) begin
          if (!rds[k]) u_m0.mem[(la >> 3) + i] = pattern(seeds[k], i);
          else         u_m1.mem[(ra >> 3) + i] = pattern(seeds[k], i);
        end
        run_op(rds[k], lens[k], int'($urandom % 3), 1'($urandom % 2), ra, la, cyc, st2);
      end
      repeat (300) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        int bad = 0;
        for (int i = 0; i < lens[k]; i++)
          if ((rds[k] ? u_m0.mem[((32'h0001_0000 + 32'(k) * 32'h1000) >> 3) + i]
                      : u_m1.mem[((32'h0002_0000 + 32'(k) * 32'h1000) >> 3) + i]) != pattern(seeds[k], i))
            bad++;
        check(bad == 0, $sformatf("back-to-back operation %0d (%s, %0d words): %0d words wrong",
                                  k, rds[k] ? "read" : "write", lens[k], bad));
      end
    end

    check(a0_berr == 0 && a1_berr == 0, "an AXI burst crossed a 4 KB boundary");
    $display("mechanisms: right=%0d error=%0d retry=%0d pad=%0d x1=%0d x2=%0d x4=%0d split=%0d retrain=%0d",
             n_right, n_error, n_retry, n_pad, n_x1, n_x2, n_x4, n_split, n_retrain);
    check(n_right > 0, "no CRC RIGHT response");
    check(n_error > 0, "no CRC ERROR response");
    check(n_retry > 0, "no retransmission");
    check(n_pad > 0, "no PAD fill");
    check(n_x1 > 0 && n_x2 > 0 && n_x4 > 0, "not every lane mode was received");
    check(n_split > 0, "no burst split at 4 KB");
    check(n_retrain > 0, "no retraining");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
