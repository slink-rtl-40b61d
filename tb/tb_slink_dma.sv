// tb_slink_dma: checks the DMA controller against an AXI3 memory model.
// Local write: the request header, the data read from memory (crossing a
// 4 KB page, which must split the burst) in order, and completion only
// after the transmit side reports done. Remote read request: a data packet
// header in the request's lane mode and CRC setting, and the data read from
// the requested address. Remote write: data from an Rx buffer model with
// random gaps written to the header's address. Local read: a header-only
// request, then the answering data written at the local address, with
// completion after the last write response. Back-to-back remote writes: a
// second header that arrives while the first packet is still being written
// must wait for it and then write to its own address; `wr_idle` must follow.
module tb_slink_dma;
  import slink_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, op_done;
  logic [31:0] cfg_hdr_lo = '0, cfg_raddr = '0, cfg_laddr = '0;
  logic        rx_hdr_valid = 0;
  slink_hdr_t  rx_hdr = '0;
  logic        rxb_valid, rxb_ready;
  logic [63:0] rxb_data;
  logic        tx_start, tx_data_valid, tx_done = 0;
  slink_hdr_t  tx_hdr;
  logic [63:0] tx_data;
  logic [31:0] m_araddr, m_awaddr;
  logic [3:0]  m_arlen, m_awlen;
  logic [2:0]  m_arsize, m_awsize;
  logic [1:0]  m_arburst, m_awburst, m_rresp, m_bresp;
  logic        m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  logic        m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic [63:0] m_rdata, m_wdata;
  logic [7:0]  m_wstrb;
  int          berr;
  logic        wr_idle;
  int checks = 0, failures = 0;

  slink_dma dut (.*);
  tb_axi_mem #(.WORDS(4096), .LAT(3)) u_mem (
    .clk, .rst_n, .araddr(m_araddr), .arlen(m_arlen), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready),
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready), .burst_errors(berr));

  // Rx data buffer model: a queue shown with random gaps
  logic [63:0] rxq [$];
  logic        gap = 0;
  assign rxb_valid = (rxq.size() > 0) && !gap;
  assign rxb_data  = (rxq.size() > 0) ? rxq[0] : '0;
  logic hs = 0;
  always @(posedge clk) begin
    hs  <= rxb_valid && rxb_ready;
    gap <= ($urandom % 4) == 0;
  end
  always @(negedge clk) if (hs) void'(rxq.pop_front());

  // logs
  logic [63:0] txq [$];
  slink_hdr_t  last_tx_hdr;
  int n_tx_start = 0, n_done = 0, n_ar = 0;
  logic [3:0] arlens [$];
  always @(posedge clk) if (rst_n) begin
    if (tx_data_valid) txq.push_back(tx_data);
    if (tx_start) begin n_tx_start++; last_tx_hdr = tx_hdr; end
    if (op_done) n_done++;
    if (m_arvalid && m_arready) begin n_ar++; arlens.push_back(m_arlen); end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic pulse_rx_hdr(input slink_hdr_t h);
    @(negedge clk); rx_hdr_valid = 1; rx_hdr = h;
    @(negedge clk); rx_hdr_valid = 0;
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] exp [$];
    slink_hdr_t h;
    int ok;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = {32'hA5A5_0000 + 32'(i), $urandom};
    rst_n = 1;

    // local write, 40 words from 0x0FA0 (crosses 0x1000), x4 with CRC
    cfg_hdr_lo = (32'd40 << 8) | (32'd2 << 5) | (32'd1 << 4) | 32'd0;
    cfg_raddr  = 32'h7700_0000;
    cfg_laddr  = 32'h0000_0FA0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (300) @(negedge clk);
    check(n_tx_start == 1 && last_tx_hdr.remote_addr == 32'h7700_0000 && last_tx_hdr.data_len == 40 &&
          last_tx_hdr.lanes == XMODE_X4 && last_tx_hdr.crc_en && last_tx_hdr.pkt_type == PT_REQ &&
          last_tx_hdr.req_type == REQ_WRITE, "local write header");
    exp.delete();
    for (int i = 0; i < 40; i++) exp.push_back(u_mem.mem[(32'h0FA0 >> 3) + i]);
    check(txq == exp, $sformatf("local write data (%0d words)", txq.size()));
    check(arlens.size() == 3 && arlens[0] == 4'd11 && arlens[1] == 4'd15 && arlens[2] == 4'd11 && berr == 0,
          $sformatf("%0d bursts, %0d across 4 KB; expected 12+16+12 beats, split at 4 KB", n_ar, berr));
    check(n_done == 0, "done before the transmit side finished");
    @(negedge clk); tx_done = 1; @(negedge clk); tx_done = 0;
    @(negedge clk);
    check(n_done == 1, "local write not done");

    // remote read request: 20 words from 0x2000, x2, CRC
    txq.delete();
    h = '{remote_addr: 32'h0000_2000, rsvd_hi: 8'd0, data_len: 16'd20, lanes: XMODE_X2, crc_en: 1'b1,
          pkt_type: PT_REQ, rsvd_lo: 1'b0, req_type: REQ_READ};
    pulse_rx_hdr(h);
    repeat (200) @(negedge clk);
    check(n_tx_start == 2 && last_tx_hdr.pkt_type == PT_DATA && last_tx_hdr.data_len == 20 &&
          last_tx_hdr.lanes == XMODE_X2 && last_tx_hdr.crc_en, "data packet header");
    exp.delete();
    for (int i = 0; i < 20; i++) exp.push_back(u_mem.mem[(32'h2000 >> 3) + i]);
    check(txq == exp, "remote read data");
    @(negedge clk); tx_done = 1; @(negedge clk); tx_done = 0;
    @(negedge clk);
    check(n_done == 1, "remote read raised op_done");

    // remote write: 25 words to 0x3000
    h = '{remote_addr: 32'h0000_3000, rsvd_hi: 8'd0, data_len: 16'd25, lanes: XMODE_X4, crc_en: 1'b0,
          pkt_type: PT_REQ, rsvd_lo: 1'b0, req_type: REQ_WRITE};
    pulse_rx_hdr(h);
    exp.delete();
    for (int i = 0; i < 25; i++) begin exp.push_back({$urandom, $urandom}); rxq.push_back(exp[i]); end
    repeat (300) @(negedge clk);
    ok = 1;
    for (int i = 0; i < 25; i++) if (u_mem.mem[(32'h3000 >> 3) + i] != exp[i]) ok = 0;
    check(ok == 1 && rxq.size() == 0, "remote write data in memory");

    // local read: header-only request, then 10 words answer at 0x0400
    cfg_hdr_lo = (32'd10 << 8) | (32'd0 << 5) | 32'd1;
    cfg_raddr  = 32'h0000_5000;
    cfg_laddr  = 32'h0000_0400;
    txq.delete();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    check(n_tx_start == 3 && last_tx_hdr.req_type == REQ_READ && last_tx_hdr.data_len == 10 &&
          last_tx_hdr.remote_addr == 32'h5000 && txq.size() == 0, "read request header");
    h = '{remote_addr: 32'h0, rsvd_hi: 8'd0, data_len: 16'd10, lanes: XMODE_X1, crc_en: 1'b0,
          pkt_type: PT_DATA, rsvd_lo: 1'b0, req_type: 1'b0};
    pulse_rx_hdr(h);
    exp.delete();
    for (int i = 0; i < 10; i++) begin exp.push_back({$urandom, $urandom}); rxq.push_back(exp[i]); end
    repeat (200) @(negedge clk);
    ok = 1;
    for (int i = 0; i < 10; i++) if (u_mem.mem[(32'h0400 >> 3) + i] != exp[i]) ok = 0;
    check(ok == 1, "read answer data at the local address");
    check(n_done == 2, "local read not done");

    // a second write header arrives while the first packet is still being
    // written: it must wait and then go to its own address
    check(wr_idle == 1'b1, "write engine not idle");
    h = '{remote_addr: 32'h0000_6000, rsvd_hi: 8'd0, data_len: 16'd40, lanes: XMODE_X4, crc_en: 1'b0,
          pkt_type: PT_REQ, rsvd_lo: 1'b0, req_type: REQ_WRITE};
    pulse_rx_hdr(h);
    exp.delete();
    for (int i = 0; i < 60; i++) begin exp.push_back({$urandom, $urandom}); rxq.push_back(exp[i]); end
    repeat (8) @(negedge clk);
    check(wr_idle == 1'b0, "write engine idle while writing");
    h.remote_addr = 32'h0000_7000;
    h.data_len    = 16'd20;
    pulse_rx_hdr(h);
    repeat (400) @(negedge clk);
    ok = 1;
    for (int i = 0; i < 40; i++) if (u_mem.mem[(32'h6000 >> 3) + i] != exp[i]) ok = 0;
    for (int i = 0; i < 20; i++) if (u_mem.mem[(32'h7000 >> 3) + i] != exp[40 + i]) ok = 0;
    check(ok == 1 && rxq.size() == 0, "back-to-back remote writes in memory");
    check(wr_idle == 1'b1, "write engine not idle at the end");
    check(berr == 0, "an AXI burst crossed 4 KB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
