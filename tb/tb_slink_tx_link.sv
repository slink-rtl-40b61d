// tb_slink_tx_link: checks the transmit packet layer with a 64-word Tx data
// buffer and a link-word sink that takes data words with random delay.
// It checks training (COM until the link is up plus TRAIN_CYCLES), the
// framing of a CRC packet (STP, header, data, CRC word from a long-division
// reference, END) with its data arriving in bursts, retransmission of the
// identical packet after an ERROR response, completion on RIGHT, a bypass
// packet that completes at END, a header-only read request, a CRC response
// packet and the return to training when the link drops.
module tb_slink_tx_link;
  import slink_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        link_up = 0, start = 0, data_valid = 0;
  slink_hdr_t  start_hdr = '0;
  logic [63:0] data = '0;
  logic        busy, tx_done, retry;
  logic        rsp_req = 0, rsp_ok = 0, peer_rsp_valid = 0, peer_rsp_ok = 0;
  logic [2:0]  rsp_lanes = '0;
  logic        buf_clear, buf_wr_en, buf_rewind, buf_rd_valid, buf_rd_ready;
  logic [63:0] buf_wr_data, buf_rd_data;
  link_word_t  out_word;
  logic        out_valid, out_ready;
  logic [6:0]  committed;
  int checks = 0, failures = 0;

  slink_tx_link #(.TRAIN_CYCLES(4)) dut (.*);
  slink_buffer #(.DEPTH(64)) u_buf (
    .clk, .rst_n, .clear(buf_clear), .auto_commit(1'b1), .wr_en(buf_wr_en), .wr_data(buf_wr_data),
    .commit(1'b0), .discard(1'b0), .rewind(buf_rewind), .rd_valid(buf_rd_valid),
    .rd_data(buf_rd_data), .rd_ready(buf_rd_ready), .committed(committed));

  // sink: K-codes take one clock, data words 1 to 3 clocks
  int wait_cnt = 0;
  always_comb out_ready = out_word.is_k || (wait_cnt == 0);
  always @(posedge clk) begin
    if (out_valid && !out_word.is_k) wait_cnt <= (wait_cnt == 0) ? int'($urandom % 3) : wait_cnt - 1;
  end

  // log of accepted entries other than IDL, PAD and COM
  link_word_t seen [$];
  int n_com = 0, n_done = 0, n_retry = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      if (out_word.is_k && out_word.kcode == K_COM) n_com++;
      else if (!(out_word.is_k && (out_word.kcode == K_IDL || out_word.kcode == K_PAD))) seen.push_back(out_word);
    end
    if (tx_done) n_done++;
    if (retry) n_retry++;
  end

  function automatic link_word_t kw(logic [7:0] k, logic [2:0] l);
    return '{is_k: 1'b1, kcode: k, lanes: l, data: 64'd0};
  endfunction
  function automatic link_word_t dw(logic [63:0] d, logic [2:0] l);
    return '{is_k: 1'b0, kcode: 8'd0, lanes: l, data: d};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_seq(input link_word_t e [$], input string what);
    int guard = 0;
    while (seen.size() < e.size() && guard < 400) begin @(posedge clk); guard++; end
    repeat (2) @(posedge clk);
    check(seen == e, $sformatf("%s: %0d entries seen, %0d expected", what, seen.size(), e.size()));
    seen.delete();
  endtask

  task automatic start_pkt(input slink_hdr_t h, input logic [63:0] d [$]);
    @(negedge clk); start = 1; start_hdr = h;
    @(negedge clk); start = 0;
    foreach (d[i]) begin
      if (i % 3 == 2) repeat (4) @(negedge clk);   // data arrives in bursts
      data_valid = 1; data = d[i];
      @(negedge clk); data_valid = 0;
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    slink_hdr_t h;
    logic [63:0] d [$], msg [$];
    link_word_t e [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    check(n_com == 20 && seen.size() == 0, "COM not sent before the link is up");
    link_up = 1;
    n_com = 0;
    repeat (12) @(negedge clk);
    check(n_com == 5, $sformatf("%0d COM after link up, expected TRAIN_CYCLES+1", n_com));

    // write request with CRC in x4
    h = '{remote_addr: 32'h1234_5678, rsvd_hi: 8'd0, data_len: 16'd6, lanes: XMODE_X4, crc_en: 1'b1,
          pkt_type: PT_REQ, rsvd_lo: 1'b0, req_type: REQ_WRITE};
    d.delete(); msg.delete(); msg.push_back(64'(h));
    for (int i = 0; i < 6; i++) begin d.push_back({$urandom, $urandom}); msg.push_back(d[i]); end
    e.delete();
    e.push_back(kw(K_STP, XMODE_X4)); e.push_back(dw(64'(h), XMODE_X4));
    foreach (d[i]) e.push_back(dw(d[i], XMODE_X4));
    e.push_back(dw({48'd0, crc_ref(msg)}, XMODE_X4)); e.push_back(kw(K_END, XMODE_X4));
    start_pkt(h, d);
    expect_seq(e, "CRC packet");
    check(busy && n_done == 0, "CRC packet completed without a response");
    @(negedge clk); peer_rsp_valid = 1; peer_rsp_ok = 0;
    @(negedge clk); peer_rsp_valid = 0;
    expect_seq(e, "retransmitted packet");
    check(n_retry == 1, "no retry pulse");
    @(negedge clk); peer_rsp_valid = 1; peer_rsp_ok = 1;
    @(negedge clk); peer_rsp_valid = 0;
    repeat (3) @(negedge clk);
    check(n_done == 1 && !busy, "RIGHT did not complete the packet");

    // data packet without CRC in x2
    h = '{remote_addr: 32'h0, rsvd_hi: 8'd0, data_len: 16'd3, lanes: XMODE_X2, crc_en: 1'b0,
          pkt_type: PT_DATA, rsvd_lo: 1'b0, req_type: 1'b0};
    d.delete(); e.delete();
    for (int i = 0; i < 3; i++) d.push_back({$urandom, $urandom});
    e.push_back(kw(K_STP, XMODE_X2)); e.push_back(dw(64'(h), XMODE_X2));
    foreach (d[i]) e.push_back(dw(d[i], XMODE_X2));
    e.push_back(kw(K_END, XMODE_X2));
    start_pkt(h, d);
    expect_seq(e, "bypass packet");
    check(n_done == 2, "bypass packet not completed at END");

    // header-only read request with CRC enabled
    h = '{remote_addr: 32'hABCD_0000, rsvd_hi: 8'd0, data_len: 16'd100, lanes: XMODE_X1, crc_en: 1'b1,
          pkt_type: PT_REQ, rsvd_lo: 1'b0, req_type: REQ_READ};
    d.delete(); e.delete();
    e.push_back(kw(K_STP, XMODE_X1)); e.push_back(dw(64'(h), XMODE_X1)); e.push_back(kw(K_END, XMODE_X1));
    start_pkt(h, d);
    expect_seq(e, "read request");
    check(n_done == 3, "read request not completed at END");

    // CRC response ERROR in x1
    @(negedge clk); rsp_req = 1; rsp_ok = 0; rsp_lanes = XMODE_X1;
    @(negedge clk); rsp_req = 0;
    h = '{remote_addr: 32'h0, rsvd_hi: 8'd0, data_len: 16'd0, lanes: XMODE_X1, crc_en: 1'b0,
          pkt_type: PT_CRC_RSP, rsvd_lo: 1'b0, req_type: RSP_ERROR};
    e.delete();
    e.push_back(kw(K_STP, XMODE_X1)); e.push_back(dw(64'(h), XMODE_X1)); e.push_back(kw(K_END, XMODE_X1));
    expect_seq(e, "CRC response");
    check(n_done == 3, "a CRC response counted as a completed packet");

    // link drops: training again
    @(negedge clk); link_up = 0; n_com = 0;
    repeat (10) @(negedge clk);
    check(n_com >= 8, "no COM after the link dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
