// tb_slink_rx_link: feeds assembled packets to the receive packet layer and
// checks header hand-over, Rx buffer writes, commit or discard after the
// CRC-16 check (reference CRC by long division), the RIGHT/ERROR response
// request and its lane mode, bypass packets, read requests (handed over at
// END only) and CRC responses from the far end.
module tb_slink_rx_link;
  import slink_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, in_first = 0, pkt_end = 0, frame_err = 0;
  logic [63:0] in_data = '0;
  logic [2:0]  in_lanes = '0;
  logic        buf_wr_en, buf_auto_commit, buf_commit, buf_discard;
  logic [63:0] buf_wr_data;
  logic        hdr_valid, rsp_req, rsp_ok, peer_rsp_valid, peer_rsp_ok, crc_err, bad_pkt;
  slink_hdr_t  hdr;
  logic [2:0]  rsp_lanes;
  int checks = 0, failures = 0;

  slink_rx_link dut (.*);

  // event log
  int n_wr, n_hdr, n_rsp, n_commit, n_discard, n_peer, n_crcerr, n_bad;
  logic last_rsp_ok, last_peer_ok, auto_during_data;
  logic [2:0] last_rsp_lanes;
  slink_hdr_t last_hdr;
  logic [63:0] wrq [$];

  always @(posedge clk) if (rst_n) begin
    if (buf_wr_en) begin n_wr++; wrq.push_back(buf_wr_data); auto_during_data = buf_auto_commit; end
    if (hdr_valid) begin n_hdr++; last_hdr = hdr; end
    if (rsp_req) begin n_rsp++; last_rsp_ok = rsp_ok; last_rsp_lanes = rsp_lanes; end
    if (buf_commit) n_commit++;
    if (buf_discard) n_discard++;
    if (peer_rsp_valid) begin n_peer++; last_peer_ok = peer_rsp_ok; end
    if (crc_err) n_crcerr++;
    if (bad_pkt) n_bad++;
  end

  task automatic clear_log();
    n_wr = 0; n_hdr = 0; n_rsp = 0; n_commit = 0; n_discard = 0; n_peer = 0;
    n_crcerr = 0; n_bad = 0; wrq.delete();
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_word(input logic [63:0] w, input bit first);
    @(negedge clk); in_valid = 1; in_first = first; in_data = w;
    @(negedge clk); in_valid = 0; in_first = 0;
  endtask

  task automatic send_end();
    @(negedge clk); pkt_end = 1;
    @(negedge clk); pkt_end = 0;
    repeat (3) @(negedge clk);
  endtask

  // A packet with a header, n data words and, if crc, a CRC word; the CRC
  // is corrupted when bad is set. Returns the data words.
  task automatic packet(input logic [1:0] ptype, input logic req, input bit crc, input int n,
                        input logic [2:0] lanes, input bit bad, output logic [63:0] words [$]);
    slink_hdr_t h;
    logic [63:0] msg [$];
    h = '{remote_addr: $urandom, rsvd_hi: 8'd0, data_len: 16'(n), lanes: lanes, crc_en: crc,
          pkt_type: ptype, rsvd_lo: 1'b0, req_type: req};
    in_lanes = lanes;
    msg.push_back(64'(h));
    send_word(64'(h), 1);
    words.delete();
    for (int i = 0; i < ((ptype == PT_REQ && req == REQ_READ) ? 0 : n); i++) begin
      logic [63:0] w = {$urandom, $urandom};
      words.push_back(w);
      msg.push_back(w);
      send_word(w, 0);
    end
    if (crc && !(ptype == PT_REQ && req == REQ_READ)) send_word({48'd0, crc_ref(msg) ^ (bad ? 16'h0100 : 16'h0)}, 0);
    send_end();
    last_hdr_sent = h;
  endtask

  slink_hdr_t last_hdr_sent;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] words [$];
    clear_log();
    repeat (2) @(negedge clk);
    rst_n = 1;
    // good write request with CRC, x2
    packet(PT_REQ, REQ_WRITE, 1, 5, XMODE_X2, 0, words);
    check(n_hdr == 1 && last_hdr == last_hdr_sent, "write header not handed over");
    check(n_wr == 5 && wrq == words, "data words not written to the buffer");
    check(!auto_during_data, "CRC packet written cut-through");
    check(n_rsp == 1 && last_rsp_ok && last_rsp_lanes == XMODE_X2, "no RIGHT response in x2");
    check(n_commit == 1 && n_discard == 0 && n_crcerr == 0, "good packet not committed");
    // same with a bad CRC, x4
    clear_log();
    packet(PT_REQ, REQ_WRITE, 1, 7, XMODE_X4, 1, words);
    check(n_rsp == 1 && !last_rsp_ok && last_rsp_lanes == XMODE_X4, "no ERROR response in x4");
    check(n_commit == 0 && n_discard == 1 && n_crcerr == 1, "bad packet not discarded");
    // data packet with CRC that ends early (frame error)
    clear_log();
    begin
      slink_hdr_t h;
      h = '{remote_addr: 32'd0, rsvd_hi: 8'd0, data_len: 16'd4, lanes: XMODE_X1, crc_en: 1'b1,
            pkt_type: PT_DATA, rsvd_lo: 1'b0, req_type: 1'b0};
      send_word(64'(h), 1);
      send_word(64'h1, 0);
      @(negedge clk); pkt_end = 1; frame_err = 1;
      @(negedge clk); pkt_end = 0; frame_err = 0;
      repeat (3) @(negedge clk);
    end
    check(n_rsp == 1 && !last_rsp_ok && n_discard == 1, "short packet not answered with ERROR");
    // bypass data packet
    clear_log();
    packet(PT_DATA, 1'b0, 0, 3, XMODE_X1, 0, words);
    check(n_hdr == 1 && n_wr == 3 && wrq == words && auto_during_data, "bypass data not written cut-through");
    check(n_rsp == 0 && n_bad == 0, "bypass packet answered or flagged");
    // read request: handed over at END only
    clear_log();
    packet(PT_REQ, REQ_READ, 1, 9, XMODE_X4, 0, words);
    check(n_hdr == 1 && last_hdr == last_hdr_sent && n_wr == 0 && n_rsp == 0, "read request not handed over");
    // CRC responses from the far end
    clear_log();
    packet(PT_CRC_RSP, RSP_ERROR, 0, 0, XMODE_X1, 0, words);
    check(n_peer == 1 && !last_peer_ok, "ERROR response not reported");
    clear_log();
    packet(PT_CRC_RSP, RSP_RIGHT, 0, 0, XMODE_X1, 0, words);
    check(n_peer == 1 && last_peer_ok && n_hdr == 0, "RIGHT response not reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
