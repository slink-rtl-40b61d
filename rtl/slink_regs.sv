// slink_regs: SLink function registers.
//
// Four 32-bit configuration registers and one read-only status register on
// a simple register port (write strobe, 5-bit byte address, combinational
// read data):
//   0x00 CTRL   bit 0 SOFT_RESETN (reset value 1; 0 holds the link layers
//               in reset), bit 1 GTPS (lane rate: 0 = 2.5 Gbps, 1 = 5 Gbps),
//               bit 4 START (write 1 to start an operation; reads as 0)
//   0x04 HDR    the low half of the header control word: bit 0 request type
//               (0 write, 1 read), bit 4 CRC enable, bits 7:5 lane mode
//               (0 x1, 1 x2, 2 x4), bits 23:8 data length in 64-bit words
//   0x08 RADDR  remote address: destination of a write, source of a read
//   0x0C LADDR  local address: source of a write, destination of a read
//   0x10 STATUS bit 0 BUSY (set by START, cleared when the operation ends
//               or by a soft reset), bit 1 DONE (last operation
//               finished), bit 2 LINK_UP,
//               bits 15:8 retransmissions, bits 23:16 CRC errors detected
//               by this side's receiver, both counted since the last START
// The register count, the header field positions, SOFT_RESETN, START at
// bit 4, GTPS and polling bit 0 of the status word until it clears follow
// the protocol's programming sequence. SOFT_RESETN at bit 0 with GTPS at
// bit 1, the reset values and the status fields above bit 0 are this
// design's choice. Writes take effect at the next clock edge.
module slink_regs
  import slink_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // register port
  input  logic        reg_we,
  input  logic [4:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // configuration
  output logic        soft_resetn,
  output logic        gtps,
  output logic        start,
  output logic [31:0] hdr_lo,
  output logic [31:0] remote_addr,
  output logic [31:0] local_addr,
  // status sources
  input  logic        op_done,
  input  logic        link_up,
  input  logic        retry,
  input  logic        crc_err
);

  logic       busy, done;
  logic [7:0] retry_cnt, crc_err_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      soft_resetn <= 1'b1;
      gtps        <= 1'b0;
      start       <= 1'b0;
      hdr_lo      <= '0;
      remote_addr <= '0;
      local_addr  <= '0;
      busy        <= 1'b0;
      done        <= 1'b0;
      retry_cnt   <= '0;
      crc_err_cnt <= '0;
    end else begin
      start <= 1'b0;
      if (op_done || !soft_resetn) begin
        busy <= 1'b0;
        done <= op_done;
      end
      if (retry   && retry_cnt   != 8'hFF) retry_cnt   <= retry_cnt + 1'b1;
      if (crc_err && crc_err_cnt != 8'hFF) crc_err_cnt <= crc_err_cnt + 1'b1;
      if (reg_we) begin
        case (reg_addr)
          REG_CTRL: begin
            soft_resetn <= reg_wdata[CTRL_SOFT_RESETN];
            gtps        <= reg_wdata[CTRL_GTPS];
            if (reg_wdata[CTRL_START] && reg_wdata[CTRL_SOFT_RESETN] && !busy) begin
              start       <= 1'b1;
              busy        <= 1'b1;
              done        <= 1'b0;
              retry_cnt   <= '0;
              crc_err_cnt <= '0;
            end
          end
          REG_HDR:   hdr_lo      <= reg_wdata;
          REG_RADDR: remote_addr <= reg_wdata;
          REG_LADDR: local_addr  <= reg_wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (reg_addr)
      REG_CTRL: begin
        reg_rdata = '0;
        reg_rdata[CTRL_SOFT_RESETN] = soft_resetn;
        reg_rdata[CTRL_GTPS]        = gtps;
      end
      REG_HDR:    reg_rdata = hdr_lo;
      REG_RADDR:  reg_rdata = remote_addr;
      REG_LADDR:  reg_rdata = local_addr;
      REG_STATUS: begin
        reg_rdata = {8'd0, crc_err_cnt, retry_cnt, 8'd0};
        reg_rdata[STAT_BUSY]    = busy;
        reg_rdata[STAT_DONE]    = done;
        reg_rdata[STAT_LINK_UP] = link_up;
      end
      default:    reg_rdata = '0;
    endcase
  end

endmodule
