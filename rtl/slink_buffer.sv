// slink_buffer: packet data buffer (Tx data buffer and Rx data buffer).
//
// A RAM of DEPTH 64-bit words, by default 65536 words = 512 KB, the largest
// packet SLink carries, so that a whole packet always fits and no full flag
// is needed. Words are written at a write pointer and become readable only
// once committed; `auto_commit` commits every write at once (cut-through),
// otherwise `commit` makes all written words visible and `discard` drops the
// uncommitted ones (receive side: words are released only after the CRC
// check). The read side is first-word-fall-through: `rd_valid`/`rd_data`
// show the next word, `rd_ready` pops it. `rewind` moves the read pointer
// back to where the buffer was last cleared, so a packet can be sent again
// for a retry; `clear` empties the buffer. Reads come from a registered RAM
// port, so a committed word appears on rd_data one cycle after it is
// fetched. Pointers carry one extra bit so a full ring is told from empty.
// The size comes from the protocol; commit/discard/rewind are how this
// design realises the retry and CRC-gated release the protocol asks for.
module slink_buffer #(
  parameter int unsigned DEPTH = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        auto_commit,
  input  logic        wr_en,
  input  logic [63:0] wr_data,
  input  logic        commit,
  input  logic        discard,
  input  logic        rewind,
  output logic        rd_valid,
  output logic [63:0] rd_data,
  input  logic        rd_ready,
  output logic [$clog2(DEPTH):0] committed   // words readable, not yet fetched
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [63:0] mem [DEPTH];
  logic [AW:0] wr_ptr, cm_ptr, rd_ptr;
  logic        head_valid;
  logic        fetch;

  assign committed = cm_ptr - rd_ptr;
  assign fetch     = (committed != '0) && (!head_valid || rd_ready) && !rewind && !clear;
  assign rd_valid  = head_valid;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr[AW-1:0]] <= wr_data;
    if (fetch) rd_data <= mem[rd_ptr[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      cm_ptr     <= '0;
      rd_ptr     <= '0;
      head_valid <= 1'b0;
    end else if (clear) begin
      wr_ptr     <= '0;
      cm_ptr     <= '0;
      rd_ptr     <= '0;
      head_valid <= 1'b0;
    end else begin
      if (wr_en) wr_ptr <= wr_ptr + 1'b1;
      if (auto_commit) cm_ptr <= wr_en ? wr_ptr + 1'b1 : wr_ptr;
      else if (commit) cm_ptr <= wr_ptr;
      else if (discard) wr_ptr <= cm_ptr;
      if (rewind) begin
        rd_ptr     <= '0;
        head_valid <= 1'b0;
      end else if (fetch) begin
        rd_ptr     <= rd_ptr + 1'b1;
        head_valid <= 1'b1;
      end else if (rd_ready) begin
        head_valid <= 1'b0;
      end
    end
  end

endmodule
