// tb_axi_mem: behavioural AXI3 slave memory for the SLink testbenches.
//
// 64-bit data, INCR bursts, one read and one write burst at a time. WORDS
// 64-bit words are addressed by byte address bits [.. : 3]; addresses wrap
// inside the array. Read data starts LAT clocks after the AR handshake and
// then flows one beat per clock. `mem` may be read and written by
// hierarchical reference to load and check contents. It also checks the
// AXI rule that a burst does not cross a 4 KB boundary. Handshakes are
// ignored while rst_n is low.
module tb_axi_mem #(
  parameter int unsigned WORDS = 65536,
  parameter int unsigned LAT   = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] araddr,
  input  logic [3:0]  arlen,
  input  logic        arvalid,
  output logic        arready,
  output logic [63:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready,
  input  logic [31:0] awaddr,
  input  logic [3:0]  awlen,
  input  logic        awvalid,
  output logic        awready,
  input  logic [63:0] wdata,
  input  logic        wlast,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  output int          burst_errors
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [63:0] mem [WORDS];

  logic        r_busy, w_busy;
  logic [31:0] r_addr, w_addr;
  logic [4:0]  r_left;
  int          r_wait;

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    r_busy = 0; w_busy = 0; rvalid = 0; bvalid = 0; burst_errors = 0;
    r_wait = 0; r_left = 0; r_addr = 0; w_addr = 0;
  end

  assign arready = !r_busy && rst_n;
  assign awready = !w_busy && !bvalid && rst_n;
  assign wready  = w_busy;
  assign rresp   = 2'b00;
  assign bresp   = 2'b00;
  assign rdata   = mem[r_addr[AW+2:3]];
  assign rlast   = (r_left == 5'd1);

  always @(posedge clk) begin
    // read channel
    if (arvalid && arready) begin
      if ((araddr[11:0] + ({28'd0, arlen} + 32'd1) * 8) > 32'd4096) burst_errors <= burst_errors + 1;
      r_busy <= 1;
      r_addr <= araddr;
      r_left <= 5'({1'b0, arlen} + 5'd1);
      r_wait <= LAT;
      rvalid <= 0;
    end else if (r_busy) begin
      if (!rvalid) begin
        if (r_wait == 0) rvalid <= 1;
        else r_wait <= r_wait - 1;
      end else if (rready) begin
        if (r_left == 5'd1) begin
          r_busy <= 0;
          rvalid <= 0;
        end
        r_left <= r_left - 1;
        r_addr <= r_addr + 8;
      end
    end
    // write channel
    if (awvalid && awready) begin
      if ((awaddr[11:0] + ({28'd0, awlen} + 32'd1) * 8) > 32'd4096) burst_errors <= burst_errors + 1;
      w_busy <= 1;
      w_addr <= awaddr;
    end else if (wvalid && wready) begin
      mem[w_addr[AW+2:3]] <= wdata;
      w_addr <= w_addr + 8;
      if (wlast) begin
        w_busy <= 0;
        bvalid <= 1;
      end
    end
    if (bvalid && bready) bvalid <= 0;
  end

endmodule
