// spectrum_buffer: the audio spectrum data buffer.
//
// Two N x 32-bit memories hold the FFT result, one for the real and one for
// the imaginary part of each bin. The FFT controller writes them through a
// simple write port (one bin per cycle, both parts together); the processor
// reads them at random over OPB.
//
// OPB window at BASE (byte addresses, read only):
//   BASE + 4*k          real part of bin k       (k < N)
//   BASE + 4*(N + k)    imaginary part of bin k
// A read is acknowledged two cycles after select: one cycle for the
// registered (block-RAM style) memory read, one for the acknowledge.
// Writes from OPB are acknowledged and ignored. The window layout is this
// design's choice.
module spectrum_buffer
  import av_pkg::*;
#(
  parameter int unsigned N    = 1024,
  parameter logic [31:0] BASE = SPEC_BASE,
  localparam int unsigned AW  = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata_re,
  input  logic [31:0]   wdata_im,
  input  opb_req_t      opb_req,
  output opb_rsp_t      opb_rsp
);

  logic [31:0] mem_re [N];
  logic [31:0] mem_im [N];
  logic [31:0] rd_re, rd_im;
  logic        sel_im, busy, ack;
  logic        hit;
  logic [AW-1:0] raddr;

  assign hit   = opb_req.select && ((opb_req.addr & REG_MASK) == BASE) && !busy && !ack;
  assign raddr = opb_req.addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (we) begin
      mem_re[waddr] <= wdata_re;
      mem_im[waddr] <= wdata_im;
    end
    rd_re <= mem_re[raddr];
    rd_im <= mem_im[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      ack    <= 1'b0;
      sel_im <= 1'b0;
    end else begin
      ack  <= busy;
      busy <= hit;
      if (hit) sel_im <= opb_req.addr[AW+2];
    end
  end

  always_comb begin
    opb_rsp = '0;
    if (ack) begin
      opb_rsp.xfer_ack = 1'b1;
      if (opb_req.rnw) opb_rsp.rdata = sel_im ? rd_im : rd_re;
    end
  end

endmodule
