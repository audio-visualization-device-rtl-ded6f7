// vga_controller: 640x480 60 Hz VGA output with 24-bit colour, reading the
// front buffer from ZBT RAM.
//
// Two clock domains meet here. In the 50 MHz system domain a prefetcher
// reads the front buffer in 4-word bursts over the VGA port of that frame
// buffer's ZBT controller and writes the pixels into a dual-clock FIFO
// (async_fifo, FIFO_DEPTH words). It walks the frame cyclically, pixel 0 to
// H_ACTIVE*V_ACTIVE-1, and issues a burst whenever the FIFO has room for it
// on top of the words already in flight. In the 25.2 MHz pixel domain a
// timing generator pops one FIFO word per visible pixel. The FIFO hides the
// RAM latency and is the only path for pixel data between the domains.
//
// Buffer flip: the processor writes the number of the buffer to display
// (0 or 1) into the OPB register. The prefetcher switches buffers only when
// it starts a new frame at pixel 0, so a frame is never shown half from
// each buffer; the register's read value reports the buffer in use, which
// software can poll before drawing into the other one.
//
// Timing: H_ACTIVE/H_FP/H_SYNC/H_BP and the V_ equivalents, syncs active
// low; the defaults are the standard 640x480 60 Hz numbers (800 x 525
// clocks per frame). After reset the pixel domain starts at the first line
// of vertical blanking, which gives the prefetcher a whole blanking period
// to fill the FIFO; from then on the stream stays aligned to the frame as
// long as the FIFO never runs dry (a visible pixel with an empty FIFO shows
// black and sets the sticky underflow flag).
//
// Outputs (pixel domain, registered, one pixel clock after the counters):
// vga_r/g/b from pixel word 0x00RRGGBB, vga_hsync_n, vga_vsync_n,
// vga_blank_n (high for visible pixels), frame_start (first visible pixel).
//
// OPB register at BASE: write bit0 = buffer to display; read bit0 = written
// value, bit1 = buffer in use. Acknowledged one cycle after select.
module vga_controller
  import av_pkg::*;
#(
  parameter int unsigned H_ACTIVE   = 640,
  parameter int unsigned H_FP       = 16,
  parameter int unsigned H_SYNC     = 96,
  parameter int unsigned H_BP       = 48,
  parameter int unsigned V_ACTIVE   = 480,
  parameter int unsigned V_FP       = 10,
  parameter int unsigned V_SYNC     = 2,
  parameter int unsigned V_BP       = 33,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter logic [31:0] BASE       = VGA_BASE
) (
  // system domain
  input  logic       clk,
  input  logic       rst_n,
  input  opb_req_t   opb_req,
  output opb_rsp_t   opb_rsp,
  output mif_req_t   mif_req [2],
  input  mif_rsp_t   mif_rsp [2],
  output logic       front_sel,
  // pixel domain
  input  logic       vga_clk,
  input  logic       vga_rst_n,
  output logic [7:0] vga_r,
  output logic [7:0] vga_g,
  output logic [7:0] vga_b,
  output logic       vga_hsync_n,
  output logic       vga_vsync_n,
  output logic       vga_blank_n,
  output logic       frame_start,
  output logic       underflow
);

  localparam int unsigned NPIX    = H_ACTIVE * V_ACTIVE;
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned FAW     = $clog2(FIFO_DEPTH);
  localparam int unsigned HW      = $clog2(H_TOTAL);
  localparam int unsigned VW      = $clog2(V_TOTAL);

  // ---------------- system domain ----------------
  logic        ack, hit, sel_reg;
  logic [31:0] rdata_q;
  logic [31:0] pix_addr;
  logic        issue, mif_busy;
  logic [FAW:0] wcount;
  logic [3:0]  inflight;        // words requested but not yet in the FIFO
  logic        fifo_wen, fifo_full;
  mif_rsp_t    cur_rsp;

  assign hit     = opb_req.select && ((opb_req.addr & REG_MASK) == BASE) && !ack;
  assign cur_rsp = front_sel ? mif_rsp[1] : mif_rsp[0];
  assign fifo_wen = cur_rsp.read_data_ready;

  always_comb begin
    mif_req[0] = '0;
    mif_req[1] = '0;
    mif_req[front_sel].read       = issue;
    mif_req[front_sel].addr       = pix_addr;
    mif_req[front_sel].be         = 4'hF;
    mif_req[front_sel].burst_size = 2'd3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack       <= 1'b0;
      rdata_q   <= '0;
      sel_reg   <= 1'b0;
      front_sel <= 1'b0;
      pix_addr  <= '0;
      issue     <= 1'b0;
      mif_busy  <= 1'b0;
      inflight  <= '0;
    end else begin
      ack   <= hit;
      issue <= 1'b0;
      if (hit) begin
        if (opb_req.rnw) rdata_q <= {30'd0, front_sel, sel_reg};
        else begin
          rdata_q <= '0;
          sel_reg <= opb_req.wdata[0];
        end
      end
      if (cur_rsp.op_done) mif_busy <= 1'b0;
      inflight <= inflight + (issue ? 4'd4 : 4'd0) - (fifo_wen ? 4'd1 : 4'd0);
      if (issue) begin
        mif_busy <= 1'b1;
      end else if (!mif_busy &&
                   (32'(wcount) + 32'(inflight) + 32'd4 <= 32'(FIFO_DEPTH))) begin
        // at the start of a frame, change buffers once the old one is idle
        if (pix_addr == '0 && sel_reg != front_sel) begin
          if (inflight == '0) begin
            front_sel <= sel_reg;
            issue     <= 1'b1;
          end
        end else begin
          issue <= 1'b1;
        end
      end
      // after a burst has been requested, move on to the next one
      if (issue) begin
        if (pix_addr == 32'(NPIX - 4)) begin
          pix_addr <= '0;
        end else begin
          pix_addr <= pix_addr + 32'd4;
        end
      end
    end
  end

  always_comb begin
    opb_rsp = '0;
    if (ack) begin
      opb_rsp.xfer_ack = 1'b1;
      opb_rsp.rdata    = rdata_q;
    end
  end

  // ---------------- pixel FIFO ----------------
  logic [23:0] fifo_rdata;
  logic        fifo_ren, fifo_empty;
  logic [FAW:0] rcount;

  async_fifo #(.WIDTH(24), .DEPTH(FIFO_DEPTH)) u_pixfifo (
    .wclk(clk), .wrst_n(rst_n), .wen(fifo_wen), .wdata(cur_rsp.read_data[23:0]),
    .wfull(fifo_full), .wcount(wcount),
    .rclk(vga_clk), .rrst_n(vga_rst_n), .ren(fifo_ren), .rdata(fifo_rdata),
    .rempty(fifo_empty), .rcount(rcount));

  // ---------------- pixel domain ----------------
  logic [HW-1:0] hc;
  logic [VW-1:0] vc;
  logic          visible;

  assign visible  = (hc < HW'(H_ACTIVE)) && (vc < VW'(V_ACTIVE));
  assign fifo_ren = visible;

  always_ff @(posedge vga_clk or negedge vga_rst_n) begin
    if (!vga_rst_n) begin
      hc          <= '0;
      vc          <= VW'(V_ACTIVE);
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
      vga_hsync_n <= 1'b1;
      vga_vsync_n <= 1'b1;
      vga_blank_n <= 1'b0;
      frame_start <= 1'b0;
      underflow   <= 1'b0;
    end else begin
      if (hc == HW'(H_TOTAL - 1)) begin
        hc <= '0;
        vc <= (vc == VW'(V_TOTAL - 1)) ? '0 : vc + 1'b1;
      end else begin
        hc <= hc + 1'b1;
      end
      vga_hsync_n <= !((hc >= HW'(H_ACTIVE + H_FP)) && (hc < HW'(H_ACTIVE + H_FP + H_SYNC)));
      vga_vsync_n <= !((vc >= VW'(V_ACTIVE + V_FP)) && (vc < VW'(V_ACTIVE + V_FP + V_SYNC)));
      vga_blank_n <= visible;
      frame_start <= (hc == '0) && (vc == '0);
      if (visible && !fifo_empty) {vga_r, vga_g, vga_b} <= fifo_rdata;
      else                        {vga_r, vga_g, vga_b} <= '0;
      if (visible && fifo_empty) underflow <= 1'b1;
    end
  end

endmodule
