// av_top: audio visualization system (FPGA logic plus the board's push
// button CPLD), 640x480 24-bit VGA output driven by the spectrum of an
// audio input.
//
// Data flow: the AC97 controller captures left-channel samples from the
// codec into the audio sample buffer (bit clock -> system clock). When the
// processor starts an FFT over OPB, the FFT controller streams 1024 samples
// into the FFT core and stores its output in the spectrum buffer, which the
// processor reads over OPB. The processor then draws the frame either by
// writing pixels itself over OPB into a frame buffer's ZBT controller
// (software mode) or by sending command packets over the FSL link to the
// rendering module (hardware modes: clear or fade, draw bars, flip). The VGA
// controller prefetches the front buffer through its own port of the two
// frame-buffer ZBT controllers and shows it at 60 Hz (system clock -> VGA
// clock). A third ZBT RAM is the fade buffer used by the fade command.
//
// Not inside this module, brought out as ports: the processor (its OPB
// master and FSL master sides), the FFT core, the AC97 codec, the three ZBT
// RAM chips, the video DAC and the clock managers (clocks and lock).
//
// Clock domains: clk_sys (50 MHz: OPB, FSL, render, ZBT, FFT, AC97 register
// side), clk_vga (25.2 MHz: VGA timing), ac97_bit_clk (12.288 MHz, from the
// codec). Each has its own reset release (clk_align).
//
// OPB address map: see av_pkg (push buttons, AC97, FFT, spectrum, VGA,
// render status, ZBT 0/1/2 memory windows).
//
// A frame must fit in one ZBT RAM ("Each 2 MB module of ZBT RAM can support
// a back buffer of 800x600 at 32-bit colour."); elaboration stops with an
// error if H_RES x V_RES words exceed 2**ZBT_ADDR_W.
module av_top
  import av_pkg::*;
#(
  parameter int unsigned H_RES          = 640,
  parameter int unsigned V_RES          = 480,
  parameter int unsigned H_FP           = 16,
  parameter int unsigned H_SYNC         = 96,
  parameter int unsigned H_BP           = 48,
  parameter int unsigned V_FP           = 10,
  parameter int unsigned V_SYNC         = 2,
  parameter int unsigned V_BP           = 33,
  parameter int unsigned PIX_FIFO_DEPTH = 512,
  parameter int unsigned FFT_N          = 1024,
  parameter int unsigned FFT_OUT_W      = 27,
  parameter int unsigned SMP_DEPTH      = 1024,
  parameter int unsigned FSL_DEPTH      = 16,
  parameter int unsigned PB_BIT_CYCLES  = 16,
  parameter int unsigned ZBT_ADDR_W     = 19,
  localparam int unsigned FAW           = $clog2(FFT_N)
) (
  // clocks and reset
  input  logic                  clk_sys,
  input  logic                  clk_vga,
  input  logic                  dcm_locked,
  input  logic                  sys_rst,
  // push buttons (on the CPLD)
  input  logic [9:0]            buttons,
  // processor side: OPB master and FSL master
  input  opb_req_t              opb_m_req,
  output opb_rsp_t              opb_m_rsp,
  output logic                  opb_timeout,
  input  logic                  fsl_m_write,
  input  logic [31:0]           fsl_m_data,
  output logic                  fsl_m_full,
  // AC97 codec
  input  logic                  ac97_bit_clk,
  output logic                  ac97_sync,
  output logic                  ac97_sdata_out,
  input  logic                  ac97_sdata_in,
  output logic                  ac97_reset_n,
  // FFT core
  output logic                  fft_start,
  output logic [15:0]           fft_xn_re,
  output logic [15:0]           fft_xn_im,
  input  logic                  fft_rfd,
  input  logic                  fft_dv,
  input  logic [FAW-1:0]        fft_xk_index,
  input  logic [FFT_OUT_W-1:0]  fft_xk_re,
  input  logic [FFT_OUT_W-1:0]  fft_xk_im,
  // ZBT RAMs: [0],[1] frame buffers, [2] fade buffer
  output logic [ZBT_ADDR_W-1:0] zbt_addr  [3],
  output logic                  zbt_cen_n [3],
  output logic                  zbt_we_n  [3],
  output logic [3:0]            zbt_bw_n  [3],
  output logic [31:0]           zbt_dq_o  [3],
  output logic                  zbt_dq_oe [3],
  input  logic [31:0]           zbt_dq_i  [3],
  // video DAC
  output logic [7:0]            vga_r,
  output logic [7:0]            vga_g,
  output logic [7:0]            vga_b,
  output logic                  vga_hsync_n,
  output logic                  vga_vsync_n,
  output logic                  vga_blank_n,
  output logic                  vga_underflow
);

  if (H_RES * V_RES > (1 << ZBT_ADDR_W)) begin : g_size_check
    $error("av_top: a %0dx%0d frame does not fit in one ZBT RAM", H_RES, V_RES);
  end

  // ---------------- resets ----------------
  logic rst_sys_n, rst_vga_n, rst_bit_n;

  clk_align u_rst_sys (.clk(clk_sys),      .locked(dcm_locked), .rst_in(sys_rst), .rst_n(rst_sys_n));
  clk_align u_rst_vga (.clk(clk_vga),      .locked(dcm_locked), .rst_in(sys_rst), .rst_n(rst_vga_n));
  clk_align u_rst_bit (.clk(ac97_bit_clk), .locked(dcm_locked), .rst_in(sys_rst), .rst_n(rst_bit_n));

  // ---------------- OPB ----------------
  localparam int unsigned NS = 9;
  opb_req_t s_req [NS];
  opb_rsp_t s_rsp [NS];
  logic     multi_ack;

  opb_bus #(.NS(NS)) u_opb (
    .clk(clk_sys), .rst_n(rst_sys_n), .m_req(opb_m_req), .m_rsp(opb_m_rsp),
    .timeout(opb_timeout), .multi_ack(multi_ack), .s_req(s_req), .s_rsp(s_rsp));

  // ---------------- push buttons ----------------
  logic       pb_serial, pb_sending, pb_frame;
  logic [9:0] pb_state;

  pb_cpld_ctrl #(.BIT_CYCLES(PB_BIT_CYCLES)) u_pb_cpld (
    .clk(clk_sys), .rst_n(rst_sys_n), .buttons(buttons),
    .pb_serial(pb_serial), .sending(pb_sending));

  pb_receiver #(.BIT_CYCLES(PB_BIT_CYCLES), .BASE(PB_BASE)) u_pb_rx (
    .clk(clk_sys), .rst_n(rst_sys_n), .pb_serial(pb_serial),
    .opb_req(s_req[0]), .opb_rsp(s_rsp[0]), .pb_state(pb_state), .frame_rx(pb_frame));

  // ---------------- audio capture ----------------
  logic                 smp_wen, smp_wfull, smp_ren, smp_rempty, ac97_frame;
  logic [15:0]          smp_wdata, smp_rdata;
  logic [$clog2(SMP_DEPTH):0] smp_wcount, smp_rcount;

  ac97_controller #(.BASE(AC97_BASE)) u_ac97 (
    .clk(clk_sys), .rst_n(rst_sys_n), .opb_req(s_req[1]), .opb_rsp(s_rsp[1]),
    .bit_clk(ac97_bit_clk), .bit_rst_n(rst_bit_n),
    .ac97_sync(ac97_sync), .ac97_sdata_out(ac97_sdata_out),
    .ac97_sdata_in(ac97_sdata_in), .ac97_reset_n(ac97_reset_n),
    .smp_wen(smp_wen), .smp_wdata(smp_wdata), .smp_wfull(smp_wfull),
    .frame_start(ac97_frame));

  async_fifo #(.WIDTH(16), .DEPTH(SMP_DEPTH)) u_smp_buf (
    .wclk(ac97_bit_clk), .wrst_n(rst_bit_n), .wen(smp_wen), .wdata(smp_wdata),
    .wfull(smp_wfull), .wcount(smp_wcount),
    .rclk(clk_sys), .rrst_n(rst_sys_n), .ren(smp_ren), .rdata(smp_rdata),
    .rempty(smp_rempty), .rcount(smp_rcount));

  // ---------------- FFT ----------------
  logic           spec_we, fft_finished;
  logic [FAW-1:0] spec_waddr;
  logic [31:0]    spec_wre, spec_wim;

  fft_controller #(.N(FFT_N), .IN_W(16), .OUT_W(FFT_OUT_W), .BASE(FFT_BASE)) u_fftc (
    .clk(clk_sys), .rst_n(rst_sys_n), .opb_req(s_req[2]), .opb_rsp(s_rsp[2]),
    .smp_rdata(smp_rdata), .smp_rempty(smp_rempty),
    .smp_rcount(($clog2(FFT_N)+1)'(smp_rcount)), .smp_ren(smp_ren),
    .fft_start(fft_start), .fft_xn_re(fft_xn_re), .fft_xn_im(fft_xn_im),
    .fft_rfd(fft_rfd), .fft_dv(fft_dv), .fft_xk_index(fft_xk_index),
    .fft_xk_re(fft_xk_re), .fft_xk_im(fft_xk_im),
    .spec_we(spec_we), .spec_waddr(spec_waddr), .spec_wre(spec_wre), .spec_wim(spec_wim),
    .fft_finished(fft_finished));

  spectrum_buffer #(.N(FFT_N), .BASE(SPEC_BASE)) u_spec (
    .clk(clk_sys), .rst_n(rst_sys_n), .we(spec_we), .waddr(spec_waddr),
    .wdata_re(spec_wre), .wdata_im(spec_wim), .opb_req(s_req[3]), .opb_rsp(s_rsp[3]));

  // ---------------- rendering ----------------
  logic [31:0] fsl_s_data;
  logic        fsl_s_exists, fsl_s_read, back_sel, render_idle;
  logic [3:0]  render_cmd_done;
  logic [$clog2(FSL_DEPTH):0] fsl_count;
  mif_req_t    rend_req [3];
  mif_rsp_t    rend_rsp [3];

  sync_fifo #(.WIDTH(32), .DEPTH(FSL_DEPTH)) u_fsl (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .fsl_m_write(fsl_m_write), .fsl_m_data(fsl_m_data), .fsl_m_full(fsl_m_full),
    .fsl_s_read(fsl_s_read), .fsl_s_data(fsl_s_data), .fsl_s_exists(fsl_s_exists),
    .count(fsl_count));

  render_module #(.H_RES(H_RES), .V_RES(V_RES), .BASE(REND_BASE)) u_render (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .fsl_s_data(fsl_s_data), .fsl_s_exists(fsl_s_exists), .fsl_s_read(fsl_s_read),
    .mif_req(rend_req), .mif_rsp(rend_rsp), .back_sel(back_sel),
    .idle(render_idle), .cmd_done(render_cmd_done),
    .opb_req(s_req[8]), .opb_rsp(s_rsp[8]));

  // ---------------- VGA ----------------
  mif_req_t vga_req [2];
  mif_rsp_t vga_rsp [2];
  logic     front_sel, vga_frame;

  vga_controller #(
    .H_ACTIVE(H_RES), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_RES), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
    .FIFO_DEPTH(PIX_FIFO_DEPTH), .BASE(VGA_BASE)
  ) u_vga (
    .clk(clk_sys), .rst_n(rst_sys_n), .opb_req(s_req[4]), .opb_rsp(s_rsp[4]),
    .mif_req(vga_req), .mif_rsp(vga_rsp), .front_sel(front_sel),
    .vga_clk(clk_vga), .vga_rst_n(rst_vga_n),
    .vga_r(vga_r), .vga_g(vga_g), .vga_b(vga_b),
    .vga_hsync_n(vga_hsync_n), .vga_vsync_n(vga_vsync_n), .vga_blank_n(vga_blank_n),
    .frame_start(vga_frame), .underflow(vga_underflow));

  // ---------------- ZBT RAM controllers ----------------
  localparam logic [31:0] ZBT_BASES [3] = '{ZBT0_BASE, ZBT1_BASE, ZBT2_BASE};

  mif_req_t zreq [3][2];
  mif_rsp_t zrsp [3][2];

  always_comb begin
    // frame buffers: port 0 VGA, port 1 render; fade buffer: render only
    zreq[0][0] = vga_req[0];
    zreq[0][1] = rend_req[0];
    zreq[1][0] = vga_req[1];
    zreq[1][1] = rend_req[1];
    zreq[2][0] = '0;
    zreq[2][1] = rend_req[2];
    vga_rsp[0]  = zrsp[0][0];
    vga_rsp[1]  = zrsp[1][0];
    rend_rsp[0] = zrsp[0][1];
    rend_rsp[1] = zrsp[1][1];
    rend_rsp[2] = zrsp[2][1];
  end

  for (genvar k = 0; k < 3; k++) begin : g_zbt
    zbt_controller #(.ADDR_W(ZBT_ADDR_W), .BASE(ZBT_BASES[k])) u_zbt (
      .clk(clk_sys), .rst_n(rst_sys_n),
      .mif_req(zreq[k]), .mif_rsp(zrsp[k]),
      .opb_req(s_req[5+k]), .opb_rsp(s_rsp[5+k]),
      .zbt_addr(zbt_addr[k]), .zbt_cen_n(zbt_cen_n[k]), .zbt_we_n(zbt_we_n[k]),
      .zbt_bw_n(zbt_bw_n[k]), .zbt_dq_o(zbt_dq_o[k]), .zbt_dq_oe(zbt_dq_oe[k]),
      .zbt_dq_i(zbt_dq_i[k]));
  end

endmodule
