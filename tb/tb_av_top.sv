// tb_av_top: end-to-end test of the audio visualization system at its full
// size (640x480 display, 1024-point FFT, 2 MB ZBT RAMs), with no parameter
// overrides.
//
// Around av_top: an AC97 codec model playing a two-tone signal (1500 Hz and
// 6000 Hz at 48 kHz), an FFT core model (direct DFT), three ZBT RAM models,
// clock sources (50 MHz, 25.2 MHz) and a processor model that drives the OPB
// and FSL master ports the way the visualization program does:
//   1. start recording and send one codec register write;
//   2. read a button combination entered with ENTER;
//   3. software rendering: write pixels into the back buffer over OPB, read
//      some back, read pixels of the displayed buffer (which competes with
//      the VGA prefetcher for that RAM), then flip the display;
//   4. hardware rendering: start an FFT, read the spectrum, turn each bin's
//      magnitude squared into a bar height, clear the back buffer, draw the
//      bars and flip;
//   5. hardware rendering with fading: second FFT, fade the back buffer,
//      draw the bars and flip.
// Independent checks: the two strongest spectrum bins are the two tones
// (bins 32 and 128), chosen pixels in the RAMs hold the drawn, cleared or
// faded colours, every displayed frame is pixel for pixel one whole frame
// buffer, each flip shows the new buffer, and the pixel FIFO never runs dry.
// The time to render a full hardware-mode frame (clear or fade, bars, flip)
// is measured and must fit in one period of the 7.8 frames/s the complete
// system reached; the time per software pixel write is printed.
// Monitors count every mechanism of the design (clear, fade, flip, draw,
// FFT, push button frame, overlapped ZBT operation, arbitration conflict on
// a ZBT controller, software OPB pixel write, VGA frame, recorded sample,
// codec register write, renderer status read as busy) and a mechanism that
// never happened is a failure.
//
// A flip is done by the processor in this order: flip command over FSL,
// poll the renderer's status register until it is idle, write the VGA
// buffer register, and wait until the VGA controller reports the new buffer
// in use; only then is the old front buffer drawn into again.
module tb_av_top;
  import av_pkg::*;
  import tb_pkg::*;
  localparam int H = 640, V = 480, NPIX = H * V, N = 1024;

  logic clk = 0, vclk = 0, locked = 0;
  always #10 clk = ~clk;
  always #19.841 vclk = ~vclk;

  logic [9:0]  buttons = '0;
  opb_req_t    oreq;
  opb_rsp_t    orsp;
  logic        otimeout;
  logic        fsl_write = 0, fsl_full;
  logic [31:0] fsl_data = '0;
  logic        bclk, sync, sdo, sdi, creset_n;
  logic        fstart, rfd, dv;
  logic [15:0] xn_re, xn_im;
  logic [9:0]  xk_index;
  logic [26:0] xk_re, xk_im;
  logic [18:0] za [3];
  logic        zcen [3], zwe [3], zoe [3];
  logic [3:0]  zbw [3];
  logic [31:0] zdo [3], zdi [3];
  logic [7:0]  r, g, b;
  logic        hs_n, vs_n, bl_n, uflow;

  av_top dut (
    .clk_sys(clk), .clk_vga(vclk), .dcm_locked(locked), .sys_rst(1'b0), .buttons,
    .opb_m_req(oreq), .opb_m_rsp(orsp), .opb_timeout(otimeout),
    .fsl_m_write(fsl_write), .fsl_m_data(fsl_data), .fsl_m_full(fsl_full),
    .ac97_bit_clk(bclk), .ac97_sync(sync), .ac97_sdata_out(sdo), .ac97_sdata_in(sdi),
    .ac97_reset_n(creset_n),
    .fft_start(fstart), .fft_xn_re(xn_re), .fft_xn_im(xn_im), .fft_rfd(rfd), .fft_dv(dv),
    .fft_xk_index(xk_index), .fft_xk_re(xk_re), .fft_xk_im(xk_im),
    .zbt_addr(za), .zbt_cen_n(zcen), .zbt_we_n(zwe), .zbt_bw_n(zbw), .zbt_dq_o(zdo),
    .zbt_dq_oe(zoe), .zbt_dq_i(zdi),
    .vga_r(r), .vga_g(g), .vga_b(b), .vga_hsync_n(hs_n), .vga_vsync_n(vs_n),
    .vga_blank_n(bl_n), .vga_underflow(uflow));

  ac97_codec_model u_codec (.bit_clk(bclk), .sync, .sdata_out(sdo), .sdata_in(sdi),
                            .reset_n(creset_n));

  // the core sees no start before the design is out of reset
  fft_core_model #(.N(N), .OUT_W(27)) u_core (.clk, .start(fstart && dut.rst_sys_n), .xn_re,
    .xn_im, .rfd, .dv, .xk_index, .xk_re, .xk_im);

  for (genvar k = 0; k < 3; k++) begin : g_ram
    zbt_ram_model #(.ADDR_W(19)) u_ram (.clk, .addr(za[k]), .cen_n(zcen[k]), .we_n(zwe[k]),
      .bw_n(zbw[k]), .dq_o(zdo[k]), .dq_oe(zoe[k]), .dq_i(zdi[k]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters (system clock) ----------------
  int n_clear = 0, n_fade = 0, n_flip = 0, n_draw = 0, n_fft = 0, n_pb = 0;
  int n_overlap = 0, n_conflict = 0, n_swpix = 0, n_timeout = 0, n_samples = 0, n_busy = 0;
  always @(posedge clk) if (dut.rst_sys_n) begin
    if (dut.render_cmd_done[0]) n_clear++;
    if (dut.render_cmd_done[1]) n_fade++;
    if (dut.render_cmd_done[2]) n_flip++;
    if (dut.render_cmd_done[3]) n_draw++;
    if (dut.fft_finished) n_fft++;
    if (dut.pb_frame) n_pb++;
    if (otimeout) n_timeout++;
    if (oreq.select && !oreq.rnw && orsp.xfer_ack && oreq.addr >= ZBT0_BASE &&
        oreq.addr < ZBT2_BASE + 32'h0020_0000) n_swpix++;
  end
  for (genvar k = 0; k < 3; k++) begin : g_mon
    always @(posedge clk) if (dut.rst_sys_n) begin
      // a new operation starts while the previous one is still in the RAM
      if (dut.g_zbt[k].u_zbt.grant_v &&
          (|dut.g_zbt[k].u_zbt.rd_v || dut.g_zbt[k].u_zbt.w1v || dut.g_zbt[k].u_zbt.w2v))
        n_overlap++;
      // a source kept waiting because the RAM serves another source
      for (int i = 0; i < 3; i++)
        if (dut.g_zbt[k].u_zbt.eff_pend[i] && dut.g_zbt[k].u_zbt.iss_active &&
            dut.g_zbt[k].u_zbt.iss_src != 2'(i) &&
            !(dut.g_zbt[k].u_zbt.grant_v && dut.g_zbt[k].u_zbt.grant == 2'(i)))
          n_conflict++;
    end
  end
  always @(posedge bclk) if (dut.rst_bit_n && dut.smp_wen) n_samples++;

  // ---------------- display monitor (pixel clock) ----------------
  // Every displayed frame must equal one of the two frame buffers.
  int idx = -1, m0 = 0, m1 = 0, frames = 0, shown0 = 0, shown1 = 0, bad_frames = 0;
  int last_buf = -1;
  always @(posedge vclk) if (dut.rst_vga_n) begin
    if (dut.vga_frame) begin
      if (idx == NPIX) begin
        frames++;
        if (m0 == 0) begin shown0++; last_buf = 0; end
        else if (m1 == 0) begin shown1++; last_buf = 1; end
        else begin
          bad_frames++;
          $display("frame %0d matches no buffer (%0d / %0d differences)", frames, m0, m1);
        end
      end
      idx = 0; m0 = 0; m1 = 0;
    end
    if (bl_n && idx >= 0 && idx < NPIX) begin
      if ({r, g, b} != g_ram[0].u_ram.mem[idx][23:0]) m0++;
      if ({r, g, b} != g_ram[1].u_ram.mem[idx][23:0]) m1++;
      idx++;
    end
  end

  // ---------------- processor model ----------------
  task automatic opb(input bit rnw, input logic [31:0] a, input logic [31:0] wd,
                     output logic [31:0] d);
    @(negedge clk);
    oreq = '{select: 1, rnw: rnw, addr: a, be: 4'hF, wdata: wd};
    do @(negedge clk); while (!orsp.xfer_ack);
    d = orsp.rdata;
    @(posedge clk);
    #1 oreq = '0;
  endtask

  task automatic fsl(input logic [31:0] w);
    @(negedge clk);
    while (fsl_full) @(negedge clk);
    fsl_write = 1; fsl_data = w;
    @(negedge clk);
    fsl_write = 0;
  endtask

  task automatic wait_render();
    logic [31:0] d;
    do begin
      opb(1, REND_BASE, 0, d);
      if (!d[0]) n_busy++;
    end while (!d[0]);
    repeat (12) @(posedge clk);
  endtask

  task automatic show(input int buf_n);
    logic [31:0] d;
    opb(0, VGA_BASE, buf_n, d);
    do opb(1, VGA_BASE, 0, d); while (d[1] != buf_n[0]);
  endtask

  task automatic wait_frames(input int n);
    int f;
    f = frames;
    wait (frames >= f + n);
  endtask

  // spectrum -> bar heights, as the visualization program does
  longint msq [N / 2];
  int     height [N / 2];
  int     top1, top2;
  task automatic read_spectrum();
    logic [31:0] re, im;
    top1 = 1; top2 = 2;
    for (int k = 0; k < N / 2; k++) begin
      opb(1, SPEC_BASE + 4 * k, 0, re);
      opb(1, SPEC_BASE + 4 * (N + k), 0, im);
      msq[k] = longint'($signed(re)) * longint'($signed(re)) +
               longint'($signed(im)) * longint'($signed(im));
      height[k] = (msq[k] >> 36) > V ? V : int'(msq[k] >> 36);
    end
    for (int k = 1; k < N / 2; k++) if (msq[k] > msq[top1]) top1 = k;
    if (top1 == top2) top2 = 1;
    for (int k = 1; k < N / 2; k++) if (k != top1 && msq[k] > msq[top2]) top2 = k;
  endtask

  task automatic run_fft(input string what);
    logic [31:0] d;
    opb(0, FFT_BASE, 1, d);
    do opb(1, FFT_BASE, 0, d); while (d[0]);
    check(d[1], {what, ": FFT done flag"});
    read_spectrum();
    check((top1 == 32 && top2 == 128) || (top1 == 128 && top2 == 32),
          $sformatf("%s: strongest bins %0d and %0d", what, top1, top2));
    check(height[32] > 100 && height[128] > 100 && height[64] == 0,
          $sformatf("%s: bar heights %0d %0d %0d", what, height[32], height[128], height[64]));
  endtask

  function automatic logic [31:0] bar_colour(input int k);
    return {8'h00, 8'(255 - k), 8'(k * 2), 8'h40};
  endfunction

  task automatic draw_bars();
    for (int k = 0; k < 160; k++) begin
      fsl(OP_DRAW_FFT_BIN); fsl(height[k]); fsl(4 * k); fsl(bar_colour(k));
    end
  endtask

  function automatic logic [31:0] ram(input int k, input int x, input int y);
    return k == 0 ? g_ram[0].u_ram.mem[y * H + x] :
           k == 1 ? g_ram[1].u_ram.mem[y * H + x] : g_ram[2].u_ram.mem[y * H + x];
  endfunction

  logic [31:0] d;
  int          sw_bad;
  realtime     t_start, t_sw, t_hw, t_fade;
  initial begin
    oreq = '0;
    #200 locked = 1;
    wait (dut.rst_sys_n);
    repeat (5) @(posedge clk);

    // 1. recording on, one codec register write (line input volume)
    opb(0, AC97_BASE, 32'h3, d);
    opb(0, AC97_BASE + 4, {9'd0, 7'h10, 16'h0808}, d);
    do opb(1, AC97_BASE + 8, 0, d); while (d[0]);
    check(u_codec.n_reg_writes == 1 && u_codec.regs[7'h10] == 16'h0808, "codec register write");

    // 2. button combination: button 3, then ENTER
    buttons[3] = 1;
    repeat (20) @(posedge clk);
    buttons[9] = 1;
    do opb(1, PB_BASE, 0, d); while (!d[31]);
    check(d[9:0] == 10'h208, $sformatf("buttons read %h", d[9:0]));
    buttons = '0;

    // 3. software rendering into the back buffer (frame buffer 1)
    t_start = $realtime;
    for (int i = 0; i < 64; i++) opb(0, ZBT1_BASE + 4 * (10 * H + 100 + i), 32'h0000_FF00 + i, d);
    t_sw = ($realtime - t_start) / 64.0;
    $display("software mode: %0.1f ns per OPB pixel write, %0.1f ms for a full frame of writes",
             t_sw, t_sw * NPIX / 1e6);
    sw_bad = 0;
    for (int i = 0; i < 64; i += 9) begin
      opb(1, ZBT1_BASE + 4 * (10 * H + 100 + i), 0, d);
      if (d != 32'h0000_FF00 + i) sw_bad++;
    end
    check(sw_bad == 0, "software pixels read back over OPB");
    check(ram(1, 163, 10) == 32'h0000_FF3F, "software pixel in RAM");
    // reading the displayed buffer competes with the display; do it at the
    // start of a visible frame, when the prefetcher is busy
    wait_frames(1);
    for (int i = 0; i < 32; i++) begin
      opb(1, ZBT0_BASE + 4 * (i * 997), 0, d);
      if (d != g_ram[0].u_ram.mem[i * 997]) sw_bad++;
    end
    check(sw_bad == 0, "front buffer read over OPB");
    fsl(OP_FLIP_BUFFER);
    wait_render();
    show(1);
    check(dut.back_sel == 1'b0, "renderer draws into frame buffer 0");
    wait_frames(2);
    check(last_buf == 1, "display shows frame buffer 1 after the flip");

    // 4. hardware rendering: FFT, clear, bars, flip
    run_fft("first FFT");
    t_start = $realtime;
    fsl(OP_CLEAR_BUFFER); fsl(32'h0000_0010);
    draw_bars();
    fsl(OP_DRAW_FFT_BIN); fsl(100); fsl(600); fsl(32'h0080_8080);
    fsl(OP_FLIP_BUFFER);
    wait_render();
    t_hw = ($realtime - t_start) / 1e6;
    $display("hardware mode: clear, %0d bars and flip rendered in %0.2f ms", 161, t_hw);
    check(t_hw < 1000.0 / 7.8, "hardware-mode frame renders within the measured 7.8 frames/s period");
    check(ram(0, 128, V - 1) == bar_colour(32) && ram(0, 128, V - height[32]) == bar_colour(32),
          "bar of bin 32 drawn");
    check(ram(0, 128, V - 1 - height[32]) == 32'h10 && ram(0, 257, V - 1) == 32'h10,
          "cleared pixels above and beside the bar");
    check(ram(2, 512, V - 1) == bar_colour(128), "bar copied into the fade buffer");
    show(0);
    wait_frames(2);
    check(last_buf == 0, "display shows frame buffer 0 after the flip");

    // 5. hardware rendering with fading: second FFT, fade, bars, flip
    run_fft("second FFT");
    t_start = $realtime;
    fsl(OP_FADE_BUFFER); fsl(32'h0010_1010);
    draw_bars();
    fsl(OP_FLIP_BUFFER);
    wait_render();
    t_fade = ($realtime - t_start) / 1e6;
    $display("fading mode: fade, %0d bars and flip rendered in %0.2f ms", 160, t_fade);
    check(t_fade < 1000.0 / 7.8, "fading-mode frame renders within the measured 7.8 frames/s period");
    check(ram(1, 600, V - 1) == 32'h0070_7070 && ram(1, 601, V - 1) == 32'h0,
          $sformatf("faded old bar %h and background %h", ram(1, 600, V - 1), ram(1, 601, V - 1)));
    check(ram(1, 128, V - 1) == bar_colour(32), "new bar over the faded frame");
    show(1);
    wait_frames(2);
    check(last_buf == 1, "display shows frame buffer 1 after the second flip");

    // results
    check(bad_frames == 0 && shown0 > 0 && shown1 > 0,
          $sformatf("frames from buffer 0: %0d, buffer 1: %0d, neither: %0d", shown0, shown1, bad_frames));
    check(!uflow, "pixel FIFO never ran dry");
    check(n_timeout == 0, "no OPB timeout");
    $display("mechanisms: clear %0d fade %0d flip %0d draw %0d fft %0d button %0d overlap %0d conflict %0d swpixel %0d frames %0d samples %0d codec-writes %0d busy-polls %0d",
             n_clear, n_fade, n_flip, n_draw, n_fft, n_pb, n_overlap, n_conflict, n_swpix,
             frames, n_samples, u_codec.n_reg_writes, n_busy);
    check(n_clear > 0, "clear happened");
    check(n_fade > 0, "fade happened");
    check(n_flip > 0, "flip happened");
    check(n_draw > 0, "draw happened");
    check(n_fft > 0, "FFT happened");
    check(n_pb > 0, "push button frame happened");
    check(n_overlap > 0, "overlapped ZBT operation happened");
    check(n_conflict > 0, "ZBT arbitration conflict happened");
    check(n_swpix > 0, "software OPB pixel write happened");
    check(frames > 0, "VGA frame happened");
    check(n_samples >= 2 * N, "audio samples recorded");
    check(u_codec.n_reg_writes > 0, "codec register write happened");
    check(n_busy > 0, "renderer status register read busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
