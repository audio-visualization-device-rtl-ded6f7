// tb_vga_controller: VGA output test with both frame buffers in ZBT RAM
// models behind zbt_controller instances, a 50 MHz system clock and a
// 25.2 MHz pixel clock.
// The two frame buffers are preloaded with different pixel patterns. The
// testbench measures the sync and blanking waveforms (sync pulse widths,
// line and frame periods, front porch, visible pixels per line, visible
// lines per frame) and compares every visible pixel with the RAM word it
// must come from, checking that each frame comes entirely from one buffer.
// It then selects buffer 1 over OPB and checks that the change happens at a
// frame boundary, that the register reports the buffer in use, and that the
// pixel FIFO never ran dry. While the display runs, the testbench also
// keeps the render port of frame buffer 0 busy with write bursts to a
// region outside the picture, so the VGA port has to win arbitration.
// The screen timing is reduced to 16x6 visible pixels.
module tb_vga_controller;
  import av_pkg::*;
  localparam int HA = 16, HF = 2, HS = 3, HB = 3, VA = 6, VF = 1, VS = 2, VB = 2;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB, NPIX = HA * VA, AW = 8;
  logic clk = 0, vclk = 0, rst_n = 0, vrst_n = 0;
  always #10 clk = ~clk;
  always #19.841 vclk = ~vclk;

  opb_req_t oreq;
  opb_rsp_t orsp;
  mif_req_t vreq [2];
  mif_rsp_t vrsp [2];
  mif_req_t rq;
  logic     front_sel, hs_n, vs_n, bl_n, fstart, uflow;
  logic [7:0] r, g, b;

  vga_controller #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB), .V_ACTIVE(VA),
    .V_FP(VF), .V_SYNC(VS), .V_BP(VB), .FIFO_DEPTH(16)) dut (.clk, .rst_n, .opb_req(oreq),
    .opb_rsp(orsp), .mif_req(vreq), .mif_rsp(vrsp), .front_sel, .vga_clk(vclk),
    .vga_rst_n(vrst_n), .vga_r(r), .vga_g(g), .vga_b(b), .vga_hsync_n(hs_n),
    .vga_vsync_n(vs_n), .vga_blank_n(bl_n), .frame_start(fstart), .underflow(uflow));

  for (genvar k = 0; k < 2; k++) begin : g_mem
    mif_req_t zq [2];
    mif_rsp_t zs [2];
    logic [AW-1:0] a;
    logic cen_n, we_n, oe;
    logic [3:0] bw_n;
    logic [31:0] dqo, dqi;
    assign zq[0] = vreq[k];
    assign zq[1] = (k == 0) ? rq : '0;
    assign vrsp[k] = zs[0];
    zbt_controller #(.ADDR_W(AW)) u_ctl (.clk, .rst_n, .mif_req(zq), .mif_rsp(zs),
      .opb_req('0), .opb_rsp(), .zbt_addr(a), .zbt_cen_n(cen_n), .zbt_we_n(we_n),
      .zbt_bw_n(bw_n), .zbt_dq_o(dqo), .zbt_dq_oe(oe), .zbt_dq_i(dqi));
    zbt_ram_model #(.ADDR_W(AW)) u_ram (.clk, .addr(a), .cen_n, .we_n, .bw_n,
      .dq_o(dqo), .dq_oe(oe), .dq_i(dqi));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pattern(input int buf_n, input int p);
    return buf_n == 0 ? {8'h00, 8'(p), 8'(p * 3), 8'h11} : {8'h00, 8'h80 | 8'(p), 8'hC3, 8'(p * 5)};
  endfunction

  // ---------------- pixel domain monitor ----------------
  int   t = 0, hs_fall = -1, hs_low = 0, vs_low = 0, vs_fall = -1, bl_run = 0, bl_fall = -1;
  int   lines_vis = 0, frames = 0, shown [2], idx = 0, cur = -1, bad_pix = 0, mixed = 0;
  int   bad_hs_w = 0, bad_hperiod = 0, bad_vs_w = 0, bad_vperiod = 0, bad_vis = 0;
  int   bad_lines = 0, bad_fp = 0, hs_n_seen = 0;
  logic hs_q = 1, vs_q = 1, bl_q = 0;
  initial begin shown[0] = 0; shown[1] = 0; end

  always @(posedge vclk) if (vrst_n) begin
    t++;
    // horizontal sync
    if (!hs_n) hs_low++;
    if (hs_q && !hs_n) begin
      if (hs_fall >= 0 && t - hs_fall != HT) bad_hperiod++;
      if (bl_fall >= 0 && t - bl_fall < HT && t - bl_fall != HF) bad_fp++;
      hs_fall = t;
      hs_n_seen++;
    end
    if (!hs_q && hs_n) begin
      if (hs_low != HS) bad_hs_w++;
      hs_low = 0;
    end
    // vertical sync
    if (!vs_n) vs_low++;
    if (vs_q && !vs_n) begin
      if (vs_fall >= 0 && t - vs_fall != HT * VT) bad_vperiod++;
      vs_fall = t;
    end
    if (!vs_q && vs_n) begin
      if (vs_low != VS * HT) bad_vs_w++;
      vs_low = 0;
    end
    // visible area
    if (bl_n) bl_run++;
    if (bl_q && !bl_n) begin
      if (bl_run != HA) bad_vis++;
      bl_run = 0;
      bl_fall = t;
      lines_vis++;
    end
    if (fstart) begin
      if (cur >= 0) begin
        if (lines_vis != VA) bad_lines++;
        frames++;
        shown[cur]++;
      end
      lines_vis = 0;
      idx = 0;
      cur = ({8'h00, r, g, b} == pattern(1, 0)) ? 1 : 0;
    end
    if (bl_n && cur >= 0) begin
      if ({8'h00, r, g, b} != pattern(cur, idx)) begin
        if ({8'h00, r, g, b} == pattern(1 - cur, idx)) mixed++;
        else bad_pix++;
        if (bad_pix + mixed < 4) $display("pixel %0d of buffer %0d: %h", idx, cur, {r, g, b});
      end
      idx++;
    end
    hs_q = hs_n; vs_q = vs_n; bl_q = bl_n;
  end

  // ---------------- competing render traffic on frame buffer 0 ----------------
  logic traffic = 0;
  int   nburst = 0;
  always @(posedge clk) begin
    rq <= '0;
    if (traffic && rst_n) begin
      // one 4-word write burst at a time to words 128..131, outside the picture
      if (nburst == 0 || g_mem[0].zs[1].op_done) begin
        rq.write      <= 1'b1;
        rq.addr       <= 32'd128;
        rq.be         <= 4'hF;
        rq.burst_size <= 2'd3;
        rq.write_data <= 32'hDEAD_0000;
        nburst <= nburst + 1;
      end
    end
  end

  task automatic opb(input bit rnw, input logic [31:0] wd, output logic [31:0] d);
    @(negedge clk);
    oreq = '{select: 1, rnw: rnw, addr: VGA_BASE, be: 4'hF, wdata: wd};
    do @(negedge clk); while (!orsp.xfer_ack);
    d = orsp.rdata;
    @(posedge clk);
    #1 oreq = '0;
  endtask

  logic [31:0] d;
  int f0;
  initial begin
    oreq = '0;
    rq = '0;
    #1;
    for (int p = 0; p < (1 << AW); p++) begin
      g_mem[0].u_ram.mem[p] = pattern(0, p);
      g_mem[1].u_ram.mem[p] = pattern(1, p);
    end
    repeat (4) @(negedge clk);
    rst_n = 1;
    vrst_n = 1;
    traffic = 1;
    wait (frames == 3);
    opb(1, 0, d);
    check(d[1:0] == 2'b00, "register shows buffer 0 selected and in use");
    opb(0, 1, d);
    wait (front_sel == 1'b1);
    opb(1, 0, d);
    check(d[1:0] == 2'b11, $sformatf("register shows buffer 1 in use (%b)", d[1:0]));
    f0 = frames;
    wait (frames == f0 + 3);
    traffic = 0;
    check(shown[0] >= 3 && shown[1] >= 2, $sformatf("frames shown from buffer 0: %0d, 1: %0d",
                                                  shown[0], shown[1]));
    check(bad_pix == 0, $sformatf("%0d wrong pixels", bad_pix));
    check(mixed == 0, $sformatf("%0d pixels from the other buffer inside a frame", mixed));
    check(hs_n_seen > 5 * VT && bad_hperiod == 0, "line period");
    check(bad_hs_w == 0, "hsync width");
    check(bad_fp == 0, "horizontal front porch");
    check(bad_vis == 0, "visible pixels per line");
    check(bad_lines == 0, "visible lines per frame");
    check(bad_vperiod == 0, "frame period");
    check(bad_vs_w == 0, "vsync width");
    check(!uflow, "pixel FIFO never ran dry");
    check(nburst > 50, $sformatf("competing render bursts issued: %0d", nburst));
    check(g_mem[0].u_ram.mem[128] == 32'hDEAD_0000, "competing render writes landed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
