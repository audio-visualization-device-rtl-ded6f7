// tb_render_module: command-level test of the hardware renderer.
// The renderer is connected as in the full design: its FSL input comes from
// a sync_fifo the testbench writes, and its three memory ports go through
// zbt_controller instances to ZBT RAM models (frame buffer 0, frame buffer 1,
// fade buffer). The testbench keeps its own picture of the three memories,
// updated from the command definitions (clear fills, fade subtracts per
// channel with floor at 0 from the last frame, draw paints a column from the
// bottom row up, flip swaps back and front), and after each command compares
// every pixel of all three RAMs with it. It also checks the order of the
// completion strobes, that an unknown opcode is skipped, that a bar taller
// than the screen is clipped, and that a clear of N pixels finishes in
// 5 cycles per 4-pixel burst, the rate of the memory interface when each
// burst is issued right after the previous one's op_done.
// Completion is detected by polling the OPB status register, which must
// report busy while a command runs and the current back buffer.
// The screen is reduced to 16x8 pixels.
module tb_render_module;
  import av_pkg::*;
  localparam int H = 16, V = 8, NPIX = H * V, AW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        f_write = 0, f_full, f_exists, f_read;
  logic [31:0] f_wdata = '0, f_rdata;
  mif_req_t    rreq [3];
  mif_rsp_t    rrsp [3];
  logic        back_sel, idle;
  logic [3:0]  cmd_done;
  opb_req_t    oreq = '0;
  opb_rsp_t    orsp;

  sync_fifo #(.WIDTH(32), .DEPTH(16)) u_fsl (.clk, .rst_n, .fsl_m_write(f_write),
    .fsl_m_data(f_wdata), .fsl_m_full(f_full), .fsl_s_read(f_read), .fsl_s_data(f_rdata),
    .fsl_s_exists(f_exists), .count());

  render_module #(.H_RES(H), .V_RES(V)) dut (.clk, .rst_n, .fsl_s_data(f_rdata),
    .fsl_s_exists(f_exists), .fsl_s_read(f_read), .mif_req(rreq), .mif_rsp(rrsp),
    .back_sel, .idle, .cmd_done, .opb_req(oreq), .opb_rsp(orsp));

  for (genvar k = 0; k < 3; k++) begin : g_mem
    mif_req_t zq [2];
    mif_rsp_t zs [2];
    logic [AW-1:0] a;
    logic cen_n, we_n, oe;
    logic [3:0] bw_n;
    logic [31:0] dqo, dqi;
    assign zq[0] = '0;
    assign zq[1] = rreq[k];
    assign rrsp[k] = zs[1];
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference picture
  logic [31:0] fb [2][NPIX];
  logic [31:0] fd [NPIX];
  int          back = 1;

  function automatic logic [31:0] sub_sat(input logic [31:0] p, input logic [31:0] a);
    logic [31:0] r;
    r = '0;
    for (int c = 0; c < 3; c++) begin
      int v;
      v = int'(p[8*c +: 8]) - int'(a[8*c +: 8]);
      r[8*c +: 8] = v < 0 ? 8'd0 : 8'(v);
    end
    return r;
  endfunction

  // completion strobes seen
  int ndone [4];
  logic [3:0] last_done;
  initial for (int i = 0; i < 4; i++) ndone[i] = 0;
  always @(posedge clk) if (rst_n && cmd_done != 0) begin
    last_done <= cmd_done;
    for (int i = 0; i < 4; i++) if (cmd_done[i]) ndone[i]++;
  end

  task automatic send(input logic [31:0] w);
    @(negedge clk);
    while (f_full) @(negedge clk);
    f_write = 1; f_wdata = w;
    @(negedge clk);
    f_write = 0;
  endtask

  task automatic opb_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    oreq = '{select: 1, rnw: 1, addr: a, be: 4'hF, wdata: 0};
    do @(negedge clk); while (!orsp.xfer_ack);
    d = orsp.rdata;
    @(posedge clk);
    #1 oreq = '0;
  endtask

  // poll the status register as software does
  int busy_polls = 0;
  task automatic wait_idle();
    logic [31:0] st;
    opb_read(REND_BASE, st);
    while (!st[0]) begin
      busy_polls++;
      opb_read(REND_BASE, st);
    end
    check(st[1] == back_sel, "status register reports the back buffer");
    repeat (12) @(posedge clk);   // let the last writes reach the RAM
  endtask

  task automatic compare(input string what);
    int bad = 0;
    for (int p = 0; p < NPIX; p++) begin
      if (g_mem[0].u_ram.mem[p] != fb[0][p] || g_mem[1].u_ram.mem[p] != fb[1][p] ||
          g_mem[2].u_ram.mem[p] != fd[p]) begin
        bad++;
        if (bad < 4) $display("%s: pixel %0d fb0 %h/%h fb1 %h/%h fade %h/%h", what, p,
                              g_mem[0].u_ram.mem[p], fb[0][p], g_mem[1].u_ram.mem[p], fb[1][p],
                              g_mem[2].u_ram.mem[p], fd[p]);
      end
    end
    check(bad == 0, $sformatf("%s: %0d wrong pixels", what, bad));
    check(back_sel == (back == 1), $sformatf("%s: back buffer select", what));
  endtask

  task automatic do_clear(input logic [31:0] c);
    send(OP_CLEAR_BUFFER); send(c);
    for (int p = 0; p < NPIX; p++) begin fb[back][p] = c; fd[p] = c; end
  endtask

  task automatic do_fade(input logic [31:0] a);
    send(OP_FADE_BUFFER); send(a);
    for (int p = 0; p < NPIX; p++) begin fd[p] = sub_sat(fd[p], a); fb[back][p] = fd[p]; end
  endtask

  task automatic do_draw(input int h, input int x, input logic [31:0] c);
    send(OP_DRAW_FFT_BIN); send(h); send(x); send(c);
    for (int i = 0; i < h && i < V; i++) begin
      fb[back][(V - 1 - i) * H + x] = c;
      fd[(V - 1 - i) * H + x] = c;
    end
  endtask

  task automatic do_flip();
    send(OP_FLIP_BUFFER);
    back = 1 - back;
  endtask

  int t0, t1;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(back_sel == 1 && idle, "after reset frame buffer 1 is the back buffer, renderer idle");

    // clear back buffer, timed
    t0 = $time / 10;
    do_clear(32'h0010_2030);
    do @(posedge clk); while (!cmd_done[0]);
    t1 = $time / 10;
    // one 4-word burst per 5 cycles (request, 4 addresses, next request
    // right after op_done), plus the two FSL words and the start-up
    check(t1 - t0 >= NPIX / 4 * 5 && t1 - t0 <= NPIX / 4 * 5 + 12,
          $sformatf("clear of %0d pixels took %0d cycles", NPIX, t1 - t0));
    wait_idle();
    // the front buffer holds power-up contents; give it defined ones
    for (int p = 0; p < NPIX; p++) fb[0][p] = g_mem[0].u_ram.mem[p];
    compare("clear");
    check(last_done == 4'b0001, "clear strobe");

    do_flip();
    wait_idle();
    compare("flip");
    check(last_done == 4'b0100, "flip strobe");
    do_clear(32'h0040_4040);
    wait_idle();
    compare("clear after flip");

    do_draw(3, 5, 32'h00FF_8000);
    wait_idle();
    compare("draw height 3");
    check(last_done == 4'b1000, "draw strobe");
    do_draw(V + 5, 0, 32'h0000_00FF);
    do_draw(V, H - 1, 32'h0012_3456);
    do_draw(0, 7, 32'h00FF_FFFF);
    wait_idle();
    compare("draw clipped, full and empty bars");

    do_fade(32'h0008_0810);
    wait_idle();
    compare("fade");
    check(last_done == 4'b0010, "fade strobe");

    // unknown opcode is skipped; the next command still works
    send(32'h0000_0007);
    do_flip();
    do_fade(32'h0030_0000);
    do_draw(4, 9, 32'h0001_0203);
    wait_idle();
    compare("unknown opcode, flip, fade, draw");

    // commands queued back to back
    do_flip();
    do_fade(32'h0001_0101);
    do_draw(2, 2, 32'h00AA_BBCC);
    do_draw(6, 3, 32'h00DD_EEFF);
    do_flip();
    do_fade(32'h00FF_FFFF);
    wait_idle();
    compare("queued commands");

    check(busy_polls > 0, "status register reported busy while drawing");
    check(ndone[0] == 2 && ndone[1] == 4 && ndone[2] == 4 && ndone[3] == 7,
          $sformatf("strobe counts clear %0d fade %0d flip %0d draw %0d",
                    ndone[0], ndone[1], ndone[2], ndone[3]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
