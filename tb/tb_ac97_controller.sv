// tb_ac97_controller: AC-link controller test against the codec model.
// Checks: SYNC framing (256 bit clocks per frame, high for 16), a codec
// register write over OPB arrives at the codec (line-in record select),
// the pending flag clears, recording pushes exactly the codec's left-channel
// sample of each frame into the FIFO write port (one per frame, 48 kHz),
// no sample before recording is enabled, and a full FIFO drops samples and
// counts them.
module tb_ac97_controller;
  import av_pkg::*;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0, bit_rst_n = 0;
  always #10 clk = ~clk;
  logic bit_clk, sync, sdo, sdi, ac97_reset_n, smp_wen, smp_wfull = 0, frame_start;
  logic [15:0] smp_wdata;
  opb_req_t oreq;
  opb_rsp_t orsp;

  ac97_controller dut (.clk, .rst_n, .opb_req(oreq), .opb_rsp(orsp), .bit_clk, .bit_rst_n,
    .ac97_sync(sync), .ac97_sdata_out(sdo), .ac97_sdata_in(sdi), .ac97_reset_n,
    .smp_wen, .smp_wdata, .smp_wfull, .frame_start);
  ac97_codec_model u_codec (.bit_clk, .sync, .sdata_out(sdo), .sdata_in(sdi), .reset_n(ac97_reset_n));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic opb(input bit rnw, input logic [31:0] a, input logic [31:0] wd, output logic [31:0] d);
    @(negedge clk);
    oreq = '{select: 1, rnw: rnw, addr: AC97_BASE + a, be: 4'hF, wdata: wd};
    do @(negedge clk); while (!orsp.xfer_ack);
    d = orsp.rdata;
    @(posedge clk);
    #1 oreq = '0;
  endtask

  // sample checks in the bit clock domain
  int nsmp = 0, bad = 0, last_t = -1, gap_bad = 0, bclk = 0;
  bit recording = 0;
  always @(posedge bit_clk) begin
    bclk++;
    if (smp_wen) begin
      nsmp++;
      if (!recording) bad++;
      if (smp_wdata != tone_sample(u_codec.frames - 1)) begin
        bad++;
        $display("sample %h expected %h", smp_wdata, tone_sample(u_codec.frames - 1));
      end
      if (last_t >= 0 && bclk - last_t != 256) gap_bad++;
      last_t = bclk;
    end
  end
  // SYNC shape
  int sync_hi = 0, sync_period_bad = 0, last_rise = -1, rises = 0;
  logic sync_q = 0;
  always @(posedge bit_clk) begin
    sync_q <= sync;
    if (sync && !sync_q) begin
      if (last_rise >= 0 && bclk - last_rise != 256) sync_period_bad++;
      last_rise = bclk;
      rises++;
      sync_hi = 0;
    end
    if (sync) sync_hi++;
  end

  initial begin
    #(10ms);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] d;
  initial begin
    oreq = '0;
    #200ns;
    rst_n = 1;
    @(posedge bit_clk) bit_rst_n = 1;
    opb(0, 0, 32'h2, d);                         // release codec reset
    repeat (3) @(posedge sync);
    check(sync_hi == 16, $sformatf("SYNC high for %0d bit clocks", sync_hi));
    opb(0, 4, {9'd0, 7'h1A, 16'h0404}, d);       // record select = line in
    opb(1, 4, 0, d);
    check(d[0] == 1, "write pending right after the request");
    repeat (4) @(posedge sync);
    opb(1, 8, 0, d);
    check(d[0] == 0, "write no longer pending");
    check(d[1] == 1, "codec ready seen");
    check(u_codec.n_reg_writes == 1 && u_codec.regs[7'h1A] == 16'h0404, "codec register written");
    check(nsmp == 0, "no samples before recording");
    recording = 1;
    opb(0, 0, 32'h3, d);
    repeat (60) @(posedge sync);
    check(nsmp >= 55, $sformatf("%0d samples in 60 frames", nsmp));
    check(bad == 0, "samples match the codec's left channel");
    check(gap_bad == 0, "one sample every 256 bit clocks");
    check(sync_period_bad == 0 && rises > 60, "frames of 256 bit clocks");
    // FIFO full: samples dropped and counted
    @(posedge bit_clk) smp_wfull = 1;
    nsmp = 0;
    repeat (10) @(posedge sync);
    @(posedge bit_clk) smp_wfull = 0;
    check(nsmp == 0, "no push while full");
    repeat (4) @(posedge sync);
    opb(1, 8, 0, d);
    check(d[31:16] >= 9 && d[31:16] <= 11, $sformatf("dropped count %0d", d[31:16]));
    check(nsmp >= 3, "recording resumes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
