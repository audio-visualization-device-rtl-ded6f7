// tb_fft_controller: FFT control path test with the FFT core model.
// The testbench fills a sample FIFO with a known sequence, starts an FFT
// over OPB, and checks: the controller waits while fewer than N samples are
// buffered, the core receives exactly the N oldest samples, the status
// reports busy then done, every bin written to the spectrum buffer equals
// an independent DFT of those samples, and a second FFT uses the next N
// samples. N is reduced to 64 to keep the DFT short.
module tb_fft_controller;
  import av_pkg::*;
  localparam int N = 64, OW = 16 + 6 + 1;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  opb_req_t oreq;
  opb_rsp_t orsp;
  logic wen = 0, wfull, ren, rempty;
  logic [15:0] wdata, rdata;
  logic [$clog2(2*N):0] wcount, rcount;
  logic fft_start, rfd, dv, spec_we, fin;
  logic [15:0] xn_re, xn_im;
  logic [$clog2(N)-1:0] xk_index, spec_waddr;
  logic [OW-1:0] xk_re, xk_im;
  logic [31:0] spec_wre, spec_wim;

  async_fifo #(.WIDTH(16), .DEPTH(2*N)) u_fifo (.wclk(clk), .wrst_n(rst_n), .wen, .wdata,
    .wfull, .wcount, .rclk(clk), .rrst_n(rst_n), .ren, .rdata, .rempty, .rcount);

  fft_controller #(.N(N), .OUT_W(OW)) dut (.clk, .rst_n, .opb_req(oreq), .opb_rsp(orsp),
    .smp_rdata(rdata), .smp_rempty(rempty), .smp_rcount(rcount[$clog2(N):0] | {($clog2(N)+1){rcount[$clog2(2*N)]}}),
    .smp_ren(ren),
    .fft_start, .fft_xn_re(xn_re), .fft_xn_im(xn_im), .fft_rfd(rfd), .fft_dv(dv),
    .fft_xk_index(xk_index), .fft_xk_re(xk_re), .fft_xk_im(xk_im),
    .spec_we, .spec_waddr, .spec_wre, .spec_wim, .fft_finished(fin));

  fft_core_model #(.N(N), .OUT_W(OW), .LAT(20)) u_core (.clk, .start(fft_start && rst_n), .xn_re, .xn_im,
    .rfd, .dv, .xk_index, .xk_re, .xk_im);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic opb(input bit rnw, input logic [31:0] a, input logic [31:0] wd, output logic [31:0] d);
    @(negedge clk);
    oreq = '{select: 1, rnw: rnw, addr: FFT_BASE + a, be: 4'hF, wdata: wd};
    do @(negedge clk); while (!orsp.xfer_ack);
    d = orsp.rdata;
    @(posedge clk);
    #1 oreq = '0;
  endtask

  // spectrum writes captured
  logic [31:0] got_re [N], got_im [N];
  int nwr = 0;
  always @(posedge clk) if (spec_we) begin
    got_re[spec_waddr] <= spec_wre;
    got_im[spec_waddr] <= spec_wim;
    nwr++;
  end

  function automatic logic signed [15:0] smp(input int n);
    return 16'($rtoi(9000.0 * $sin(2.0 * PI * 5.0 * n / N) + 3000.0 * $cos(2.0 * PI * 11.0 * n / N)) + (n % 7) * 13);
  endfunction

  task automatic push(input int from, input int cnt);
    for (int i = from; i < from + cnt; i++) begin
      @(negedge clk) wen = 1; wdata = smp(i);
    end
    @(negedge clk) wen = 0;
  endtask

  task automatic check_bins(input int base);
    int bad = 0;
    for (int k = 0; k < N; k++) begin
      real sr, si;
      longint er, ei;
      sr = 0; si = 0;
      for (int n = 0; n < N; n++) begin
        sr += real'(smp(base + n)) * $cos(2.0 * PI * k * n / N);
        si -= real'(smp(base + n)) * $sin(2.0 * PI * k * n / N);
      end
      er = $rtoi(sr >= 0 ? sr + 0.5 : sr - 0.5);
      ei = $rtoi(si >= 0 ? si + 0.5 : si - 0.5);
      if ($signed(got_re[k]) - er > 1 || er - $signed(got_re[k]) > 1 ||
          $signed(got_im[k]) - ei > 1 || ei - $signed(got_im[k]) > 1) begin
        bad++;
        if (bad < 4) $display("bin %0d: %0d %0d expected %0d %0d", k,
                              $signed(got_re[k]), $signed(got_im[k]), er, ei);
      end
    end
    check(bad == 0, $sformatf("spectrum of samples %0d.. (%0d bad bins)", base, bad));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] d;
  int t0;
  initial begin
    oreq = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    push(0, N / 2);
    opb(0, 0, 1, d);
    repeat (50) @(negedge clk);
    opb(1, 0, 0, d);
    check(d[0] && d[2] && !d[1], $sformatf("busy and waiting for samples, status %h", d));
    check(u_core.runs == 0 && !rfd, "core not started with too few samples");
    opb(1, 4, 0, d);
    check(d == N / 2, "fill level readable");
    push(N / 2, N / 2 + 10);
    do opb(1, 0, 0, d); while (d[0]);
    check(d[1], "done flag set");
    check(nwr == N, $sformatf("%0d bins written", nwr));
    check_bins(0);
    check(rcount == 10, "exactly N samples consumed");
    // second run on the next N samples
    push(N + 10, N - 10);
    nwr = 0;
    opb(0, 0, 1, d);
    opb(1, 0, 0, d);
    check(!d[1], "start clears done");
    do opb(1, 0, 0, d); while (d[0]);
    check(nwr == N, "second run writes every bin");
    check_bins(N);
    check(u_core.runs == 2, "two core runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
