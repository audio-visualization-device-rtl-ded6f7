// tb_spectrum_buffer: writes random real/imaginary pairs to all N bins and
// reads them back over OPB in random order, checking the window layout
// (real parts first, imaginary parts after N words) and the two-cycle read
// latency.
module tb_spectrum_buffer;
  import av_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [$clog2(N)-1:0] waddr;
  logic [31:0] wre, wim;
  opb_req_t oreq;
  opb_rsp_t orsp;

  spectrum_buffer #(.N(N)) dut (.clk, .rst_n, .we, .waddr, .wdata_re(wre), .wdata_im(wim),
                                .opb_req(oreq), .opb_rsp(orsp));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] d, output int c);
    @(negedge clk);
    oreq = '{select: 1, rnw: 1, addr: a, be: 4'hF, wdata: 0};
    c = 0;
    do begin @(negedge clk); c++; end while (!orsp.xfer_ack);
    d = orsp.rdata;
    @(posedge clk);
    #1 oreq = '0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] re [N], im [N], d;
  int c, k;
  initial begin
    oreq = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      we = 1; waddr = i[$clog2(N)-1:0];
      re[i] = $urandom; im[i] = $urandom;
      wre = re[i]; wim = im[i];
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 200; n++) begin
      k = $urandom_range(0, 2 * N - 1);
      rd(SPEC_BASE + 32'(4 * k), d, c);
      check(d == (k < N ? re[k] : im[k - N]), $sformatf("word %0d = %h", k, d));
      check(c == 2, $sformatf("read latency %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
