// tb_opb_bus: OPB interconnect test with four simple register slaves of
// different latencies, one silent address, and a slave that suppresses the
// timeout. Checks read data routing, the OR of responses, the 16-cycle
// timeout and its suppression.
module tb_opb_bus;
  import av_pkg::*;
  localparam int NS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  opb_req_t m_req, s_req [NS];
  opb_rsp_t m_rsp, s_rsp [NS];
  logic timeout, multi_ack;

  opb_bus #(.NS(NS), .TIMEOUT(16)) dut (.*);

  // slave i answers at address 0x1000*i after i+1 cycles with 0xA0+i; slave 3
  // is slow (40 cycles) but holds tout_sup
  for (genvar i = 0; i < NS; i++) begin : g_s
    int cnt;
    always @(posedge clk) begin
      s_rsp[i] <= '0;
      if (s_req[i].select && s_req[i].addr[15:12] == 4'(i) && !s_rsp[i].xfer_ack) begin
        cnt <= cnt + 1;
        s_rsp[i].tout_sup <= (i == 3);
        if (cnt == (i == 3 ? 40 : i)) begin
          s_rsp[i].xfer_ack <= 1;
          s_rsp[i].rdata    <= 32'hA0 + 32'(i);
          cnt <= 0;
        end
      end else cnt <= 0;
    end
  end

  int checks = 0, failures = 0, n_to = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) if (timeout) n_to++;

  task automatic rd(input logic [31:0] a, output logic [31:0] d, output int cyc);
    @(negedge clk);
    m_req = '{select: 1, rnw: 1, addr: a, be: 4'hF, wdata: 0};
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!m_rsp.xfer_ack);
    d = m_rsp.rdata;
    @(posedge clk);
    #1 m_req = '0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] d;
  int c;
  initial begin
    m_req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) begin
      rd(32'h1000 * i, d, c);
      check(d == 32'hA0 + i, $sformatf("slave %0d data %h", i, d));
    end
    check(n_to == 0, "no timeout on answered reads");
    rd(32'h9000, d, c);
    check(d == 0 && n_to == 1, "unanswered address times out with zero data");
    check(c == 16, $sformatf("timeout answered in cycle %0d", c));
    rd(32'h3000, d, c);
    check(d == 32'hA3 && n_to == 1, "tout_sup holds off the timeout");
    check(!multi_ack, "single acknowledge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
