// tb_zbt_controller: self-checking test of the ZBT RAM controller with a
// behavioural ZBT RAM.
//  1. The burst scenario of the controller's interface description: a
//     4-word read requested in cycle c must issue op_done in c+4 and return
//     its words in c+5..c+8; a 4-word write requested right after (c+5)
//     must raise write_data_request in three cycles and op_done in c+9.
//  2. Both MIF ports request in the same cycle: port 0 (VGA) goes first.
//  3. OPB single-word write with byte enables and read back.
//  4. Random bursts from both ports and OPB, each in its own address range,
//     checked against a reference memory.
module tb_zbt_controller;
  import av_pkg::*;

  localparam int AW = 12;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  mif_req_t req [2];
  mif_rsp_t rsp [2];
  opb_req_t oreq;
  opb_rsp_t orsp;
  logic [AW-1:0] zaddr;
  logic zcen_n, zwe_n, zoe;
  logic [3:0] zbw_n;
  logic [31:0] zdo, zdi;

  zbt_controller #(.ADDR_W(AW), .BASE(ZBT0_BASE)) dut (
    .clk, .rst_n, .mif_req(req), .mif_rsp(rsp), .opb_req(oreq), .opb_rsp(orsp),
    .zbt_addr(zaddr), .zbt_cen_n(zcen_n), .zbt_we_n(zwe_n), .zbt_bw_n(zbw_n),
    .zbt_dq_o(zdo), .zbt_dq_oe(zoe), .zbt_dq_i(zdi));

  zbt_ram_model #(.ADDR_W(AW)) u_ram (
    .clk, .addr(zaddr), .cen_n(zcen_n), .we_n(zwe_n), .bw_n(zbw_n),
    .dq_o(zdo), .dq_oe(zoe), .dq_i(zdi));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // ---- per-port write data: word widx[p] of wbuf[p] is presented ----
  logic [31:0] wbuf [2][4];
  int          widx [2];
  always @(posedge clk)
    for (int p = 0; p < 2; p++)
      if (rsp[p].write_data_request) begin
        widx[p]            <= widx[p] + 1;
        req[p].write_data  <= wbuf[p][(widx[p] + 1) % 4];
      end

  // ---- per-port read data collection ----
  logic [31:0] rexp [2][$];
  int          nread [2];
  always @(posedge clk)
    for (int p = 0; p < 2; p++)
      if (rsp[p].read_data_ready) begin
        nread[p]++;
        if (rexp[p].size() == 0) check(0, $sformatf("port %0d unexpected read data", p));
        else begin
          logic [31:0] e;
          e = rexp[p].pop_front();
          check(rsp[p].read_data == e,
                $sformatf("port %0d read %h expected %h", p, rsp[p].read_data, e));
        end
      end

  logic [31:0] ref_mem [2**AW];

  // issue one MIF operation on port p and wait for its op_done;
  // returns the request cycle and the op_done cycle
  task automatic mif_op(input int p, input bit wr, input int addr, input int bs,
                        output int c_req, output int c_done);
    @(negedge clk);
    req[p].read       = !wr;
    req[p].write      = wr;
    req[p].addr       = 32'(addr);
    req[p].be         = 4'hF;
    req[p].burst_size = 2'(bs);
    widx[p]           = 0;
    req[p].write_data = wbuf[p][0];
    c_req = cyc;
    if (wr) for (int i = 0; i <= bs; i++) ref_mem[addr + i] = wbuf[p][i];
    else    for (int i = 0; i <= bs; i++) rexp[p].push_back(ref_mem[addr + i]);
    @(negedge clk);
    req[p].read  = 0;
    req[p].write = 0;
    while (!rsp[p].op_done) @(negedge clk);
    c_done = cyc;
    @(posedge clk);   // the last write word is taken at this edge
  endtask

  task automatic opb_xfer(input bit rnw, input logic [31:0] addr, input logic [31:0] wd,
                          input logic [3:0] be, output logic [31:0] rd);
    @(negedge clk);
    oreq = '{select: 1'b1, rnw: rnw, addr: addr, be: be, wdata: wd};
    do @(negedge clk); while (!orsp.xfer_ack);
    rd = orsp.rdata;
    @(posedge clk);
    #1 oreq = '0;
  endtask

  // cycle of each read_data_ready / write_data_request on port 0
  int rdy_cyc [$], wdr_cyc [$];
  always @(posedge clk) begin
    if (rsp[0].read_data_ready)    rdy_cyc.push_back(cyc);
    if (rsp[0].write_data_request) wdr_cyc.push_back(cyc);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int c0, c1, c2, c3, pc0, pc1;
  logic [31:0] rd;
  initial begin
    req[0] = '0; req[1] = '0; oreq = '0;
    widx[0] = 0; widx[1] = 0;
    for (int i = 0; i < 2**AW; i++) begin
      ref_mem[i]   = 32'(i) * 32'h01000000 + 32'h11;
      u_ram.mem[i] = ref_mem[i];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // ---- 1: burst read then overlapped burst write ----
    wbuf[0] = '{32'h09000000, 32'h0a000000, 32'h0b000000, 32'h0c000000};
    mif_op(0, 0, 0, 3, c0, c1);
    check(c1 == c0 + 4, $sformatf("read op_done %0d cycles after request, expected 4", c1 - c0));
    mif_op(0, 1, 8, 3, c2, c3);
    check(c2 == c0 + 5, "write requested in the cycle after op_done");
    check(c3 == c2 + 4, $sformatf("write op_done %0d cycles after request, expected 4", c3 - c2));
    repeat (10) @(negedge clk);
    check(rdy_cyc.size() == 4, "four read_data_ready strobes");
    for (int i = 0; i < rdy_cyc.size(); i++)
      check(rdy_cyc[i] == c0 + 5 + i, $sformatf("read word %0d at cycle %0d", i, rdy_cyc[i] - c0));
    check(wdr_cyc.size() == 3, $sformatf("three write_data_request strobes, got %0d", wdr_cyc.size()));
    for (int i = 0; i < wdr_cyc.size(); i++)
      check(wdr_cyc[i] == c2 + 1 + i, "write_data_request timing");
    for (int i = 0; i < 4; i++)
      check(u_ram.mem[8 + i] == wbuf[0][i], $sformatf("burst write word %0d", i));

    // ---- 2: simultaneous requests, port 0 first ----
    fork
      mif_op(0, 0, 16, 3, c0, c1);
      mif_op(1, 0, 32, 3, pc0, pc1);
    join
    check(c0 == pc0, "both ports requested together");
    check(c1 == c0 + 4, "port 0 served first");
    check(pc1 == c1 + 4, "port 1 served right after port 0");

    // ---- 3: OPB ----
    opb_xfer(0, ZBT0_BASE + 32'h40, 32'hA1B2C3D4, 4'b0101, rd);
    ref_mem[16] = (ref_mem[16] & 32'hFF00FF00) | 32'h00B200D4;
    opb_xfer(1, ZBT0_BASE + 32'h40, 0, 4'hF, rd);
    check(rd == ref_mem[16], $sformatf("OPB byte-enable write/read %h exp %h", rd, ref_mem[16]));

    // ---- 4: random traffic ----
    fork
      for (int n = 0; n < 300; n++) begin
        int bs, a;
        bs = $urandom_range(0, 3);
        a  = 256 + $urandom_range(0, 500);
        for (int i = 0; i < 4; i++) wbuf[0][i] = $urandom;
        mif_op(0, 1'($urandom_range(0, 1)), a, bs, c0, c1);
        if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 5)) @(negedge clk);
      end
      for (int n = 0; n < 300; n++) begin
        int bs, a;
        bs = $urandom_range(0, 3);
        a  = 1024 + $urandom_range(0, 500);
        for (int i = 0; i < 4; i++) wbuf[1][i] = $urandom;
        mif_op(1, 1'($urandom_range(0, 1)), a, bs, pc0, pc1);
      end
      for (int n = 0; n < 60; n++) begin
        int a;
        logic [31:0] v, r;
        a = 2048 + $urandom_range(0, 63);
        v = $urandom;
        opb_xfer(0, ZBT0_BASE + 32'(a * 4), v, 4'hF, r);
        ref_mem[a] = v;
        opb_xfer(1, ZBT0_BASE + 32'(a * 4), 0, 4'hF, r);
        check(r == v, "OPB random write/read");
      end
    join
    repeat (20) @(negedge clk);
    check(rexp[0].size() == 0 && rexp[1].size() == 0, "all reads returned");
    for (int i = 0; i < 2**AW; i++)
      if (u_ram.mem[i] != ref_mem[i]) begin
        check(0, $sformatf("memory word %0d = %h expected %h", i, u_ram.mem[i], ref_mem[i]));
        break;
      end
    check(u_ram.n_bad == 0, "write data driven when the RAM takes it");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
