// tb_pb_link: push button path test, CPLD controller to FPGA receiver.
// Presses button patterns and ENTER; checks that a frame is sent only when
// ENTER rises and the other buttons changed, that the receiver's register
// (read over OPB) holds the sampled states with the new-state flag, that a
// read clears the flag, and that a frame takes N_BUTTONS+2 bit periods.
module tb_pb_link;
  import av_pkg::*;
  localparam int BC = 8;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  logic [9:0] buttons = 0;
  logic pb_serial, sending, frame_rx;
  logic [9:0] pb_state;
  opb_req_t oreq;
  opb_rsp_t orsp;

  pb_cpld_ctrl #(.BIT_CYCLES(BC)) u_tx (.clk, .rst_n, .buttons, .pb_serial, .sending);
  pb_receiver  #(.BIT_CYCLES(BC)) u_rx (.clk, .rst_n, .pb_serial, .opb_req(oreq),
                                        .opb_rsp(orsp), .pb_state, .frame_rx);

  int checks = 0, failures = 0, frames = 0, send_cycles = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) begin
    if (frame_rx) frames++;
    if (sending) send_cycles++;
  end

  task automatic opb_rd(output logic [31:0] d);
    @(negedge clk);
    oreq = '{select: 1, rnw: 1, addr: PB_BASE, be: 4'hF, wdata: 0};
    do @(negedge clk); while (!orsp.xfer_ack);
    d = orsp.rdata;
    @(posedge clk);
    #1 oreq = '0;
  endtask

  task automatic press(input logic [8:0] others);
    @(negedge clk) buttons = {1'b0, others};
    repeat (5) @(negedge clk);
    buttons = {1'b1, others};              // ENTER down
    repeat (5) @(negedge clk);
    buttons = {1'b0, others};              // ENTER up
    repeat (BC * 14) @(negedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] d;
  logic [8:0] pat;
  int f0;
  initial begin
    oreq = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    opb_rd(d);
    check(d == 0, "register clear after reset");
    press(9'h0A5);
    check(frames == 1, "frame sent on ENTER after a change");
    check(send_cycles >= 12 * BC && send_cycles <= 12 * BC + 1, $sformatf("frame length %0d cycles", send_cycles));
    opb_rd(d);
    check(d == {1'b1, 21'd0, 10'h2A5}, $sformatf("register %h", d));
    opb_rd(d);
    check(d[31] == 0 && d[9:0] == 10'h2A5, "read clears the new-state flag");
    press(9'h0A5);
    check(frames == 1, "no frame when nothing changed");
    for (int i = 0; i < 6; i++) begin
      pat = 9'($urandom) | 9'h1;
      pat[i] = ~pat[i];
      f0 = frames;
      press(pat);
      check(frames == f0 + 1, "frame for a changed pattern");
      opb_rd(d);
      check(d[9:0] == {1'b1, pat} && d[31], $sformatf("pattern %h read %h", pat, d));
      check(pb_state == {1'b1, pat}, "state output");
    end
    @(negedge clk) buttons = 10'h0F0;        // change without ENTER
    repeat (BC * 20) @(negedge clk);
    opb_rd(d);
    check(d[9:0] != 10'h0F0, "no frame without ENTER");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
