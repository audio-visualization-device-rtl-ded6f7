// tb_async_fifo: dual-clock FIFO test with unrelated write and read clocks.
// Writes a counting-plus-random sequence with random stalls on both sides,
// checks order and contents on the read side, that full appears at DEPTH
// words with the reader stopped, and that nothing is lost or duplicated.
module tb_async_fifo;
  localparam int W = 16, D = 16;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #7  wclk = ~wclk;
  always #10 rclk = ~rclk;

  logic wen = 0, ren = 0, wfull, rempty;
  logic [W-1:0] wdata = 0, rdata;
  logic [$clog2(D):0] wcount, rcount;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [W-1:0] sent [$];
  int nw = 0, nr = 0;
  bit stop_read = 1;

  initial begin
    repeat (400000) @(posedge rclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    // fill until full with the reader stopped
    while (!wfull) begin
      @(negedge wclk);
      if (!wfull) begin wen = 1; wdata = W'(nw * 3 + 1); end
      @(posedge wclk);
      if (wen && !wfull) begin sent.push_back(wdata); nw++; end
      #1 wen = 0;
    end
    check(nw == D, $sformatf("full after %0d words, expected %0d", nw, D));
    repeat (10) @(posedge wclk);
    check(wcount == D, "write-side count at full");
    stop_read = 0;
    while (nw < 3000) begin
      @(negedge wclk);
      wen   = ($urandom_range(0, 3) != 0);
      wdata = W'($urandom);
      @(posedge wclk);
      if (wen && !wfull) begin sent.push_back(wdata); nw++; end
    end
    @(negedge wclk) wen = 0;
  end

  // reader
  initial begin
    wait (rrst_n);
    forever begin
      @(negedge rclk);
      ren = !stop_read && ($urandom_range(0, 2) != 0);
      @(posedge rclk);
      if (ren && !rempty) begin
        check(sent.size() > 0 && rdata == sent[0],
              $sformatf("read %h expected %h", rdata, sent.size() ? sent[0] : 0));
        if (sent.size() > 0) void'(sent.pop_front());
        nr++;
        if (nr == 3000) begin
          repeat (20) @(posedge rclk);
          check(rempty, "empty at the end");
          check(rcount == 0, "read-side count zero at the end");
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
