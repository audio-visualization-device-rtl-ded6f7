// tb_clk_align: reset release test. rst_n must stay low while locked is
// low or rst_in is high, rise exactly HOLD+3 cycles after both are good
// (two synchroniser cycles, HOLD counting cycles, one output register), and
// drop at once when lock is lost.
module tb_clk_align;
  localparam int HOLD = 8;
  logic clk = 0, locked = 0, rst_in = 1, rst_n;
  always #5 clk = ~clk;
  clk_align #(.HOLD(HOLD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n;
  initial begin
    repeat (5) @(negedge clk);
    check(!rst_n, "held while unlocked");
    locked = 1;
    repeat (30) @(negedge clk);
    check(!rst_n, "held while rst_in is high");
    for (int round = 0; round < 2; round++) begin
      @(negedge clk);
      rst_in = 0;
      n = 0;
      while (!rst_n && n < 100) begin @(negedge clk); n++; end
      check(n == HOLD + 3, $sformatf("released after %0d cycles, expected %0d", n, HOLD + 3));
      repeat (20) @(negedge clk);
      check(rst_n, "stays released");
      #2 locked = 0;
      #1 check(!rst_n, "asynchronous assertion on lock loss");
      @(negedge clk);
      locked = 1; rst_in = 1;
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
