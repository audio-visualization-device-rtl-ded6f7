// tb_sync_fifo: FSL link FIFO test. A blocking writer (holds write while
// full) and a random reader; checks order, the full flag at DEPTH words, and
// that exists follows the contents.
module tb_sync_fifo;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fsl_m_write = 0, fsl_m_full, fsl_s_read = 0, fsl_s_exists;
  logic [31:0] fsl_m_data = 0, fsl_s_data;
  logic [$clog2(D):0] count;

  sync_fifo #(.WIDTH(32), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] q [$];
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!fsl_s_exists, "empty after reset");
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      fsl_m_write = 1; fsl_m_data = 32'(i);
      check(!fsl_m_full, "not full before DEPTH words");
      q.push_back(fsl_m_data);
    end
    @(negedge clk);
    fsl_m_write = 0;
    check(fsl_m_full, "full at DEPTH words");
    check(fsl_s_exists && fsl_s_data == 0, "oldest word shown");
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      fsl_s_read = fsl_s_exists && ($urandom_range(0, 1) == 1);
      if (fsl_s_read) begin
        check(fsl_s_data == q[0], $sformatf("read %h expected %h", fsl_s_data, q[0]));
        void'(q.pop_front());
      end
      fsl_m_write = ($urandom_range(0, 1) == 1) && !fsl_m_full;
      fsl_m_data  = $urandom;
      if (fsl_m_write) q.push_back(fsl_m_data);
      check(fsl_s_exists == (count != 0), "exists matches count");
    end
    @(negedge clk);
    fsl_m_write = 0; fsl_s_read = 0;
    check(32'(count) == q.size(), "count matches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
