// sync_fifo: single-clock first-word-fall-through FIFO, used as the FSL
// (Fast Simplex Link) between the processor and the rendering module.
//
// The processor side writes 32-bit command words with a blocking write: it
// holds fsl_m_write until fsl_m_full is low. The render side sees the oldest
// word on fsl_s_data while fsl_s_exists is high and takes it with a
// one-cycle fsl_s_read. A word written into an empty FIFO is visible on the
// read side in the next cycle. The depth of 16 words is this design's choice
// (the common default of such links); it only sets how far the processor can
// run ahead of the renderer.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fsl_m_write,
  input  logic [WIDTH-1:0] fsl_m_data,
  output logic             fsl_m_full,
  input  logic             fsl_s_read,
  output logic [WIDTH-1:0] fsl_s_data,
  output logic             fsl_s_exists,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic do_w, do_r;

  assign fsl_m_full   = (count == (AW+1)'(DEPTH));
  assign fsl_s_exists = (count != '0);
  assign fsl_s_data   = mem[rptr];
  assign do_w = fsl_m_write && !fsl_m_full;
  assign do_r = fsl_s_read && fsl_s_exists;

  always_ff @(posedge clk) begin
    if (do_w) mem[wptr] <= fsl_m_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_w) wptr <= wptr + 1'b1;
      if (do_r) rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_w) - (AW+1)'(do_r);
    end
  end

endmodule
