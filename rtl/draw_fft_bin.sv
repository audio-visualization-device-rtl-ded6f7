// draw_fft_bin: render engine for the "draw FFT bin" command.
//
// Draws one vertical bar: the column x of the back buffer, from the bottom
// row (V_RES-1) upward over `height` rows (clipped to the screen), in the
// given colour. The same pixels are written into the fade buffer. Pixels of
// a column are H_RES words apart, so each is a single-word write on both
// ports; the next pixel starts when both ports have reported op_done.
// A bar with x >= H_RES or height 0 draws nothing.
//
// Interface: start pulse with height, x and colour held, busy, done pulse.
module draw_fft_bin
  import av_pkg::*;
#(
  parameter int unsigned H_RES = 640,
  parameter int unsigned V_RES = 480
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] height,
  input  logic [31:0] x,
  input  logic [31:0] colour,
  output logic        busy,
  output logic        done,
  output mif_req_t    back_req,
  input  mif_rsp_t    back_rsp,
  output mif_req_t    fade_req,
  input  mif_rsp_t    fade_rsp
);

  logic [31:0] col_q;
  logic [31:0] addr;       // word address of the current pixel
  logic [31:0] rows_left;  // pixels still to draw, current one included
  logic        issue, wait_b, wait_f;

  always_comb begin
    back_req            = '0;
    back_req.write      = issue;
    back_req.addr       = addr;
    back_req.be         = 4'hF;
    back_req.burst_size = 2'd0;
    back_req.write_data = col_q;
    fade_req            = back_req;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q     <= '0;
      addr      <= '0;
      rows_left <= '0;
      issue     <= 1'b0;
      wait_b    <= 1'b0;
      wait_f    <= 1'b0;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else begin
      done  <= 1'b0;
      issue <= 1'b0;
      if (start && !busy) begin
        if (x >= 32'(H_RES) || height == 32'd0) begin
          done <= 1'b1;
        end else begin
          busy      <= 1'b1;
          col_q     <= colour;
          addr      <= 32'((V_RES - 1) * H_RES) + x;
          rows_left <= (height > 32'(V_RES)) ? 32'(V_RES) : height;
          issue     <= 1'b1;
        end
      end else if (busy) begin
        if (issue) begin
          wait_b <= 1'b1;
          wait_f <= 1'b1;
        end else begin
          if (back_rsp.op_done) wait_b <= 1'b0;
          if (fade_rsp.op_done) wait_f <= 1'b0;
          if ((!wait_b || back_rsp.op_done) && (!wait_f || fade_rsp.op_done)) begin
            if (rows_left == 32'd1) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              rows_left <= rows_left - 32'd1;
              addr      <= addr - 32'(H_RES);
              issue     <= 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
