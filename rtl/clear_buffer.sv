// clear_buffer: render engine for the "clear back buffer" command.
//
// Fills all H_RES*V_RES pixels of the back buffer with one colour, and the
// same pixels of the fade buffer, so the fade buffer keeps a copy of the
// frame being drawn. Works in 4-word bursts: both memory ports get a write
// burst for the same four addresses; the engine moves on when both ports
// have reported op_done. The data word never changes, so every
// write_data_request is served with the same colour.
//
// Interface: start (one-cycle pulse, colour held with it), busy, done (one
// cycle at the end), and two MIF requester ports. H_RES*V_RES must be a
// multiple of 4. Pixel p = y*H_RES + x is at word address p.
module clear_buffer
  import av_pkg::*;
#(
  parameter int unsigned H_RES = 640,
  parameter int unsigned V_RES = 480
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] colour,
  output logic        busy,
  output logic        done,
  output mif_req_t    back_req,
  input  mif_rsp_t    back_rsp,
  output mif_req_t    fade_req,
  input  mif_rsp_t    fade_rsp
);

  localparam int unsigned NPIX = H_RES * V_RES;

  logic [31:0] col_q;
  logic [31:0] addr;
  logic        issue;          // pulse the next burst this cycle
  logic        wait_b, wait_f; // burst outstanding on each port

  always_comb begin
    back_req            = '0;
    back_req.write      = issue;
    back_req.addr       = addr;
    back_req.be         = 4'hF;
    back_req.burst_size = 2'd3;
    back_req.write_data = col_q;
    fade_req            = back_req;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q  <= '0;
      addr   <= '0;
      issue  <= 1'b0;
      wait_b <= 1'b0;
      wait_f <= 1'b0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done  <= 1'b0;
      issue <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        col_q  <= colour;
        addr   <= '0;
        issue  <= 1'b1;
      end else if (busy) begin
        if (issue) begin
          wait_b <= 1'b1;
          wait_f <= 1'b1;
        end else begin
          if (back_rsp.op_done) wait_b <= 1'b0;
          if (fade_rsp.op_done) wait_f <= 1'b0;
          if ((!wait_b || back_rsp.op_done) && (!wait_f || fade_rsp.op_done)) begin
            if (addr == 32'(NPIX - 4)) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              addr  <= addr + 32'd4;
              issue <= 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
