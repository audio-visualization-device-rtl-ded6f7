// fade_buffer: render engine for the "fade back buffer" command.
//
// Instead of clearing, the back buffer receives a darker copy of the last
// frame drawn. That frame is kept in the fade buffer (every clear, draw and
// fade also writes there). For each group of four pixels the engine reads a
// 4-word burst from the fade buffer, subtracts the fade value from each
// colour channel with saturation at zero (fade value 0x00RRGGBB gives the
// amount per channel), and writes the four results as a burst to both the
// back buffer and the fade buffer. The fade-buffer write starts only after
// all four read words have arrived, so reads and writes never mix up.
//
// Interface: start pulse with amount held, busy, done pulse, two MIF ports.
module fade_buffer
  import av_pkg::*;
#(
  parameter int unsigned H_RES = 640,
  parameter int unsigned V_RES = 480
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] amount,
  output logic        busy,
  output logic        done,
  output mif_req_t    back_req,
  input  mif_rsp_t    back_rsp,
  output mif_req_t    fade_req,
  input  mif_rsp_t    fade_rsp
);

  localparam int unsigned NPIX = H_RES * V_RES;

  typedef enum logic [1:0] {F_IDLE, F_READ, F_WRITE} fstate_e;

  fstate_e     st;
  logic [31:0] amt_q;
  logic [31:0] addr;
  logic [31:0] px [4];
  logic [2:0]  nrd;             // read words received
  logic        rd_issue, wr_issue;
  logic [1:0]  idx_b, idx_f;    // word presented on each write port
  logic        wait_b, wait_f;

  always_comb begin
    back_req            = '0;
    back_req.write      = wr_issue;
    back_req.addr       = addr;
    back_req.be         = 4'hF;
    back_req.burst_size = 2'd3;
    back_req.write_data = px[idx_b];
    fade_req            = '0;
    fade_req.read       = rd_issue;
    fade_req.write      = wr_issue;
    fade_req.addr       = addr;
    fade_req.be         = 4'hF;
    fade_req.burst_size = 2'd3;
    fade_req.write_data = px[idx_f];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= F_IDLE;
      amt_q    <= '0;
      addr     <= '0;
      for (int i = 0; i < 4; i++) px[i] <= '0;
      nrd      <= '0;
      rd_issue <= 1'b0;
      wr_issue <= 1'b0;
      idx_b    <= '0;
      idx_f    <= '0;
      wait_b   <= 1'b0;
      wait_f   <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
    end else begin
      done     <= 1'b0;
      rd_issue <= 1'b0;
      wr_issue <= 1'b0;
      case (st)
        F_IDLE: if (start) begin
          busy     <= 1'b1;
          amt_q    <= amount;
          addr     <= '0;
          nrd      <= '0;
          rd_issue <= 1'b1;
          st       <= F_READ;
        end
        F_READ: begin
          if (fade_rsp.read_data_ready) begin
            px[nrd[1:0]] <= fade_pixel(fade_rsp.read_data, amt_q);
            nrd          <= nrd + 3'd1;
            if (nrd == 3'd3) begin
              wr_issue <= 1'b1;
              idx_b    <= '0;
              idx_f    <= '0;
              wait_b   <= 1'b1;
              wait_f   <= 1'b1;
              st       <= F_WRITE;
            end
          end
        end
        F_WRITE: begin
          if (!wr_issue) begin
            if (back_rsp.write_data_request) idx_b <= idx_b + 2'd1;
            if (fade_rsp.write_data_request) idx_f <= idx_f + 2'd1;
            if (back_rsp.op_done) wait_b <= 1'b0;
            if (fade_rsp.op_done) wait_f <= 1'b0;
            if ((!wait_b || back_rsp.op_done) && (!wait_f || fade_rsp.op_done)) begin
              if (addr == 32'(NPIX - 4)) begin
                busy <= 1'b0;
                done <= 1'b1;
                st   <= F_IDLE;
              end else begin
                addr     <= addr + 32'd4;
                nrd      <= '0;
                rd_issue <= 1'b1;
                st       <= F_READ;
              end
            end
          end
        end
        default: st <= F_IDLE;
      endcase
    end
  end

endmodule
