// fft_controller: runs one FFT on the buffered audio samples on request.
//
// The processor starts an FFT by an OPB write and polls the status. The
// controller then waits until the audio sample buffer holds N samples,
// starts the FFT core, and feeds it the N samples, one per cycle while the
// core asserts rfd (ready for data); the sample FIFO is first-word-fall-
// through, so the FIFO's output word is the core's input and rfd pops it.
// The imaginary input is zero. When the core outputs a bin (dv with
// xk_index), the real and imaginary results are sign-extended to 32 bits and
// written into the spectrum buffer at that index. After bin N-1 the
// operation is done.
//
// FFT core interface (burst I/O, natural-order output, as this design
// expects from the core): fft_start pulse; then rfd high for N cycles while
// the core takes xn_re/xn_im; later dv high for N cycles with xk_index,
// xk_re, xk_im (OUT_W bits, unscaled).
//
// OPB registers at BASE (acknowledged one cycle after select):
//   0 CTRL   w  bit0 = 1 starts an FFT (ignored while busy)
//            r  bit0 busy, bit1 done (set at the end, cleared by a start),
//               bit2 waiting for samples
//   1 FILL   r  samples currently in the sample buffer
// Register layout and the "wait for N samples" rule are this design's own.
//
// The data path is only wires: samples go straight from the FIFO to the
// core and results straight to the spectrum buffer, so most output bits
// are inputs passed through (or constant, like the zero imaginary input and
// the sign extension); the controller itself is the sequencing.
module fft_controller
  import av_pkg::*;
#(
  parameter int unsigned N     = 1024,
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 27,
  parameter logic [31:0] BASE  = FFT_BASE,
  localparam int unsigned AW   = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  opb_req_t         opb_req,
  output opb_rsp_t         opb_rsp,
  // sample FIFO read side
  input  logic [IN_W-1:0]  smp_rdata,
  input  logic             smp_rempty,
  input  logic [AW:0]      smp_rcount,
  output logic             smp_ren,
  // FFT core
  output logic             fft_start,
  output logic [IN_W-1:0]  fft_xn_re,
  output logic [IN_W-1:0]  fft_xn_im,
  input  logic             fft_rfd,
  input  logic             fft_dv,
  input  logic [AW-1:0]    fft_xk_index,
  input  logic [OUT_W-1:0] fft_xk_re,
  input  logic [OUT_W-1:0] fft_xk_im,
  // spectrum buffer write port
  output logic             spec_we,
  output logic [AW-1:0]    spec_waddr,
  output logic [31:0]      spec_wre,
  output logic [31:0]      spec_wim,
  output logic             fft_finished
);

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_START, S_LOAD, S_UNLOAD} state_e;

  state_e      st;
  logic        ack, hit, done_flag;
  logic [31:0] rdata_q;
  logic [AW:0] nload;

  assign hit = opb_req.select && ((opb_req.addr & REG_MASK) == BASE) && !ack;

  assign fft_xn_re = smp_rdata;
  assign fft_xn_im = '0;
  assign smp_ren   = (st == S_LOAD) && fft_rfd;

  assign spec_we    = fft_dv && (st == S_UNLOAD);
  assign spec_waddr = fft_xk_index;
  assign spec_wre   = 32'(signed'(fft_xk_re));
  assign spec_wim   = 32'(signed'(fft_xk_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      ack          <= 1'b0;
      rdata_q      <= '0;
      done_flag    <= 1'b0;
      nload        <= '0;
      fft_start    <= 1'b0;
      fft_finished <= 1'b0;
    end else begin
      ack          <= hit;
      fft_start    <= 1'b0;
      fft_finished <= 1'b0;
      if (hit) begin
        if (opb_req.rnw) begin
          rdata_q <= opb_req.addr[2] ? 32'(smp_rcount)
                   : {29'd0, st == S_WAIT, done_flag, st != S_IDLE};
        end else begin
          rdata_q <= '0;
          if (!opb_req.addr[2] && opb_req.wdata[0] && st == S_IDLE) begin
            st        <= S_WAIT;
            done_flag <= 1'b0;
          end
        end
      end
      case (st)
        S_WAIT: if (smp_rcount >= (AW+1)'(N)) begin
          fft_start <= 1'b1;
          nload     <= '0;
          st        <= S_START;
        end
        S_START: st <= S_LOAD;
        S_LOAD: begin
          if (fft_rfd) begin
            nload <= nload + 1'b1;
            if (nload == (AW+1)'(N - 1)) st <= S_UNLOAD;
          end
        end
        S_UNLOAD: if (fft_dv && fft_xk_index == AW'(N - 1)) begin
          st           <= S_IDLE;
          done_flag    <= 1'b1;
          fft_finished <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    opb_rsp = '0;
    if (ack) begin
      opb_rsp.xfer_ack = 1'b1;
      opb_rsp.rdata    = rdata_q;
    end
  end

  // The sample buffer must never run dry while the core is loading.
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(smp_ren && smp_rempty))
    else $error("fft_controller: sample buffer empty during FFT load");

endmodule
