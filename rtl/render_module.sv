// render_module: hardware renderer fed by command packets over FSL.
//
// The processor sends each command as a packet of 32-bit words: an opcode
// followed by its arguments.
//   OP_CLEAR_BUFFER  colour                     fill the back buffer
//   OP_FADE_BUFFER   fade amount (0x00RRGGBB)   back buffer = last frame
//                                               minus amount, per channel
//   OP_FLIP_BUFFER   (none)                     swap back and front buffer
//   OP_DRAW_FFT_BIN  height, x, colour          draw one spectrum bar
// The command set, argument order and meaning follow the design; the opcode
// values (0..3) are this design's choice. An unknown opcode is dropped with
// no arguments.
//
// How it works: a decoder takes words from the FSL FIFO one per cycle,
// collects the arguments, then starts one of three engines (clear_buffer,
// fade_buffer, draw_fft_bin) and waits for its done before reading the next
// packet; a flip is done by the decoder itself. Each engine has a back-buffer
// port and a fade-buffer port; only one engine runs at a time, so their
// requests are OR-ed. The back-buffer port is steered to frame buffer
// back_sel (MIF port 0 or 1); port 2 is the fade buffer's RAM. After reset
// frame buffer 1 is the back buffer (frame buffer 0 is displayed).
//
// Interface: FSL slave (fsl_s_data, fsl_s_exists, fsl_s_read), three MIF
// requester ports, back_sel, idle (no command in progress), and per-command
// completion strobes for monitoring.
//
// OPB status register at BASE (read only, acknowledged one cycle after
// select): bit0 idle (no command running and none waiting in the FSL),
// bit1 back_sel. Software polls it after a flip command before it switches
// the display, so the display never shows a frame that is still being
// drawn. The module has an OPB side in the design it follows; what that
// side holds is this design's choice.
module render_module
  import av_pkg::*;
#(
  parameter int unsigned H_RES = 640,
  parameter int unsigned V_RES = 480,
  parameter logic [31:0] BASE  = REND_BASE
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] fsl_s_data,
  input  logic        fsl_s_exists,
  output logic        fsl_s_read,
  output mif_req_t    mif_req [3],
  input  mif_rsp_t    mif_rsp [3],
  output logic        back_sel,
  output logic        idle,
  output logic [3:0]  cmd_done,     // one-hot per opcode, one cycle
  input  opb_req_t    opb_req,
  output opb_rsp_t    opb_rsp
);

  typedef enum logic [1:0] {D_OPC, D_ARG, D_RUN} dstate_e;

  dstate_e     st;
  render_op_e  op;
  logic [1:0]  nargs, argi;
  logic [31:0] args [3];
  logic        go_clear, go_fade, go_draw;
  logic        busy_c, busy_f, busy_d, done_c, done_f, done_d;
  mif_req_t    c_back, c_fade, f_back, f_fade, d_back, d_fade, back_req, fade_req;
  mif_rsp_t    back_rsp;

  function automatic logic [1:0] n_args(input logic [31:0] opc);
    case (opc)
      OP_CLEAR_BUFFER: return 2'd1;
      OP_FADE_BUFFER:  return 2'd1;
      OP_DRAW_FFT_BIN: return 2'd3;
      default:         return 2'd0;
    endcase
  endfunction

  assign fsl_s_read = fsl_s_exists && (st == D_OPC || st == D_ARG);
  assign idle       = (st == D_OPC) && !fsl_s_exists;

  // ---------------- OPB status register ----------------
  logic        ack, hit;
  logic [31:0] rdata_q;

  assign hit = opb_req.select && ((opb_req.addr & REG_MASK) == BASE) && !ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack     <= 1'b0;
      rdata_q <= '0;
    end else begin
      ack <= hit;
      if (hit) rdata_q <= opb_req.rnw ? {30'd0, back_sel, idle} : 32'd0;
    end
  end

  always_comb begin
    opb_rsp = '0;
    if (ack) begin
      opb_rsp.xfer_ack = 1'b1;
      opb_rsp.rdata    = rdata_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= D_OPC;
      op       <= OP_FLIP_BUFFER;
      nargs    <= '0;
      argi     <= '0;
      for (int i = 0; i < 3; i++) args[i] <= '0;
      go_clear <= 1'b0;
      go_fade  <= 1'b0;
      go_draw  <= 1'b0;
      back_sel <= 1'b1;
      cmd_done <= '0;
    end else begin
      go_clear <= 1'b0;
      go_fade  <= 1'b0;
      go_draw  <= 1'b0;
      cmd_done <= '0;
      case (st)
        D_OPC: if (fsl_s_exists) begin
          op    <= render_op_e'(fsl_s_data);
          nargs <= n_args(fsl_s_data);
          argi  <= '0;
          if (fsl_s_data == OP_FLIP_BUFFER) begin
            back_sel <= ~back_sel;
            cmd_done <= 4'b0100;
          end else if (n_args(fsl_s_data) != 2'd0) begin
            st <= D_ARG;
          end
        end
        D_ARG: if (fsl_s_exists) begin
          args[argi] <= fsl_s_data;
          argi       <= argi + 2'd1;
          if (argi == nargs - 2'd1) begin
            st       <= D_RUN;
            go_clear <= (op == OP_CLEAR_BUFFER);
            go_fade  <= (op == OP_FADE_BUFFER);
            go_draw  <= (op == OP_DRAW_FFT_BIN);
          end
        end
        D_RUN: if (done_c || done_f || done_d) begin
          st       <= D_OPC;
          cmd_done <= {done_d, 1'b0, done_f, done_c};
        end
        default: st <= D_OPC;
      endcase
    end
  end

  clear_buffer #(.H_RES(H_RES), .V_RES(V_RES)) u_clear (
    .clk, .rst_n, .start(go_clear), .colour(args[0]), .busy(busy_c), .done(done_c),
    .back_req(c_back), .back_rsp(back_rsp), .fade_req(c_fade), .fade_rsp(mif_rsp[2]));

  fade_buffer #(.H_RES(H_RES), .V_RES(V_RES)) u_fade (
    .clk, .rst_n, .start(go_fade), .amount(args[0]), .busy(busy_f), .done(done_f),
    .back_req(f_back), .back_rsp(back_rsp), .fade_req(f_fade), .fade_rsp(mif_rsp[2]));

  draw_fft_bin #(.H_RES(H_RES), .V_RES(V_RES)) u_draw (
    .clk, .rst_n, .start(go_draw), .height(args[0]), .x(args[1]), .colour(args[2]),
    .busy(busy_d), .done(done_d),
    .back_req(d_back), .back_rsp(back_rsp), .fade_req(d_fade), .fade_rsp(mif_rsp[2]));

  // Only the running engine drives its requests; idle engines hold them at 0.
  always_comb begin
    back_req = busy_c ? c_back : busy_f ? f_back : busy_d ? d_back : '0;
    fade_req = busy_c ? c_fade : busy_f ? f_fade : busy_d ? d_fade : '0;
    mif_req[0] = back_sel ? '0 : back_req;
    mif_req[1] = back_sel ? back_req : '0;
    mif_req[2] = fade_req;
    back_rsp   = back_sel ? mif_rsp[1] : mif_rsp[0];
  end

endmodule
