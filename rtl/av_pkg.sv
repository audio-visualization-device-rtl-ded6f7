// av_pkg: types and constants shared by the audio visualization system.
//
// The system moves data over three kinds of connection, and each gets a
// packed struct here so that modules and the top can pass whole bundles:
//   * OPB: the processor's peripheral bus. A master holds a request (select,
//     read-not-write, byte address, byte enables, write data) until one slave
//     returns a one-cycle transfer acknowledge; read data is valid only with
//     that acknowledge and is zero otherwise, so slave responses are OR-ed.
//     tout_sup asks the bus not to time the transfer out.
//   * MIF: the custom memory interface of the ZBT RAM controller. A requester
//     pulses read or write for one cycle with a word address, byte enables,
//     a burst size (value n means n+1 words) and, for writes, the first data
//     word. The controller answers with op_done, write_data_request and
//     read_data_ready strobes; see zbt_controller for the cycle timing.
//   * The render command opcodes carried over the FSL link.
// The signal names of MIF follow the custom interface of the memory
// controller; the address map and opcode values are this design's choice.
package av_pkg;

  typedef struct packed {
    logic        select;
    logic        rnw;
    logic [31:0] addr;
    logic [3:0]  be;
    logic [31:0] wdata;
  } opb_req_t;

  typedef struct packed {
    logic        xfer_ack;
    logic        tout_sup;
    logic [31:0] rdata;
  } opb_rsp_t;

  typedef struct packed {
    logic        read;
    logic        write;
    logic [31:0] addr;
    logic [3:0]  be;
    logic [31:0] write_data;
    logic [1:0]  burst_size;
  } mif_req_t;

  typedef struct packed {
    logic [31:0] read_data;
    logic        read_data_ready;
    logic        write_data_request;
    logic        op_done;
  } mif_rsp_t;

  // Render command opcodes (first word of each FSL command packet).
  typedef enum logic [31:0] {
    OP_CLEAR_BUFFER = 32'd0,
    OP_FADE_BUFFER  = 32'd1,
    OP_FLIP_BUFFER  = 32'd2,
    OP_DRAW_FFT_BIN = 32'd3
  } render_op_e;

  // OPB address map (byte addresses).
  localparam logic [31:0] PB_BASE    = 32'h4000_0000;
  localparam logic [31:0] AC97_BASE  = 32'h4001_0000;
  localparam logic [31:0] FFT_BASE   = 32'h4002_0000;
  localparam logic [31:0] SPEC_BASE  = 32'h4003_0000;
  localparam logic [31:0] VGA_BASE   = 32'h4004_0000;
  localparam logic [31:0] REND_BASE  = 32'h4005_0000;
  localparam logic [31:0] ZBT0_BASE  = 32'h5000_0000;
  localparam logic [31:0] ZBT1_BASE  = 32'h5020_0000;
  localparam logic [31:0] ZBT2_BASE  = 32'h5040_0000;
  localparam logic [31:0] REG_MASK   = 32'hFFFF_0000;  // 64 KiB register windows
  localparam logic [31:0] ZBT_MASK   = 32'hFFE0_0000;  // 2 MiB memory windows

  // Saturating per-channel subtraction on a 0x00RRGGBB pixel.
  function automatic logic [31:0] fade_pixel(input logic [31:0] pix,
                                             input logic [31:0] amount);
    logic [31:0] r;
    r = '0;
    for (int c = 0; c < 3; c++) begin
      r[8*c +: 8] = (pix[8*c +: 8] > amount[8*c +: 8]) ?
                    pix[8*c +: 8] - amount[8*c +: 8] : 8'd0;
    end
    return r;
  endfunction

endpackage
