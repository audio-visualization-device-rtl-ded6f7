// pb_receiver: push button receiver on the FPGA with an OPB register.
//
// Decodes the serial frames sent by pb_cpld_ctrl (idle high, start bit,
// N_BUTTONS data bits LSB first, stop bit, BIT_CYCLES clocks per bit) and
// stores the button states in a register the processor reads over OPB.
// The line is synchronised with two flip-flops; a falling edge starts a
// frame, each bit is sampled in the middle of its period, and a frame whose
// stop bit is not 1 is discarded.
//
// OPB register at BASE (read only, acknowledged one cycle after select):
//   bits [N_BUTTONS-1:0]  last received button states
//   bit  31               new-state flag, set by a frame, cleared by a read
// Writes are acknowledged and ignored. The register layout is this design's
// own; that the processor reads the states directly from a register
// follows the design it implements.
module pb_receiver
  import av_pkg::*;
#(
  parameter int unsigned N_BUTTONS  = 10,
  parameter int unsigned BIT_CYCLES = 16,
  parameter logic [31:0] BASE       = PB_BASE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pb_serial,
  input  opb_req_t             opb_req,
  output opb_rsp_t             opb_rsp,
  output logic [N_BUTTONS-1:0] pb_state,
  output logic                 frame_rx
);

  localparam int unsigned BCW = $clog2(BIT_CYCLES);
  localparam int unsigned FCW = $clog2(N_BUTTONS + 2);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  rx_state_e            st;
  logic [2:0]           sync;
  logic [BCW-1:0]       bcnt;
  logic [FCW-1:0]       nbit;
  logic [N_BUTTONS-1:0] shreg;
  logic                 new_flag;
  logic                 ack;
  logic                 hit;
  logic                 line;
  logic [31:0]          rdata_q;

  assign line = sync[1];
  assign hit  = opb_req.select && ((opb_req.addr & REG_MASK) == BASE) && !ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= RX_IDLE;
      sync     <= '1;
      bcnt     <= '0;
      nbit     <= '0;
      shreg    <= '0;
      pb_state <= '0;
      new_flag <= 1'b0;
      frame_rx <= 1'b0;
      ack      <= 1'b0;
      rdata_q  <= '0;
    end else begin
      sync     <= {sync[1:0], pb_serial};
      frame_rx <= 1'b0;
      ack      <= hit;
      if (hit) rdata_q <= {new_flag, {(31 - N_BUTTONS){1'b0}}, pb_state};
      if (hit && opb_req.rnw) new_flag <= 1'b0;
      case (st)
        RX_IDLE: begin
          bcnt <= '0;
          if (sync[2] && !line) st <= RX_START;
        end
        RX_START: begin
          if (bcnt == BCW'(BIT_CYCLES / 2 - 1)) begin
            bcnt <= '0;
            nbit <= '0;
            st   <= line ? RX_IDLE : RX_DATA;   // glitch, not a start bit
          end else bcnt <= bcnt + 1'b1;
        end
        RX_DATA: begin
          if (bcnt == BCW'(BIT_CYCLES - 1)) begin
            bcnt  <= '0;
            shreg <= {line, shreg[N_BUTTONS-1:1]};
            nbit  <= nbit + 1'b1;
            if (nbit == FCW'(N_BUTTONS - 1)) st <= RX_STOP;
          end else bcnt <= bcnt + 1'b1;
        end
        RX_STOP: begin
          if (bcnt == BCW'(BIT_CYCLES - 1)) begin
            st <= RX_IDLE;
            if (line) begin
              pb_state <= shreg;
              new_flag <= 1'b1;
              frame_rx <= 1'b1;
            end
          end else bcnt <= bcnt + 1'b1;
        end
        default: st <= RX_IDLE;
      endcase
    end
  end

  always_comb begin
    opb_rsp = '0;
    if (ack) begin
      opb_rsp.xfer_ack = 1'b1;
      opb_rsp.rdata    = opb_req.rnw ? rdata_q : 32'd0;
    end
  end

endmodule
