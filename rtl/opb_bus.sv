// opb_bus: On-chip Peripheral Bus interconnect for one master (the
// processor) and NS slaves.
//
// The master's request is broadcast to every slave; each slave decodes its
// own address window. Slave responses are OR-ed, which is correct because a
// slave that is not addressed drives all response bits low. If no slave
// acknowledges within TIMEOUT cycles and none asserts tout_sup, the bus
// answers the transfer itself (xfer_ack with zero data) and pulses timeout,
// so a stray address cannot hang the processor. It also flags (multi_ack)
// a cycle in which more than one slave acknowledges. TIMEOUT = 16 follows
// the usual OPB rule; the rest is this design's choice.
module opb_bus
  import av_pkg::*;
#(
  parameter int unsigned NS      = 8,
  parameter int unsigned TIMEOUT = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  opb_req_t m_req,
  output opb_rsp_t m_rsp,
  output logic     timeout,
  output logic     multi_ack,
  output opb_req_t s_req [NS],
  input  opb_rsp_t s_rsp [NS]
);

  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  opb_rsp_t    or_rsp;
  logic [TW-1:0] wait_cnt;
  logic        to_ack;
  int unsigned n_ack;

  always_comb begin
    or_rsp = '0;
    n_ack  = 0;
    for (int i = 0; i < int'(NS); i++) begin
      or_rsp = or_rsp | s_rsp[i];
      n_ack  = n_ack + 32'(s_rsp[i].xfer_ack);
    end
  end

  for (genvar i = 0; i < int'(NS); i++) begin : g_bcast
    assign s_req[i] = to_ack ? '0 : m_req;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_cnt <= '0;
      to_ack   <= 1'b0;
    end else begin
      to_ack <= 1'b0;
      if (!m_req.select || or_rsp.xfer_ack || or_rsp.tout_sup || to_ack) begin
        wait_cnt <= '0;
      end else if (wait_cnt == TW'(TIMEOUT - 1)) begin
        wait_cnt <= '0;
        to_ack   <= 1'b1;
      end else begin
        wait_cnt <= wait_cnt + 1'b1;
      end
    end
  end

  always_comb begin
    m_rsp          = or_rsp;
    m_rsp.xfer_ack = or_rsp.xfer_ack | to_ack;
  end

  assign timeout   = to_ack;
  assign multi_ack = (n_ack > 1);

endmodule
