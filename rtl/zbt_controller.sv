// zbt_controller: controller for one 2 MB ZBT (zero bus turnaround)
// synchronous SRAM, with three request sources.
//
// Sources, in fixed priority order:
//   port 0  custom memory interface (MIF) for the VGA controller (front buffer)
//   port 1  custom memory interface for the rendering module (back/fade buffer)
//   port 2  OPB slave, used by software rendering (single-word accesses)
// The VGA port comes first because the display must never starve; the OPB
// port asserts tout_sup while it waits so the bus does not time it out.
//
// MIF protocol (per port). A port pulses read or write for one cycle with
// addr (word address), be, burst_size (n means n+1 words, 1..4) and, for a
// write, the first data word on write_data. It must not pulse again until
// its op_done. The request is latched, so it may wait while another port is
// served. Once granted, the controller issues one word address per cycle:
//   * op_done is high in the cycle the last address is issued; in the next
//     cycle another operation (from any port) can already be issued, while
//     the previous one is still completing inside the RAM (overlap);
//   * write: write_data_request is high while words 1..n-1 are issued; in
//     the cycle after each request the port presents the next word;
//   * read: read_data_ready is high for one cycle per word, four cycles
//     after that word's address was issued, with the word on read_data.
// For an uncontended 4-word burst requested in cycle c: addresses in c+1..c+4,
// op_done in c+4, read data in c+5..c+8; for a write, write_data_request in
// c+1..c+3. These are the cycle counts of the interface this design follows;
// the exact register stages behind them are this design's own.
//
// RAM side: every pin is registered. Address and controls reach the RAM one
// cycle after issue; the RAM (pipelined ZBT, two-cycle latency) expects
// write data two cycles after the address and returns read data two cycles
// after it, which is registered once more. The bidirectional data pins are
// split into zbt_dq_o / zbt_dq_oe / zbt_dq_i.
//
// OPB window: BASE..BASE+2 MB, byte address, word (addr/4) access with byte
// enables; acknowledged when the write is issued or the read data returns.
module zbt_controller
  import av_pkg::*;
#(
  parameter int unsigned ADDR_W = 19,             // 512K x 32-bit words = 2 MB
  parameter logic [31:0] BASE   = ZBT0_BASE
) (
  input  logic              clk,
  input  logic              rst_n,
  // custom memory interfaces: [0] VGA, [1] render
  input  mif_req_t          mif_req [2],
  output mif_rsp_t          mif_rsp [2],
  // OPB slave
  input  opb_req_t          opb_req,
  output opb_rsp_t          opb_rsp,
  // ZBT RAM pins
  output logic [ADDR_W-1:0] zbt_addr,
  output logic              zbt_cen_n,
  output logic              zbt_we_n,
  output logic [3:0]        zbt_bw_n,
  output logic [31:0]       zbt_dq_o,
  output logic              zbt_dq_oe,
  input  logic [31:0]       zbt_dq_i
);

  localparam int unsigned NP = 3;

  // ---------------- request sources ----------------
  mif_req_t    src_req [NP];
  mif_req_t    req_q   [NP];
  logic [NP-1:0] pulse, pend_q, eff_pend;
  mif_req_t    eff_req [NP];

  logic opb_out, opb_wack, opb_hit;

  assign opb_hit = opb_req.select && ((opb_req.addr & ZBT_MASK) == BASE);

  always_comb begin
    src_req[0] = mif_req[0];
    src_req[1] = mif_req[1];
    src_req[2] = '0;
    if (opb_hit && !opb_out && !opb_rsp.xfer_ack) begin
      src_req[2].read       = opb_req.rnw;
      src_req[2].write      = !opb_req.rnw;
      src_req[2].addr       = 32'((opb_req.addr - BASE) >> 2);
      src_req[2].be         = opb_req.be;
      src_req[2].write_data = opb_req.wdata;
      src_req[2].burst_size = 2'd0;
    end
    for (int i = 0; i < NP; i++) begin
      pulse[i]    = src_req[i].read || src_req[i].write;
      eff_pend[i] = pend_q[i] || pulse[i];
      eff_req[i]  = pend_q[i] ? req_q[i] : src_req[i];
    end
  end

  // ---------------- issue state ----------------
  logic              iss_active, iss_write, iss_first;
  logic [1:0]        iss_src;
  logic [1:0]        iss_left;
  logic [ADDR_W-1:0] iss_addr;
  logic [3:0]        iss_be;
  logic [31:0]       iss_wd1;
  logic              free, last;
  logic              grant_v;
  logic [1:0]        grant;
  logic [31:0]       iss_data;

  assign last = iss_active && (iss_left == 2'd0);
  assign free = !iss_active || last;

  always_comb begin
    grant_v = 1'b0;
    grant   = 2'd0;
    for (int i = NP - 1; i >= 0; i--) begin
      if (eff_pend[i]) begin
        grant_v = free;
        grant   = 2'(i);
      end
    end
  end

  always_comb begin
    if (iss_first || iss_src == 2'd2) iss_data = iss_wd1;
    else if (iss_src == 2'd0)         iss_data = mif_req[0].write_data;
    else                              iss_data = mif_req[1].write_data;
  end

  // read pipeline: valid + source for each issued read, 3 stages to the pins
  logic [2:0] rd_v;
  logic [1:0] rd_src [3];
  logic       rdv;
  logic [1:0] rsrc;
  logic [31:0] rdq;
  logic [31:0] w1, w2;
  logic        w1v, w2v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q     <= '0;
      for (int i = 0; i < NP; i++) req_q[i] <= '0;
      iss_active <= 1'b0;
      iss_write  <= 1'b0;
      iss_first  <= 1'b0;
      iss_src    <= '0;
      iss_left   <= '0;
      iss_addr   <= '0;
      iss_be     <= '0;
      iss_wd1    <= '0;
      opb_out    <= 1'b0;
      opb_wack   <= 1'b0;
      zbt_addr   <= '0;
      zbt_cen_n  <= 1'b1;
      zbt_we_n   <= 1'b1;
      zbt_bw_n   <= '1;
      w1 <= '0; w2 <= '0; w1v <= 1'b0; w2v <= 1'b0;
      zbt_dq_o   <= '0;
      zbt_dq_oe  <= 1'b0;
      rd_v       <= '0;
      for (int i = 0; i < 3; i++) rd_src[i] <= '0;
      rdv        <= 1'b0;
      rsrc       <= '0;
      rdq        <= '0;
    end else begin
      // latch new requests
      for (int i = 0; i < NP; i++) begin
        if (pulse[i] && !pend_q[i]) req_q[i] <= src_req[i];
        if (pulse[i])               pend_q[i] <= 1'b1;
      end
      if (pulse[2]) opb_out <= 1'b1;

      // advance / start issue
      if (grant_v) begin
        pend_q[grant] <= 1'b0;
        iss_active    <= 1'b1;
        iss_src       <= grant;
        iss_write     <= eff_req[grant].write;
        iss_addr      <= eff_req[grant].addr[ADDR_W-1:0];
        iss_left      <= eff_req[grant].burst_size;
        iss_be        <= eff_req[grant].be;
        iss_wd1       <= eff_req[grant].write_data;
        iss_first     <= 1'b1;
      end else if (iss_active) begin
        iss_first <= 1'b0;
        iss_addr  <= iss_addr + 1'b1;
        iss_left  <= iss_left - 1'b1;
        if (last) iss_active <= 1'b0;
      end

      // RAM pins (registered)
      zbt_cen_n <= !iss_active;
      zbt_we_n  <= !(iss_active && iss_write);
      zbt_addr  <= iss_addr;
      zbt_bw_n  <= (iss_active && iss_write) ? ~iss_be : 4'b0000;

      // write data: two cycles behind the address at the pins
      w1v       <= iss_active && iss_write;
      w1        <= iss_data;
      w2v       <= w1v;
      w2        <= w1;
      zbt_dq_oe <= w2v;
      zbt_dq_o  <= w2;

      // read data: returned on the pins three cycles after issue, registered
      rd_v      <= {rd_v[1:0], iss_active && !iss_write};
      rd_src[0] <= iss_src;
      rd_src[1] <= rd_src[0];
      rd_src[2] <= rd_src[1];
      rdv       <= rd_v[2];
      rsrc      <= rd_src[2];
      rdq       <= zbt_dq_i;

      // OPB completion
      opb_wack <= last && iss_write && (iss_src == 2'd2);
      if (opb_rsp.xfer_ack) opb_out <= 1'b0;
    end
  end

  // ---------------- responses ----------------
  always_comb begin
    for (int i = 0; i < 2; i++) begin
      mif_rsp[i].read_data          = rdq;
      mif_rsp[i].read_data_ready    = rdv && (rsrc == 2'(i));
      mif_rsp[i].op_done            = last && (iss_src == 2'(i));
      mif_rsp[i].write_data_request = iss_active && iss_write && (iss_left != 2'd0)
                                      && (iss_src == 2'(i));
    end
    opb_rsp          = '0;
    opb_rsp.tout_sup = opb_out;
    if (opb_wack) opb_rsp.xfer_ack = 1'b1;
    if (rdv && rsrc == 2'd2) begin
      opb_rsp.xfer_ack = 1'b1;
      opb_rsp.rdata    = rdq;
    end
  end

  // A port may not pulse while its previous operation is still waiting or
  // issuing addresses (other than in its op_done cycle, which ends it).
  for (genvar i = 0; i < 2; i++) begin : g_chk
    a_rw: assert property (@(posedge clk) disable iff (!rst_n)
                           !(mif_req[i].read && mif_req[i].write))
      else $error("zbt_controller: port %0d read and write together", i);
    a_one: assert property (@(posedge clk) disable iff (!rst_n)
                            !(pulse[i] && pend_q[i]))
      else $error("zbt_controller: port %0d request while one is pending", i);
  end

endmodule
