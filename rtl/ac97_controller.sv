// ac97_controller: AC-link controller for the AC97 codec, with an OPB
// register interface and a sample output into the audio sample buffer.
//
// AC-link (AC'97 standard): the codec supplies BIT_CLK (12.288 MHz); the
// controller frames 256-bit frames (48 kHz) with SYNC, which is high during
// the 16-bit tag slot 0. Slots 1..12 have 20 bits each, MSB first. Slot 1
// carries a codec register address, slot 2 its data; slot 3 of the input
// stream carries the left-channel PCM sample.
//
// What this block does:
//   * drives SYNC and SDATA_OUT; a codec register write requested over OPB
//     is sent in the next frame with tag bits "frame valid, slot 1 valid,
//     slot 2 valid" (this is how software selects the line input);
//   * captures the input stream; when the input tag says "codec ready" and
//     "slot 3 valid" and recording is enabled, the top 16 bits of slot 3 are
//     pushed into the sample FIFO. Only the left channel is recorded. A sample
//     that finds the FIFO full is dropped and counted.
//
// Bit timing: SYNC and SDATA_OUT change on the rising edge of BIT_CLK, so
// output bit k fills the k-th bit period (SYNC rises with bit 0) and the
// codec can take it on the falling edge. The codec sees SYNC on that falling
// edge and answers from the next rising edge, so input bit k fills period
// k+1; it is captured on the falling edge in the middle of that period and
// used by the rising-edge logic at the end of it.
//
// Clock crossings: sample data crosses through the sample FIFO (outside
// this block). Control crosses as quasi-static levels through two-flop
// synchronisers, and a register-write request as a toggle handshake whose
// address/data are held stable until it is acknowledged.
//
// OPB registers (word offsets from BASE):
//   0 CTRL   rw  bit0 record enable, bit1 codec reset release (ac97_reset_n)
//   1 CMD    w   bits 22:16 codec register index, bits 15:0 data: start write
//            r   bit0 write still pending
//   2 STATUS r   bit0 write pending, bit1 codec ready, bits 31:16 dropped samples
// All are acknowledged one cycle after select.
module ac97_controller
  import av_pkg::*;
#(
  parameter logic [31:0] BASE = AC97_BASE
) (
  // system domain
  input  logic        clk,
  input  logic        rst_n,
  input  opb_req_t    opb_req,
  output opb_rsp_t    opb_rsp,
  // AC-link (bit clock domain)
  input  logic        bit_clk,
  input  logic        bit_rst_n,
  output logic        ac97_sync,
  output logic        ac97_sdata_out,
  input  logic        ac97_sdata_in,
  output logic        ac97_reset_n,
  // sample FIFO write side (bit clock domain)
  output logic        smp_wen,
  output logic [15:0] smp_wdata,
  input  logic        smp_wfull,
  output logic        frame_start
);

  localparam int unsigned SLOT3_END = 16 + 3 * 20 - 1;  // last bit of slot 3

  // bit-clock-domain state read by the system side
  logic        cmd_ack_t;
  logic        codec_ready;
  logic [15:0] drop_cnt;

  // ---------------- system domain: OPB registers ----------------
  logic        ack;
  logic [31:0] rdata_q;
  logic        rec_en, codec_rst_rel;
  logic [6:0]  cmd_addr;
  logic [15:0] cmd_data;
  logic        cmd_req_t;                 // toggles per request
  logic [1:0]  cmd_ack_s;                 // synchronised acknowledge toggle
  logic [1:0]  rdy_s;
  logic [15:0] drop_s1, drop_s2;
  logic        cmd_busy;
  logic        hit;
  logic [1:0]  reg_idx;

  assign hit      = opb_req.select && ((opb_req.addr & REG_MASK) == BASE) && !ack;
  assign reg_idx  = opb_req.addr[3:2];
  assign cmd_busy = (cmd_req_t != cmd_ack_s[1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack           <= 1'b0;
      rdata_q       <= '0;
      rec_en        <= 1'b0;
      codec_rst_rel <= 1'b0;
      cmd_addr      <= '0;
      cmd_data      <= '0;
      cmd_req_t     <= 1'b0;
      cmd_ack_s     <= '0;
      rdy_s         <= '0;
      drop_s1       <= '0;
      drop_s2       <= '0;
    end else begin
      ack       <= hit;
      cmd_ack_s <= {cmd_ack_s[0], cmd_ack_t};
      rdy_s     <= {rdy_s[0], codec_ready};
      drop_s1   <= drop_cnt;              // slowly changing counter, display only
      drop_s2   <= drop_s1;
      if (hit) begin
        if (opb_req.rnw) begin
          case (reg_idx)
            2'd0:    rdata_q <= {30'd0, codec_rst_rel, rec_en};
            2'd1:    rdata_q <= {31'd0, cmd_busy};
            2'd2:    rdata_q <= {drop_s2, 14'd0, rdy_s[1], cmd_busy};
            default: rdata_q <= '0;
          endcase
        end else begin
          rdata_q <= '0;
          case (reg_idx)
            2'd0: begin
              rec_en        <= opb_req.wdata[0];
              codec_rst_rel <= opb_req.wdata[1];
            end
            2'd1: if (!cmd_busy) begin
              cmd_addr  <= opb_req.wdata[22:16];
              cmd_data  <= opb_req.wdata[15:0];
              cmd_req_t <= ~cmd_req_t;
            end
            default: ;
          endcase
        end
      end
    end
  end

  always_comb begin
    opb_rsp = '0;
    if (ack) begin
      opb_rsp.xfer_ack = 1'b1;
      opb_rsp.rdata    = rdata_q;
    end
  end

  assign ac97_reset_n = codec_rst_rel;

  // ---------------- bit clock domain: AC-link ----------------
  logic [7:0]  cnt;          // bit index of the current output period
  logic [7:0]  in_idx;       // bit index of the input bit sampled now
  logic [1:0]  rec_s, req_s;
  logic        req_seen;     // last request toggle already taken
  logic        cmd_pend, cmd_in_frame;
  logic [15:0] out_tag;
  logic [19:0] out_slot1, out_slot2;
  logic [19:0] in_sr;
  logic        sdi_q;        // SDATA_IN captured on the falling edge
  logic [15:0] in_tag;
  logic [7:0]  nxt;
  logic        nxt_bit;

  assign nxt    = cnt + 8'd1;
  assign in_idx = cnt - 8'd1;

  // Output bit for frame position p.
  function automatic logic out_bit(input logic [7:0] p, input logic [15:0] tag,
                                   input logic [19:0] s1, input logic [19:0] s2);
    if (p < 8'd16)      return tag[15 - p];
    else if (p < 8'd36) return s1[19 - (p - 8'd16)];
    else if (p < 8'd56) return s2[19 - (p - 8'd36)];
    else                return 1'b0;
  endfunction

  assign nxt_bit = out_bit(nxt, out_tag, out_slot1, out_slot2);

  // The codec changes SDATA_IN on the rising edge; take it on the falling
  // edge, in the middle of the bit period, as the AC-link timing intends.
  always_ff @(negedge bit_clk or negedge bit_rst_n) begin
    if (!bit_rst_n) sdi_q <= 1'b0;
    else            sdi_q <= ac97_sdata_in;
  end

  always_ff @(posedge bit_clk or negedge bit_rst_n) begin
    if (!bit_rst_n) begin
      cnt            <= 8'd255;
      rec_s          <= '0;
      req_s          <= '0;
      req_seen       <= 1'b0;
      cmd_pend       <= 1'b0;
      cmd_in_frame   <= 1'b0;
      cmd_ack_t      <= 1'b0;
      out_tag        <= '0;
      out_slot1      <= '0;
      out_slot2      <= '0;
      in_sr          <= '0;
      in_tag         <= '0;
      codec_ready    <= 1'b0;
      drop_cnt       <= '0;
      smp_wen        <= 1'b0;
      smp_wdata      <= '0;
      ac97_sync      <= 1'b0;
      ac97_sdata_out <= 1'b0;
      frame_start    <= 1'b0;
    end else begin
      rec_s       <= {rec_s[0], rec_en};
      req_s       <= {req_s[0], cmd_req_t};
      smp_wen     <= 1'b0;
      frame_start <= 1'b0;

      // new register-write request from the system domain
      if (req_s[1] != req_seen && !cmd_pend) begin
        req_seen <= req_s[1];
        cmd_pend <= 1'b1;
      end

      // ---- output side ----
      cnt <= nxt;
      if (nxt == 8'd0) begin
        // frame boundary: load the slots for the frame that starts now
        frame_start <= 1'b1;
        cmd_in_frame <= cmd_pend;
        if (cmd_in_frame) begin
          cmd_ack_t <= ~cmd_ack_t;            // previous frame carried it
          cmd_pend  <= 1'b0;
        end
        if (cmd_pend && !cmd_in_frame) begin
          out_tag   <= 16'hE000;              // valid frame, slot 1, slot 2
          out_slot1 <= {1'b0, cmd_addr, 12'd0};
          out_slot2 <= {cmd_data, 4'd0};
          ac97_sdata_out <= 1'b1;             // tag bit 15
        end else begin
          cmd_in_frame <= 1'b0;
          out_tag   <= 16'h0000;
          out_slot1 <= '0;
          out_slot2 <= '0;
          ac97_sdata_out <= 1'b0;
        end
        ac97_sync <= 1'b1;
      end else begin
        ac97_sync      <= (nxt < 8'd16);
        ac97_sdata_out <= nxt_bit;
      end

      // ---- input side: bit in_idx is on the line now ----
      in_sr <= {in_sr[18:0], sdi_q};
      if (in_idx == 8'd15) begin
        in_tag      <= {in_sr[14:0], sdi_q};
        codec_ready <= in_sr[14];             // tag bit 15
      end
      if (in_idx == 8'(SLOT3_END)) begin
        if (in_tag[15] && in_tag[12] && rec_s[1]) begin
          if (smp_wfull) drop_cnt <= drop_cnt + 1'b1;
          else begin
            smp_wen   <= 1'b1;
            smp_wdata <= in_sr[18:3];         // slot bits 19:4
          end
        end
      end
    end
  end

endmodule
