// ac97_codec_model: behavioural model of an AC97 codec's AC-link side.
// Not synthesizable: it stands for the codec chip. It generates BIT_CLK
// (12.288 MHz), finds the frame start from SYNC, records codec register
// writes sent in slots 1/2, and returns frames whose tag says "codec ready,
// slots 3 and 4 valid" with tb_pkg::tone_sample(n) in slot 3 (left) of its
// n-th frame. It answers one rising edge after it sees each output bit,
// the timing the controller expects. While reset_n is low it sends zeros.
module ac97_codec_model #(
  parameter real HALF_NS = 40.69
) (
  output logic bit_clk,
  input  logic sync,
  input  logic sdata_out,
  output logic sdata_in,
  input  logic reset_n
);
  import tb_pkg::*;

  int          cnt = -1;        // index of the bit just sampled
  int          frames = 0;      // frames returned with a valid sample
  logic        sync_q = 0;
  logic [255:0] in_frame, out_frame;
  logic [15:0] regs [128];
  int          n_reg_writes = 0;
  logic [6:0]  last_reg;

  initial begin
    bit_clk  = 0;
    sdata_in = 0;
    forever #(HALF_NS * 1ns) bit_clk = ~bit_clk;
  end

  function automatic logic [255:0] make_frame(input int n);
    logic [255:0] f;
    logic [19:0]  l, r;
    f = '0;
    l = {tone_sample(n), 4'h0};
    r = {right_sample(n), 4'h0};
    f[255 -: 16] = 16'h9800;             // ready, slot 3, slot 4
    f[255 - 56 -: 20] = l;
    f[255 - 76 -: 20] = r;
    return f;
  endfunction

  always @(posedge bit_clk) begin
    sync_q <= sync;
    if (sync && !sync_q) cnt = 0;
    else if (cnt >= 0) cnt = (cnt + 1) % 256;
    if (cnt >= 0) begin
      in_frame[255 - cnt] = sdata_out;
      if (cnt == 0) begin
        if (reset_n) begin
          out_frame = make_frame(frames);
          frames++;
        end else out_frame = '0;
      end
      sdata_in <= out_frame[255 - cnt];
      if (cnt == 255) begin
        if (in_frame[255] && in_frame[254] && in_frame[253] && !in_frame[255-16]) begin
          last_reg = in_frame[255-17 -: 7];
          regs[last_reg] = in_frame[255-36 -: 16];
          n_reg_writes++;
        end
      end
    end
  end
endmodule
