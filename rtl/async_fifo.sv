// async_fifo: dual-clock first-word-fall-through FIFO.
//
// Used twice in the system: as the 1024 x 16-bit audio sample buffer that
// carries left-channel samples from the AC97 bit-clock domain into the
// 50 MHz system domain, and as the VGA pixel prefetch buffer from the system
// domain into the 25.2 MHz pixel-clock domain. All clock-domain crossings of
// sample and pixel data go through this FIFO.
//
// How it works: binary read and write pointers one bit wider than the
// address are kept in their own domains; their Gray-coded copies cross to
// the other domain through two flip-flops. Full and empty compare the local
// Gray pointer with the synchronised remote one, so both flags are
// conservative (full may linger, empty may linger) but never wrong.
//
// Interface: write side (wclk, wrst_n, wen, wdata, wfull, wcount); read side
// (rclk, rrst_n, ren, rdata, rempty, rcount). rdata shows the oldest word
// whenever rempty is low; ren pops it at the clock edge. wen while full and
// ren while empty are ignored. wcount/rcount are fill levels as seen from
// each side. Depth and width are parameters; the default 1024 x 16 is the
// sample buffer's size. DEPTH must be a power of two.
module async_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wen,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  output logic [AW:0]      wcount,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             ren,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty,
  output logic [AW:0]      rcount
);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic do_write;
  assign wfull    = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign do_write = wen && !wfull;
  assign wcount   = wbin - gray2bin(rgray_w2);

  always_ff @(posedge wclk) begin
    if (do_write) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_write) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // ---------------- read domain ----------------
  logic do_read;
  assign rempty  = (rgray == wgray_r2);
  assign do_read = ren && !rempty;
  assign rdata   = mem[rbin[AW-1:0]];
  assign rcount  = gray2bin(wgray_r2) - rbin;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (do_read) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule
