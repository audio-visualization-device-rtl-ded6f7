// clk_align: reset release for one clock domain.
//
// The system's clocks come from clock managers that need time to lock.
// This block holds its domain in reset while the lock indication is low or
// the external reset is asserted, and after both are good it waits HOLD
// further cycles of its own clock before releasing rst_n synchronously.
// Assertion is asynchronous, release is synchronous to clk (two-flop
// synchroniser followed by a counter). One instance serves each of the
// system, VGA and AC97 bit-clock domains. HOLD is this design's choice.
module clk_align #(
  parameter int unsigned HOLD = 16
) (
  input  logic clk,
  input  logic locked,
  input  logic rst_in,
  output logic rst_n
);

  localparam int unsigned CW = $clog2(HOLD + 1);

  logic          arst_n;
  logic [1:0]    sync;
  logic [CW-1:0] cnt;

  assign arst_n = locked && !rst_in;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      sync  <= '0;
      cnt   <= '0;
      rst_n <= 1'b0;
    end else begin
      sync <= {sync[0], 1'b1};
      if (sync[1] && cnt != CW'(HOLD)) cnt <= cnt + 1'b1;
      rst_n <= (cnt == CW'(HOLD));
    end
  end

endmodule
