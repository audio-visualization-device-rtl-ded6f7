// pb_cpld_ctrl: push button controller on the board's CPLD.
//
// The ten push buttons cannot reach the FPGA directly, so this controller
// watches them and sends their states to the FPGA over one serial line.
// A frame is sent when ENTER is pressed (rising edge) and the other nine
// buttons differ from what was last sent; the frame carries all ten states
// as sampled at that moment. The trigger rule is the one the board's
// controller follows; the line format is this design's own: idle high, one
// start bit (0), N_BUTTONS data bits LSB first, one stop bit (1), each bit
// BIT_CYCLES clocks long. pb_receiver decodes the same format.
//
// Buttons are active high and pass through a two-flop synchroniser; no
// debouncing is done here. ENTER_IDX selects which button is ENTER.
module pb_cpld_ctrl #(
  parameter int unsigned N_BUTTONS  = 10,
  parameter int unsigned ENTER_IDX  = 9,
  parameter int unsigned BIT_CYCLES = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_BUTTONS-1:0] buttons,
  output logic                 pb_serial,
  output logic                 sending
);

  localparam int unsigned FRAME_BITS = N_BUTTONS + 2;
  localparam int unsigned BCW = $clog2(BIT_CYCLES);
  localparam int unsigned FCW = $clog2(FRAME_BITS + 1);

  logic [N_BUTTONS-1:0] s1, s2, last_sent;
  logic                 enter_q;
  logic [FRAME_BITS-1:0] shreg;
  logic [BCW-1:0]       bcnt;
  logic [FCW-1:0]       bits_left;
  logic [N_BUTTONS-1:0] others_mask;
  logic                 trigger;

  always_comb begin
    others_mask = '1;
    others_mask[ENTER_IDX] = 1'b0;
  end

  assign trigger = s2[ENTER_IDX] && !enter_q &&
                   ((s2 & others_mask) != (last_sent & others_mask));
  assign sending = (bits_left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1        <= '0;
      s2        <= '0;
      enter_q   <= 1'b0;
      last_sent <= '0;
      shreg     <= '1;
      bcnt      <= '0;
      bits_left <= '0;
      pb_serial <= 1'b1;
    end else begin
      s1      <= buttons;
      s2      <= s1;
      enter_q <= s2[ENTER_IDX];
      if (!sending) begin
        pb_serial <= 1'b1;
        if (trigger) begin
          last_sent <= s2;
          shreg     <= {1'b1, s2, 1'b0};
          bits_left <= FCW'(FRAME_BITS);
          bcnt      <= '0;
        end
      end else begin
        pb_serial <= shreg[0];
        if (bcnt == BCW'(BIT_CYCLES - 1)) begin
          bcnt      <= '0;
          shreg     <= {1'b1, shreg[FRAME_BITS-1:1]};
          bits_left <= bits_left - 1'b1;
        end else begin
          bcnt <= bcnt + 1'b1;
        end
      end
    end
  end

endmodule
