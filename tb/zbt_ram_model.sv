// zbt_ram_model: behavioural model of a pipelined ZBT SRAM, 32-bit words.
// Not synthesizable logic: it stands for the RAM chip on the board.
// Address and controls are sampled at a rising edge E (cen_n low = access,
// we_n low = write). A read drives the word during the cycle after E+1, so
// the controller samples it at E+2; a write takes its data (under the byte
// write enables bw_n) at E+2. There is no bus turnaround: reads and writes
// may follow each other in any order every cycle.
module zbt_ram_model #(
  parameter int unsigned ADDR_W = 19
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              cen_n,
  input  logic              we_n,
  input  logic [3:0]        bw_n,
  input  logic [31:0]       dq_o,
  input  logic              dq_oe,
  output logic [31:0]       dq_i
);
  logic [31:0] mem [2**ADDR_W];
  logic              wv1, wv2;
  logic [ADDR_W-1:0] wa1, wa2;
  logic [3:0]        wb1, wb2;
  int unsigned       n_reads = 0, n_writes = 0, n_bad = 0;

  logic [ADDR_W-1:0] ra1;

  // A read returns the RAM contents merged with a write to the same word
  // that completes in the same cycle (the chip's late-write forwarding).
  always @(posedge clk) begin
    logic [31:0] v;
    ra1 <= addr;
    v = mem[ra1];
    if (wv2 && wa2 == ra1)
      for (int b = 0; b < 4; b++) if (!wb2[b]) v[8*b +: 8] = dq_o[8*b +: 8];
    dq_i <= v;
    wv1  <= !cen_n && !we_n;
    wa1  <= addr;
    wb1  <= bw_n;
    wv2  <= wv1;
    wa2  <= wa1;
    wb2  <= wb1;
    if (!cen_n && we_n) n_reads++;
    if (wv2) begin
      n_writes++;
      if (!dq_oe) n_bad++;
      for (int b = 0; b < 4; b++)
        if (!wb2[b]) mem[wa2][8*b +: 8] <= dq_o[8*b +: 8];
    end
  end

  initial begin
    wv1 = 0; wv2 = 0; dq_i = 0; ra1 = 0;
  end
endmodule
