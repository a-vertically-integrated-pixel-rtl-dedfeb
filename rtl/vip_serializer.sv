// vip_serializer: peripheral serializer of the hit data.
//
// Every hit pixel leaves the chip as one serial word:
//   sync(1) | X address (XW) | Y address (YW) | time stamp (TW) | status (2)
// sent most significant bit first, one bit per serial clock, so a hit takes
// 1 + XW + YW + TW + 2 clocks (22 for a 64 x 64 array at 5-bit time stamps).
// The word content (addresses, time stamp, a sync bit, a few status bits)
// and the bit-per-clock timing follow the chip. The field order, the sync
// bit value (1) and the meaning of the two status bits are choices of this
// design: status[1] = `last`, set when the readout token has already left the
// array when the word is loaded (no further hit pixel follows); status[0] =
// even parity over the X, Y and time-stamp fields.
//
// Interface: clk (the serial clock), rst_n, load (NewSerialWord, a one-clock
// strobe that captures the parallel inputs), x, y, ts, last; serial_out. The
// sync bit appears on serial_out in the clock after load; the line is 0 when
// idle. A new word can be loaded every FW clocks for a continuous stream.
module vip_serializer #(
  parameter int unsigned XW = 7,
  parameter int unsigned YW = 7,
  parameter int unsigned TW = 5,
  parameter int unsigned FW = 1 + XW + YW + TW + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [XW-1:0] x,
  input  logic [YW-1:0] y,
  input  logic [TW-1:0] ts,
  input  logic          last,
  output logic          serial_out
);
  logic [FW-1:0] sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sreg <= '0;
    else if (load) sreg <= {1'b1, x, y, ts, last, ^{x, y, ts}};
    else           sreg <= sreg << 1;
  end

  assign serial_out = sreg[FW-1];
endmodule
