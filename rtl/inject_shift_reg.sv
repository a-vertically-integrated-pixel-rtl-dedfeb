// inject_shift_reg: test-pulse enable chain, one flip-flop per pixel.
//
// The flip-flops of all pixels form one shift register. A bit pattern is
// shifted in serially; a pixel whose bit is 1 lets the common test voltage
// step reach its small injection capacitor, so the chosen pattern of pixels
// receives a test charge. Bit 0 is the first pixel of the chain (row 1,
// column 1), and the chain runs in the order the readout token travels; data
// enters at the last pixel and moves towards bit 0, so after LEN shifts the
// first bit shifted in sits in bit 0. The chain order and the shift
// direction are choices of this design. The real cells are dynamic
// flip-flops; this is a static register.
//
// Interface: clk, rst_n, shift (enable), sin; en[LEN] (one bit per pixel),
// sout (bit 0, the end of the chain). Each shift takes one clock.
module inject_shift_reg #(
  parameter int unsigned LEN = 4096
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift,
  input  logic           sin,
  output logic [LEN-1:0] en,
  output logic           sout
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     en <= '0;
    else if (shift) en <= {sin, en[LEN-1:1]};
  end

  assign sout = en[0];
endmodule
