// gray_counter: time-slice counter of the array periphery.
//
// The bunch train is cut into 2**W time slices (W = 5 gives 32). The counter
// is cleared at the start of the train and steps once per time slice; its
// value is broadcast to every pixel as a Gray code, so that only one bus line
// changes per step and a pixel latching the bus during a step sees either the
// old or the new code. The Gray coding, the width and the clear at train
// start follow the chip; the one-cycle `adv` strobe that marks a new slice is
// this design's choice (the slice clock comes from outside the chip).
//
// Interface: clk, active-low asynchronous rst_n, synchronous `clear`
// (train start, has priority), `adv` (step one slice). `gray` is registered
// and changes one clock after `clear` or `adv`. The counter wraps after the
// last slice.
module gray_counter #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         adv,
  output logic [W-1:0] gray
);
  logic [W-1:0] bin, bin_next;

  always_comb begin
    bin_next = bin;
    if (clear)    bin_next = '0;
    else if (adv) bin_next = bin + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin  <= '0;
      gray <= '0;
    end else begin
      bin  <= bin_next;
      gray <= bin_next ^ (bin_next >> 1);
    end
  end
endmodule
