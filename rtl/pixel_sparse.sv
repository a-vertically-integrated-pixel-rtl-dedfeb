// pixel_sparse: sparsification cell of one pixel (tier farthest from the
// sensor), the per-pixel part of the look-ahead token readout.
//
// A hit latch (an S-R flip-flop) is set by the hit pulse or, through the same
// OR gate, by read_anyway, which forces a pixel to be read whatever its
// signal. A pixel whose latch is clear is transparent to the token:
// token_out = token_in. A pixel whose latch is set stops the token. When the
// token is present at a set pixel, the next data_clk moves the latch content
// into a D flip-flop whose output is release_data: it selects the pixel (it
// drives the pixel's X and Y wire-OR lines and makes the stored time stamp
// and analog samples visible on the buses) and clears the hit latch. With the
// latch clear the token is passed on at once, so while this pixel is being
// shipped out the token already runs ahead to the next set pixel. The next
// data_clk then deselects this pixel and selects that one.
//
// All of this follows the chip. Choices of this model: the latch and the D
// flip-flop are clocked by the one system clock, data_clk being a one-clock
// enable; the latch clear by release_data is seen by the token logic in the
// same cycle (pending = latch & ~release_data), as the asynchronous clear of
// the real latch would be; clear has priority over set; rst_n clears both.
//
// Interface: clk, rst_n, hit, read_anyway, token_in, data_clk (enable);
// token_out (combinational), release_data (registered).
module pixel_sparse (
  input  logic clk,
  input  logic rst_n,
  input  logic hit,
  input  logic read_anyway,
  input  logic token_in,
  input  logic data_clk,
  output logic token_out,
  output logic release_data
);
  logic hit_latch, sel, pending;

  assign pending   = hit_latch & ~sel;
  assign token_out = token_in & ~pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_latch <= 1'b0;
      sel       <= 1'b0;
    end else begin
      if (sel)                      hit_latch <= 1'b0;
      else if (hit || read_anyway)  hit_latch <= 1'b1;
      if (data_clk)                 sel <= token_in & pending;
    end
  end

  assign release_data = sel;
endmodule
