// pixel_ts_mem: digital time-stamp store of one pixel (middle tier).
//
// W static one-bit cells hold the time slice in which the pixel was hit. At
// the start of the bunch train every cell is preset to 1. While the pixel's
// hit pulse is high, a cell can only be pulled from 1 to 0, when the bus bit
// it watches is 0; a cell never goes from 0 back to 1 until the next preset.
// One hit therefore stores the code present on the bus at that moment. During
// readout the stored word is driven onto the column bus only while the pixel
// is selected (release_data); otherwise the pixel drives zeros, so the column
// bus can be formed as an OR of all pixels.
//
// The preset, the 1-to-0 only rule and the hit gating follow the chip. The
// clocked (rather than asynchronous) write and the zero-when-idle bus drive
// are choices of this model.
//
// Interface: clk, rst_n (presets cells), preset (train start), hit,
// code_in (time-stamp bus as seen by the pixel), release_data,
// ts_out (stored code while released, else 0). Cells update one clock after
// hit; ts_out is combinational from release_data.
module pixel_ts_mem #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         preset,
  input  logic         hit,
  input  logic [W-1:0] code_in,
  input  logic         release_data,
  output logic [W-1:0] ts_out
);
  logic [W-1:0] cells;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cells <= '1;
    else if (preset) cells <= '1;
    else if (hit)    cells <= cells & code_in;  // only 1 -> 0 transitions
  end

  assign ts_out = release_data ? cells : '0;
endmodule
