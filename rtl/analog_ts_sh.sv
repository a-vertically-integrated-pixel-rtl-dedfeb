// analog_ts_sh: behavioural model of the analog time-stamp sample/hold of
// one pixel (middle tier). This is a model of an analog circuit, not logic
// to be synthesised as it stands.
//
// A slowly rising voltage ramp is distributed from the periphery to all
// pixels during the bunch train. At the rising edge of the pixel's hit pulse
// the sample/hold freezes the ramp value; after the train, while the pixel is
// selected for readout (release_data), the held value is put on a separate
// analog bus towards an off-chip ADC. Voltages are represented here by the
// unsigned code the external ADC would produce, W bits wide (a choice of this
// model). Leakage and droop of the real hold capacitor are not modelled; the
// first rising edge of hit after `preset` is the one that is kept, the chip
// storing a single hit per train.
//
// Interface: clk, rst_n, preset (train start, clears the cell), hit, ramp,
// release_data, an_ts (held value while released, else 0, so the bus is an OR
// of all pixels). The value is sampled on the clock edge at which hit is
// first seen high.
module analog_ts_sh #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         preset,
  input  logic         hit,
  input  logic [W-1:0] ramp,
  input  logic         release_data,
  output logic [W-1:0] an_ts
);
  logic [W-1:0] held;
  logic         taken;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held  <= '0;
      taken <= 1'b0;
    end else if (preset) begin
      held  <= '0;
      taken <= 1'b0;
    end else if (hit && !taken) begin
      held  <= ramp;
      taken <= 1'b1;
    end
  end

  assign an_ts = release_data ? held : '0;
endmodule
