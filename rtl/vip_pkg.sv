// vip_pkg: widths and types shared by the pixel readout chip.
//
// The time-stamp width (5 bits, 32 time slices per bunch train) is the
// chip's own number. The widths of the modelled analog quantities (charge in
// electrons, ramp and sample codes) are choices of this model: analog levels
// are carried as signed integers so that the readout logic can be simulated
// end to end.
package vip_pkg;
  // Digital time stamp: 5-bit Gray code, 32 slices per bunch train.
  localparam int unsigned TS_W = 5;
  // Signed charge / analog sample word, in electrons at the integrator input.
  localparam int unsigned Q_W = 16;
  // Analog time-stamp ramp code width.
  localparam int unsigned A_W = 10;
  // Status bits carried with every hit in the serial word.
  localparam int unsigned ST_W = 2;

  typedef logic signed [Q_W-1:0] charge_t;
  typedef logic [A_W-1:0]        ramp_t;
  typedef logic [TS_W-1:0]       tstamp_t;

  // Width of a 1-based address able to hold 1..n: trunc(log2 n) + 1.
  function automatic int unsigned addr_width(input int unsigned n);
    return $clog2(n + 1);
  endfunction
endpackage
