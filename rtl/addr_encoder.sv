// addr_encoder: peripheral address registers of one array edge.
//
// Each column (or row) of the array has a wire-OR line that the selected
// pixel pulls active. At the end of every line sits a static register holding
// that line's 1-based address (1..N); the active line puts its register on
// the address bus. Only one line is active at a time, so the bus is the OR of
// the gated registers. The address is W = trunc(log2 N) + 1 bits wide, enough
// for the value N itself. Keeping the addresses at the periphery rather than
// in the pixels, the 1-based numbering and the width follow the chip; `valid`
// (some line active) is an addition of this design.
//
// Interface: lines[N] in, addr[W] and valid out, purely combinational.
module addr_encoder #(
  parameter int unsigned N = 64,
  parameter int unsigned W = $clog2(N + 1)
) (
  input  logic [N-1:0] lines,
  output logic [W-1:0] addr,
  output logic         valid
);
  always_comb begin
    addr = '0;
    for (int unsigned i = 0; i < N; i++)
      if (lines[i]) addr |= W'(i + 1);
  end

  assign valid = |lines;
endmodule
