// clock_gate: integrated clock gating cell (latch plus AND).
//
// gclk = clk AND en_lat, where en_lat is a level-sensitive latch that is
// transparent while clk is low. The enable is therefore sampled at the rising
// clock edge and held for the whole high phase, so a change of en at any time
// can never produce a runt pulse on gclk. A register clocked by gclk behaves as
// a register clocked by clk that loads only in cycles where en was high before
// the edge, while its clock pin sees no toggling in the other cycles.
//
// The same cell serves two purposes in this design: as the global gating cell
// that switches one whole AES core off through its EN pin, and as the local
// gating cell in front of each pipeline register bank of a core (enabled by
// the valid bit of the data arriving at that bank).
//
// Ports: clk (free-running clock), en (enable, from logic clocked by clk),
// gclk (gated clock). Timing: en must be stable at the rising edge of clk;
// it may change anywhere in the cycle otherwise.
//
// The latch inferred for en_lat is intended: it is what makes the cell
// glitch-free. In an ASIC flow this module is replaced by the library's ICG
// cell.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;

endmodule
