// tiered_crossbar: storage model of the Tiered-crossbar TLC ReRAM arrays.
//
// In a tiered crossbar each long bitline is cut by an isolation transistor
// into a short near segment, next to the write drivers and sense amplifiers,
// and a far segment (near : far = 1 : 3). A near cell is reached with the
// transistor off, so the far part of the bitline and its sneak currents are
// cut off; a far cell needs the transistor on. The analog side (IR drop,
// sneak currents, program-and-verify pulses) is not modelled here: its timing
// and energy live in write_controller.
//
// This module holds LINES line slots of CELLS TLC cells (3-bit states). Line
// addresses below NEAR_LINES = LINES/4 map to the near segments, the rest to
// the far segments. One write port and one read port with a registered
// (one-cycle) read; the controller never uses both in one cycle. `iso_on` is
// the isolation-transistor control of the current access: 1 for a far access.
// The 1:3 split and the transistor behaviour follow the published design; the
// number of lines (one 1024-line slice instead of the 8 GB memory) and the
// address-to-segment mapping are this design's choices.
module tiered_crossbar
  import tr_pkg::*;
#(
  parameter int unsigned LINES      = 1024,
  parameter int unsigned NEAR_LINES = LINES / 4,
  parameter int unsigned ADDR_W     = $clog2(LINES)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  cells_t            wcells,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output cells_t            rcells,
  output logic              waddr_near,  // waddr lies in a near segment
  output logic              raddr_near,  // raddr lies in a near segment
  output logic              iso_on       // isolation transistor on (far access)
);

  cells_t mem [LINES];

  assign waddr_near = (32'(waddr) < NEAR_LINES);
  assign raddr_near = (32'(raddr) < NEAR_LINES);
  assign iso_on     = (we && !waddr_near) || (re && !raddr_near);

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wcells;
    if (re) rcells <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    a_one_access: assert (!(we && re));
  end

endmodule
