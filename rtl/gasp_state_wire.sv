// gasp_state_wire -- one GasP state wire with its two half keepers.
//
// A state wire links two adjacent GasP modules. HI means FULL (the upstream
// module has, or very soon will have, a message for the downstream one) and
// LO means EMPTY. The upstream module fills it with a P transistor; the
// downstream module drains it with an N transistor. Between drive events
// each end holds one state: the upstream module keeps the wire LO and the
// downstream module keeps it HI, each keeper being shut off while its own
// module drives the wire.
//
// Timing model (shared by every module of this design): one clock period is
// one gate delay, and every gate or drive transistor is one register. The
// wire register therefore is the drive transistor's delay: the wire shows a
// fill or drain one tick after the driver's gate goes active. With neither
// driver on, the register keeps its value, which is what the split keeper
// does. The two-ended wire is split into a drive side (fill, drain) and a
// sense side (full).
//
// Interface: fill (upstream P driver on), drain (downstream N driver on),
// full (wire level). rst loads init_full, which seeds the ring with tokens.
// Fill and drain never overlap in a working GasP circuit; an assertion
// flags the fight if they do, and fill wins in the model.
module gasp_state_wire (
  input  logic clk,
  input  logic rst,
  input  logic init_full,
  input  logic fill,
  input  logic drain,
  output logic full
);

  always_ff @(posedge clk) begin
    if (rst)        full <= init_full;
    else if (fill)  full <= 1'b1;
    else if (drain) full <= 1'b0;
  end

  a_no_fight: assert property (@(posedge clk) disable iff (rst) !(fill && drain))
    else $error("state wire driven HI and LO at once");

endmodule
