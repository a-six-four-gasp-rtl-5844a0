// gasp_plain -- the basic 6-4 GasP control stage.
//
// The stage FIREs when its predecessor state wire is FULL (HI) and its
// successor state wire is EMPTY (LO). FIRE opens the stage's address latches
// (the "fire" export), drains the predecessor wire through an N transistor
// and, through an inverter, turns on the P transistor that fills the
// successor wire. Because FIRE destroys the state that caused it, it is a
// pulse: each of the two loops (predecessor side and successor side) is a
// five-gate ring oscillator, coupled by the AND at the centre.
//
// Gate chain, one register per gate, one clock period per gate delay:
//   pred --inv--> pinv_n --LO-active AND with succ--> go --inv--> go_n
//        --inv--> fire
//   fire --N transistor--> pred drained           (drive out: pred_drain)
//   fire --inv--> fill_n --P transistor--> succ filled (drive out: succ_fill)
// The gate chain follows the basic GasP cell figure; the real cell merges the
// inverter and AND into a three-input gate without changing the count.
//
// Timing (checked by the testbench): pred FULL -> FIRE 4 ticks; succ EMPTY ->
// FIRE 3 ticks; pred FULL -> succ FULL 6; succ EMPTY -> pred EMPTY 4; FIRE
// lasts 5 ticks. Ports pred/succ are wire levels; pred_drain/succ_fill are
// the drive transistors' gates (active HI), to be connected to
// gasp_state_wire. Synchronous reset puts every gate in its idle value; it
// is this design's own addition, as is the clocked unit-delay model itself.
module gasp_plain (
  input  logic clk,
  input  logic rst,
  input  logic pred,        // predecessor state wire, HI = FULL
  input  logic succ,        // successor state wire, HI = FULL
  output logic pred_drain,  // N driver on: renders pred EMPTY
  output logic succ_fill,   // P driver on: renders succ FULL
  output logic fire         // FIRE, HI is active; opens the address latches
);

  logic pinv_n;  // inverted predecessor: LO when pred is FULL
  logic go;      // LO-active AND of pinv_n and succ
  logic go_n;
  logic fill_n;  // gate of the P fill transistor, LO is on

  always_ff @(posedge clk) begin
    if (rst) begin
      pinv_n <= 1'b1;
      go     <= 1'b0;
      go_n   <= 1'b1;
      fire   <= 1'b0;
      fill_n <= 1'b1;
    end else begin
      pinv_n <= ~pred;
      go     <= ~pinv_n & ~succ;
      go_n   <= ~go;
      fire   <= ~go_n;
      fill_n <= ~fire;
    end
  end

  assign pred_drain = fire;
  assign succ_fill  = ~fill_n;

endmodule
