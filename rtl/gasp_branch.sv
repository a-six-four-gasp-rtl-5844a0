// gasp_branch -- 6-4 GasP stage with two successors.
//
// The stage FIREs when its predecessor is FULL and BOTH successor wires are
// EMPTY; all three enter the central LO-active AND. FIRE drains the
// predecessor as in the plain stage. Each successor has its own fill
// driver, preceded by a NAND that makes the fill conditional on the
// direction bit: succA fills only when direction is LO, succB only when it
// is HI. Exactly one successor therefore becomes FULL per firing. The
// register of this stage sends its address and data to both successors;
// only the one whose wire was filled takes them.
//
// direction must come from the stage's INPUT address bits (the predecessor
// register's outputs), which are kited less than the data, not from the
// bits this stage captures. It is sampled while FIRE is HI and must stay
// put until the fill is done; its complement is taken as available at the
// same time.
//
// One register per gate, one clock period per gate delay, so the timing is
// that of the plain stage: pred FULL -> FIRE 4, successors EMPTY -> FIRE 3,
// FIRE -> chosen successor FULL 2, FIRE -> pred EMPTY 1, FIRE lasts 5.
// Synchronous reset to the idle state is this design's own addition.
module gasp_branch (
  input  logic clk,
  input  logic rst,
  input  logic pred,         // predecessor state wire, HI = FULL
  input  logic succ_a,       // successor A state wire
  input  logic succ_b,       // successor B state wire
  input  logic direction,    // LO: fill succ_a, HI: fill succ_b
  output logic pred_drain,
  output logic succ_a_fill,
  output logic succ_b_fill,
  output logic fire
);

  logic pinv_n;
  logic go;
  logic go_n;
  logic fill_a_n;  // NAND of FIRE and ~direction, LO turns on fill A
  logic fill_b_n;  // NAND of FIRE and direction, LO turns on fill B

  always_ff @(posedge clk) begin
    if (rst) begin
      pinv_n   <= 1'b1;
      go       <= 1'b0;
      go_n     <= 1'b1;
      fire     <= 1'b0;
      fill_a_n <= 1'b1;
      fill_b_n <= 1'b1;
    end else begin
      pinv_n   <= ~pred;
      go       <= ~pinv_n & ~succ_a & ~succ_b;
      go_n     <= ~go;
      fire     <= ~go_n;
      fill_a_n <= ~(fire & ~direction);
      fill_b_n <= ~(fire & direction);
    end
  end

  assign pred_drain  = fire;
  assign succ_a_fill = ~fill_a_n;
  assign succ_b_fill = ~fill_b_n;

endmodule
