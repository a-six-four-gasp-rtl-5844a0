// gasp_merge -- arbitrated 6-4 GasP merge of two predecessors into one
// successor.
//
// Two predecessor wires, predA and predB, compete for one successor. An
// arbiter made of two cross-connected gates (A for side A, H for side B)
// lets only one request through at a time, so fire[A] and fire[B] are
// mutually exclusive. Each side then has the plain stage's chain: a
// LO-active AND with the successor wire (B, J), two inverters (C, D and
// K, L) giving fire[A] / fire[B]. Each fire signal drains its own
// predecessor (drivers E, M), and either fire signal fills the successor
// (gate F combining both, driving fill transistor G). The letters are those
// of the merge cell drawing.
//
//   A = NAND(predA, H)     H = NAND(predB, A)      (LO = grant)
//   B = AND(~A, ~succ [, ~fire_b])   C = ~B   fire_a = D = ~C
//   J = AND(~H, ~succ [, ~fire_a])   K = ~J   fire_b = L = ~K
//   F = ~(fire_a | fire_b)   succ_fill = ~F (transistor G)
//   pred_a_drain = fire_a (E)   pred_b_drain = fire_b (M)
//
// The drawn circuit leaves out the arbiter's anti-metastability part. In
// this clocked model two requests that arrive in the same tick would make
// the cross-connected pair oscillate, so a tie is resolved here: the grant
// goes to the side that did not win the last tie (a toggling bit). That
// resolution is this design's own choice.
//
// EXTRA_FIRE_INPUT = 1 adds the third input proposed to make the circuit
// more robust against the race between the successor-full disable and the
// grant: gate B also needs fire[B] LO and gate J also needs fire[A] LO. The
// default, 0, is the drawn two-input circuit.
//
// One register per gate, one clock period per gate delay: predX FULL ->
// fire[X] 4 ticks, succ EMPTY -> fire 3, fire -> succ FULL 2, fire -> predX
// EMPTY 1, fire lasts 5. Synchronous reset to the idle state is this
// design's own addition.
module gasp_merge #(
  parameter bit EXTRA_FIRE_INPUT = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic pred_a,        // predecessor A state wire, HI = FULL
  input  logic pred_b,        // predecessor B state wire, HI = FULL
  input  logic succ,          // successor state wire, HI = FULL
  output logic pred_a_drain,  // driver E
  output logic pred_b_drain,  // driver M
  output logic succ_fill,     // driver G
  output logic fire_a,        // fire[A], gate D
  output logic fire_b         // fire[B], gate L
);

  logic g_a, g_h;        // arbiter outputs, LO = grant
  logic g_b, g_c;        // side A chain
  logic g_j, g_k;        // side B chain
  logic g_f;             // LO turns on fill transistor G
  logic tie_to_b;        // next tie goes to side B
  logic a_next, h_next;
  logic tie;

  always_comb begin
    a_next = ~(pred_a & g_h);
    h_next = ~(pred_b & g_a);
    tie    = ~a_next & ~h_next;
    if (tie) begin
      if (tie_to_b) a_next = 1'b1;
      else          h_next = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      g_a      <= 1'b1;
      g_h      <= 1'b1;
      g_b      <= 1'b0;
      g_c      <= 1'b1;
      fire_a   <= 1'b0;
      g_j      <= 1'b0;
      g_k      <= 1'b1;
      fire_b   <= 1'b0;
      g_f      <= 1'b1;
      tie_to_b <= 1'b0;
    end else begin
      g_a      <= a_next;
      g_h      <= h_next;
      g_b      <= ~g_a & ~succ & ~(EXTRA_FIRE_INPUT & fire_b);
      g_c      <= ~g_b;
      fire_a   <= ~g_c;
      g_j      <= ~g_h & ~succ & ~(EXTRA_FIRE_INPUT & fire_a);
      g_k      <= ~g_j;
      fire_b   <= ~g_k;
      g_f      <= ~(fire_a | fire_b);
      if (tie) tie_to_b <= ~tie_to_b;
    end
  end

  assign pred_a_drain = fire_a;
  assign pred_b_drain = fire_b;
  assign succ_fill    = ~g_f;

  a_fire_exclusive: assert property (@(posedge clk) disable iff (rst) !(fire_a && fire_b))
    else $error("fire[A] and fire[B] active together");

endmodule
