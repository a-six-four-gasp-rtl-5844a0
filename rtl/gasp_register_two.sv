// gasp_register_two -- twin-input GasP register for the merge stage.
//
// Two sets of inputs, (ina, ind) and (inb, ine), share one set of output
// latches outa[1:14,T], outd[1:37]. fire[A] opens the address latches to
// ina; fire[B] opens them to inb. Each side has its own data clock gate: a
// NAND of its fire signal with its own incoming T bit, then a driver, so the
// data latches take ind (or ine) two gate delays after the address latches
// and only when that side's incoming T is ONE. fire[A] and fire[B] come from
// the merge stage's arbiter and are never HI together.
//
// Timing model as in gasp_register_one: one clock period per gate delay,
// latches copy on every tick their enable is HI. Assertions check that each
// side's inputs hold still while that side's latches are open. Reset loads init_a/init_d.
// Should both enables be HI at once (which the merge never does), side A is
// taken; that priority is this design's own choice.
module gasp_register_two
  import gasp_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  addr_t init_a,
  input  data_t init_d,
  input  logic  fire_a,  // fire[A]
  input  logic  fire_b,  // fire[B]
  input  addr_t ina,     // ina[1:14,T]
  input  data_t ind,     // ind[1:37]
  input  addr_t inb,     // inb[1:14,T]
  input  data_t ine,     // ine[1:37]
  output addr_t outa,
  output data_t outd
);

  logic dnand_a, den_a;
  logic dnand_b, den_b;

  always_ff @(posedge clk) begin
    if (rst) begin
      dnand_a <= 1'b1;
      den_a   <= 1'b0;
      dnand_b <= 1'b1;
      den_b   <= 1'b0;
      outa    <= init_a;
      outd    <= init_d;
    end else begin
      dnand_a <= ~(fire_a & ina.t);
      den_a   <= ~dnand_a;
      dnand_b <= ~(fire_b & inb.t);
      den_b   <= ~dnand_b;
      if (fire_a)      outa <= ina;
      else if (fire_b) outa <= inb;
      if (den_a)       outd <= ind;
      else if (den_b)  outd <= ine;
    end
  end

  // Kiting rule, per side: inputs hold still while their latches are open.
  a_addr_a_stable: assert property (@(posedge clk) disable iff (rst)
                                    fire_a && $past(fire_a) |-> $stable(ina))
    else $error("input a changed while its address latches were open");
  a_addr_b_stable: assert property (@(posedge clk) disable iff (rst)
                                    fire_b && $past(fire_b) |-> $stable(inb))
    else $error("input b changed while its address latches were open");
  a_data_a_stable: assert property (@(posedge clk) disable iff (rst)
                                    den_a && $past(den_a) |-> $stable(ind))
    else $error("input d changed while its data latches were open");
  a_data_b_stable: assert property (@(posedge clk) disable iff (rst)
                                    den_b && $past(den_b) |-> $stable(ine))
    else $error("input e changed while its data latches were open");

endmodule
