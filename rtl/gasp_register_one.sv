// gasp_register_one -- one-input GasP register (15 address + 37 data latches).
//
// The register holds the message of one GasP stage. Its latches are
// normally opaque. The stage's FIRE pulse makes the 15 address latches
// (a[1:14] and the token bit T) transparent directly. The 37 data latches
// are driven through a NAND of FIRE with the INCOMING T bit followed by a
// large driver, so they open two gate delays after the address latches
// and only when the incoming T is ONE: a token (T = ZERO) moves its address
// but leaves the data latches closed to save energy. The data path is
// kited more than the address path, which is why it may be this late.
//
// Timing model: one clock period is one gate delay. A transparent latch is
// a register that copies its input on every tick its enable is HI (a thru
// time of one tick) and holds otherwise. The NAND and the data latch driver
// are one register each. With a FIRE pulse of 5 ticks starting at tick f,
// address latches copy at ticks f..f+4 and data latches at f+2..f+6.
// Assertions check the kiting rule: the inputs hold still while the latches
// they feed are open. The latch's thru time and the reset, which loads init_a/init_d so a ring
// can start with messages in place, are this design's own choices.
module gasp_register_one
  import gasp_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  addr_t init_a,
  input  data_t init_d,
  input  logic  fire,   // FIRE of the controlling stage
  input  addr_t ina,    // ina[1:14,T]
  input  data_t ind,    // ind[1:37]
  output addr_t outa,   // outa[1:14,T]
  output data_t outd    // outd[1:37]
);

  logic dnand;  // NAND(fire, ina.t)
  logic den;    // data latch driver output, HI = data latches transparent

  always_ff @(posedge clk) begin
    if (rst) begin
      dnand <= 1'b1;
      den   <= 1'b0;
      outa  <= init_a;
      outd  <= init_d;
    end else begin
      dnand <= ~(fire & ina.t);
      den   <= ~dnand;
      if (fire) outa <= ina;
      if (den)  outd <= ind;
    end
  end

  // Kiting rule: FULL promises that the message is there by the time the
  // latches use it, so the inputs must hold still while the latches are
  // transparent.
  a_addr_stable: assert property (@(posedge clk) disable iff (rst)
                                  fire && $past(fire) |-> $stable(ina))
    else $error("address input changed while the address latches were open");
  a_data_stable: assert property (@(posedge clk) disable iff (rst)
                                  den && $past(den) |-> $stable(ind))
    else $error("data input changed while the data latches were open");

endmodule
