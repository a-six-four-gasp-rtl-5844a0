// gasp_ring5 -- a test ring of plain 6-4 GasP stages and their registers.
//
// STAGES plain GasP control stages and as many one-input registers are
// closed into a ring. State wire w[i] joins stage i (which fills it) to
// stage i+1 (which drains it); register i is opened by stage i's FIRE and
// takes its input from register i-1. A message whose wire w[i] is FULL is
// held in register i and moves on when stage i+1 fires. The ring needs at
// least one FULL and one EMPTY wire to run; it then runs for ever.
//
// Reset loads w[i] from init_full[i] and register i from init_a[i] /
// init_d[i]: this stands in for the stages that load a test ring, which are
// not part of this design. Every wire is modelled alike; the different wire
// lengths of the drawing only change transistor sizes, not logic.
//
// Timing model: one clock period per gate delay (see gasp_plain). With k
// messages in a ring of N stages a message goes around in 6N ticks and a
// gap in 4N, and no stage can fire faster than once in 10 ticks, so a stage
// fires min(k/(6N), (N-k)/(4N), 1/10) times per tick in the long run.
// Outputs expose each FIRE, each wire and each register for observation.
module gasp_ring5
  import gasp_pkg::*;
#(
  parameter int unsigned STAGES = 5
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [STAGES-1:0]   init_full,
  input  addr_t [STAGES-1:0]  init_a,
  input  data_t [STAGES-1:0]  init_d,
  output logic [STAGES-1:0]   fire,
  output logic [STAGES-1:0]   wire_full,
  output addr_t [STAGES-1:0]  outa,
  output data_t [STAGES-1:0]  outd
);

  logic [STAGES-1:0] fill;   // fill[i]: stage i fills w[i]
  logic [STAGES-1:0] drain;  // drain[i]: stage i drains w[i-1]

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    localparam int unsigned PREV = (i + STAGES - 1) % STAGES;
    localparam int unsigned NEXT = (i + 1) % STAGES;

    gasp_plain u_ctl (
      .clk        (clk),
      .rst        (rst),
      .pred       (wire_full[PREV]),
      .succ       (wire_full[i]),
      .pred_drain (drain[i]),
      .succ_fill  (fill[i]),
      .fire       (fire[i])
    );

    gasp_state_wire u_wire (
      .clk       (clk),
      .rst       (rst),
      .init_full (init_full[i]),
      .fill      (fill[i]),
      .drain     (drain[NEXT]),
      .full      (wire_full[i])
    );

    gasp_register_one u_reg (
      .clk    (clk),
      .rst    (rst),
      .init_a (init_a[i]),
      .init_d (init_d[i]),
      .fire   (fire[i]),
      .ina    (outa[PREV]),
      .ind    (outd[PREV]),
      .outa   (outa[i]),
      .outd   (outd[i])
    );
  end

endmodule
