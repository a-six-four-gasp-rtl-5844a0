// gasp_infinity5 -- two coupled GasP rings that share a section.
//
// Ring A and ring B each have SHARED + PRIVATE stages (5 + 5 = 10) and
// share SHARED of them. The shared section starts with an arbitrated merge,
// which takes a message from whichever ring offers one, continues with plain
// stages and ends with a branch, which sends each message back into ring A
// (direction LO) or ring B (direction HI). Each ring's private section is a
// chain of PRIVATE plain stages from the branch back to the merge.
//
// Stages and wires:
//   shared stage 0 = merge (register_two), 1..SHARED-2 = plain,
//   SHARED-1 = branch; ws[j] joins shared stage j to j+1.
//   private stage k of ring A = plain; wa[k] is its predecessor wire, so
//   wa[0] is filled by the branch (succA) and wa[PRIVATE] is the merge's
//   predA. Ring B likewise with wb, succB and predB.
// Every stage has a register opened by its FIRE that reads the register of
// the stage before it; the merge's register reads the last register of
// either ring. The branch direction is address bit a[DIR_BIT] at the
// branch's INPUT, i.e. of the register before it, so a message keeps
// returning to the ring its address names.
//
// Reset loads every wire and register from the init_* ports (standing in
// for the test chip's load stages, which are not part of this design).
// Timing model: one clock period per gate delay, as in every module here.
module gasp_infinity5
  import gasp_pkg::*;
#(
  parameter int unsigned SHARED  = 5,  // >= 3: merge, plain stages, branch
  parameter int unsigned PRIVATE = 5,  // >= 1 plain stages per ring
  parameter int unsigned DIR_BIT = 1   // address bit a[DIR_BIT] steers the branch
) (
  input  logic                  clk,
  input  logic                  rst,
  // initial state
  input  logic [SHARED-2:0]     init_ws,
  input  logic [PRIVATE:0]      init_wa,
  input  logic [PRIVATE:0]      init_wb,
  input  addr_t [SHARED-1:0]    init_s_a,
  input  data_t [SHARED-1:0]    init_s_d,
  input  addr_t [PRIVATE-1:0]   init_ra_a,
  input  data_t [PRIVATE-1:0]   init_ra_d,
  input  addr_t [PRIVATE-1:0]   init_rb_a,
  input  data_t [PRIVATE-1:0]   init_rb_d,
  // observation
  output logic                  merge_fire_a,
  output logic                  merge_fire_b,
  output logic [SHARED-1:0]     s_fire,   // [0] is fire[A] | fire[B]
  output logic [PRIVATE-1:0]    ra_fire,
  output logic [PRIVATE-1:0]    rb_fire,
  output logic [SHARED-2:0]     ws,
  output logic [PRIVATE:0]      wa,
  output logic [PRIVATE:0]      wb,
  output addr_t [SHARED-1:0]    s_outa,
  output data_t [SHARED-1:0]    s_outd,
  output addr_t [PRIVATE-1:0]   ra_outa,
  output data_t [PRIVATE-1:0]   ra_outd,
  output addr_t [PRIVATE-1:0]   rb_outa,
  output data_t [PRIVATE-1:0]   rb_outd
);

  localparam int unsigned LAST = SHARED - 1;  // the branch stage

  logic [SHARED-2:0]  ws_fill, ws_drain;
  logic [PRIVATE:0]   wa_fill, wa_drain;
  logic [PRIVATE:0]   wb_fill, wb_drain;

  // ---------------------------------------------------------------- merge
  gasp_merge u_merge (
    .clk          (clk),
    .rst          (rst),
    .pred_a       (wa[PRIVATE]),
    .pred_b       (wb[PRIVATE]),
    .succ         (ws[0]),
    .pred_a_drain (wa_drain[PRIVATE]),
    .pred_b_drain (wb_drain[PRIVATE]),
    .succ_fill    (ws_fill[0]),
    .fire_a       (merge_fire_a),
    .fire_b       (merge_fire_b)
  );
  assign s_fire[0] = merge_fire_a | merge_fire_b;

  gasp_register_two u_merge_reg (
    .clk    (clk),
    .rst    (rst),
    .init_a (init_s_a[0]),
    .init_d (init_s_d[0]),
    .fire_a (merge_fire_a),
    .fire_b (merge_fire_b),
    .ina    (ra_outa[PRIVATE-1]),
    .ind    (ra_outd[PRIVATE-1]),
    .inb    (rb_outa[PRIVATE-1]),
    .ine    (rb_outd[PRIVATE-1]),
    .outa   (s_outa[0]),
    .outd   (s_outd[0])
  );

  // ------------------------------------------------- shared plain stages
  for (genvar j = 1; j < LAST; j++) begin : g_shared
    gasp_plain u_ctl (
      .clk        (clk),
      .rst        (rst),
      .pred       (ws[j-1]),
      .succ       (ws[j]),
      .pred_drain (ws_drain[j-1]),
      .succ_fill  (ws_fill[j]),
      .fire       (s_fire[j])
    );
    gasp_register_one u_reg (
      .clk    (clk),
      .rst    (rst),
      .init_a (init_s_a[j]),
      .init_d (init_s_d[j]),
      .fire   (s_fire[j]),
      .ina    (s_outa[j-1]),
      .ind    (s_outd[j-1]),
      .outa   (s_outa[j]),
      .outd   (s_outd[j])
    );
  end

  // --------------------------------------------------------------- branch
  gasp_branch u_branch (
    .clk         (clk),
    .rst         (rst),
    .pred        (ws[LAST-1]),
    .succ_a      (wa[0]),
    .succ_b      (wb[0]),
    .direction   (s_outa[LAST-1].num[DIR_BIT]),
    .pred_drain  (ws_drain[LAST-1]),
    .succ_a_fill (wa_fill[0]),
    .succ_b_fill (wb_fill[0]),
    .fire        (s_fire[LAST])
  );

  gasp_register_one u_branch_reg (
    .clk    (clk),
    .rst    (rst),
    .init_a (init_s_a[LAST]),
    .init_d (init_s_d[LAST]),
    .fire   (s_fire[LAST]),
    .ina    (s_outa[LAST-1]),
    .ind    (s_outd[LAST-1]),
    .outa   (s_outa[LAST]),
    .outd   (s_outd[LAST])
  );

  // ------------------------------------------------------- shared wires
  for (genvar j = 0; j < SHARED - 1; j++) begin : g_ws
    gasp_state_wire u_wire (
      .clk       (clk),
      .rst       (rst),
      .init_full (init_ws[j]),
      .fill      (ws_fill[j]),
      .drain     (ws_drain[j]),
      .full      (ws[j])
    );
  end

  // ------------------------------------------ private sections of A and B
  for (genvar k = 0; k < PRIVATE; k++) begin : g_priv
    gasp_plain u_ctl_a (
      .clk        (clk),
      .rst        (rst),
      .pred       (wa[k]),
      .succ       (wa[k+1]),
      .pred_drain (wa_drain[k]),
      .succ_fill  (wa_fill[k+1]),
      .fire       (ra_fire[k])
    );
    gasp_plain u_ctl_b (
      .clk        (clk),
      .rst        (rst),
      .pred       (wb[k]),
      .succ       (wb[k+1]),
      .pred_drain (wb_drain[k]),
      .succ_fill  (wb_fill[k+1]),
      .fire       (rb_fire[k])
    );
    gasp_register_one u_reg_a (
      .clk    (clk),
      .rst    (rst),
      .init_a (init_ra_a[k]),
      .init_d (init_ra_d[k]),
      .fire   (ra_fire[k]),
      .ina    ((k == 0) ? s_outa[LAST] : ra_outa[(k == 0) ? 0 : k-1]),
      .ind    ((k == 0) ? s_outd[LAST] : ra_outd[(k == 0) ? 0 : k-1]),
      .outa   (ra_outa[k]),
      .outd   (ra_outd[k])
    );
    gasp_register_one u_reg_b (
      .clk    (clk),
      .rst    (rst),
      .init_a (init_rb_a[k]),
      .init_d (init_rb_d[k]),
      .fire   (rb_fire[k]),
      .ina    ((k == 0) ? s_outa[LAST] : rb_outa[(k == 0) ? 0 : k-1]),
      .ind    ((k == 0) ? s_outd[LAST] : rb_outd[(k == 0) ? 0 : k-1]),
      .outa   (rb_outa[k]),
      .outd   (rb_outd[k])
    );
  end

  for (genvar k = 0; k <= PRIVATE; k++) begin : g_wab
    gasp_state_wire u_wire_a (
      .clk       (clk),
      .rst       (rst),
      .init_full (init_wa[k]),
      .fill      (wa_fill[k]),
      .drain     (wa_drain[k]),
      .full      (wa[k])
    );
    gasp_state_wire u_wire_b (
      .clk       (clk),
      .rst       (rst),
      .init_full (init_wb[k]),
      .fill      (wb_fill[k]),
      .drain     (wb_drain[k]),
      .full      (wb[k])
    );
  end

endmodule
