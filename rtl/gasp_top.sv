// gasp_top -- the two GasP test structures side by side.
//
// ring5 is a single ring of five plain stages. infinity5 is a pair of
// 10-stage rings sharing five stages through a merge and a branch. Both are
// clocked unit-delay models: clk advances time by one gate delay. Each has
// its own reset-time load ports (init_*) and observation ports, and each
// has throughput counters that count FIRE pulses: one on ring5 stage 0, one
// on the shared section (merge output side, shared stage 1) and one on the
// first private stage of each infinity ring. rst clears the counters and
// loads the initial wire states and register contents.
module gasp_top
  import gasp_pkg::*;
#(
  parameter int unsigned RING_STAGES = 5,   // ring5
  parameter int unsigned SHARED      = 5,   // infinity5 shared stages
  parameter int unsigned PRIVATE     = 5,   // infinity5 private stages per ring
  parameter int unsigned DIR_BIT     = 1,   // address bit steering the branch
  parameter int unsigned CNT_WIDTH   = 32
) (
  input  logic                        clk,
  input  logic                        rst,
  // ring5
  input  logic [RING_STAGES-1:0]      r5_init_full,
  input  addr_t [RING_STAGES-1:0]     r5_init_a,
  input  data_t [RING_STAGES-1:0]     r5_init_d,
  output logic [RING_STAGES-1:0]      r5_fire,
  output logic [RING_STAGES-1:0]      r5_wire,
  output addr_t [RING_STAGES-1:0]     r5_outa,
  output data_t [RING_STAGES-1:0]     r5_outd,
  output logic [CNT_WIDTH-1:0]        r5_count,
  // infinity5
  input  logic [SHARED-2:0]           i5_init_ws,
  input  logic [PRIVATE:0]            i5_init_wa,
  input  logic [PRIVATE:0]            i5_init_wb,
  input  addr_t [SHARED-1:0]          i5_init_s_a,
  input  data_t [SHARED-1:0]          i5_init_s_d,
  input  addr_t [PRIVATE-1:0]         i5_init_ra_a,
  input  data_t [PRIVATE-1:0]         i5_init_ra_d,
  input  addr_t [PRIVATE-1:0]         i5_init_rb_a,
  input  data_t [PRIVATE-1:0]         i5_init_rb_d,
  output logic                        i5_merge_fire_a,
  output logic                        i5_merge_fire_b,
  output logic [SHARED-1:0]           i5_s_fire,
  output logic [PRIVATE-1:0]          i5_ra_fire,
  output logic [PRIVATE-1:0]          i5_rb_fire,
  output logic [SHARED-2:0]           i5_ws,
  output logic [PRIVATE:0]            i5_wa,
  output logic [PRIVATE:0]            i5_wb,
  output addr_t [SHARED-1:0]          i5_s_outa,
  output data_t [SHARED-1:0]          i5_s_outd,
  output addr_t [PRIVATE-1:0]         i5_ra_outa,
  output data_t [PRIVATE-1:0]         i5_ra_outd,
  output addr_t [PRIVATE-1:0]         i5_rb_outa,
  output data_t [PRIVATE-1:0]         i5_rb_outd,
  output logic [CNT_WIDTH-1:0]        i5_shared_count,
  output logic [CNT_WIDTH-1:0]        i5_a_count,
  output logic [CNT_WIDTH-1:0]        i5_b_count
);

  gasp_ring5 #(.STAGES(RING_STAGES)) u_ring5 (
    .clk       (clk),
    .rst       (rst),
    .init_full (r5_init_full),
    .init_a    (r5_init_a),
    .init_d    (r5_init_d),
    .fire      (r5_fire),
    .wire_full (r5_wire),
    .outa      (r5_outa),
    .outd      (r5_outd)
  );

  gasp_fire_counter #(.WIDTH(CNT_WIDTH)) u_r5_count (
    .clk   (clk),
    .rst   (rst),
    .fire  (r5_fire[0]),
    .count (r5_count)
  );

  gasp_infinity5 #(.SHARED(SHARED), .PRIVATE(PRIVATE), .DIR_BIT(DIR_BIT)) u_inf5 (
    .clk          (clk),
    .rst          (rst),
    .init_ws      (i5_init_ws),
    .init_wa      (i5_init_wa),
    .init_wb      (i5_init_wb),
    .init_s_a     (i5_init_s_a),
    .init_s_d     (i5_init_s_d),
    .init_ra_a    (i5_init_ra_a),
    .init_ra_d    (i5_init_ra_d),
    .init_rb_a    (i5_init_rb_a),
    .init_rb_d    (i5_init_rb_d),
    .merge_fire_a (i5_merge_fire_a),
    .merge_fire_b (i5_merge_fire_b),
    .s_fire       (i5_s_fire),
    .ra_fire      (i5_ra_fire),
    .rb_fire      (i5_rb_fire),
    .ws           (i5_ws),
    .wa           (i5_wa),
    .wb           (i5_wb),
    .s_outa       (i5_s_outa),
    .s_outd       (i5_s_outd),
    .ra_outa      (i5_ra_outa),
    .ra_outd      (i5_ra_outd),
    .rb_outa      (i5_rb_outa),
    .rb_outd      (i5_rb_outd)
  );

  gasp_fire_counter #(.WIDTH(CNT_WIDTH)) u_i5_shared_count (
    .clk   (clk),
    .rst   (rst),
    .fire  (i5_s_fire[1]),
    .count (i5_shared_count)
  );

  gasp_fire_counter #(.WIDTH(CNT_WIDTH)) u_i5_a_count (
    .clk   (clk),
    .rst   (rst),
    .fire  (i5_ra_fire[0]),
    .count (i5_a_count)
  );

  gasp_fire_counter #(.WIDTH(CNT_WIDTH)) u_i5_b_count (
    .clk   (clk),
    .rst   (rst),
    .fire  (i5_rb_fire[0]),
    .count (i5_b_count)
  );

endmodule
