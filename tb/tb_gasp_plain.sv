// tb_gasp_plain -- self-checking test of the plain 6-4 GasP stage.
//
// The testbench owns both state wires: it fills the predecessor and drains
// the successor, and the stage's own drivers do the rest. Each event is
// time-stamped in ticks (one tick = one gate delay) and compared with the
// 6-4 GasP timing: pred FULL -> FIRE 4, succ EMPTY -> FIRE 3, pred FULL ->
// succ FULL 6, succ EMPTY -> pred EMPTY 4, FIRE width 5. It also checks that
// the stage never fires while the successor is FULL. The 10-tick cycle of a
// stage between real neighbours is checked in the ring tests.
module tb_gasp_plain;

  logic clk = 1'b0;
  logic rst;
  logic pred, succ, pred_drain, succ_fill, fire;
  logic tb_fill, tb_drain;
  int   checks = 0, failures = 0;
  int   tick = 0;
  int   t_pred_rise, t_pred_fall, t_succ_rise, t_succ_fall, t_fire_rise, t_fire_fall;
  int   n_fire = 0;
  logic pred_q, succ_q, fire_q;

  gasp_plain dut (.clk, .rst, .pred, .succ, .pred_drain, .succ_fill, .fire);

  // The two wires, modelled in the testbench.
  always_ff @(posedge clk) begin
    if (rst) begin
      pred <= 1'b0;
      succ <= 1'b0;
    end else begin
      if (tb_fill)         pred <= 1'b1;
      else if (pred_drain) pred <= 1'b0;
      if (succ_fill)       succ <= 1'b1;
      else if (tb_drain)   succ <= 1'b0;
    end
  end

  always #5 clk = ~clk;

  // Event time stamps, sampled between edges.
  always @(negedge clk) begin
    tick++;
    if (pred && !pred_q) t_pred_rise = tick;
    if (!pred && pred_q) t_pred_fall = tick;
    if (succ && !succ_q) t_succ_rise = tick;
    if (!succ && succ_q) t_succ_fall = tick;
    if (fire && !fire_q) begin t_fire_rise = tick; n_fire++; end
    if (!fire && fire_q) t_fire_fall = tick;
    if (!rst && fire && fire_q == 1'b0 && succ) begin
      failures++;
      $display("FAIL fired with successor FULL at tick %0d", tick);
    end
    pred_q = pred; succ_q = succ; fire_q = fire;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic pulse_fill();
    @(posedge clk); #1 tb_fill = 1;
    @(posedge clk); #1 tb_fill = 0;
  endtask

  task automatic pulse_drain();
    @(posedge clk); #1 tb_drain = 1;
    @(posedge clk); #1 tb_drain = 0;
  endtask

  initial begin
    tb_fill = 0; tb_drain = 0; rst = 1;
    pred_q = 0; succ_q = 0; fire_q = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (4) @(posedge clk);

    // 1. predecessor is last to become FULL
    pulse_fill();
    repeat (15) @(posedge clk);
    expect_eq("pred FULL -> FIRE", t_fire_rise - t_pred_rise, 4);
    expect_eq("pred FULL -> succ FULL", t_succ_rise - t_pred_rise, 6);
    expect_eq("pred FULL -> pred EMPTY (pred loop)", t_pred_fall - t_pred_rise, 5);
    expect_eq("FIRE width", t_fire_fall - t_fire_rise, 5);
    expect_eq("fires", n_fire, 1);

    // 2. successor is last to become EMPTY: pred FULL while succ FULL
    pulse_fill();
    repeat (15) @(posedge clk);
    expect_eq("no fire while succ FULL", n_fire, 1);
    checks++;
    if (!(pred && succ)) begin failures++; $display("FAIL wires not both FULL"); end
    pulse_drain();
    repeat (15) @(posedge clk);
    expect_eq("succ EMPTY -> FIRE", t_fire_rise - t_succ_fall, 3);
    expect_eq("succ EMPTY -> pred EMPTY", t_pred_fall - t_succ_fall, 4);
    expect_eq("succ EMPTY -> succ FULL (succ loop)", t_succ_rise - t_succ_fall, 5);
    expect_eq("FIRE width", t_fire_fall - t_fire_rise, 5);
    expect_eq("fires", n_fire, 2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
