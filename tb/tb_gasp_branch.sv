// tb_gasp_branch -- self-checking test of the two-way GasP branch stage.
//
// The testbench owns all three state wires and the direction input. It
// checks that direction LO fills only succA and direction HI only succB,
// that the stage waits while either successor is FULL (both enter the
// AND), and the 6-4 timing: pred FULL -> FIRE 4, pred FULL -> chosen
// successor FULL 6, pred FULL -> pred EMPTY 5, last successor EMPTY ->
// FIRE 3, FIRE width 5. A random run then sends many messages with random
// directions and random successor delays and counts the fills per side.
module tb_gasp_branch;

  logic clk = 1'b0;
  logic rst;
  logic pred, succ_a, succ_b, direction;
  logic pred_drain, succ_a_fill, succ_b_fill, fire;
  logic tb_fill, tb_drain_a, tb_drain_b;
  int   checks = 0, failures = 0;
  int   tick = 0;
  int   t_pred_rise, t_pred_fall, t_a_rise, t_a_fall, t_b_rise, t_b_fall, t_fire_rise, t_fire_fall;
  int   n_fire = 0, n_a = 0, n_b = 0;
  logic pred_q, a_q, b_q, fire_q;

  gasp_branch dut (.clk, .rst, .pred, .succ_a, .succ_b, .direction,
                   .pred_drain, .succ_a_fill, .succ_b_fill, .fire);

  always_ff @(posedge clk) begin
    if (rst) begin
      pred <= 1'b0; succ_a <= 1'b0; succ_b <= 1'b0;
    end else begin
      if (tb_fill)          pred   <= 1'b1;
      else if (pred_drain)  pred   <= 1'b0;
      if (succ_a_fill)      succ_a <= 1'b1;
      else if (tb_drain_a)  succ_a <= 1'b0;
      if (succ_b_fill)      succ_b <= 1'b1;
      else if (tb_drain_b)  succ_b <= 1'b0;
    end
  end

  always #5 clk = ~clk;

  always @(negedge clk) begin
    tick++;
    if (pred && !pred_q)   t_pred_rise = tick;
    if (!pred && pred_q)   t_pred_fall = tick;
    if (succ_a && !a_q)    begin t_a_rise = tick; n_a++; end
    if (!succ_a && a_q)    t_a_fall = tick;
    if (succ_b && !b_q)    begin t_b_rise = tick; n_b++; end
    if (!succ_b && b_q)    t_b_fall = tick;
    if (fire && !fire_q)   begin t_fire_rise = tick; n_fire++; end
    if (!fire && fire_q)   t_fire_fall = tick;
    pred_q = pred; a_q = succ_a; b_q = succ_b; fire_q = fire;
  end

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic pulse(ref logic s);
    @(posedge clk); #1 s = 1;
    @(posedge clk); #1 s = 0;
  endtask

  initial begin
    int exp_a, exp_b;
    tb_fill = 0; tb_drain_a = 0; tb_drain_b = 0; direction = 0; rst = 1;
    pred_q = 0; a_q = 0; b_q = 0; fire_q = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (4) @(posedge clk);

    // 1. direction LO -> succA
    direction = 0;
    pulse(tb_fill);
    repeat (15) @(posedge clk);
    expect_eq("pred FULL -> FIRE", t_fire_rise - t_pred_rise, 4);
    expect_eq("pred FULL -> succA FULL", t_a_rise - t_pred_rise, 6);
    expect_eq("pred FULL -> pred EMPTY", t_pred_fall - t_pred_rise, 5);
    expect_eq("FIRE width", t_fire_fall - t_fire_rise, 5);
    expect_eq("succA fills", n_a, 1);
    expect_eq("succB fills", n_b, 0);

    // 2. direction HI -> succB, while succA still FULL: must wait
    direction = 1;
    pulse(tb_fill);
    repeat (15) @(posedge clk);
    expect_eq("no FIRE while succA FULL", n_fire, 1);
    pulse(tb_drain_a);
    repeat (15) @(posedge clk);
    expect_eq("succA EMPTY -> FIRE", t_fire_rise - t_a_fall, 3);
    expect_eq("succA EMPTY -> pred EMPTY", t_pred_fall - t_a_fall, 4);
    expect_eq("FIRE -> succB FULL", t_b_rise - t_fire_rise, 2);
    expect_eq("succA fills", n_a, 1);
    expect_eq("succB fills", n_b, 1);

    // 3. succB FULL blocks a message for succA too
    direction = 0;
    pulse(tb_fill);
    repeat (15) @(posedge clk);
    expect_eq("no FIRE while succB FULL", n_fire, 2);
    pulse(tb_drain_b);
    repeat (15) @(posedge clk);
    expect_eq("succB EMPTY -> FIRE", t_fire_rise - t_b_fall, 3);
    expect_eq("succA fills", n_a, 2);
    expect_eq("succB fills", n_b, 1);
    pulse(tb_drain_a);
    repeat (5) @(posedge clk);

    // 4. random directions and random successor delays
    exp_a = n_a; exp_b = n_b;
    for (int m = 0; m < 200; m++) begin
      logic d;
      d = $urandom_range(0, 1);
      direction = d;
      pulse(tb_fill);
      while (!(d ? succ_b : succ_a)) @(posedge clk);
      #1;
      checks++;
      if (d ? succ_a : succ_b) begin
        failures++;
        $display("FAIL message %0d filled the wrong successor", m);
      end
      if (d) exp_b++; else exp_a++;
      // a real successor drains no sooner than 4 ticks after the fill
      repeat ($urandom_range(4, 10)) @(posedge clk);
      if (d) pulse(tb_drain_b); else pulse(tb_drain_a);
      repeat (2) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    expect_eq("random succA fills", n_a, exp_a);
    expect_eq("random succB fills", n_b, exp_b);
    expect_eq("random fires", n_fire, exp_a + exp_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
