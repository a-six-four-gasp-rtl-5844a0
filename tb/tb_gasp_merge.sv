// tb_gasp_merge -- self-checking test of the arbitrated GasP merge.
//
// The testbench owns predA, predB and succ. It checks single requests on
// each side against the 6-4 timing (predX FULL -> fire[X] 4, -> succ FULL
// 6, -> predX EMPTY 5; succ EMPTY -> fire 3; fire width 5), that a FULL
// successor holds both sides off, that two requests arriving in the same
// tick are served one after the other and that two such ties go to
// different sides, and that fire[A] and fire[B] are never HI together. A
// random run then offers many messages on both sides and checks that every
// message is passed exactly once.
module tb_gasp_merge;

  logic clk = 1'b0;
  logic rst;
  logic pred_a, pred_b, succ;
  logic pred_a_drain, pred_b_drain, succ_fill, fire_a, fire_b;
  logic tb_fill_a, tb_fill_b, tb_drain;
  int   checks = 0, failures = 0;
  int   tick = 0;
  int   t_pa_rise, t_pa_fall, t_pb_rise, t_pb_fall, t_s_rise, t_s_fall;
  int   t_fa_rise, t_fa_fall, t_fb_rise, t_fb_fall;
  int   n_fa = 0, n_fb = 0, n_s = 0;
  logic pa_q, pb_q, s_q, fa_q, fb_q;

  gasp_merge dut (.clk, .rst, .pred_a, .pred_b, .succ, .pred_a_drain, .pred_b_drain,
                  .succ_fill, .fire_a, .fire_b);

  always_ff @(posedge clk) begin
    if (rst) begin
      pred_a <= 1'b0; pred_b <= 1'b0; succ <= 1'b0;
    end else begin
      if (tb_fill_a)         pred_a <= 1'b1;
      else if (pred_a_drain) pred_a <= 1'b0;
      if (tb_fill_b)         pred_b <= 1'b1;
      else if (pred_b_drain) pred_b <= 1'b0;
      if (succ_fill)         succ   <= 1'b1;
      else if (tb_drain)     succ   <= 1'b0;
    end
  end

  always #5 clk = ~clk;

  always @(negedge clk) begin
    tick++;
    if (pred_a && !pa_q) t_pa_rise = tick;
    if (!pred_a && pa_q) t_pa_fall = tick;
    if (pred_b && !pb_q) t_pb_rise = tick;
    if (!pred_b && pb_q) t_pb_fall = tick;
    if (succ && !s_q)    begin t_s_rise = tick; n_s++; end
    if (!succ && s_q)    t_s_fall = tick;
    if (fire_a && !fa_q) begin t_fa_rise = tick; n_fa++; end
    if (!fire_a && fa_q) t_fa_fall = tick;
    if (fire_b && !fb_q) begin t_fb_rise = tick; n_fb++; end
    if (!fire_b && fb_q) t_fb_fall = tick;
    if (!rst) begin
      checks++;
      if (fire_a && fire_b) begin
        failures++;
        $display("FAIL fire[A] and fire[B] together at tick %0d", tick);
      end
    end
    pa_q = pred_a; pb_q = pred_b; s_q = succ; fa_q = fire_a; fb_q = fire_b;
  end

  initial begin
    repeat (30000) @(posedge clk);
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

  task automatic pulse2(ref logic s1, ref logic s2);
    @(posedge clk); #1 s1 = 1; s2 = 1;
    @(posedge clk); #1 s1 = 0; s2 = 0;
  endtask

  initial begin
    int first_tie_a, fa0, fb0, sent_a, sent_b;
    tb_fill_a = 0; tb_fill_b = 0; tb_drain = 0; rst = 1;
    pa_q = 0; pb_q = 0; s_q = 0; fa_q = 0; fb_q = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (4) @(posedge clk);

    // 1. side A alone
    pulse(tb_fill_a);
    repeat (15) @(posedge clk);
    expect_eq("predA FULL -> fire[A]", t_fa_rise - t_pa_rise, 4);
    expect_eq("predA FULL -> succ FULL", t_s_rise - t_pa_rise, 6);
    expect_eq("predA FULL -> predA EMPTY", t_pa_fall - t_pa_rise, 5);
    expect_eq("fire[A] width", t_fa_fall - t_fa_rise, 5);
    expect_eq("fire[A] count", n_fa, 1);
    expect_eq("fire[B] count", n_fb, 0);
    pulse(tb_drain);
    repeat (6) @(posedge clk);

    // 2. side B alone
    pulse(tb_fill_b);
    repeat (15) @(posedge clk);
    expect_eq("predB FULL -> fire[B]", t_fb_rise - t_pb_rise, 4);
    expect_eq("predB FULL -> succ FULL", t_s_rise - t_pb_rise, 6);
    expect_eq("predB FULL -> predB EMPTY", t_pb_fall - t_pb_rise, 5);
    expect_eq("fire[B] width", t_fb_fall - t_fb_rise, 5);
    expect_eq("fire[B] count", n_fb, 1);

    // 3. successor FULL holds side A off; draining it releases A
    pulse(tb_fill_a);
    repeat (15) @(posedge clk);
    expect_eq("no fire while succ FULL", n_fa, 1);
    pulse(tb_drain);
    repeat (15) @(posedge clk);
    expect_eq("succ EMPTY -> fire[A]", t_fa_rise - t_s_fall, 3);
    expect_eq("succ EMPTY -> predA EMPTY", t_pa_fall - t_s_fall, 4);
    expect_eq("fire[A] count", n_fa, 2);
    pulse(tb_drain);
    repeat (6) @(posedge clk);

    // 4. two ties: both requests in the same tick, twice
    for (int r = 0; r < 2; r++) begin
      fa0 = n_fa; fb0 = n_fb;
      pulse2(tb_fill_a, tb_fill_b);
      repeat (15) @(posedge clk);
      expect_eq("tie: one side served", (n_fa - fa0) + (n_fb - fb0), 1);
      if (r == 0) first_tie_a = n_fa - fa0;
      else        expect_eq("second tie served the other side", n_fa - fa0, 1 - first_tie_a);
      pulse(tb_drain);
      repeat (15) @(posedge clk);
      expect_eq("tie: other side served after drain", (n_fa - fa0) + (n_fb - fb0), 2);
      expect_eq("tie: one of each side", n_fa - fa0, 1);
      pulse(tb_drain);
      repeat (6) @(posedge clk);
    end

    // 5. A, then B one tick later, successor EMPTY: A first, B after drain
    fa0 = n_fa; fb0 = n_fb;
    @(posedge clk); #1 tb_fill_a = 1;
    @(posedge clk); #1 tb_fill_a = 0; tb_fill_b = 1;
    @(posedge clk); #1 tb_fill_b = 0;
    repeat (15) @(posedge clk);
    expect_eq("A-then-B: A served", n_fa - fa0, 1);
    expect_eq("A-then-B: B waits", n_fb - fb0, 0);
    pulse(tb_drain);
    repeat (15) @(posedge clk);
    expect_eq("A-then-B: B served after drain", n_fb - fb0, 1);
    expect_eq("succ EMPTY -> fire[B]", t_fb_rise - t_s_fall, 3);
    pulse(tb_drain);
    repeat (6) @(posedge clk);

    // 6. random traffic; the testbench plays both predecessors and the
    //    successor, each waiting at least 4 ticks as a real stage would
    fa0 = n_fa; fb0 = n_fb; sent_a = 0; sent_b = 0;
    fork
      repeat (150) begin
        repeat ($urandom_range(4, 30)) @(posedge clk);
        while (pred_a) @(posedge clk);
        repeat (4) @(posedge clk);
        pulse(tb_fill_a); sent_a++;
      end
      repeat (150) begin
        repeat ($urandom_range(4, 30)) @(posedge clk);
        while (pred_b) @(posedge clk);
        repeat (4) @(posedge clk);
        pulse(tb_fill_b); sent_b++;
      end
      repeat (400) begin
        while (!succ) @(posedge clk);
        repeat ($urandom_range(4, 12)) @(posedge clk);
        pulse(tb_drain);
      end
    join_any
    disable fork;
    repeat (40) @(posedge clk);
    while (succ || pred_a || pred_b) begin
      if (succ) begin repeat (4) @(posedge clk); pulse(tb_drain); end
      repeat (20) @(posedge clk);
    end
    expect_eq("random: every A message passed once", n_fa - fa0, sent_a);
    expect_eq("random: every B message passed once", n_fb - fb0, sent_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
