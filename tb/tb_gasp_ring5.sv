// tb_gasp_ring5 -- self-checking test of the five-stage GasP ring.
//
// For every message count k = 1..4 (and two starting placements) the ring
// is reset with k messages, each with a unique address a[1:14] and random
// data; one of them is a token (T = ZERO) whenever k > 1. The testbench
// then checks:
//  * order and integrity: messages never overtake, so stage i sees the
//    messages in the ring order worked out from the starting placement; a
//    check seven ticks after each FIRE compares the stage's register with
//    the expected message (data only for T = ONE; a token must leave the
//    data latches untouched);
//  * throughput: a message takes 6 ticks per stage, a gap 4 ticks per stage
//    backwards, and a stage needs 10 ticks per cycle, so in a window of W
//    ticks stage 0 fires W * min(k/30, (5-k)/20, 1/10) times (+-1);
//  * that waiting (pred FULL, succ FULL) and data clock gating happened.
module tb_gasp_ring5;
  import gasp_pkg::*;

  localparam int N      = 5;
  localparam int WARM   = 300;
  localparam int WINDOW = 600;

  logic clk = 1'b0;
  logic rst;
  logic [N-1:0]  init_full, fire, wire_full;
  addr_t [N-1:0] init_a, outa;
  data_t [N-1:0] init_d, outd;

  int checks = 0, failures = 0;
  int tick = 0;
  int n_wait = 0, n_token_pass = 0;

  gasp_ring5 dut (.clk, .rst, .init_full, .init_a, .init_d, .fire, .wire_full, .outa, .outd);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: message table and the order each stage sees them in
  data_t msg_data [int];
  logic  msg_t    [int];
  int    order    [N][$];   // message ids in arrival order, one lap
  int    nfire    [N];
  int    check_at [N];
  data_t d_before [N];
  logic  fire_q   [N];
  int    win_count;
  bit    counting;

  always @(negedge clk) begin
    tick++;
    if (!rst) begin
      for (int i = 0; i < N; i++) begin
        int prev;
        prev = (i + N - 1) % N;
        if (wire_full[prev] && wire_full[i] && !fire[i]) n_wait++;
        if (fire[i] && !fire_q[i]) begin
          check_at[i] = tick + 7;
          d_before[i] = outd[i];
          if (!outa[prev].t) n_token_pass++;
          if (i == 0 && counting) win_count++;
        end
        if (tick == check_at[i] && order[i].size() > 0) begin
          int id;
          id = order[i][nfire[i] % order[i].size()];
          nfire[i]++;
          checks++;
          if (int'(outa[i].num) != id || outa[i].t != msg_t[id] ||
              (msg_t[id] && outd[i] != msg_data[id]) ||
              (!msg_t[id] && outd[i] != d_before[i])) begin
            failures++;
            $display("FAIL stage %0d pass %0d: got a=%0d t=%0b d=%h, expected message %0d",
                     i, nfire[i], outa[i].num, outa[i].t, outd[i], id);
          end
        end
        fire_q[i] = fire[i];
      end
    end
  end

  task automatic run(input logic [N-1:0] placement);
    int k, exp_fires, id;
    k = $countones(placement);
    msg_data.delete(); msg_t.delete();
    for (int i = 0; i < N; i++) begin
      order[i].delete();
      nfire[i] = 0; check_at[i] = -1; fire_q[i] = 0;
    end
    rst = 1;
    init_full = placement;
    id = 0;
    for (int j = 0; j < N; j++) begin
      init_a[j] = addr_t'($urandom());
      init_d[j] = {$urandom(), $urandom()};
      if (placement[j]) begin
        id++;
        init_a[j].num = 14'(id);
        init_a[j].t   = !(k > 1 && id == 2);
        msg_data[id]  = init_d[j];
        msg_t[id]     = init_a[j].t;
      end
    end
    // stage i first drains w[i-1], then w[i-2], ... (messages never overtake)
    for (int i = 0; i < N; i++)
      for (int s = 1; s <= N; s++) begin
        int j;
        j = (i - s + 2 * N) % N;
        if (placement[j]) order[i].push_back(int'(init_a[j].num));
      end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (WARM) @(posedge clk);
    win_count = 0; counting = 1;
    repeat (WINDOW) @(posedge clk);
    counting = 0;
    exp_fires = WINDOW * k / 30;
    if (WINDOW * (N - k) / 20 < exp_fires) exp_fires = WINDOW * (N - k) / 20;
    if (WINDOW / 10 < exp_fires) exp_fires = WINDOW / 10;
    checks++;
    if (win_count < exp_fires - 1 || win_count > exp_fires + 1) begin
      failures++;
      $display("FAIL k=%0d placement=%b: stage 0 fired %0d times in %0d ticks, expected %0d",
               k, placement, win_count, WINDOW, exp_fires);
    end else
      $display("k=%0d placement=%b: %0d fires in %0d ticks (expected %0d)",
               k, placement, win_count, WINDOW, exp_fires);
    checks++;
    if ($countones(wire_full) > k) begin
      failures++;
      $display("FAIL k=%0d: %0d wires FULL", k, $countones(wire_full));
    end
  endtask

  initial begin
    counting = 0;
    run(5'b00001);
    run(5'b00101);
    run(5'b00011);
    run(5'b10101);
    run(5'b00111);
    run(5'b01111);
    run(5'b10111);
    checks++;
    if (n_wait == 0) begin failures++; $display("FAIL no stage ever waited on a FULL successor"); end
    checks++;
    if (n_token_pass == 0) begin failures++; $display("FAIL no token (T = ZERO) passed"); end
    $display("waits %0d, token passes %0d", n_wait, n_token_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
