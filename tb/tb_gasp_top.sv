// tb_gasp_top -- end-to-end test of both GasP structures at full size.
//
// Instantiates gasp_top with its default sizes (five-stage ring, two
// 10-stage rings sharing five stages, 37 data bits) and starts both with
// messages, some of them tokens (T = ZERO). While they run, every register
// capture is checked to hold a known message with the right data (or, for a
// token, untouched data latches), and each mechanism is counted: stage
// FIREs, waiting on a FULL successor, data clock gating by T, merge grants
// on each side, an arbiter tie, branch fills on each side. A mechanism that
// never happened counts as a failure. At the end the throughput counters
// are compared with the testbench's own FIRE counts, and ring5's rate with
// the rate its one gap allows, (N-k)/(4N) for k messages in N stages.
module tb_gasp_top;
  import gasp_pkg::*;

  localparam int N   = 5;
  localparam int S   = 5;
  localparam int P   = 5;
  localparam int RUN = 3000;

  logic clk = 1'b0;
  logic rst;
  logic [N-1:0]  r5_init_full, r5_fire, r5_wire;
  addr_t [N-1:0] r5_init_a, r5_outa;
  data_t [N-1:0] r5_init_d, r5_outd;
  logic [31:0]   r5_count, i5_shared_count, i5_a_count, i5_b_count;
  logic [S-2:0]  i5_init_ws, i5_ws;
  logic [P:0]    i5_init_wa, i5_init_wb, i5_wa, i5_wb;
  addr_t [S-1:0] i5_init_s_a, i5_s_outa;
  data_t [S-1:0] i5_init_s_d, i5_s_outd;
  addr_t [P-1:0] i5_init_ra_a, i5_init_rb_a, i5_ra_outa, i5_rb_outa;
  data_t [P-1:0] i5_init_ra_d, i5_init_rb_d, i5_ra_outd, i5_rb_outd;
  logic          i5_merge_fire_a, i5_merge_fire_b;
  logic [S-1:0]  i5_s_fire;
  logic [P-1:0]  i5_ra_fire, i5_rb_fire;

  gasp_top dut (.*);

  int checks = 0, failures = 0, tick = 0;
  // mechanism counts
  int m_r5_fire = 0, m_wait = 0, m_gated = 0, m_merge_a = 0, m_merge_b = 0;
  int m_tie = 0, m_branch_a = 0, m_branch_b = 0;
  int c_r5 = 0, c_sh = 0, c_a = 0, c_b = 0;
  logic r5f_q, shf_q, af_q, bf_q, ma_q, mb_q, wa0_q, wb0_q;

  always #5 clk = ~clk;

  initial begin
    repeat (RUN + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NST = N + S + 2 * P;
  logic  st_fire [NST];
  addr_t st_outa [NST];
  data_t st_outd [NST];
  addr_t st_ina  [NST];
  always_comb begin
    for (int i = 0; i < N; i++) begin
      st_fire[i] = r5_fire[i]; st_outa[i] = r5_outa[i]; st_outd[i] = r5_outd[i];
      st_ina[i]  = r5_outa[(i + N - 1) % N];
    end
    for (int j = 0; j < S; j++) begin
      st_fire[N+j] = i5_s_fire[j]; st_outa[N+j] = i5_s_outa[j]; st_outd[N+j] = i5_s_outd[j];
      st_ina[N+j]  = (j == 0) ? (i5_merge_fire_a ? i5_ra_outa[P-1] : i5_rb_outa[P-1]) : i5_s_outa[j-1];
    end
    for (int k = 0; k < P; k++) begin
      st_fire[N+S+k]   = i5_ra_fire[k]; st_outa[N+S+k]   = i5_ra_outa[k]; st_outd[N+S+k]   = i5_ra_outd[k];
      st_ina[N+S+k]    = (k == 0) ? i5_s_outa[S-1] : i5_ra_outa[k == 0 ? 0 : k-1];
      st_fire[N+S+P+k] = i5_rb_fire[k]; st_outa[N+S+P+k] = i5_rb_outa[k]; st_outd[N+S+P+k] = i5_rb_outd[k];
      st_ina[N+S+P+k]  = (k == 0) ? i5_s_outa[S-1] : i5_rb_outa[k == 0 ? 0 : k-1];
    end
  end

  data_t msg_data [int];
  logic  msg_t    [int];
  int    check_at [NST];
  data_t d_before [NST];
  logic  fire_q   [NST];

  always @(negedge clk) begin
    tick++;
    if (!rst) begin
      if (r5_fire[0] && !r5f_q)            c_r5++;
      if (i5_s_fire[1] && !shf_q)          c_sh++;
      if (i5_ra_fire[0] && !af_q)          c_a++;
      if (i5_rb_fire[0] && !bf_q)          c_b++;
      if (i5_merge_fire_a && !ma_q)        m_merge_a++;
      if (i5_merge_fire_b && !mb_q)        m_merge_b++;
      if (i5_wa[0] && !wa0_q)              m_branch_a++;
      if (i5_wb[0] && !wb0_q)              m_branch_b++;
      if (dut.u_inf5.u_merge.tie)          m_tie++;
      for (int i = 0; i < N; i++)
        if (r5_wire[(i + N - 1) % N] && r5_wire[i] && !r5_fire[i]) m_wait++;
      r5f_q = r5_fire[0]; shf_q = i5_s_fire[1]; af_q = i5_ra_fire[0]; bf_q = i5_rb_fire[0];
      ma_q = i5_merge_fire_a; mb_q = i5_merge_fire_b; wa0_q = i5_wa[0]; wb0_q = i5_wb[0];
      for (int i = 0; i < NST; i++) begin
        if (st_fire[i] && !fire_q[i]) begin
          check_at[i] = tick + 7;
          d_before[i] = st_outd[i];
          if (i < N) m_r5_fire++;
          if (!st_ina[i].t) m_gated++;
        end
        if (tick == check_at[i]) begin
          int id;
          id = int'(st_outa[i].num);
          checks++;
          if (!msg_t.exists(id) || st_outa[i].t != msg_t[id] ||
              (msg_t[id] && st_outd[i] != msg_data[id]) ||
              (!msg_t[id] && st_outd[i] != d_before[i])) begin
            failures++;
            $display("FAIL stage %0d: bad message a=%0d t=%0b", i, id, st_outa[i].t);
          end
        end
        fire_q[i] = st_fire[i];
      end
    end
  end

  // address a[14:2] = serial, a[1] = infinity ring (0 A, 1 B)
  function automatic addr_t make_msg(input int serial, input int ring, input logic t);
    addr_t a;
    a.num = 14'((serial << 1) | ring);
    a.t   = t;
    msg_data[int'(a.num)] = {$urandom(), $urandom()};
    msg_t[int'(a.num)]    = t;
    return a;
  endfunction

  task automatic expect_mech(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    int serial, exp_r5;
    r5f_q = 0; shf_q = 0; af_q = 0; bf_q = 0; ma_q = 0; mb_q = 0; wa0_q = 0; wb0_q = 0;
    for (int i = 0; i < NST; i++) begin check_at[i] = -1; fire_q[i] = 0; end
    rst = 1;
    serial = 1;
    // ring5: four messages in five stages, one of them a token; the single
    // gap limits the rate, so stages wait on FULL successors
    r5_init_full = 5'b01111;
    for (int i = 0; i < N; i++) begin r5_init_a[i] = '1; r5_init_d[i] = '0; end
    for (int i = 0; i < 4; i++) begin
      r5_init_a[i] = make_msg(serial++, 0, i != 1);
      r5_init_d[i] = msg_data[int'(r5_init_a[i].num)];
    end
    // infinity5: ring A two messages, ring B two (one token), placed so the
    // first two arrive at the merge together
    for (int j = 0; j < S; j++) begin i5_init_s_a[j] = '1; i5_init_s_d[j] = '0; end
    for (int k = 0; k < P; k++) begin
      i5_init_ra_a[k] = '1; i5_init_ra_d[k] = '0; i5_init_rb_a[k] = '1; i5_init_rb_d[k] = '0;
    end
    i5_init_ws = '0; i5_init_wa = '0; i5_init_wb = '0;
    i5_init_ra_a[3] = make_msg(serial++, 0, 1'b1); i5_init_ra_d[3] = msg_data[int'(i5_init_ra_a[3].num)]; i5_init_wa[4] = 1;
    i5_init_rb_a[3] = make_msg(serial++, 1, 1'b1); i5_init_rb_d[3] = msg_data[int'(i5_init_rb_a[3].num)]; i5_init_wb[4] = 1;
    i5_init_ra_a[0] = make_msg(serial++, 0, 1'b1); i5_init_ra_d[0] = msg_data[int'(i5_init_ra_a[0].num)]; i5_init_wa[1] = 1;
    i5_init_rb_a[1] = make_msg(serial++, 1, 1'b0); i5_init_rb_d[1] = msg_data[int'(i5_init_rb_a[1].num)]; i5_init_wb[2] = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (RUN) @(posedge clk);
    #1;
    checks++;
    if (r5_count != 32'(c_r5) || i5_shared_count != 32'(c_sh) ||
        i5_a_count != 32'(c_a) || i5_b_count != 32'(c_b)) begin
      failures++;
      $display("FAIL counters %0d %0d %0d %0d, testbench saw %0d %0d %0d %0d",
               r5_count, i5_shared_count, i5_a_count, i5_b_count, c_r5, c_sh, c_a, c_b);
    end
    // four messages, one gap in five stages: the gap moves back 4 ticks per
    // stage, so a stage fires once per 20 ticks
    exp_r5 = RUN / 20;
    checks++;
    if (int'(r5_count) < exp_r5 - 2 || int'(r5_count) > exp_r5 + 1) begin
      failures++;
      $display("FAIL ring5 throughput %0d, expected about %0d", r5_count, exp_r5);
    end
    expect_mech("ring5 FIRE", m_r5_fire);
    expect_mech("wait on FULL successor", m_wait);
    expect_mech("data clock gating (T = ZERO)", m_gated);
    expect_mech("merge grant A", m_merge_a);
    expect_mech("merge grant B", m_merge_b);
    expect_mech("arbiter tie", m_tie);
    expect_mech("branch fill A", m_branch_a);
    expect_mech("branch fill B", m_branch_b);
    $display("mechanisms: ring5 fires %0d, waits %0d, gated %0d, merge A %0d B %0d, ties %0d, branch A %0d B %0d",
             m_r5_fire, m_wait, m_gated, m_merge_a, m_merge_b, m_tie, m_branch_a, m_branch_b);
    $display("counters: ring5 %0d, shared %0d, ring A %0d, ring B %0d",
             r5_count, i5_shared_count, i5_a_count, i5_b_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
