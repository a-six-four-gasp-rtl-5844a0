// tb_gasp_infinity5 -- self-checking test of the coupled GasP rings.
//
// Resets the two rings with messages in both private sections and in the
// shared section. Address bit a[1] (the branch's direction bit) is 0 for
// messages of ring A and 1 for ring B, so each message must keep coming back
// to its own ring. One message of ring B is a token (T = ZERO). Checks:
//  * every register capture (seven ticks after its FIRE) holds a known
//    message, with its data (T = ONE) or with the data latches untouched
//    (T = ZERO); a private stage of ring A only ever sees ring A messages,
//    and likewise for B;
//  * messages of one ring never overtake each other: at each private stage
//    the sequence of message ids repeats with the number of that ring's
//    messages as its period;
//  * fire[A] and fire[B] of the merge are never HI together;
//  * every message keeps moving (each passes the shared section often);
//  * the merge served both sides, broke at least one tie, the branch filled
//    both successors, and stages waited on FULL successors.
module tb_gasp_infinity5;
  import gasp_pkg::*;

  localparam int S   = 5;
  localparam int P   = 5;
  localparam int NST = S + 2 * P;  // stages: shared 0..S-1, A S..S+P-1, B after
  localparam int RUN = 6000;

  logic clk = 1'b0;
  logic rst;
  logic [S-2:0]   init_ws;
  logic [P:0]     init_wa, init_wb;
  addr_t [S-1:0]  init_s_a;
  data_t [S-1:0]  init_s_d;
  addr_t [P-1:0]  init_ra_a, init_rb_a;
  data_t [P-1:0]  init_ra_d, init_rb_d;
  logic           merge_fire_a, merge_fire_b;
  logic [S-1:0]   s_fire;
  logic [P-1:0]   ra_fire, rb_fire;
  logic [S-2:0]   ws;
  logic [P:0]     wa, wb;
  addr_t [S-1:0]  s_outa;
  data_t [S-1:0]  s_outd;
  addr_t [P-1:0]  ra_outa, rb_outa;
  data_t [P-1:0]  ra_outd, rb_outd;

  gasp_infinity5 dut (.*);

  int checks = 0, failures = 0, tick = 0;
  int n_fa = 0, n_fb = 0, n_ties = 0, n_to_a = 0, n_to_b = 0, n_wait = 0;
  logic fa_q, fb_q, wa0_q, wb0_q;

  always #5 clk = ~clk;

  initial begin
    repeat (RUN + 4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // flattened view of the stages
  logic  st_fire [NST];
  addr_t st_outa [NST];
  data_t st_outd [NST];
  int    st_ring [NST];  // 0 shared, 1 ring A, 2 ring B
  always_comb begin
    for (int j = 0; j < S; j++) begin
      st_fire[j] = s_fire[j]; st_outa[j] = s_outa[j]; st_outd[j] = s_outd[j]; st_ring[j] = 0;
    end
    for (int k = 0; k < P; k++) begin
      st_fire[S+k]   = ra_fire[k]; st_outa[S+k]   = ra_outa[k]; st_outd[S+k]   = ra_outd[k];
      st_ring[S+k]   = 1;
      st_fire[S+P+k] = rb_fire[k]; st_outa[S+P+k] = rb_outa[k]; st_outd[S+P+k] = rb_outd[k];
      st_ring[S+P+k] = 2;
    end
  end

  data_t msg_data [int];
  logic  msg_t    [int];
  int    msg_pass [int];
  int    n_ring   [3];
  int    seen     [NST][$];
  int    check_at [NST];
  data_t d_before [NST];
  logic  fire_q   [NST];

  always @(negedge clk) begin
    tick++;
    if (!rst) begin
      if (merge_fire_a && merge_fire_b) begin
        failures++;
        $display("FAIL merge fires together at tick %0d", tick);
      end
      if (merge_fire_a && !fa_q) n_fa++;
      if (merge_fire_b && !fb_q) n_fb++;
      if (dut.u_merge.tie) n_ties++;
      if (wa[0] && !wa0_q) n_to_a++;
      if (wb[0] && !wb0_q) n_to_b++;
      if ((ws[0] && ws[1] && !s_fire[1]) || (wa[1] && wa[2] && !ra_fire[1])) n_wait++;
      fa_q = merge_fire_a; fb_q = merge_fire_b; wa0_q = wa[0]; wb0_q = wb[0];
      for (int i = 0; i < NST; i++) begin
        if (st_fire[i] && !fire_q[i]) begin
          check_at[i] = tick + 7;
          d_before[i] = st_outd[i];
        end
        if (tick == check_at[i]) begin
          int id;
          id = int'(st_outa[i].num);
          checks++;
          if (!msg_t.exists(id)) begin
            failures++;
            $display("FAIL stage %0d holds unknown address %0d", i, id);
          end else begin
            if (st_outa[i].t != msg_t[id] ||
                (msg_t[id] && st_outd[i] != msg_data[id]) ||
                (!msg_t[id] && st_outd[i] != d_before[i])) begin
              failures++;
              $display("FAIL stage %0d message %0d corrupted", i, id);
            end
            if (st_ring[i] != 0 && st_ring[i] != 1 + (id & 1)) begin
              failures++;
              $display("FAIL stage %0d (ring %0d) got message %0d of the other ring", i, st_ring[i], id);
            end
            if (i == 1) msg_pass[id]++;
            if (st_ring[i] != 0) begin
              int nr;
              nr = n_ring[st_ring[i]];
              seen[i].push_back(id);
              if (seen[i].size() > nr) begin
                checks++;
                if (seen[i][seen[i].size() - 1 - nr] != id) begin
                  failures++;
                  $display("FAIL stage %0d: message order broken", i);
                end
              end
            end
          end
        end
        fire_q[i] = st_fire[i];
      end
    end
  end

  // message ids: address a[14:2] = serial number, a[1] = ring (0 A, 1 B)
  function automatic addr_t make_msg(input int serial, input int ring, input logic t);
    addr_t a;
    data_t d;
    a.num = 14'((serial << 1) | ring);
    a.t   = t;
    d     = {$urandom(), $urandom()};
    msg_data[int'(a.num)] = d;
    msg_t[int'(a.num)]    = t;
    msg_pass[int'(a.num)] = 0;
    n_ring[1 + ring]++;
    return a;
  endfunction

  initial begin
    int serial;
    fa_q = 0; fb_q = 0; wa0_q = 0; wb0_q = 0;
    for (int phase = 0; phase < 2; phase++) begin
      for (int i = 0; i < NST; i++) begin check_at[i] = -1; fire_q[i] = 0; seen[i].delete(); end
      n_ring[0] = 0; n_ring[1] = 0; n_ring[2] = 0;
      msg_data.delete(); msg_t.delete(); msg_pass.delete();
      rst = 1;
      // fill with junk that is not a message, then place messages
      for (int j = 0; j < S; j++) begin init_s_a[j] = '1; init_s_d[j] = '0; end
      for (int k = 0; k < P; k++) begin
        init_ra_a[k] = '1; init_ra_d[k] = '0; init_rb_a[k] = '1; init_rb_d[k] = '0;
      end
      init_ws = '0; init_wa = '0; init_wb = '0;
      serial = 1;
      if (phase == 0) begin
        // ring A: messages held by private stages 0 and 2 (wires wa[1], wa[3])
        init_ra_a[0] = make_msg(serial++, 0, 1'b1); init_ra_d[0] = msg_data[int'(init_ra_a[0].num)]; init_wa[1] = 1;
        init_ra_a[2] = make_msg(serial++, 0, 1'b1); init_ra_d[2] = msg_data[int'(init_ra_a[2].num)]; init_wa[3] = 1;
        // ring B: messages at private stages 1, 3 and 4 (one a token)
        init_rb_a[1] = make_msg(serial++, 1, 1'b1); init_rb_d[1] = msg_data[int'(init_rb_a[1].num)]; init_wb[2] = 1;
        init_rb_a[3] = make_msg(serial++, 1, 1'b0); init_rb_d[3] = msg_data[int'(init_rb_a[3].num)]; init_wb[4] = 1;
        init_rb_a[4] = make_msg(serial++, 1, 1'b1); init_rb_d[4] = msg_data[int'(init_rb_a[4].num)]; init_wb[5] = 1;
        // shared: the merge's register holds a ring-A message (wire ws[0])
        init_s_a[0]  = make_msg(serial++, 0, 1'b1); init_s_d[0]  = msg_data[int'(init_s_a[0].num)];  init_ws[0] = 1;
      end else begin
        // mirror-image placement: one message per ring at the same place,
        // so both reach the merge in the same tick and tie there
        init_ra_a[1] = make_msg(serial++, 0, 1'b1); init_ra_d[1] = msg_data[int'(init_ra_a[1].num)]; init_wa[2] = 1;
        init_rb_a[1] = make_msg(serial++, 1, 1'b1); init_rb_d[1] = msg_data[int'(init_rb_a[1].num)]; init_wb[2] = 1;
      end
      repeat (3) @(posedge clk);
      #1 rst = 0;
      repeat (RUN / 2) @(posedge clk);
      foreach (msg_pass[id]) begin
        checks++;
        if (msg_pass[id] < 10) begin
          failures++;
          $display("FAIL phase %0d: message %0d passed the shared section only %0d times",
                   phase, id, msg_pass[id]);
        end
      end
    end

    checks++; if (n_fa == 0)    begin failures++; $display("FAIL merge never served A"); end
    checks++; if (n_fb == 0)    begin failures++; $display("FAIL merge never served B"); end
    checks++; if (n_ties == 0)  begin failures++; $display("FAIL merge never broke a tie"); end
    checks++; if (n_to_a == 0)  begin failures++; $display("FAIL branch never filled succA"); end
    checks++; if (n_to_b == 0)  begin failures++; $display("FAIL branch never filled succB"); end
    checks++; if (n_wait == 0)  begin failures++; $display("FAIL no stage ever waited"); end
    checks++;
    if (n_to_a + n_to_b > n_fa + n_fb + 6 || n_fa + n_fb > n_to_a + n_to_b + 6) begin
      failures++;
      $display("FAIL branch and merge counts differ too much");
    end
    $display("merge A %0d B %0d ties %0d, branch A %0d B %0d, waits %0d",
             n_fa, n_fb, n_ties, n_to_a, n_to_b, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
