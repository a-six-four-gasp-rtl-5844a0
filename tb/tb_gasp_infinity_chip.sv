// tb_gasp_infinity_chip -- coupled rings at the size of the test chip.
//
// The same structure as gasp_infinity5, built as two rings of 100 stages
// that share 50 (SHARED = 50, PRIVATE = 50). Ring A starts with a message at
// every 8th private stage, ring B with one at every 8th private stage offset
// by 4, and one ring-B message is a token (T = ZERO). Address bit a[1] names
// the ring. Checks, as in the small test: every register capture holds a
// known, uncorrupted message; private stages only see their own ring's
// messages; messages of one ring keep their order; merge fires never
// overlap; and every message goes round its ring several times.
module tb_gasp_infinity_chip;
  import gasp_pkg::*;

  localparam int S   = 50;
  localparam int P   = 50;
  localparam int NST = S + 2 * P;
  localparam int RUN = 8000;

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

  gasp_infinity5 #(.SHARED(S), .PRIVATE(P)) dut (.*);

  int checks = 0, failures = 0, tick = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (RUN + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic  st_fire [NST];
  addr_t st_outa [NST];
  data_t st_outd [NST];
  int    st_ring [NST];
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
      for (int i = 0; i < NST; i++) begin
        if (st_fire[i] && !fire_q[i]) begin
          check_at[i] = tick + 7;
          d_before[i] = st_outd[i];
        end
        if (tick == check_at[i]) begin
          int id;
          id = int'(st_outa[i].num);
          checks++;
          if (!msg_t.exists(id) || st_outa[i].t != msg_t[id] ||
              (msg_t[id] && st_outd[i] != msg_data[id]) ||
              (!msg_t[id] && st_outd[i] != d_before[i]) ||
              (st_ring[i] != 0 && st_ring[i] != 1 + (id & 1))) begin
            failures++;
            $display("FAIL stage %0d holds a wrong message (address %0d)", i, id);
          end else begin
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

  function automatic addr_t make_msg(input int serial, input int ring, input logic t);
    addr_t a;
    a.num = 14'((serial << 1) | ring);
    a.t   = t;
    msg_data[int'(a.num)] = {$urandom(), $urandom()};
    msg_t[int'(a.num)]    = t;
    msg_pass[int'(a.num)] = 0;
    n_ring[1 + ring]++;
    return a;
  endfunction

  initial begin
    int serial;
    for (int i = 0; i < NST; i++) begin check_at[i] = -1; fire_q[i] = 0; end
    n_ring[0] = 0; n_ring[1] = 0; n_ring[2] = 0;
    rst = 1;
    for (int j = 0; j < S; j++) begin init_s_a[j] = '1; init_s_d[j] = '0; end
    init_ws = '0; init_wa = '0; init_wb = '0;
    serial = 1;
    for (int k = 0; k < P; k++) begin
      init_ra_a[k] = '1; init_ra_d[k] = '0; init_rb_a[k] = '1; init_rb_d[k] = '0;
      if (k % 8 == 0) begin
        init_ra_a[k] = make_msg(serial++, 0, 1'b1);
        init_ra_d[k] = msg_data[int'(init_ra_a[k].num)];
        init_wa[k+1] = 1;
      end
      if (k % 8 == 4) begin
        init_rb_a[k] = make_msg(serial++, 1, k != 12);
        init_rb_d[k] = msg_data[int'(init_rb_a[k].num)];
        init_wb[k+1] = 1;
      end
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (RUN) @(posedge clk);
    // a lap is 100 stages of 6 ticks; with the shared section contended a
    // message still completes at least 5 laps in RUN ticks
    foreach (msg_pass[id]) begin
      checks++;
      if (msg_pass[id] < 5) begin
        failures++;
        $display("FAIL message %0d passed the shared section only %0d times", id, msg_pass[id]);
      end
    end
    $display("messages: ring A %0d, ring B %0d", n_ring[1], n_ring[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
