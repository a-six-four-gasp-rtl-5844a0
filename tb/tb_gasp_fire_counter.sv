// tb_gasp_fire_counter -- self-checking test of the FIRE pulse counter.
//
// Sends FIRE pulses of random widths (a 6-4 GasP FIRE lasts five ticks;
// other widths are tried too) separated by random gaps, and checks that the
// count equals the number of pulses sent and that reset clears it.
module tb_gasp_fire_counter;

  logic        clk = 1'b0;
  logic        rst, fire;
  logic [31:0] count;
  int          checks = 0, failures = 0, sent = 0;

  gasp_fire_counter dut (.clk, .rst, .fire, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_count(input int exp);
    checks++;
    if (count !== 32'(exp)) begin
      failures++;
      $display("FAIL count=%0d expected %0d", count, exp);
    end
  endtask

  initial begin
    fire = 0; rst = 1;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int p = 0; p < 200; p++) begin
      int w, g;
      w = (p % 3 == 0) ? 5 : $urandom_range(1, 8);
      g = $urandom_range(1, 6);
      #1 fire = 1;
      repeat (w) @(posedge clk);
      #1 fire = 0;
      sent++;
      repeat (g) @(posedge clk);
      #1 check_count(sent);
    end
    rst = 1;
    @(posedge clk); #1;
    check_count(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
