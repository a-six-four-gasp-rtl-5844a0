// tb_gasp_register_two -- self-checking test of the twin-input register.
//
// Alternates random 5-tick fire[A] and fire[B] pulses (never both) with
// random inputs on both sides. Checks that fire[A] takes (ina, ind) and
// fire[B] takes (inb, ine), address one tick after fire rises and data two
// ticks later, that each side's data latch gate follows that side's own
// incoming T bit, and that nothing is taken while both fires are LO.
module tb_gasp_register_two;
  import gasp_pkg::*;

  logic  clk = 1'b0;
  logic  rst, fire_a, fire_b;
  addr_t init_a, ina, inb, outa;
  data_t init_d, ind, ine, outd;
  int    checks = 0, failures = 0;

  gasp_register_two dut (.clk, .rst, .init_a, .init_d, .fire_a, .fire_b,
                         .ina, .ind, .inb, .ine, .outa, .outd);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t rand_data();
    return {$urandom(), $urandom()};
  endfunction

  task automatic expect_reg(input string what, input addr_t ea, input data_t ed);
    checks++;
    if (outa !== ea || outd !== ed) begin
      failures++;
      $display("FAIL %s: outa=%h outd=%h expected %h %h", what, outa, outd, ea, ed);
    end
  endtask

  initial begin
    addr_t a_now, a_sel;
    data_t d_now, d_sel;
    logic  side;
    fire_a = 0; fire_b = 0; rst = 1;
    init_a = addr_t'(15'h0123); init_d = data_t'(37'h0_fedc_ba98);
    ina = '0; ind = '0; inb = '0; ine = '0;
    @(posedge clk); @(posedge clk); #1;
    expect_reg("reset contents", init_a, init_d);
    rst = 0;
    a_now = init_a; d_now = init_d;
    for (int m = 0; m < 300; m++) begin
      side = $urandom_range(0, 1);
      ina = addr_t'($urandom()); ind = rand_data();
      inb = addr_t'($urandom()); ine = rand_data();
      ina.t = $urandom_range(0, 3) != 0;
      inb.t = $urandom_range(0, 3) != 0;
      a_sel = side ? inb : ina;
      d_sel = side ? ine : ind;
      @(posedge clk); #1;
      if (side) fire_b = 1; else fire_a = 1;
      @(posedge clk); #1;
      expect_reg("tick f+1: address in", a_sel, d_now);
      @(posedge clk); @(posedge clk); #1;
      a_now = a_sel;
      if (a_sel.t) d_now = d_sel;
      expect_reg("tick f+3: data in if T", a_now, d_now);
      @(posedge clk); @(posedge clk); #1 fire_a = 0; fire_b = 0;
      @(posedge clk); @(posedge clk); #1;
      ina = addr_t'($urandom()); ind = rand_data();
      inb = addr_t'($urandom()); ine = rand_data();
      repeat (3) @(posedge clk); #1;
      expect_reg("closed after fire", a_now, d_now);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
