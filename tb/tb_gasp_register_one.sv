// tb_gasp_register_one -- self-checking test of the one-input register.
//
// Drives 5-tick FIRE pulses, as a 6-4 GasP stage makes them, with random
// inputs. Checks that the address (a[1:14], T) appears one tick after FIRE
// rises, that the data appear two ticks after the address, that the data
// latches stay closed when the incoming T is ZERO, that the latches close
// again with FIRE (inputs changed afterwards are not taken), and that reset
// loads the initial contents.
module tb_gasp_register_one;
  import gasp_pkg::*;

  logic  clk = 1'b0;
  logic  rst, fire;
  addr_t init_a, ina, outa;
  data_t init_d, ind, outd;
  int    checks = 0, failures = 0;

  gasp_register_one dut (.clk, .rst, .init_a, .init_d, .fire, .ina, .ind, .outa, .outd);

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
    addr_t a_now, a_new;
    data_t d_now, d_new;
    fire = 0; rst = 1;
    init_a = addr_t'(15'h5a5a); init_d = data_t'(37'h1_2345_6789);
    ina = '0; ind = '0;
    @(posedge clk); @(posedge clk); #1;
    expect_reg("reset contents", init_a, init_d);
    rst = 0;
    a_now = init_a; d_now = init_d;
    for (int m = 0; m < 300; m++) begin
      a_new = addr_t'($urandom());
      a_new.t = (m % 4 != 3);  // every fourth message is a token (T = ZERO)
      d_new = rand_data();
      ina = a_new; ind = d_new;
      @(posedge clk); #1 fire = 1;          // FIRE HI from tick f
      expect_reg("tick f: nothing yet", a_now, d_now);
      @(posedge clk); #1;                   // tick f+1
      expect_reg("tick f+1: address in", a_new, d_now);
      @(posedge clk); #1;                   // tick f+2
      expect_reg("tick f+2: data not yet", a_new, d_now);
      @(posedge clk); #1;                   // tick f+3
      a_now = a_new;
      if (a_new.t) d_now = d_new;
      expect_reg("tick f+3: data in if T", a_now, d_now);
      @(posedge clk); @(posedge clk); #1 fire = 0;  // FIRE LO from tick f+5
      @(posedge clk); @(posedge clk); #1;           // tick f+7
      // latches closed again: new inputs are not taken
      ina = addr_t'($urandom()); ind = rand_data();
      repeat (3) @(posedge clk); #1;
      expect_reg("closed after FIRE", a_now, d_now);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
