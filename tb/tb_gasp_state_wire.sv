// tb_gasp_state_wire -- self-checking test of one state wire.
//
// Drives fill and drain pulses and checks, against a plain reference, that
// the wire loads its reset value, turns FULL one tick after fill, EMPTY one
// tick after drain, and holds its level while neither driver is on.
module tb_gasp_state_wire;

  logic clk = 1'b0;
  logic rst, init_full, fill, drain, full;
  logic ref_full;
  int   checks = 0, failures = 0;

  gasp_state_wire dut (.clk, .rst, .init_full, .fill, .drain, .full);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic f, input logic d);
    fill  = f;
    drain = d;
    @(posedge clk);
    if (f)      ref_full = 1'b1;
    else if (d) ref_full = 1'b0;
    #1;
    checks++;
    if (full !== ref_full) begin
      failures++;
      $display("FAIL fill=%0b drain=%0b full=%0b expected %0b", f, d, full, ref_full);
    end
  endtask

  initial begin
    fill = 0; drain = 0;
    for (int r = 0; r < 2; r++) begin
      rst = 1; init_full = r[0];
      @(posedge clk); #1;
      ref_full = r[0];
      checks++;
      if (full !== ref_full) begin
        failures++;
        $display("FAIL reset value %0b", full);
      end
      rst = 0;
      step(0, 0); step(0, 0);
      step(1, 0); step(0, 0); step(0, 0);
      step(0, 1); step(0, 0); step(0, 0);
      step(1, 0); step(0, 1); step(0, 0);
      for (int i = 0; i < 100; i++) begin
        logic f;
        f = $urandom_range(0, 1);
        step(f, ~f & ($urandom_range(0, 1) == 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
