// gasp_fire_counter -- throughput counter for one GasP stage.
//
// Counts FIRE pulses: each rising edge of fire adds one. Sampling the count
// over a known number of ticks gives the stage's throughput. A ring on a
// test chip needs such a counter; its width and the synchronous clear are
// this design's own choices. count wraps at 2**WIDTH.
module gasp_fire_counter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,    // clears the count
  input  logic             fire,
  output logic [WIDTH-1:0] count
);

  logic fire_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      fire_q <= 1'b0;
      count  <= '0;
    end else begin
      fire_q <= fire;
      if (fire && !fire_q) count <= count + 1'b1;
    end
  end

endmodule
