// rectangle_load_register -- register behind a 2:1 Read/Iteration multiplexer.
//
// When 'load' is high the register takes the external word 'load_d' (Read);
// otherwise, while 'en' is high, it takes the next-round word 'iter_d'
// (Iteration); with both low it holds. Used for the 64-bit cipher state and
// the 80-bit key state. There is no reset: a load initialises the contents.
// Timing: new value visible one clock after the edge that captures it.
module rectangle_load_register #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             load,
  input  logic             en,
  input  logic [WIDTH-1:0] load_d,
  input  logic [WIDTH-1:0] iter_d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (load)
      q <= load_d;
    else if (en)
      q <= iter_d;
  end

endmodule
