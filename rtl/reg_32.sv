// reg_32: a WIDTH-bit (default 32, one key word) register with load enable
// and active-low asynchronous reset to zero. The key expander chains eight
// of them as the window of the last eight key words. q follows d one clock
// after a cycle with en high.
module reg_32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
endmodule
