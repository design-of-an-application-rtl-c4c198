// Two-stage synchroniser for an asynchronous input.
//
// The input is sampled on the falling edge of the clock by a synchronising
// flip-flop and passed to a logic flip-flop on the next rising edge, giving the
// first stage half a clock period to settle from metastability. This is the
// synchronising circuit of the design (two D flip-flops and an inverted clock);
// the response delay to an input change is between one half and one and a half
// clock periods (31 to 94 ns at 16 MHz).
//
// Interface: clk, async reset rst_n (active low, forces both stages to
// RESET_VAL), d (asynchronous), q (synchronous to the rising edge).
module sync_ff #(
  parameter int unsigned WIDTH     = 1,
  parameter logic        RESET_VAL = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) meta <= {WIDTH{RESET_VAL}};
    else        meta <= d;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= {WIDTH{RESET_VAL}};
    else        q <= meta;
endmodule
