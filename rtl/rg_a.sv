// rg_a -- register RgA, which holds the 2N-bit number A being reduced.
//
// A is loaded from the data input on the clock edge where start is high and
// held until the next start, so that every partial remainder former can read
// its own K-bit group of A, and the first former its upper N bits, for as long
// as the combinational former chain takes to settle.
//
// Interface: clk, rst_n (asynchronous, active low), start, a_in (2N bits);
// a_q is the stored number. Timing: one register stage, no other latency.
module rg_a #(
  parameter int unsigned N = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [2*N-1:0]  a_in,
  output logic [2*N-1:0]  a_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     a_q <= '0;
    else if (start) a_q <= a_in;
  end

endmodule
