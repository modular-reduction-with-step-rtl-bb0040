// multiples_former -- the unit that forms the multiples of the modulus.
//
// On Start the N-bit modulus P is captured, and from that register the unit
// forms, combinationally, every multiple P, 2P, ..., (2^K-1)P together with its
// one's complement. K is the number of bits of A consumed per reduction step:
// with K = 2 the partial remainder formers need P, 2P, 3P and their
// complements; with K = 3 they need P .. 7P. All multiples are W = N+K bits
// wide, the width of the numbers A_i the formers reduce, so that adding the
// complement plus one subtracts the multiple modulo 2^W.
//
// The multiples are built as a running sum (jP = (j-1)P + P); the document only
// says which multiples are formed, so this construction is a choice of this
// design.
//
// Interface: clk, rst_n (asynchronous, active low), start (load P), p_in.
// mult[j] = j*P and mult_n[j] = ~(j*P), j = 1..M.
// Timing: P is registered on the clock edge where start is high; the
// multiples follow one combinational adder chain later.
module multiples_former #(
  parameter int unsigned N = 6,
  parameter int unsigned K = 2,
  localparam int unsigned M = (1 << K) - 1,
  localparam int unsigned W = N + K
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [N-1:0]        p_in,
  output logic [M:1][W-1:0]   mult,
  output logic [M:1][W-1:0]   mult_n
);

  logic [N-1:0] p_q;   // stored modulus

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     p_q <= '0;
    else if (start) p_q <= p_in;
  end

  always_comb begin
    logic [W-1:0] acc;
    acc = '0;
    for (int unsigned j = 1; j <= M; j++) begin
      acc       = acc + W'(p_q);
      mult[j]   = acc;
      mult_n[j] = ~acc;
    end
  end

endmodule
