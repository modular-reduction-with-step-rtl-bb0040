// prf3 -- partial remainder former for three bits of A per step.
//
// Input A_i = 8*R_(i-1) + (next three bits of A), with R_(i-1) < P, so
// A_i < 8P. The former returns R_i = A_i mod P = A_i - q*P, q = floor(A_i/P)
// in 0..7, with five magnitude comparators in two parallel levels and one
// adder, so that its delay matches the two-bit former (two comparators in
// series, then the adder):
//   * level 1, in parallel: A_i against 2P, 4P and 6P;
//   * level 2, in parallel: one shared comparator against P or 5P and one
//     shared comparator against 3P or 7P, the reference picked by the 4P
//     result;
//   * q = {A_i>=4P, A_i>=2P or 6P, A_i>=odd multiple} selects ~(qP) for the
//     adder's second input, carry-in = (q != 0).
// The document gives the former's function, the number of comparators (five)
// and that they work in parallel; this split of the comparisons into two
// levels, reusing comparators as the two-bit former does, is this design's
// reading of that.
//
// Interface: a_i (N+3 bits); mult[j] / mult_n[j] = j*P and ~(j*P), j = 1..7,
// all N+3 bits; r_i = A_i mod P (N bits). Purely combinational.
module prf3 #(
  parameter int unsigned N = 6,
  localparam int unsigned W = N + 3
) (
  input  logic [W-1:0]        a_i,
  input  logic [7:1][W-1:0]   mult,
  input  logic [7:1][W-1:0]   mult_n,
  output logic [N-1:0]        r_i
);

  logic         ge2, ge4, ge6;      // level-1 comparators
  logic         ge_lo, ge_hi;       // level-2 shared comparators
  logic [W-1:0] ref_lo, ref_hi;
  logic [2:0]   q;
  logic [W-1:0] add_b;
  logic [N-1:0] sum;                // A_i - qP < P: upper bits are zero

  always_comb begin
    ge2 = (a_i >= mult[2]);
    ge4 = (a_i >= mult[4]);
    ge6 = (a_i >= mult[6]);

    ref_lo = ge4 ? mult[5] : mult[1];
    ref_hi = ge4 ? mult[7] : mult[3];
    ge_lo  = (a_i >= ref_lo);
    ge_hi  = (a_i >= ref_hi);

    q[2] = ge4;
    q[1] = ge4 ? ge6 : ge2;
    q[0] = q[1] ? ge_hi : ge_lo;

    add_b = '0;
    for (int unsigned j = 1; j <= 7; j++)
      if (q == 3'(j)) add_b = mult_n[j];

    sum = N'(a_i + add_b + W'(q != 3'd0));
    r_i = sum;
  end

endmodule
