// prf2 -- partial remainder former for two bits of A per step.
//
// Input A_i = 4*R_(i-1) + (next two bits of A), with R_(i-1) < P, so
// A_i < 4P. The former returns R_i = A_i mod P by subtracting 0, P, 2P or 3P,
// chosen with two magnitude comparators and a single adder:
//   * CC-1 compares A_i with 2P.
//   * CC-2 is shared: its reference is P when A_i < 2P and 3P when A_i >= 2P
//     (gate blocks AND1/AND2 and OR1 steer the reference).
//   * The decision selects the complement ~P, ~2P or ~3P (gate blocks
//     AND3/AND4/AND5 and OR2) onto the second adder input, and sets the
//     adder's carry-in to 1 unless A_i < P (gates AND6, NOT, AND7), so the
//     adder forms A_i + ~(jP) + 1 = A_i - jP, or A_i + 0 when A_i < P.
//   * AND8, enabled by OR3 of the two CC-2 outputs, gates A_i onto the first
//     adder input.
// This gate structure follows the document's functional diagram; names of the
// internal signals follow its gate labels. The former is purely
// combinational: its delay is two comparators in series plus one adder.
//
// Interface: a_i (N+2 bits); mult[j] / mult_n[j] = j*P and ~(j*P), j = 1..3,
// all N+2 bits, from the multiples former; r_i = A_i mod P (N bits).
module prf2 #(
  parameter int unsigned N = 6,
  localparam int unsigned W = N + 2
) (
  input  logic [W-1:0]        a_i,
  input  logic [3:1][W-1:0]   mult,
  input  logic [3:1][W-1:0]   mult_n,
  output logic [N-1:0]        r_i
);

  // CC-1: A_i against 2P. out1: A_i < 2P, out2: A_i >= 2P.
  logic cc1_out1, cc1_out2;
  // CC-2: A_i against P or 3P.
  logic cc2_out1, cc2_out2;
  logic [W-1:0] cc2_ref;
  logic [W-1:0] add_a, add_b;
  logic [N-1:0] sum;           // A_i - jP < P, so its upper bits are zero
  logic         and6, not_q, cin, or3;

  always_comb begin
    cc1_out2 = (a_i >= mult[2]);
    cc1_out1 = ~cc1_out2;

    // AND1 / AND2 / OR1: reference of the shared comparator
    cc2_ref  = (mult[1] & {W{cc1_out1}}) | (mult[3] & {W{cc1_out2}});
    cc2_out2 = (a_i >= cc2_ref);
    cc2_out1 = ~cc2_out2;

    // AND3 / AND4 / AND5 / OR2: complement of the multiple to subtract
    add_b = (mult_n[1] & {W{cc1_out1 & cc2_out2}})    // P  <= A_i < 2P
          | (mult_n[2] & {W{cc1_out2 & cc2_out1}})    // 2P <= A_i < 3P
          | (mult_n[3] & {W{cc1_out2 & cc2_out2}});   // 3P <= A_i

    // AND6 / NOT / AND7: carry-in is 0 only when A_i < P
    and6  = cc1_out1 & cc2_out1;
    not_q = ~and6;
    cin   = not_q & 1'b1;

    // OR3 / AND8: A_i passes to the adder
    or3   = cc2_out1 | cc2_out2;
    add_a = a_i & {W{or3}};

    sum   = N'(add_a + add_b + W'(cin));
    r_i   = sum;
  end

endmodule
