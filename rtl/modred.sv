// modred -- modular reduction device R = A mod P, A of 2N bits, P of N bits,
// consuming K bits of A per step.
//
// Idea: instead of dividing the whole 2N-bit number, the device reduces it a
// few bits at a time. The upper N bits of A are the first partial remainder
// R0 (this needs A < P * 2^N, which holds whenever A is the product of two
// residues mod P, the case in modular multiplication). Each following step
// shifts the previous remainder left by K bits and appends the next K bits
// of A: A_i = 2^K * R_(i-1) + a-group_i < 2^K * P. A partial remainder former
// (PRF) reduces A_i to R_i = A_i mod P by subtracting the right multiple of P,
// found by comparing A_i with the multiples in parallel. After N/K formers
// the last remainder is A mod P.
//
// Structure (following the document's structural diagram):
//   * multiples_former: latches P on start, forms P..(2^K-1)P and their
//     one's complements for all formers;
//   * rg_a: latches A on start;
//   * N/K formers in a combinational chain, prf2 for K = 2 (the main
//     configuration) or prf3 for K = 3;
//   * delay_element: raises ready N/K clock edges after start, budgeting one
//     clock period per former.
// The ready flag and the clocked budget are this design's choices; the
// document specifies only the delay element and the total delay N/K * T_PRF.
//
// Interface: clk, rst_n (asynchronous, active low); start loads p_in and
// a_in. r_out = A mod P, valid while ready is high. r_partial[i] is the
// partial remainder R_i of former i (r_partial[N/K] = r_out).
// Timing: ready is high N/K clock edges after the edge that sampled start
// (3 for the default N = 6, K = 2); the clock period must cover one former.
// Lint note: the two operating-range assertions use rst_n in disable iff,
// which a linter reports as rst_n being used both synchronously and
// asynchronously; that use is in checking code only, not in the circuit.
module modred #(
  parameter int unsigned N = 6,
  parameter int unsigned K = 2,
  localparam int unsigned S = N / K,
  localparam int unsigned M = (1 << K) - 1,
  localparam int unsigned W = N + K
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [N-1:0]       p_in,
  input  logic [2*N-1:0]     a_in,
  output logic [N-1:0]       r_out,
  output logic               ready,
  output logic [S:1][N-1:0]  r_partial
);

  if (K != 2 && K != 3) begin : g_bad_k
    $error("modred: K must be 2 or 3");
  end
  if (N % K != 0) begin : g_bad_n
    $error("modred: N must be a multiple of K");
  end

  logic [M:1][W-1:0] mult, mult_n;
  logic [2*N-1:0]    a_q;
  logic [S:0][N-1:0] r;       // r[0] = R0, r[i] = output of former i

  multiples_former #(.N(N), .K(K)) u_mult (
    .clk, .rst_n, .start, .p_in, .mult, .mult_n
  );

  rg_a #(.N(N)) u_rga (
    .clk, .rst_n, .start, .a_in, .a_q
  );

  delay_element #(.DEPTH(S)) u_de (
    .clk, .rst_n, .start, .ready
  );

  assign r[0] = a_q[2*N-1:N];

  for (genvar i = 1; i <= S; i++) begin : g_prf
    logic [W-1:0] a_i;
    assign a_i = {r[i-1], a_q[N-1-(i-1)*K -: K]};
    if (K == 2) begin : g_k2
      prf2 #(.N(N)) u_prf (.a_i, .mult, .mult_n, .r_i(r[i]));
    end else begin : g_k3
      prf3 #(.N(N)) u_prf (.a_i, .mult, .mult_n, .r_i(r[i]));
    end
  end

  assign r_out     = r[S];
  assign r_partial = r[S:1];

  // Operating conditions of the method: a nonzero modulus, and an upper half
  // of A that is already below P.
  a_nonzero_p: assert property (@(posedge clk) disable iff (!rst_n)
                                start |-> (p_in != '0))
    else $error("modred: modulus P must be nonzero");
  a_upper_below_p: assert property (@(posedge clk) disable iff (!rst_n)
                                    start |-> (a_in[2*N-1:N] < p_in))
    else $error("modred: upper half of A must be below P");

endmodule
