// tb_prf3 -- exhaustive self-checking test of the three-bit partial remainder
// former at N = 6: every modulus P = 1..63 and every input A_i < 8P (the
// range the former is specified for). Multiples and complements are computed
// here, and R_i is compared with A_i mod P. Each of the eight outcomes
// (subtract 0, P, ..., 7P) is counted and must occur. The first step
// of the worked example read three bits at a time, A_1 = 8*22 + 3 = 179,
// P = 35 -> 4, is checked by name.
module tb_prf3;
  localparam int unsigned N = 6;
  localparam int unsigned W = N + 3;

  logic [W-1:0] a_i;
  logic [7:1][W-1:0] mult, mult_n;
  logic [N-1:0] r_i;
  int checks = 0, failures = 0;
  int quot_seen [8];

  prf3 #(.N(N)) dut (.a_i, .mult, .mult_n, .r_i);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int unsigned p, input int unsigned a);
    for (int unsigned j = 1; j <= 7; j++) begin
      mult[j]   = W'(j * p);
      mult_n[j] = ~W'(j * p);
    end
    a_i = W'(a);
    #1;
    checks++;
    quot_seen[a / p]++;
    if (r_i != N'(a % p)) begin
      failures++;
      if (failures < 20) $display("P=%0d A_i=%0d: R_i=%0d expected %0d", p, a, r_i, a % p);
    end
  endtask

  initial begin
    apply(35, 179);
    checks++;
    if (r_i != 6'd4) begin failures++; $display("worked step: %0d", r_i); end
    for (int unsigned p = 1; p < 64; p++)
      for (int unsigned a = 0; a < 8 * p; a++)
        apply(p, a);
    for (int q = 0; q < 8; q++) begin
      checks++;
      if (quot_seen[q] == 0) begin failures++; $display("quotient %0d never seen", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
