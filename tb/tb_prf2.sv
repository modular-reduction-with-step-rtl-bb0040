// tb_prf2 -- exhaustive self-checking test of the two-bit partial remainder
// former at N = 6: every modulus P = 1..63 and every input A_i < 4P (the
// range the former is specified for). Multiples and complements are computed
// here, and R_i is compared with A_i mod P. Each of the four outcomes
// (subtract 0, P, 2P or 3P) is counted and must occur. The worked step
// A_1 = 89, P = 35 -> 19 is checked by name.
module tb_prf2;
  localparam int unsigned N = 6;
  localparam int unsigned W = N + 2;

  logic [W-1:0] a_i;
  logic [3:1][W-1:0] mult, mult_n;
  logic [N-1:0] r_i;
  int checks = 0, failures = 0;
  int quot_seen [4];

  prf2 #(.N(N)) dut (.a_i, .mult, .mult_n, .r_i);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int unsigned p, input int unsigned a);
    for (int unsigned j = 1; j <= 3; j++) begin
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
    apply(35, 89);
    checks++;
    if (r_i != 6'd19) begin failures++; $display("worked step: %0d", r_i); end
    for (int unsigned p = 1; p < 64; p++)
      for (int unsigned a = 0; a < 4 * p; a++)
        apply(p, a);
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quot_seen[q] == 0) begin failures++; $display("quotient %0d never seen", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
