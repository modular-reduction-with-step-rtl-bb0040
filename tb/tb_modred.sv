// tb_modred -- end-to-end self-checking test of the modular reduction device
// at its default size (N = 6, two bits of A per step, three formers).
//
// 1. The worked example A = 1437, P = 35: partial remainders 19, 9, 2, and
//    ready exactly three clock edges after start.
// 2. Every modulus P = 1..63 with every A < P * 2^6 (every A whose upper
//    half is below P, the condition the method relies on): r_out = A mod P,
//    each partial remainder equals the reference R_i, and ready rises after
//    exactly three edges. Back-to-back operations are started as soon as
//    ready is seen, and some are restarted before ready.
// Mechanisms counted, each of which must occur: every former subtracting
// 0, P, 2P and 3P; and a restart of an operation before ready.
module tb_modred;
  localparam int unsigned N = 6;
  localparam int unsigned K = 2;
  localparam int unsigned S = N / K;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [N-1:0] p_in = 6'd1;
  logic [2*N-1:0] a_in = '0;
  logic [N-1:0] r_out;
  logic ready;
  logic [S:1][N-1:0] r_partial;
  int checks = 0, failures = 0;
  int cycles = 0;
  longint ops = 0;
  int sub_seen [S+1][4];      // [former][multiple subtracted]
  int restarts = 0;

  modred dut (.clk, .rst_n, .start, .p_in, .a_in, .r_out, .ready, .r_partial);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 5_000_000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%s", msg);
  endtask

  // Start one reduction and check it; with abort set, restart it once
  // before ready with a different A to exercise the restart.
  task automatic reduce(input int unsigned p, input int unsigned a, input bit abort);
    int unsigned rr [S+1];
    int unsigned ai;
    int lat;
    if (abort) begin
      @(negedge clk);
      p_in = N'(p); a_in = (2*N)'((a + 17) % (p << N)); start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      restarts++;
    end
    @(negedge clk);
    p_in = N'(p); a_in = (2*N)'(a); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    p_in = ~p_in; a_in = ~a_in;           // inputs are free once loaded
    // reference: R0 is the upper half, each step appends K bits
    rr[0] = a >> N;
    for (int i = 1; i <= S; i++) begin
      ai = (rr[i-1] << K) | ((a >> (N - i*K)) & ((1 << K) - 1));
      rr[i] = ai % p;
      sub_seen[i][ai / p]++;
    end
    lat = 1;
    while (!ready && lat < 10) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != S) fail($sformatf("P=%0d A=%0d: ready after %0d edges, expected %0d", p, a, lat, S));
    checks++;
    if (r_out != N'(a % p)) fail($sformatf("P=%0d A=%0d: R=%0d expected %0d", p, a, r_out, a % p));
    for (int i = 1; i <= S; i++) begin
      checks++;
      if (r_partial[i] != N'(rr[i]))
        fail($sformatf("P=%0d A=%0d: R_%0d=%0d expected %0d", p, a, i, r_partial[i], rr[i]));
    end
    ops++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (ready) fail("ready high in reset");
    rst_n = 1'b1;

    // worked example
    reduce(35, 1437, 1'b0);
    checks++;
    if (r_partial[1] != 6'd19 || r_partial[2] != 6'd9 || r_partial[3] != 6'd2)
      fail($sformatf("example: partials %0d %0d %0d, expected 19 9 2",
                     r_partial[1], r_partial[2], r_partial[3]));

    for (int unsigned p = 1; p < (1 << N); p++)
      for (int unsigned a = 0; a < (p << N); a++)
        reduce(p, a, (a % 97) == 5);

    for (int i = 1; i <= S; i++)
      for (int q = 0; q < 4; q++) begin
        checks++;
        if (sub_seen[i][q] == 0) fail($sformatf("former %0d never subtracted %0dP", i, q));
        else if (i == 1 || i == S) $display("former %0d subtracted %0dP: %0d times", i, q, sub_seen[i][q]);
      end
    checks++;
    if (restarts == 0) fail("no restart exercised");
    $display("operations %0d, restarts %0d", ops, restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
