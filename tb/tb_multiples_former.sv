// tb_multiples_former -- self-checking test of the multiples former.
//
// Two instances, K = 2 (multiples up to 3P) and K = 3 (up to 7P), both with
// N = 6. Every modulus 1..63 is loaded with start; each multiple j*P and its
// complement are compared with products computed here. The test also checks
// that P is held while start is low and that reset clears it.
module tb_multiples_former;
  localparam int unsigned N = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [N-1:0] p_in = '0;
  logic [3:1][N+1:0] m2, m2n;
  logic [7:1][N+2:0] m3, m3n;
  int checks = 0, failures = 0;
  int cycles = 0;

  multiples_former #(.N(N), .K(2)) dut2 (.clk, .rst_n, .start, .p_in, .mult(m2), .mult_n(m2n));
  multiples_former #(.N(N), .K(3)) dut3 (.clk, .rst_n, .start, .p_in, .mult(m3), .mult_n(m3n));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check_all(input int unsigned p);
    for (int unsigned j = 1; j <= 3; j++) begin
      checks++;
      if (m2[j] != (N+2)'(j * p) || m2n[j] != ~((N+2)'(j * p))) begin
        failures++;
        $display("K=2 P=%0d j=%0d: got %0d / %0h", p, j, m2[j], m2n[j]);
      end
    end
    for (int unsigned j = 1; j <= 7; j++) begin
      checks++;
      if (m3[j] != (N+3)'(j * p) || m3n[j] != ~((N+3)'(j * p))) begin
        failures++;
        $display("K=3 P=%0d j=%0d: got %0d / %0h", p, j, m3[j], m3n[j]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check_all(0);                       // cleared by reset
    for (int unsigned p = 1; p < 64; p++) begin
      @(negedge clk);
      p_in = N'(p); start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      p_in = N'(p ^ 6'h2a);               // must not be taken without start
      check_all(p);
      @(negedge clk);
      check_all(p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
