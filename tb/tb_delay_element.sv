// tb_delay_element -- self-checking test of the delay element.
//
// Instances with DEPTH = 3 (the default: N = 6 read two bits per step) and
// DEPTH = 2 (three bits per step). After each start, ready must be low for
// DEPTH-1 cycles and high from the DEPTH-th clock edge on (that edge counted
// from the one that sampled start), and stay high until the next start. A
// start issued while counting must restart the count. Ready must be low
// after reset.
module tb_delay_element;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic ready3, ready2;
  int checks = 0, failures = 0;
  int cycles = 0;

  delay_element #(.DEPTH(3)) dut3 (.clk, .rst_n, .start, .ready(ready3));
  delay_element #(.DEPTH(2)) dut2 (.clk, .rst_n, .start, .ready(ready2));

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

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: ready=%0b expected %0b at cycle %0d", what, got, exp, cycles);
    end
  endtask

  // Pulse start for one cycle, then watch `idle` cycles; ready of the
  // DEPTH-d instance must rise after d edges.
  task automatic run(input int idle);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;       // one edge has sampled start
    for (int e = 1; e <= idle; e++) begin
      check(ready3, e >= 3, "DEPTH=3");
      check(ready2, e >= 2, "DEPTH=2");
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(ready3, 1'b0, "reset");
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(ready3, 1'b0, "idle after reset");
    check(ready2, 1'b0, "idle after reset");
    run(6);
    run(1);          // restart while the DEPTH=3 count is running
    run(2);
    for (int t = 0; t < 20; t++) run($urandom_range(1, 5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
