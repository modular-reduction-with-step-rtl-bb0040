// tb_rg_a -- self-checking test of register RgA.
//
// Loads random 12-bit numbers with start, changes the data input while start
// is low and checks that the register holds, and checks the reset value.
module tb_rg_a;
  localparam int unsigned N = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [2*N-1:0] a_in = '0, a_q, expect_q;
  int checks = 0, failures = 0;
  int cycles = 0;

  rg_a #(.N(N)) dut (.clk, .rst_n, .start, .a_in, .a_q);

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

  task automatic check(input logic [2*N-1:0] e);
    checks++;
    if (a_q != e) begin
      failures++;
      $display("a_q=%0d expected %0d", a_q, e);
    end
  endtask

  initial begin
    a_in = 12'd1437;
    repeat (2) @(posedge clk);
    check('0);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      a_in = (2*N)'($urandom);
      start = ($urandom_range(0, 2) == 0);
      if (start) expect_q = a_in;
      else if (t == 0) expect_q = '0;
      @(negedge clk);
      start = 1'b0;
      a_in = ~a_in;
      check(expect_q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
