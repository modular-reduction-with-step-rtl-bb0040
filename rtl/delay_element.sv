// delay_element -- marks when the remainder at the device output is valid.
//
// The former chain is combinational, and its result settles only after all
// DEPTH formers have been passed (T = DEPTH * T_PRF). This element budgets one
// clock period per former: start loads a down-counter with DEPTH-1, and the
// ready flag rises when the counter has run out, DEPTH clock edges after the
// edge that sampled start (that edge included). Ready stays high until the
// next start, which clears it; it is low after reset until the first start.
// The document names the delay element but not its construction; the
// counter, the one-clock-per-former budget and the ready output are this
// design's choices.
//
// Interface: clk, rst_n (asynchronous, active low), start; ready.
module delay_element #(
  parameter int unsigned DEPTH = 3,
  localparam int unsigned CW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic ready
);

  logic [CW-1:0] cnt;
  logic          loaded;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      loaded <= 1'b0;
    end else if (start) begin
      cnt    <= CW'(DEPTH - 1);
      loaded <= 1'b1;
    end else if (cnt != '0) begin
      cnt    <= cnt - 1'b1;
    end
  end

  assign ready = loaded & (cnt == '0);

endmodule
