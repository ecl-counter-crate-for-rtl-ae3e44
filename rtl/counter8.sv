`timescale 1ns/1ps
// One 8-bit counter IC of a delay channel.
//
// A synchronous binary up-counter with parallel load and a terminal-count
// output, the function of the 8-bit ECL counter chips that are cascaded
// three deep in every channel. Load has priority over counting. The count
// enable input lets the stages be chained: a stage advances only when all
// lower stages sit at their terminal count. tc is combinational and high
// while the count is all ones.
//
// Timing: q changes on the rising clock edge after load or ce is sampled
// high. Reset (active low, asynchronous) clears the count; the chips have no
// such reset, it is added so that simulation starts from a known state.
module counter8 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [7:0] d,
  input  logic       ce,
  output logic [7:0] q,
  output logic       tc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
    else if (ce)   q <= q + 8'd1;
  end

  assign tc = &q;

endmodule
