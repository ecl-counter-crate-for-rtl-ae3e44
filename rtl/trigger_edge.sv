`timescale 1ns/1ps
// Trigger edge detector of a drawer.
//
// The selected (and finely delayed) trigger is sampled by the drawer clock.
// load is high during the first clock cycle after the clock edge that first
// sees the trigger high: in that cycle the counters take their settings and
// the fine delay chips latch theirs. A trigger that stays high starts only
// one load. The trigger path's own fine delay sets where the trigger edge
// falls inside the clock period; there is no extra synchroniser stage, as
// that would add a cycle of latency. Reset is asynchronous, active low.
module trigger_edge (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,
  output logic load
);

  logic trig_q, trig_qq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_q  <= 1'b0;
      trig_qq <= 1'b0;
    end else begin
      trig_q  <= trig;
      trig_qq <= trig_q;
    end
  end

  assign load = trig_q & ~trig_qq;

endmodule
