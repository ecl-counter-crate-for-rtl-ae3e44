`timescale 1ns/1ps
// Fan-out and combiner card.
//
// The card carries two independent ECL functions. The fan-out buffer copies
// one input to four true and two complementary outputs. The combiner ORs its
// inputs and buffers the result to two true and two complementary outputs.
// The number of combiner inputs is not given; four are provided here, one
// per counter output of a drawer. Purely combinational; in logic terms the
// buffers add no delay.
module fanout_combiner #(
  parameter int unsigned COMB_INPUTS = 4
) (
  input  logic                   fo_in,
  output logic [3:0]             fo_out,
  output logic [1:0]             fo_out_n,
  input  logic [COMB_INPUTS-1:0] comb_in,
  output logic [1:0]             comb_out,
  output logic [1:0]             comb_out_n
);

  logic comb_or;

  assign comb_or    = |comb_in;
  assign fo_out     = {4{fo_in}};
  assign fo_out_n   = {2{~fo_in}};
  assign comb_out   = {2{comb_or}};
  assign comb_out_n = {2{~comb_or}};

endmodule
