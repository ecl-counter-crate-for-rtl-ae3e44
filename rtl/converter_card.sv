`timescale 1ns/1ps
// Behavioural model of the ECL/TTL converter card.
//
// This is a simulation model, not synthesizable logic: level translation and
// the monostables are analog circuits. In logic terms the card has four
// TTL-to-ECL converters, four ECL-to-TTL converters, one ECL inverter and
// one TTL inverter. A jumper per ECL-to-TTL channel (mono_sel) inserts a
// monostable in front of the converter that stretches each rising edge into
// a pulse of MONO_NS (about 90 ns), for counter pulses too short for TTL
// inputs. The monostable ignores edges that arrive while its pulse is
// running. Converter propagation delays are not modelled.
module converter_card #(
  parameter int unsigned MONO_NS = 90
) (
  input  logic [3:0] ttl_in,
  output logic [3:0] ecl_out,
  input  logic [3:0] ecl_in,
  input  logic [3:0] mono_sel,   // jumper: 1 = monostable in circuit
  output logic [3:0] ttl_out,
  input  logic       ecl_inv_in,
  output logic       ecl_inv_out,
  input  logic       ttl_inv_in,
  output logic       ttl_inv_out
);

  logic [3:0] mono;

  initial mono = '0;

  for (genvar i = 0; i < 4; i++) begin : g_mono
    always begin
      @(posedge ecl_in[i]);
      mono[i] <= 1'b1;
      #(MONO_NS * 1.0);
      mono[i] <= 1'b0;
    end
  end

  assign ecl_out     = ttl_in;
  assign ttl_out     = (mono_sel & mono) | (~mono_sel & ecl_in);
  assign ecl_inv_out = ~ecl_inv_in;
  assign ttl_inv_out = ~ttl_inv_in;

endmodule
