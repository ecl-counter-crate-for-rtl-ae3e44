`timescale 1ns/1ps
// Trigger source selector of a drawer.
//
// All four counters of a drawer start from one trigger, chosen from the four
// rear-connector inputs and the front-panel input by the 3-bit code of the
// control byte (111, 110, 101, 100 for triggers 1 to 4; 000 for the front
// panel). The codes 001 to 011 are not listed for any source; here they
// select nothing and the trigger stays low. The selector is combinational.
// selected is the one-hot choice, bit 4 for the front panel, which the
// drawer shows on its trigger-select LEDs.
module trigger_select
  import ctf3_timing_pkg::*;
(
  input  trig_sel_e                sel,
  input  logic [NUM_TRIG_REAR-1:0] trig_rear,
  input  logic                     trig_fp,
  output logic                     trig,
  output logic [4:0]               selected
);

  always_comb begin
    unique case (sel)
      TRIG_SEL_1:  selected = 5'b00001;
      TRIG_SEL_2:  selected = 5'b00010;
      TRIG_SEL_3:  selected = 5'b00100;
      TRIG_SEL_4:  selected = 5'b01000;
      TRIG_SEL_FP: selected = 5'b10000;
      default:     selected = 5'b00000;
    endcase
  end

  assign trig = |(selected & {trig_fp, trig_rear});

endmodule
