`timescale 1ns/1ps
// Behavioural model of the 9-bit programmable fine delay IC.
//
// This is a simulation model, not synthesizable logic: the real part is an
// analog delay line. The output follows the input delayed by code * STEP_PS
// picoseconds (0 .. 5110 ps for the 9-bit code in 10 ps steps). Each edge is
// delayed on its own, so a pulse keeps its width. The code is held in the
// part's latch, which is transparent while latch_en is high; the drawer
// opens it during the load cycle, so the code of a running pulse is fixed.
// That transparent latch is the chip's own, so the latch warning it draws
// is expected.
//
// Only the programmable part of the delay is modelled. The fixed insertion
// delay of the real part and its jitter are not (INSERTION_PS defaults to 0).
module fine_delay #(
  parameter int unsigned STEP_PS      = 10,
  parameter int unsigned INSERTION_PS = 0
) (
  input  logic       d_in,
  input  logic [8:0] code,      // delay in STEP_PS units
  input  logic       latch_en,  // 1 = latch transparent
  output logic       d_out
);

  logic [8:0] code_q;

  always_latch begin
    if (latch_en) code_q = code;
  end

  initial d_out = 1'b0;

  // Every input edge gets its own delayed copy (transport delay), so an
  // edge is not lost when the delay exceeds the pulse width.
  always @(d_in) begin
    if (code_q == '0 && INSERTION_PS == 0) begin
      d_out = d_in;
    end else begin
      fork
        automatic logic    level = d_in;
        automatic realtime dly =
          (real'(code_q) * real'(STEP_PS) + real'(INSERTION_PS)) / 1000.0;
        begin
          #(dly);
          d_out = level;
        end
      join_none
    end
  end

endmodule
