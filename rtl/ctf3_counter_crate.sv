`timescale 1ns/1ps
// The CTF3 ECL counter crate.
//
// A chassis with up to four counter drawers in front and, at the rear, six
// auxiliary card slots and the computer interface. Every drawer has its own
// clock, four rear triggers, a front-panel trigger, four fast disables, four
// delayed outputs and an OR output. The drawers share one computer-control
// bus: address byte, data-in byte, WRITE, READ and LOCAL in, data-out byte
// back. A7..A5 of the address select the drawer whose DIL switch matches;
// the addressed drawer drives dout during READ and the others give zero, so
// the bus is the OR of all drawers.
//
// The rear slots are fitted as four fan-out/combiner cards and two converter
// cards; they are not wired to the drawers inside the crate (that is done
// with cables on the patch panel), so their pins are brought out as ports.
// The computer interface cards are plain buffers and are represented by the
// bus ports themselves. Power-on reset (rst_n, active low) is this design's
// addition.
module ctf3_counter_crate
  import ctf3_timing_pkg::*;
#(
  parameter int unsigned NUM_DRAWERS         = 4,
  parameter int unsigned NUM_FANOUT_CARDS    = 4,
  parameter int unsigned NUM_CONVERTER_CARDS = 2,
  parameter int unsigned COUNTER_STAGES      = 3,
  parameter int unsigned LED_HOLD_CYCLES     = 1 << 22
) (
  input  logic                                        rst_n,
  // per drawer: clock, triggers, disables, front panel, DIL switch
  input  logic [NUM_DRAWERS-1:0]                      clk,
  input  logic [NUM_DRAWERS-1:0][NUM_TRIG_REAR-1:0]   trig_rear,
  input  logic [NUM_DRAWERS-1:0]                      trig_fp,
  input  logic [NUM_DRAWERS-1:0][NUM_COUNTERS-1:0]    fast_disable,
  input  logic [NUM_DRAWERS-1:0][3:0]                 dil_on,
  input  panel_switches_t [NUM_DRAWERS-1:0]           sw,
  input  logic [3:0]                                  psu_ok,
  output panel_indicators_t [NUM_DRAWERS-1:0]         ind,
  output logic [NUM_DRAWERS-1:0]                      clk_mon,
  output logic [NUM_DRAWERS-1:0]                      trig_mon,
  output logic [NUM_DRAWERS-1:0][NUM_COUNTERS-1:0]    out,
  output logic [NUM_DRAWERS-1:0]                      out_sum,
  // computer control bus
  input  logic [7:0]                                  addr,
  input  logic [7:0]                                  din,
  input  logic                                        write_n,
  input  logic                                        read_n,
  input  logic                                        local_line,
  output logic [7:0]                                  dout,
  // fan-out and combiner cards
  input  logic [NUM_FANOUT_CARDS-1:0]                 fo_in,
  output logic [NUM_FANOUT_CARDS-1:0][3:0]            fo_out,
  output logic [NUM_FANOUT_CARDS-1:0][1:0]            fo_out_n,
  input  logic [NUM_FANOUT_CARDS-1:0][3:0]            comb_in,
  output logic [NUM_FANOUT_CARDS-1:0][1:0]            comb_out,
  output logic [NUM_FANOUT_CARDS-1:0][1:0]            comb_out_n,
  // converter cards
  input  logic [NUM_CONVERTER_CARDS-1:0][3:0]         cv_ttl_in,
  output logic [NUM_CONVERTER_CARDS-1:0][3:0]         cv_ecl_out,
  input  logic [NUM_CONVERTER_CARDS-1:0][3:0]         cv_ecl_in,
  input  logic [NUM_CONVERTER_CARDS-1:0][3:0]         cv_mono_sel,
  output logic [NUM_CONVERTER_CARDS-1:0][3:0]         cv_ttl_out,
  input  logic [NUM_CONVERTER_CARDS-1:0]              cv_ecl_inv_in,
  output logic [NUM_CONVERTER_CARDS-1:0]              cv_ecl_inv_out,
  input  logic [NUM_CONVERTER_CARDS-1:0]              cv_ttl_inv_in,
  output logic [NUM_CONVERTER_CARDS-1:0]              cv_ttl_inv_out
);

  logic [NUM_DRAWERS-1:0][7:0] drawer_dout;
  logic [NUM_DRAWERS-1:0]      drawer_dout_en;

  for (genvar d = 0; d < NUM_DRAWERS; d++) begin : g_drawer
    counter_drawer #(
      .COUNTER_STAGES (COUNTER_STAGES),
      .LED_HOLD_CYCLES(LED_HOLD_CYCLES)
    ) u_drawer (
      .clk         (clk[d]),
      .rst_n       (rst_n),
      .trig_rear   (trig_rear[d]),
      .trig_fp     (trig_fp[d]),
      .fast_disable(fast_disable[d]),
      .addr        (addr),
      .din         (din),
      .write_n     (write_n),
      .read_n      (read_n),
      .local_line  (local_line),
      .dout        (drawer_dout[d]),
      .dout_en     (drawer_dout_en[d]),
      .dil_on      (dil_on[d]),
      .sw          (sw[d]),
      .psu_ok      (psu_ok),
      .ind         (ind[d]),
      .clk_mon     (clk_mon[d]),
      .trig_mon    (trig_mon[d]),
      .out         (out[d]),
      .out_sum     (out_sum[d])
    );
  end

  always_comb begin
    dout = '0;
    for (int d = 0; d < NUM_DRAWERS; d++) dout |= drawer_dout[d];
  end

  // Two drawers set to the same board address would fight on the bus.
  always_comb begin
    if (rst_n && !read_n)
      assert ($countones(drawer_dout_en) <= 1)
        else $error("several drawers answer one read address");
  end

  for (genvar f = 0; f < NUM_FANOUT_CARDS; f++) begin : g_fanout
    fanout_combiner u_fc (
      .fo_in     (fo_in[f]),
      .fo_out    (fo_out[f]),
      .fo_out_n  (fo_out_n[f]),
      .comb_in   (comb_in[f]),
      .comb_out  (comb_out[f]),
      .comb_out_n(comb_out_n[f])
    );
  end

  for (genvar c = 0; c < NUM_CONVERTER_CARDS; c++) begin : g_conv
    converter_card u_cv (
      .ttl_in     (cv_ttl_in[c]),
      .ecl_out    (cv_ecl_out[c]),
      .ecl_in     (cv_ecl_in[c]),
      .mono_sel   (cv_mono_sel[c]),
      .ttl_out    (cv_ttl_out[c]),
      .ecl_inv_in (cv_ecl_inv_in[c]),
      .ecl_inv_out(cv_ecl_inv_out[c]),
      .ttl_inv_in (cv_ttl_inv_in[c]),
      .ttl_inv_out(cv_ttl_inv_out[c])
    );
  end

endmodule
