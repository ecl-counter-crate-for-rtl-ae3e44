`timescale 1ns/1ps
// One counter drawer: four precision delay channels started by a common
// trigger.
//
// Signal flow: the trigger selector picks one of four rear triggers or the
// front-panel trigger; a fine delay set by two front-panel switches (20 ps
// steps, about 5 ns range) places its edge correctly against the clock; the
// edge detector raises load for the first clock cycle after the trigger's
// rising edge. In that cycle each of the four coarse counters takes its
// setting and each fine delay chip latches its 9-bit code. Counting starts
// in the next cycle. When a counter reaches its terminal count it emits a
// pulse one clock period long, which passes through its fine delay to the
// output. out_sum is the OR of the four outputs.
//
// Settings come from the front panel or, in remote mode, from the 18
// computer latches (see control_select). A counter is silenced by its
// disable setting or by its fast rear-panel disable input (active high).
// With the trigger sampled high at clock edge T, a channel with coarse delay
// N emits its pulse from edge T + 2 + N to T + 3 + N, then shifted by its
// fine delay. clk_mon and trig_mon are the clock and the delayed trigger for
// the front-panel monitor outputs.
//
// The structure follows the published drawer description; the
// register-level details of the control logic are this design's own.
module counter_drawer
  import ctf3_timing_pkg::*;
#(
  parameter int unsigned COUNTER_STAGES  = 3,
  parameter int unsigned LED_HOLD_CYCLES = 1 << 22
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // triggers and disables
  input  logic [NUM_TRIG_REAR-1:0] trig_rear,
  input  logic                     trig_fp,
  input  logic [NUM_COUNTERS-1:0]  fast_disable,
  // computer control bus
  input  logic [7:0]               addr,
  input  logic [7:0]               din,
  input  logic                     write_n,
  input  logic                     read_n,
  input  logic                     local_line,
  output logic [7:0]               dout,
  output logic                     dout_en,
  // on-board DIL switch, 1 = pole ON; [0] local override, [3:1] address
  input  logic [3:0]               dil_on,
  // front panel
  input  panel_switches_t          sw,
  input  logic [3:0]               psu_ok,
  output panel_indicators_t        ind,
  // outputs
  output logic                     clk_mon,
  output logic                     trig_mon,
  output logic [NUM_COUNTERS-1:0]  out,
  output logic                     out_sum
);

  localparam int unsigned CW = 8 * COUNTER_STAGES;

  logic [NUM_BYTES-1:0][7:0] regs;
  logic                      addressed;
  logic                      remote;
  drawer_setting_t           setting;
  logic                      trig_raw, trig_dly, load;
  logic [4:0]                trig_selected;
  logic [NUM_COUNTERS-1:0]   coarse_out;

  drawer_regs u_regs (
    .rst_n     (rst_n),
    .board_addr(~dil_on[3:1]),   // pole ON reads as 0
    .addr      (addr),
    .din       (din),
    .write_n   (write_n),
    .read_n    (read_n),
    .dout      (dout),
    .dout_en   (dout_en),
    .addressed (addressed),
    .regs      (regs)
  );

  control_select u_ctrl (
    .dil_pole1_on(dil_on[0]),
    .local_line  (local_line),
    .regs        (regs),
    .sw          (sw),
    .remote      (remote),
    .setting     (setting)
  );

  trigger_select u_tsel (
    .sel      (setting.trig_sel),
    .trig_rear(trig_rear),
    .trig_fp  (trig_fp),
    .trig     (trig_raw),
    .selected (trig_selected)
  );

  // Trigger-path fine delay: front-panel switches only, 20 ps steps.
  fine_delay u_trig_dly (
    .d_in    (trig_raw),
    .code    ({sw.trig_delay, 1'b0}),
    .latch_en(1'b1),
    .d_out   (trig_dly)
  );

  trigger_edge u_edge (
    .clk  (clk),
    .rst_n(rst_n),
    .trig (trig_dly),
    .load (load)
  );

  for (genvar ch = 0; ch < NUM_COUNTERS; ch++) begin : g_ch
    delay_counter #(.NUM_STAGES(COUNTER_STAGES)) u_cnt (
      .clk       (clk),
      .rst_n     (rst_n),
      .load      (load),
      .load_value(~setting.coarse_delay[ch][CW-1:0]),
      .disable_i (setting.disabled[ch] | fast_disable[ch]),
      .out       (coarse_out[ch]),
      .running   ()
    );

    fine_delay u_fine (
      .d_in    (coarse_out[ch]),
      .code    (setting.fine_delay[ch]),
      .latch_en(load),
      .d_out   (out[ch])
    );
  end

  front_panel #(.LED_HOLD_CYCLES(LED_HOLD_CYCLES)) u_panel (
    .clk          (clk),
    .rst_n        (rst_n),
    .setting      (setting),
    .trig_selected(trig_selected),
    .trig_load    (load),
    .fast_disable (fast_disable),
    .psu_ok       (psu_ok),
    .remote       (remote),
    .addressed    (addressed),
    .write_n      (write_n),
    .read_n       (read_n),
    .ind          (ind)
  );

  assign out_sum  = |out;
  assign clk_mon  = clk;
  assign trig_mon = trig_dly;

endmodule
