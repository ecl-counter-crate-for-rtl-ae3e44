`timescale 1ns/1ps
// Front-panel indicators of a drawer: 18 LEDs and four 8-character displays.
//
// LEDs: five for the selected trigger source (1 to 4, F.P.), one for trigger
// activity, four for counter disable (lit = disabled, including the fast
// rear-panel disable), four for the supplies, and four for computer control.
// The computer-control LEDs are REMOTE (drawer under computer control),
// ADDRESSED (A7..A5 match this drawer), READ and WRITE (a strobe is low
// while addressed). The trigger LED is held on for LED_HOLD_CYCLES clocks
// after each trigger so that a single short trigger can be seen; the hold
// time is this design's choice (2**22 periods, about 17 ms at 250 MHz).
//
// Displays: for each counter, the six left characters are the 24-bit coarse
// delay in hex and the two right characters are the fine delay from the
// 20 ps bit to the 2560 ps bit (FF = 5100 ps); the 10 ps bit is not shown.
// Characters are ASCII codes. Everything but the trigger LED is
// combinational; the hold counter resets asynchronously (active low).
module front_panel
  import ctf3_timing_pkg::*;
#(
  parameter int unsigned LED_HOLD_CYCLES = 1 << 22
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  drawer_setting_t         setting,
  input  logic [4:0]              trig_selected,
  input  logic                    trig_load,
  input  logic [NUM_COUNTERS-1:0] fast_disable,
  input  logic [3:0]              psu_ok,
  input  logic                    remote,
  input  logic                    addressed,
  input  logic                    write_n,
  input  logic                    read_n,
  output panel_indicators_t       ind
);

  localparam int unsigned HW = $clog2(LED_HOLD_CYCLES + 1);

  logic [HW-1:0] hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         hold <= '0;
    else if (trig_load) hold <= HW'(LED_HOLD_CYCLES);
    else if (hold != 0) hold <= hold - 1'b1;
  end

  always_comb begin
    ind.led_trig_sel    = trig_selected;
    ind.led_trig_active = (hold != 0);
    ind.led_disabled    = setting.disabled | fast_disable;
    ind.led_psu         = psu_ok;
    ind.led_remote      = remote;
    ind.led_addressed   = addressed;
    ind.led_read        = addressed & ~read_n;
    ind.led_write       = addressed & ~write_n;
    for (int ch = 0; ch < NUM_COUNTERS; ch++) begin
      for (int i = 0; i < 6; i++)
        ind.display[ch][i + 2] = hex_ascii(setting.coarse_delay[ch][4*i +: 4]);
      ind.display[ch][1] = hex_ascii(setting.fine_delay[ch][8:5]);
      ind.display[ch][0] = hex_ascii(setting.fine_delay[ch][4:1]);
    end
  end

endmodule
