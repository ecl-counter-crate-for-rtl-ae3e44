`timescale 1ns/1ps
// Shared types and constants of the CTF3 ECL counter crate.
//
// A drawer holds four delay channels. Each channel has a 24-bit coarse delay
// counted in clock periods and a 9-bit fine delay in 10 ps steps. The
// computer writes the settings byte by byte into 18 latches per drawer. In
// those bytes every field is stored inverted: all ones means zero delay,
// because the counters are loaded with the byte value and count up to all
// ones. This package fixes that byte map, the trigger-select codes, and the
// decoded settings record that the drawer logic passes around.
//
// The byte map, the trigger codes and the inverted data format follow the
// published control tables. The record layout, the "no trigger" code for
// unlisted select values and the hex-to-ASCII helper are this design's own.
package ctf3_timing_pkg;

  localparam int unsigned NUM_COUNTERS = 4;   // counters per drawer
  localparam int unsigned NUM_TRIG_REAR = 4;  // rear trigger inputs per drawer
  localparam int unsigned NUM_BYTES = 18;     // 8-bit latches per drawer
  localparam int unsigned COARSE_W = 24;      // coarse counter bits
  localparam int unsigned FINE_W = 9;         // fine delay bits (10 ps LSB)

  // Byte addresses (A4..A0) inside a drawer.
  localparam logic [4:0] BYTE_CTRL = 5'd0;    // trigger select and disables
  localparam logic [4:0] BYTE_FINE_LSB = 5'd1; // 10 ps bits of all counters

  // Address of the fine-delay byte (20 ps .. 2560 ps) of counter ch.
  function automatic logic [4:0] fine_byte_addr(input int unsigned ch);
    return 5'(2 + 4 * ch);
  endfunction

  // Address of coarse byte k (0 = bits 7:0 .. 2 = bits 23:16) of counter ch.
  function automatic logic [4:0] coarse_byte_addr(input int unsigned ch,
                                                  input int unsigned k);
    return 5'(3 + 4 * ch + k);
  endfunction

  // Trigger-select code, bits D2..D0 of the control byte.
  typedef enum logic [2:0] {
    TRIG_SEL_FP   = 3'b000,  // front-panel trigger
    TRIG_SEL_NONE = 3'b001,  // unlisted codes 001..011: no trigger
    TRIG_SEL_4    = 3'b100,
    TRIG_SEL_3    = 3'b101,
    TRIG_SEL_2    = 3'b110,
    TRIG_SEL_1    = 3'b111
  } trig_sel_e;

  // Decoded settings of one drawer, in positive units.
  typedef struct packed {
    trig_sel_e                                 trig_sel;
    logic [NUM_COUNTERS-1:0]                   disabled;      // 1 = disabled
    logic [NUM_COUNTERS-1:0][COARSE_W-1:0]     coarse_delay;  // clock periods
    logic [NUM_COUNTERS-1:0][FINE_W-1:0]       fine_delay;    // 10 ps units
  } drawer_setting_t;

  // Front-panel controls of one drawer.
  typedef struct packed {
    logic [3:0]                                trig_sel;      // rotary switch
    logic [NUM_COUNTERS-1:0]                   disable_sw;    // 1 = disable
    logic [7:0]                                trig_delay;    // 2 switches, 20 ps
    logic [NUM_COUNTERS-1:0][7:0]              fine;          // 2 switches, 20 ps
    logic [NUM_COUNTERS-1:0][COARSE_W-1:0]     coarse;        // 6 switches
  } panel_switches_t;

  // Front-panel indicators of one drawer.
  typedef struct packed {
    logic [4:0]                                led_trig_sel;  // [0..3] = 1..4, [4] = F.P.
    logic                                      led_trig_active;
    logic [NUM_COUNTERS-1:0]                   led_disabled;
    logic [3:0]                                led_psu;       // +5, +3.3, -3.3, -5.2 V
    logic                                      led_remote;
    logic                                      led_addressed;
    logic                                      led_read;
    logic                                      led_write;
    // display[ch][i]: ASCII character i of counter ch, i = 7 leftmost.
    logic [NUM_COUNTERS-1:0][7:0][7:0]         display;
  } panel_indicators_t;

  // ASCII code of a hex digit, upper case.
  function automatic logic [7:0] hex_ascii(input logic [3:0] nib);
    return (nib < 4'd10) ? (8'h30 + 8'(nib)) : (8'h41 + 8'(nib) - 8'd10);
  endfunction

endpackage
