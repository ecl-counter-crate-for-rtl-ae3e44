`timescale 1ns/1ps
// Local/remote control selection and settings decode of a drawer.
//
// The drawer is under computer (remote) control when pole 1 of its DIL
// switch is ON and the computer's LOCAL line is low; otherwise the front
// panel rules. This block turns whichever source is active into one decoded
// settings record in positive units, which the counters, the trigger
// selector and the front-panel displays use.
//
// Remote decode (all fields inverted in the latches):
//   byte 1 D2..D0 trigger code, D3..D6 counter 1..4 enable (1 = enabled);
//   byte 2 Dn = 0 adds the 10 ps step to counter n+1;
//   bytes 3/7/11/15 fine delay in 20 ps steps, bytes 4-6/8-10/12-14/16-18
//   coarse bits 0-7, 8-15, 16-23; stored value all ones = zero delay.
// Local decode: the trigger rotary switch reads 0 for the front panel and 1
// to 4 for the rear triggers (other positions select nothing); the disable
// switches act directly; two hex switches give the fine delay in 20 ps steps
// with the 10 ps step off; six hex switches give the coarse delay in clock
// periods. The switch encodings are this design's choice. The block is
// combinational.
module control_select
  import ctf3_timing_pkg::*;
(
  input  logic                        dil_pole1_on,  // 1 = normal, 0 = local override
  input  logic                        local_line,    // computer LOCAL, 1 = local
  input  logic [NUM_BYTES-1:0][7:0]   regs,
  input  panel_switches_t             sw,
  output logic                        remote,
  output drawer_setting_t             setting
);

  drawer_setting_t remote_set, local_set;

  assign remote = dil_pole1_on & ~local_line;

  always_comb begin
    remote_set.trig_sel = trig_sel_e'(regs[BYTE_CTRL][2:0]);
    if (!(regs[BYTE_CTRL][2:0] inside {TRIG_SEL_1, TRIG_SEL_2, TRIG_SEL_3,
                                       TRIG_SEL_4, TRIG_SEL_FP}))
      remote_set.trig_sel = TRIG_SEL_NONE;
    for (int ch = 0; ch < NUM_COUNTERS; ch++) begin
      remote_set.disabled[ch]     = ~regs[BYTE_CTRL][3 + ch];
      remote_set.fine_delay[ch]   = ~{regs[fine_byte_addr(ch)],
                                      regs[BYTE_FINE_LSB][ch]};
      remote_set.coarse_delay[ch] = ~{regs[coarse_byte_addr(ch, 2)],
                                      regs[coarse_byte_addr(ch, 1)],
                                      regs[coarse_byte_addr(ch, 0)]};
    end
  end

  always_comb begin
    unique case (sw.trig_sel)
      4'd0:    local_set.trig_sel = TRIG_SEL_FP;
      4'd1:    local_set.trig_sel = TRIG_SEL_1;
      4'd2:    local_set.trig_sel = TRIG_SEL_2;
      4'd3:    local_set.trig_sel = TRIG_SEL_3;
      4'd4:    local_set.trig_sel = TRIG_SEL_4;
      default: local_set.trig_sel = TRIG_SEL_NONE;
    endcase
    local_set.disabled = sw.disable_sw;
    for (int ch = 0; ch < NUM_COUNTERS; ch++) begin
      local_set.fine_delay[ch]   = {sw.fine[ch], 1'b0};
      local_set.coarse_delay[ch] = sw.coarse[ch];
    end
  end

  assign setting = remote ? remote_set : local_set;

endmodule
