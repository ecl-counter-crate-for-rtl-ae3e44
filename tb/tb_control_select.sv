`timescale 1ns/1ps
// Test of control_select with random latch contents and switch settings in
// all four local/remote combinations. The expected settings are computed
// here field by field from the published byte formats (inverted fields,
// 10 ps bits of byte 2, fine bytes 3/7/11/15, coarse bytes 4-6 .. 16-18).
module tb_control_select;
  import ctf3_timing_pkg::*;
  logic             dil_pole1_on, local_line, remote;
  logic [17:0][7:0] regs;
  panel_switches_t  sw;
  drawer_setting_t  setting;
  int checks = 0, failures = 0;
  int n_remote = 0, n_local = 0;

  control_select dut (.dil_pole1_on, .local_line, .regs, .sw, .remote, .setting);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2:0] exp_code(input logic [2:0] c);
    return (c == 3'b001 || c == 3'b010 || c == 3'b011) ? 3'b001 : c;
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic exp_remote;
      logic [2:0] tsel;
      for (int b = 0; b < 18; b++) regs[b] = 8'($urandom);
      sw = {$urandom, $urandom, $urandom, $urandom, $urandom};
      sw.trig_sel = 4'($urandom % 8);
      {dil_pole1_on, local_line} = 2'(i);
      exp_remote = dil_pole1_on && !local_line;
      #1;
      checks++;
      if (remote !== exp_remote) begin failures++; $display("remote wrong"); end
      if (exp_remote) begin
        n_remote++;
        tsel = exp_code(regs[0][2:0]);
        checks++;
        if (setting.trig_sel !== tsel) begin failures++; $display("remote trig sel"); end
        for (int ch = 0; ch < 4; ch++) begin
          logic [23:0] cdelay;
          logic [8:0]  fdelay;
          // Table 8-10: byte value 0xFF = 0 periods, each step down adds weight.
          cdelay = (24'(8'hFF - regs[3 + 4*ch])) + (24'(8'hFF - regs[4 + 4*ch]) << 8)
                 + (24'(8'hFF - regs[5 + 4*ch]) << 16);
          // Table 7: 0xFF = 0 ps in 20 ps steps; Table 6: bit = 0 adds 10 ps.
          fdelay = 9'(2 * (8'hFF - regs[2 + 4*ch])) + 9'(regs[1][ch] ? 0 : 1);
          checks++;
          if (setting.coarse_delay[ch] !== cdelay || setting.fine_delay[ch] !== fdelay ||
              setting.disabled[ch] !== !regs[0][3 + ch]) begin
            failures++;
            $display("remote ch %0d: %h/%0d/%b expected %h/%0d", ch, setting.coarse_delay[ch],
                     setting.fine_delay[ch], setting.disabled[ch], cdelay, fdelay);
          end
        end
      end else begin
        n_local++;
        case (sw.trig_sel)
          0: tsel = 3'b000;
          1: tsel = 3'b111;
          2: tsel = 3'b110;
          3: tsel = 3'b101;
          4: tsel = 3'b100;
          default: tsel = 3'b001;
        endcase
        checks++;
        if (setting.trig_sel !== tsel) begin failures++; $display("local trig sel"); end
        for (int ch = 0; ch < 4; ch++) begin
          checks++;
          if (setting.coarse_delay[ch] !== sw.coarse[ch] ||
              setting.fine_delay[ch] !== 9'(2 * sw.fine[ch]) ||
              setting.disabled[ch] !== sw.disable_sw[ch]) begin
            failures++;
            $display("local ch %0d wrong", ch);
          end
        end
      end
    end
    checks++;
    if (n_remote == 0 || n_local == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
