`timescale 1ns/1ps
// Test of front_panel: hex display characters for random settings (six
// coarse characters, two fine characters without the 10 ps bit), the LED
// mapping, and the trigger LED hold time (LED_HOLD_CYCLES reduced to 50).
module tb_front_panel;
  import ctf3_timing_pkg::*;
  localparam int HOLD = 50;
  logic              clk = 0, rst_n = 0, trig_load = 0, remote = 0, addressed = 0;
  logic              write_n = 1, read_n = 1;
  drawer_setting_t   setting;
  logic [4:0]        trig_selected = 0;
  logic [3:0]        fast_disable = 0, psu_ok = 0;
  panel_indicators_t ind;
  int checks = 0, failures = 0;

  front_panel #(.LED_HOLD_CYCLES(HOLD)) dut (.clk, .rst_n, .setting, .trig_selected,
    .trig_load, .fast_disable, .psu_ok, .remote, .addressed, .write_n, .read_n, .ind);

  always #2 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string hexstr(input logic [31:0] v);
    string s = $sformatf("%08x", v);
    return s.toupper();
  endfunction

  initial begin
    int on_cycles;
    setting = '0;
    #5 rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      setting = {$urandom, $urandom, $urandom, $urandom, $urandom};
      {remote, addressed, write_n, read_n} = 4'($urandom);
      trig_selected = 5'($urandom);
      fast_disable = 4'($urandom);
      psu_ok = 4'($urandom);
      #1;
      for (int ch = 0; ch < 4; ch++) begin
        string s;
        s = hexstr({setting.coarse_delay[ch], setting.fine_delay[ch][8:1]});
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (ind.display[ch][7 - k] !== 8'(s[k])) begin
            failures++;
            $display("display %0d char %0d = %c expected %c", ch, k, ind.display[ch][7-k], s[k]);
          end
        end
      end
      checks++;
      if (ind.led_disabled !== (setting.disabled | fast_disable) || ind.led_psu !== psu_ok ||
          ind.led_trig_sel !== trig_selected || ind.led_remote !== remote ||
          ind.led_addressed !== addressed || ind.led_write !== (addressed && !write_n) ||
          ind.led_read !== (addressed && !read_n)) begin
        failures++;
        $display("LED mapping wrong");
      end
    end
    // trigger LED hold
    checks++;
    if (ind.led_trig_active) begin failures++; $display("trigger LED on before trigger"); end
    @(negedge clk) trig_load = 1;
    @(negedge clk) trig_load = 0;
    on_cycles = 0;
    for (int i = 0; i < 3 * HOLD; i++) begin
      @(negedge clk);
      if (ind.led_trig_active) on_cycles++;
    end
    checks++;
    if (on_cycles != HOLD - 1) begin failures++; $display("LED held %0d cycles", on_cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
