`timescale 1ns/1ps
// End-to-end test of the whole crate at its default parameters: four
// drawers, two clocked at 250 MHz and two at 400 MHz, on one control bus,
// with the rear cards wired as on a patch panel (drawer 1's OR output into a
// fan-out, drawer 2's four outputs into a combiner, drawer 1's counter 1
// into a converter channel with its monostable).
//
// The host programs every drawer through the bus, reads the bytes back and
// fires triggers. Every output pulse is checked against
// T + (2 + N) periods + F * 10 ps and one period of width. Each mechanism of
// the design is counted and must occur at least once: all five trigger
// sources, remote and local control, the DIL override, computer and fast
// disables, a retrigger, the 10 ps step, a carry through all three counter
// stages, read-back, the OR output, the trigger LED, fan-out, combiner and
// monostable.
module tb_ctf3_counter_crate;
  import ctf3_timing_pkg::*;

  localparam int ND = 4;
  localparam realtime TCLK [ND] = '{4.0, 2.5, 4.0, 2.5};

  logic                        rst_n = 1;
  logic [ND-1:0]               clk = '0;
  logic [ND-1:0][3:0]          trig_rear = '0, fast_disable = '0, dil_on;
  logic [ND-1:0]               trig_fp = '0;
  panel_switches_t [ND-1:0]    sw = '0;
  logic [3:0]                  psu_ok = 4'b1111;
  panel_indicators_t [ND-1:0]  ind;
  logic [ND-1:0]               clk_mon, trig_mon, out_sum;
  logic [ND-1:0][3:0]          out;
  logic [7:0]                  addr = 0, din = 0, dout;
  logic                        write_n = 1, read_n = 1, local_line = 0;
  logic [3:0]                  fo_in;
  logic [3:0][3:0]             fo_out, comb_in;
  logic [3:0][1:0]             fo_out_n, comb_out, comb_out_n;
  logic [1:0][3:0]             cv_ttl_in = '0, cv_ecl_out, cv_ecl_in, cv_mono_sel = '0, cv_ttl_out;
  logic [1:0]                  cv_ecl_inv_in = '0, cv_ecl_inv_out, cv_ttl_inv_in = '0, cv_ttl_inv_out;
  int checks = 0, failures = 0;

  ctf3_counter_crate dut (
    .rst_n, .clk, .trig_rear, .trig_fp, .fast_disable, .dil_on, .sw, .psu_ok, .ind,
    .clk_mon, .trig_mon, .out, .out_sum, .addr, .din, .write_n, .read_n, .local_line,
    .dout, .fo_in, .fo_out, .fo_out_n, .comb_in, .comb_out, .comb_out_n,
    .cv_ttl_in, .cv_ecl_out, .cv_ecl_in, .cv_mono_sel, .cv_ttl_out,
    .cv_ecl_inv_in, .cv_ecl_inv_out, .cv_ttl_inv_in, .cv_ttl_inv_out);

  // patch-panel cabling of the rear cards
  assign fo_in      = {3'b000, out_sum[0]};
  assign comb_in    = {12'h000, out[2]};
  assign cv_ecl_in  = {4'h0, 3'b000, out[0][0]};

  for (genvar d = 0; d < ND; d++) begin : g_clk
    always #(TCLK[d] / 2) clk[d] = ~clk[d];
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int m_src[5], m_remote, m_local, m_override, m_cdis, m_fdis, m_retrig;
  int m_10ps, m_carry, m_readback, m_sum, m_trig_led, m_fanout, m_comb, m_mono;

  // ---------------- output edge records ----------------
  realtime rise_t [ND][4][$];
  realtime fall_t [ND][4][$];
  for (genvar d = 0; d < ND; d++) begin : g_mon
    for (genvar c = 0; c < 4; c++) begin : g_ch
      always @(posedge out[d][c]) rise_t[d][c].push_back($realtime);
      always @(negedge out[d][c]) fall_t[d][c].push_back($realtime);
    end
    always @(posedge out_sum[d]) m_sum++;
    always @(posedge ind[d].led_trig_active) m_trig_led++;
  end
  always @(posedge fo_out[0][3]) begin
    #0.001;
    if (fo_out[0] == 4'hF && fo_out_n[0] == 2'b00) m_fanout++;
  end
  always @(posedge comb_out[0][0]) begin
    #0.001;
    if (comb_out[0] == 2'b11 && comb_out_n[0] == 2'b00 && out[2] != 0) m_comb++;
  end
  realtime mono_rise;
  always @(posedge cv_ttl_out[0][0]) mono_rise = $realtime;
  always @(negedge cv_ttl_out[0][0])
    if (cv_mono_sel[0][0]) begin
      checks++;
      if ($realtime - mono_rise > 89.99 && $realtime - mono_rise < 90.01) m_mono++;
      else begin failures++; $display("monostable width %0.3f", $realtime - mono_rise); end
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  task automatic wait_clk(input int d);
    case (d)
      0: @(posedge clk[0]);
      1: @(posedge clk[1]);
      2: @(posedge clk[2]);
      default: @(posedge clk[3]);
    endcase
  endtask

  // ---------------- host bus cycles ----------------
  task automatic bus_write(input int d, input int b, input logic [7:0] v);
    addr = {3'(d), 5'(b)}; din = v;
    #20 write_n = 0;
    #50 write_n = 1;
    #20;
  endtask

  task automatic bus_read(input int d, input int b, output logic [7:0] v);
    addr = {3'(d), 5'(b)};
    #20 read_n = 0;
    #40 v = dout;
    #10 read_n = 1;
    #20;
  endtask

  // ---------------- expected settings ----------------
  int unsigned exp_n [ND][4];
  int unsigned exp_f [ND][4];
  bit          exp_on [ND][4];
  logic [7:0]  shadow [ND][18];

  task automatic host_write(input int d, input int b, input logic [7:0] v);
    bus_write(d, b, v);
    shadow[d][b] = v;
  endtask

  task automatic program_counter(input int d, input int c, input int unsigned n,
                                 input int unsigned f);
    logic [7:0] b2;
    host_write(d, 3 + 4*c, ~8'(n));
    host_write(d, 4 + 4*c, ~8'(n >> 8));
    host_write(d, 5 + 4*c, ~8'(n >> 16));
    host_write(d, 2 + 4*c, ~8'(f >> 1));
    b2 = shadow[d][1];
    b2[c] = ~f[0];
    host_write(d, 1, b2);
    exp_n[d][c] = n;
    exp_f[d][c] = f;
    if (f[0]) m_10ps++;
    if (n >= 65536) m_carry++;
  endtask

  // source: 0..3 rear trigger 1..4, 4 front panel
  function automatic logic [2:0] src_code(input int s);
    return (s == 4) ? 3'b000 : 3'(7 - s);
  endfunction

  task automatic fire(input int d, input int src, output realtime t_edge);
    wait_clk(d);
    #0.5;
    if (src == 4) trig_fp[d] = 1; else trig_rear[d][src] = 1;
    wait_clk(d);
    t_edge = $realtime;
    repeat (3) wait_clk(d);
    #0.5;
    trig_fp[d] = 0;
    trig_rear[d] = 0;
  endtask

  task automatic check_drawer(input int d, input realtime t_edge, input string what);
    for (int c = 0; c < 4; c++) begin
      realtime exp_t = t_edge + (2 + exp_n[d][c]) * TCLK[d] + exp_f[d][c] * 0.010;
      if (exp_on[d][c]) begin
        check(rise_t[d][c].size() == 1 && fall_t[d][c].size() == 1,
              $sformatf("%s: drawer %0d ch %0d gave %0d pulses", what, d, c, rise_t[d][c].size()));
        if (rise_t[d][c].size() == 1 && fall_t[d][c].size() == 1) begin
          check(rise_t[d][c][0] > exp_t - 0.001 && rise_t[d][c][0] < exp_t + 0.001,
                $sformatf("%s: drawer %0d ch %0d rise %0.3f expected %0.3f", what, d, c,
                          rise_t[d][c][0], exp_t));
          check(fall_t[d][c][0] - rise_t[d][c][0] > TCLK[d] - 0.001 &&
                fall_t[d][c][0] - rise_t[d][c][0] < TCLK[d] + 0.001,
                $sformatf("%s: drawer %0d ch %0d width", what, d, c));
        end
      end else begin
        check(rise_t[d][c].size() == 0, $sformatf("%s: drawer %0d ch %0d not quiet", what, d, c));
      end
      rise_t[d][c].delete();
      fall_t[d][c].delete();
    end
  endtask

  task automatic max_wait(input int d);
    int unsigned m = 0;
    for (int c = 0; c < 4; c++) if (exp_n[d][c] > m) m = exp_n[d][c];
    #((m + 6) * TCLK[d] + 6.0);
  endtask

  // Fire one drawer and check it.
  task automatic run_drawer(input int d, input int src, input string what);
    realtime te;
    fire(d, src, te);
    m_src[src]++;
    max_wait(d);
    check_drawer(d, te, what);
  endtask

  initial begin
    logic [7:0] v;
    realtime te [ND];
    for (int d = 0; d < ND; d++) dil_on[d] = {~3'(d), 1'b1};
    #1 rst_n = 0;
    #10 rst_n = 1;
    for (int d = 0; d < ND; d++) for (int b = 0; b < 18; b++) shadow[d][b] = 8'hFF;
    #20;
    // forget edges from power-up
    for (int d = 0; d < ND; d++)
      for (int c = 0; c < 4; c++) begin
        rise_t[d][c].delete();
        fall_t[d][c].delete();
      end

    // ---- remote: program all four drawers, trigger d+1 on drawer d ----
    for (int d = 0; d < ND; d++) begin
      host_write(d, 0, {1'b0, 4'b1111, src_code(d)});
      for (int c = 0; c < 4; c++) begin
        program_counter(d, c, (d == 3 && c == 3) ? 70000 + $urandom % 1000 : $urandom % 400,
                        (c == 0) ? 0 : $urandom % 512);
        exp_on[d][c] = 1;
      end
    end
    // read back every byte of every drawer, and an empty slot
    for (int d = 0; d < ND; d++)
      for (int b = 0; b < 18; b++) begin
        bus_read(d, b, v);
        check(v == shadow[d][b], $sformatf("read back drawer %0d byte %0d", d, b + 1));
        m_readback++;
      end
    bus_read(6, 0, v);
    check(v == 8'h00, "empty drawer address reads zero");
    for (int d = 0; d < ND; d++) check(ind[d].led_remote, "remote LED");
    m_remote++;
    // fire all four at once
    fork
      begin fire(0, 0, te[0]); end
      begin fire(1, 1, te[1]); end
      begin fire(2, 2, te[2]); end
      begin fire(3, 3, te[3]); end
    join
    for (int d = 0; d < ND; d++) m_src[d]++;
    max_wait(3);
    for (int d = 0; d < ND; d++) check_drawer(d, te[d], "remote, all drawers");

    // ---- front-panel trigger under computer control ----
    host_write(0, 0, {1'b0, 4'b1111, src_code(4)});
    run_drawer(0, 4, "remote front-panel trigger");

    // ---- computer disable and fast disable on drawer 1 ----
    host_write(1, 0, {1'b0, 4'b1110, src_code(1)});   // counter 1 disabled
    fast_disable[1] = 4'b0100;                         // counter 3 fast-disabled
    exp_on[1] = '{0, 1, 0, 1};
    m_cdis++;
    m_fdis++;
    run_drawer(1, 1, "disables");
    fast_disable[1] = 0;
    host_write(1, 0, {1'b0, 4'b1111, src_code(1)});
    exp_on[1] = '{1, 1, 1, 1};

    // ---- retrigger on drawer 2 while counting ----
    for (int c = 0; c < 4; c++) program_counter(2, c, 50 + 10 * c, 3 * c);
    begin
      realtime t1, t2;
      fire(2, 2, t1);
      repeat (20) wait_clk(2);
      fire(2, 2, t2);
      m_src[2] += 2;
      m_retrig++;
      max_wait(2);
      check_drawer(2, t2, "retrigger");
    end

    // ---- local control of every drawer through the LOCAL line ----
    local_line = 1;
    for (int d = 0; d < ND; d++) begin
      sw[d].trig_sel = 4'd0;                 // front panel
      sw[d].disable_sw = 4'b0000;
      for (int c = 0; c < 4; c++) begin
        sw[d].coarse[c] = 24'($urandom % 300);
        sw[d].fine[c]   = 8'($urandom);
        exp_n[d][c] = sw[d].coarse[c];
        exp_f[d][c] = 2 * sw[d].fine[c];
        exp_on[d][c] = 1;
      end
    end
    sw[3].disable_sw = 4'b1000;
    exp_on[3][3] = 0;
    #1;
    for (int d = 0; d < ND; d++) check(!ind[d].led_remote, "local LED");
    m_local++;
    for (int d = 0; d < ND; d++) run_drawer(d, 4, "local");
    // writes still reach the latches while local
    host_write(3, 17, 8'h5A);
    bus_read(3, 17, v);
    check(v == 8'h5A, "write while local");

    // ---- DIL override on drawer 1 only ----
    local_line = 0;
    dil_on[1][0] = 0;
    #1;
    check(!ind[1].led_remote && ind[0].led_remote, "override only on drawer 1");
    sw[1].trig_sel = 4'd4;                   // rear trigger 4
    m_override++;
    run_drawer(1, 3, "DIL override");
    dil_on[1][0] = 1;

    // ---- monostable before the TTL converter on drawer 1's counter 1 ----
    cv_mono_sel[0][0] = 1;
    host_write(0, 0, {1'b0, 4'b1111, src_code(0)});
    for (int c = 0; c < 4; c++) begin
      exp_n[0][c] = 0;
      exp_f[0][c] = 0;
      for (int k = 0; k < 3; k++) shadow[0][3 + 4*c + k] = 8'hFF;
    end
    for (int c = 0; c < 4; c++) program_counter(0, c, 10 * c, 0);
    run_drawer(0, 0, "monostable");
    #200;

    // ---- mechanism coverage ----
    for (int s = 0; s < 5; s++) check(m_src[s] > 0, $sformatf("trigger source %0d used", s));
    check(m_remote > 0, "remote");            check(m_local > 0, "local");
    check(m_override > 0, "override");        check(m_cdis > 0, "computer disable");
    check(m_fdis > 0, "fast disable");        check(m_retrig > 0, "retrigger");
    check(m_10ps > 0, "10 ps step");          check(m_carry > 0, "carry into stage 3");
    check(m_readback > 0, "read back");       check(m_sum > 0, "sum output");
    check(m_trig_led > 0, "trigger LED");     check(m_fanout > 0, "fan-out");
    check(m_comb > 0, "combiner");            check(m_mono > 0, "monostable");
    $display("mechanisms: src %0d %0d %0d %0d %0d remote %0d local %0d override %0d cdis %0d fdis %0d retrig %0d 10ps %0d carry %0d readback %0d sum %0d led %0d fanout %0d comb %0d mono %0d",
             m_src[0], m_src[1], m_src[2], m_src[3], m_src[4], m_remote, m_local, m_override,
             m_cdis, m_fdis, m_retrig, m_10ps, m_carry, m_readback, m_sum, m_trig_led,
             m_fanout, m_comb, m_mono);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
