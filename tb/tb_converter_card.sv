`timescale 1ns/1ps
// Test of the converter card model: straight TTL-to-ECL paths and the two
// inverters, ECL-to-TTL paths with and without the monostable. A 4 ns pulse
// through a channel with the monostable selected must come out 90 ns long;
// a second edge during the pulse must not extend it.
module tb_converter_card;
  logic [3:0] ttl_in = 0, ecl_out, ecl_in = 0, mono_sel = 0, ttl_out;
  logic       ecl_inv_in = 0, ecl_inv_out, ttl_inv_in = 0, ttl_inv_out;
  int checks = 0, failures = 0;

  converter_card dut (.ttl_in, .ecl_out, .ecl_in, .mono_sel, .ttl_out,
                      .ecl_inv_in, .ecl_inv_out, .ttl_inv_in, .ttl_inv_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin
    for (int p = 0; p < 64; p++) begin
      {ecl_inv_in, ttl_inv_in, ttl_in} = p[5:0];
      #1;
      check(ecl_out == ttl_in && ecl_inv_out == !ecl_inv_in && ttl_inv_out == !ttl_inv_in,
            "straight paths");
    end
    // direct ECL-to-TTL
    for (int p = 0; p < 16; p++) begin
      ecl_in = p[3:0];
      #1;
      check(ttl_out == ecl_in, "ECL to TTL without monostable");
    end
    ecl_in = 0;
    #200;
    // monostable on channels 1 and 3
    mono_sel = 4'b1010;
    for (int ch = 0; ch < 4; ch++) begin
      realtime t0;
      ecl_in[ch] = 1; t0 = $realtime;
      #4 ecl_in[ch] = 0;
      #10 ecl_in[ch] = 1;   // second edge inside the pulse
      #4 ecl_in[ch] = 0;
      if (mono_sel[ch]) begin
        #(88 - 18);
        check(ttl_out[ch] == 1, "monostable still high at 88 ns");
        #4;
        check(ttl_out[ch] == 0, "monostable low at 92 ns");
      end else begin
        #1;
        check(ttl_out[ch] == 0, "no stretching without monostable");
      end
      #200;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
