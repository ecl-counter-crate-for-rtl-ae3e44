`timescale 1ns/1ps
// Exhaustive test of trigger_select: every select code against every
// pattern of the five trigger inputs, compared with the control-byte table.
module tb_trigger_select;
  import ctf3_timing_pkg::*;
  trig_sel_e  sel;
  logic [3:0] trig_rear;
  logic       trig_fp, trig;
  logic [4:0] selected;
  int checks = 0, failures = 0;

  trigger_select dut (.sel, .trig_rear, .trig_fp, .trig, .selected);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      for (int p = 0; p < 32; p++) begin
        logic exp_trig;
        logic [4:0] exp_sel;
        sel = trig_sel_e'(c[2:0]);
        {trig_fp, trig_rear} = p[4:0];
        // D2..D0: 111 -> 1, 110 -> 2, 101 -> 3, 100 -> 4, 000 -> front panel
        case (c)
          7: begin exp_sel = 5'b00001; exp_trig = trig_rear[0]; end
          6: begin exp_sel = 5'b00010; exp_trig = trig_rear[1]; end
          5: begin exp_sel = 5'b00100; exp_trig = trig_rear[2]; end
          4: begin exp_sel = 5'b01000; exp_trig = trig_rear[3]; end
          0: begin exp_sel = 5'b10000; exp_trig = trig_fp; end
          default: begin exp_sel = 5'b00000; exp_trig = 1'b0; end
        endcase
        #1;
        checks++;
        if (trig !== exp_trig || selected !== exp_sel) begin
          failures++;
          $display("code %0d pattern %b: trig=%b sel=%b", c, p[4:0], trig, selected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
