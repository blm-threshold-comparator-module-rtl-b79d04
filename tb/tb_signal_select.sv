// Testbench of signal_select: all eight rows of the selection table.
module tb_signal_select;
  import blm_pkg::*;

  logic crc_ok_a, crc_ok_b, crc_equal, sw_trigger;
  sel_e sel;
  int checks = 0, failures = 0;

  signal_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rows: {A ok, B ok, CRCs equal} -> output, software trigger
  sel_e exp_sel [8] = '{SEL_DUMP, SEL_DUMP, SEL_B, SEL_B, SEL_A, SEL_A, SEL_DUMP, SEL_A};
  logic exp_sw  [8] = '{1, 1, 1, 1, 1, 1, 1, 0};

  initial begin
    for (int r = 0; r < 8; r++) begin
      {crc_ok_a, crc_ok_b, crc_equal} = 3'(r);
      #1;
      checks++;
      if (sel !== exp_sel[r] || sw_trigger !== exp_sw[r]) begin
        failures++;
        $display("FAIL row %0d: sel=%0d exp %0d sw=%b", r, sel, exp_sel[r], sw_trigger);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
