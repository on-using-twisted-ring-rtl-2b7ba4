// tb_trc_mux - exhaustive check of the TRC serial-input multiplexer: every
// select code with every combination of the three data inputs.
module tb_trc_mux;
  import trc_bist_pkg::*;

  mux_sel_e sel;
  logic rom_bit, scan_in, fn, d, exp_d;
  int checks = 0, failures = 0;

  trc_mux dut (.sel, .rom_bit, .scan_in, .fn, .d);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int v = 0; v < 8; v++) begin
        sel = mux_sel_e'(s);
        {rom_bit, scan_in, fn} = 3'(v);
        #1;
        case (s)
          0: exp_d = rom_bit;  // 00: ROM
          1: exp_d = fn;       // 01: shift (F_n fed back)
          2: exp_d = ~fn;      // 10: twist (F_n inverted)
          3: exp_d = scan_in;  // 11: tester
        endcase
        checks++;
        if (d !== exp_d) begin
          failures++;
          $display("FAIL sel=%0d inputs=%b d=%b expected %b", s, v[2:0], d, exp_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
