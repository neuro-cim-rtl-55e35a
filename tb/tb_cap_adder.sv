// tb_cap_adder -- random bit-line levels through the capacitive adders,
// compared with the capacitor map written out per column in both modes.
module tb_cap_adder;
  import ncim_pkg::*;

  wmode_e wmode;
  blcnt_t bl_cnt [NUM_COLS];
  volt_t dpos [2], dneg [2];
  int checks = 0, failures = 0;

  cap_adder dut (.wmode, .bl_cnt, .dpos, .dneg);

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int c[10];
      int ep0, en0, ep1, en1;
      wmode = wmode_e'(it & 1);
      foreach (c[i]) begin c[i] = (it < 2) ? 65 : $urandom_range(0, 65); bl_cnt[i] = c[i][6:0]; end
      #1;
      if (wmode == WMODE_8B) begin
        ep0 = 16*(4*c[2] + 2*c[3] + c[4]) + 8*c[6] + 4*c[7] + 2*c[8] + c[9];
        en0 = 16*(8*c[1] + c[0]) + c[5];
        ep1 = 0; en1 = 0;
      end else begin
        ep0 = 4*c[2] + 2*c[3] + c[4];  en0 = 8*c[1] + 4*c[0];
        ep1 = 4*c[7] + 2*c[8] + c[9];  en1 = 8*c[6] + 4*c[5];
      end
      checks++;
      if (dpos[0] != ep0 || dneg[0] != en0 || dpos[1] != ep1 || dneg[1] != en1) begin
        failures++;
        $display("FAIL mode=%0d got %0d/%0d %0d/%0d exp %0d/%0d %0d/%0d", wmode,
                 dpos[0], dneg[0], dpos[1], dneg[1], ep0, en0, ep1, en1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
