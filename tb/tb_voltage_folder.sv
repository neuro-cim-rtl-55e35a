// tb_voltage_folder -- sweeps V_IN across all three folding ranges and
// beyond, checking count, residue and the V_X/V_Y selection.
module tb_voltage_folder;
  import ncim_pkg::*;

  volt_t v_in;
  logic [1:0] fold_cnt;
  logic [RES_W-1:0] v_sel;
  logic sel_x;
  int checks = 0, failures = 0;

  voltage_folder dut (.v_in, .fold_cnt, .v_sel, .sel_x);

  initial begin
    for (int v = 0; v < 65536; v += 7) begin
      int ec, er;
      v_in = volt_t'(v);
      #1;
      if (v >= 3 * VFOLD) begin ec = 2; er = VFOLD - 1; end
      else begin ec = v / VFOLD; er = v % VFOLD; end
      checks++;
      if (fold_cnt != ec || v_sel != er || sel_x != (ec == 1)) begin
        failures++;
        $display("FAIL v=%0d cnt=%0d res=%0d x=%0d", v, fold_cnt, v_sel, sel_x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
