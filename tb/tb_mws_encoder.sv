// tb_mws_encoder -- exhaustive check of the MSB word skipping encoder.
// For every weight, both precisions and MWS on/off, the stored row must
// decode to the same signed value, and the '-1' flag must appear exactly
// when the sign-extension rule applies. Also checks that MWS never raises
// the number of ones stored.
module tb_mws_encoder;
  import ncim_pkg::*;

  wmode_e wmode;
  logic mws_en;
  logic [7:0] weight;
  logic [NUM_COLS-1:0] row;
  int checks = 0, failures = 0;
  int ones_plain = 0;
  int ones_mws = 0;

  mws_encoder dut (.wmode, .mws_en, .weight, .row);

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s w=%h mode=%0d mws=%0d row=%b", msg, weight, wmode, mws_en, row); end
  endtask

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int e = 0; e < 2; e++) begin
        for (int w = 0; w < 256; w++) begin
          int v, v2, exp_v, exp_v2;
          wmode = wmode_e'(m); mws_en = e[0]; weight = w[7:0];
          #1;
          if (m == 0) begin
            // column values: 0 flagU(-16) 1 sign(-128) 2..4 64,32,16  5 flagL(-1) 6..9 8,4,2,1
            v = -16*row[0] - 128*row[1] + 64*row[2] + 32*row[3] + 16*row[4]
                - row[5] + 8*row[6] + 4*row[7] + 2*row[8] + row[9];
            exp_v = $signed(weight);
            chk(v == exp_v, "8b value");
            chk(row[0] == (e == 1 && weight[7:4] == 4'hF), "8b flag");
            chk(row[5] == 1'b0, "8b lower flag");
          end else begin
            v  = -4*row[0] - 8*row[1] + 4*row[2] + 2*row[3] + row[4];
            v2 = -4*row[5] - 8*row[6] + 4*row[7] + 2*row[8] + row[9];
            exp_v  = $signed(weight[3:0]);
            exp_v2 = $signed(weight[7:4]);
            chk(v == exp_v && v2 == exp_v2, "4b value");
            chk(row[0] == (e == 1 && weight[3:2] == 2'b11), "4b flag U");
            chk(row[5] == (e == 1 && weight[7:6] == 2'b11), "4b flag L");
          end
          if (e == 0) ones_plain = ones_plain + int'($countones(row));
          else        ones_mws   = ones_mws + int'($countones(row));
        end
      end
    end
    checks++;
    if (!(ones_mws < ones_plain)) begin failures++; $display("FAIL MWS did not reduce ones"); end
    $display("ones stored: plain=%0d mws=%0d", ones_plain, ones_mws);
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
