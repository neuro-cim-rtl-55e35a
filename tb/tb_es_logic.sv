// tb_es_logic -- random V_POS, V_NEG and V_ES; stop must equal
// es_en && (V_POS - V_NEG < V_ES).
module tb_es_logic;
  import ncim_pkg::*;

  logic es_en, stop;
  volt_t v_pos, v_neg;
  logic signed [V_W:0] v_es;
  int checks = 0, failures = 0;

  es_logic dut (.es_en, .v_pos, .v_neg, .v_es, .stop);

  initial begin
    for (int it = 0; it < 5000; it++) begin
      int p, n, e;
      bit exp_stop;
      p = $urandom_range(0, 30000); n = $urandom_range(0, 30000);
      e = int'($urandom_range(0, 4000)) - 2000;
      if (it % 3 == 0) n = p - e + int'($urandom_range(0, 2)) - 1;   // near the boundary
      if (n < 0) n = 0;
      es_en = (it % 5 != 0);
      v_pos = volt_t'(p); v_neg = volt_t'(n); v_es = 17'(e);
      #1;
      exp_stop = es_en && ((p - n) < e);
      checks++;
      if (stop != exp_stop) begin failures++; $display("FAIL p=%0d n=%0d es=%0d stop=%0d", p, n, e, stop); end
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
