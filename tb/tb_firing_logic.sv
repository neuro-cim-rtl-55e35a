// tb_firing_logic -- random folded V_POS/V_NEG pairs; the spike must equal
// (V_POS > V_NEG) on the unfolded values, and the counter must count the
// spikes of eval cycles, clear, and saturate.
module tb_firing_logic;
  import ncim_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, eval = 0;
  logic [1:0] pos_cnt, neg_cnt;
  logic [RES_W-1:0] pos_res, neg_res;
  logic spike;
  logic [SPK_W-1:0] spike_cnt;
  int checks = 0, failures = 0, exp_cnt = 0, digital_dec = 0, analog_dec = 0;

  firing_logic dut (.clk, .rst_n, .clear, .eval, .pos_cnt, .pos_res, .neg_cnt, .neg_res, .spike, .spike_cnt);

  always #5 clk = ~clk;

  initial begin
    pos_cnt = 0; neg_cnt = 0; pos_res = 0; neg_res = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int vp, vn;
      bit exp_spk;
      @(negedge clk);
      clear = (it % 500 == 0);
      eval  = ($urandom_range(0, 3) != 0);
      vp = $urandom_range(0, 3 * VFOLD - 1);
      vn = (it % 2) ? vp + int'($urandom_range(0, 4)) - 2 : $urandom_range(0, 3 * VFOLD - 1);
      if (vn < 0) vn = 0;
      if (vn > 3 * VFOLD - 1) vn = 3 * VFOLD - 1;
      pos_cnt = 2'(vp / VFOLD); pos_res = RES_W'(vp % VFOLD);
      neg_cnt = 2'(vn / VFOLD); neg_res = RES_W'(vn % VFOLD);
      if (pos_cnt != neg_cnt) digital_dec++; else analog_dec++;
      #1;
      exp_spk = eval && !clear && (vp > vn);
      checks++;
      if (spike != (eval && (vp > vn))) begin failures++; $display("FAIL spike vp=%0d vn=%0d", vp, vn); end
      @(posedge clk); #1;
      if (clear) exp_cnt = 0;
      else if (exp_spk && exp_cnt < 31) exp_cnt++;
      checks++;
      if (spike_cnt != exp_cnt) begin failures++; $display("FAIL count %0d exp %0d", spike_cnt, exp_cnt); end
    end
    // saturation
    @(negedge clk); clear = 0; eval = 1; pos_cnt = 2; neg_cnt = 0;
    repeat (40) @(posedge clk);
    #1; checks++;
    if (spike_cnt != 31) begin failures++; $display("FAIL saturation %0d", spike_cnt); end
    checks++;
    if (digital_dec == 0 || analog_dec == 0) begin failures++; $display("FAIL decision paths not both exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
