// tb_cim_bank_array -- random rows written, random spikes, threshold and
// Sub-WL enables; per-column bit-line levels and activity counts are checked
// against a shadow copy of the array.
module tb_cim_bank_array;
  import ncim_pkg::*;

  logic clk = 0, we = 0;
  logic [ROW_AW-1:0] waddr = '0;
  logic [NUM_COLS-1:0] wdata = '0;
  logic [NUM_ROWS-1:0] spikes = '0;
  logic [1:0] thr_en = '0, sub_wl_en = '0;
  blcnt_t bl_cnt [NUM_COLS];
  logic [7:0] wl_cnt;
  logic [9:0] bl_ones;
  logic [NUM_COLS-1:0] shadow [NUM_ROWS+1];
  int checks = 0, failures = 0;

  cim_bank_array dut (.clk, .we, .waddr, .wdata, .spikes, .thr_en, .sub_wl_en, .bl_cnt, .wl_cnt, .bl_ones);

  always #5 clk = ~clk;

  task automatic write_row(int r, logic [9:0] d);
    @(negedge clk); we = 1; waddr = ROW_AW'(r); wdata = d; shadow[r] = d;
    @(negedge clk); we = 0;
  endtask

  initial begin
    for (int r = 0; r <= NUM_ROWS; r++) write_row(r, 10'($urandom));
    for (int it = 0; it < 600; it++) begin
      int ec[NUM_COLS];
      int ewl, eones;
      if (it % 50 == 0) write_row($urandom_range(0, NUM_ROWS), 10'($urandom));
      @(negedge clk);
      spikes = {$urandom, $urandom};
      if (it % 7 == 0) spikes = '1;
      thr_en = 2'($urandom); sub_wl_en = (it % 5 == 0) ? 2'b11 : 2'($urandom);
      #1;
      foreach (ec[c]) ec[c] = 0;
      ewl = 0; eones = 0;
      for (int g = 0; g < 2; g++)
        for (int r = 0; r <= NUM_ROWS; r++) begin
          automatic bit d = sub_wl_en[g] && ((r < NUM_ROWS) ? spikes[r] : thr_en[g]);
          if (d) begin
            ewl++;
            for (int c = g*5; c < g*5+5; c++) if (shadow[r][c]) begin ec[c]++; eones++; end
          end
        end
      for (int c = 0; c < NUM_COLS; c++) begin
        checks++;
        if (bl_cnt[c] != ec[c]) begin failures++; $display("FAIL col %0d got %0d exp %0d", c, bl_cnt[c], ec[c]); end
      end
      checks++;
      if (wl_cnt != ewl || bl_ones != eones) begin failures++; $display("FAIL activity %0d/%0d exp %0d/%0d", wl_cnt, bl_ones, ewl, eones); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
