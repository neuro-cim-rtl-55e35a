// tb_data_sram -- random writes and reads against a shadow array,
// checking the one-cycle read latency and that reads do not disturb data.
module tb_data_sram;
  logic clk = 0, en = 0, we = 0;
  logic [14:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] shadow [32768];
  bit valid [32768];
  int checks = 0, failures = 0;

  data_sram dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    for (int it = 0; it < 6000; it++) begin
      int a;
      @(negedge clk);
      a = (it < 3000) ? $urandom_range(0, 32767) : $urandom_range(0, 63) * 512 + $urandom_range(0, 1);
      en = 1; addr = 15'(a);
      if ($urandom_range(0, 1) || !valid[a]) begin
        we = 1; wdata = 8'($urandom); shadow[a] = wdata; valid[a] = 1;
      end else begin
        we = 0;
        @(negedge clk);
        en = 0;
        checks++;
        if (rdata != shadow[a]) begin failures++; $display("FAIL addr %0d got %h exp %h", a, rdata, shadow[a]); end
      end
    end
    // full-address sweep at the ends
    @(negedge clk); en = 1; we = 1; addr = 15'd32767; wdata = 8'hA5;
    @(negedge clk); we = 0;
    @(negedge clk); checks++;
    if (rdata != 8'hA5) begin failures++; $display("FAIL top address"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
