// tb_ncim_controller -- small controller (NCH=8, NOUT=4) with a behavioural
// SRAM. Checks the activation buffer contents, the number and order of
// accumulate/fire strobes, es_chk at t_es only, the stored spike counts and
// the documented cycle count of one operation.
module tb_ncim_controller;
  import ncim_pkg::*;

  localparam int NCH = 8, NOUT = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [T_W-1:0] t_es = 4'd5;
  logic [SRAM_AW-1:0] in_base = 15'd100, out_base = 15'd2000;
  logic busy, done, m_en, m_we, nstart, acc, fire, es_chk;
  logic [SRAM_AW-1:0] m_addr;
  logic [7:0] m_wdata, m_rdata;
  logic [3:0] act [NCH];
  logic [SPK_W-1:0] cnt_in [NOUT];
  logic [T_W-1:0] t;
  logic [7:0] mem [32768];
  int checks = 0, failures = 0;

  ncim_controller #(.NCH(NCH), .NOUT(NOUT)) dut (.clk, .rst_n, .start, .t_es, .in_base, .out_base,
    .busy, .done, .m_en, .m_we, .m_addr, .m_wdata, .m_rdata, .act, .cnt_in, .nstart, .acc, .fire, .es_chk, .t);

  always #5 clk = ~clk;

  // behavioural SRAM, one-cycle read
  always_ff @(posedge clk) if (m_en) begin
    if (m_we) mem[m_addr] <= m_wdata;
    else      m_rdata <= mem[m_addr];
  end

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int cyc, n_acc, n_fire, n_es, n_start, exp_cycles;
    m_rdata = '0;
    foreach (mem[i]) mem[i] = '0;
    for (int i = 0; i < NCH; i++) mem[100 + i] = 8'($urandom);
    for (int i = 0; i < NOUT; i++) cnt_in[i] = SPK_W'(3 * i + 1);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 2; op++) begin
      t_es = 4'(op ? 15 : 5);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1; n_acc = 0; n_fire = 0; n_es = 0; n_start = 0;
      while (!done) begin
        if (acc) begin n_acc++; chk(!fire, "acc and fire together"); chk(t == 4'(n_acc - 1), "timestep order"); end
        if (fire) n_fire++;
        if (es_chk) begin n_es++; chk(t == t_es && fire, "es_chk timing"); end
        if (nstart) begin n_start++; chk(n_acc == 0, "nstart before first acc"); end
        @(negedge clk); cyc++;
        chk(cyc < 1000, "runaway");
        if (cyc >= 1000) break;
      end
      exp_cycles = NCH + 1 + 2 * T_STEPS + NOUT + 1;
      chk(cyc == exp_cycles, $sformatf("cycle count %0d exp %0d", cyc, exp_cycles));
      chk(n_acc == T_STEPS && n_fire == T_STEPS && n_es == 1 && n_start == 1, "strobe counts");
      for (int i = 0; i < NCH; i++) chk(act[i] == mem[100 + i][3:0], "activation buffer");
      @(negedge clk);
      for (int i = 0; i < NOUT; i++) chk(mem[2000 + i] == 8'(cnt_in[i]), "stored count");
      chk(!busy, "idle after done");
      for (int i = 0; i < NOUT; i++) cnt_in[i] = SPK_W'($urandom_range(0, 16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
