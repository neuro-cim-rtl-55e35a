// tb_neuro_cim_top -- end-to-end test of the processor at its full default
// size (16 macros x 16 banks x 64 rows, 32 KB SRAM). Four layer operations:
//   A: 8b weights, MWS on, single-macro neurons
//   C: the same weights, three-macro aggregation chains with folding
//   B: 4b weights (two neurons per bank), folding and early stopping
//   D: the weights of A stored without MWS
// Activations are written to the data SRAM, spike counts read back through
// the host port and compared, all 512 of them, with the reference neuron
// model. Operation latency, and that MWS lowers bit-line activity for the
// same result, are checked. Each mechanism (MWS flag, early stop, folding
// decision, aggregation, 4b mode) must occur at least once.
module tb_neuro_cim_top;
  import ncim_pkg::*;
  import ncim_tb_pkg::*;

  localparam int NM = NUM_MACROS, NB = NUM_BANKS;
  localparam int IN_BASE = 256, OUT_BASE = 8192;

  logic clk = 0, rst_n = 0;
  top_cfg_t cfg;
  logic w_we = 0;
  logic [3:0] w_macro = '0, w_bank = '0;
  logic [ROW_AW-1:0] w_row = '0;
  logic [7:0] w_data = '0;
  logic h_en = 0, h_we = 0;
  logic [SRAM_AW-1:0] h_addr = '0;
  logic [7:0] h_wdata = '0, h_rdata;
  logic start = 0, busy, done;
  stats_t stats;

  neuro_cim_top dut (.clk, .rst_n, .cfg, .w_we, .w_macro, .w_bank, .w_row, .w_data,
    .h_en, .h_we, .h_addr, .h_wdata, .h_rdata, .start, .busy, .done, .stats);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] wts [NM][NB][NUM_ROWS+1];
  int act [NM*NUM_ROWS];
  int got [NM*NB*2];
  int n_mode4 = 0, n_agg_ops = 0;

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic load_weights();
    for (int m = 0; m < NM; m++)
      for (int b = 0; b < NB; b++)
        for (int r = 0; r <= NUM_ROWS; r++) begin
          @(negedge clk);
          w_we = 1; w_macro = 4'(m); w_bank = 4'(b); w_row = ROW_AW'(r); w_data = wts[m][b][r];
        end
    @(negedge clk); w_we = 0;
  endtask

  task automatic load_acts();
    for (int c = 0; c < NM*NUM_ROWS; c++) begin
      @(negedge clk);
      h_en = 1; h_we = 1; h_addr = SRAM_AW'(IN_BASE + c); h_wdata = 8'(act[c] + 16 * (c % 16));  // high nibble ignored
    end
    @(negedge clk); h_en = 0; h_we = 0;
  endtask

  task automatic run_and_read(output int cycles);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done && cycles < 10000) begin @(negedge clk); cycles++; end
    @(negedge clk);
    for (int k = 0; k < NM*NB*2; k++) begin
      h_en = 1; h_we = 0; h_addr = SRAM_AW'(OUT_BASE + k);
      @(negedge clk);
      got[k] = h_rdata;
    end
    h_en = 0;
  endtask

  // reference spike counts of the whole processor
  task automatic check_outputs(string tag, bit mode8);
    int errs = 0;
    logic [NM-1:0] pass;
    pass = cfg.agg_pass; pass[NM-1] = 1'b0;
    for (int m = 0; m < NM; m++)
      for (int b = 0; b < NB; b++)
        for (int h = 0; h < 2; h++) begin
          int exp_cnt, first, k;
          k = (m*NB + b)*2 + h;
          if (pass[m] || (mode8 && h == 1)) exp_cnt = 0;
          else begin
            int rp[$], rn[$], ra[$];
            int tp, tn;
            nres_t r;
            first = m;
            while (first > 0 && pass[first-1]) first--;
            for (int mm = first; mm <= m; mm++)
              for (int i = 0; i < NUM_ROWS; i++) begin
                int p, n;
                split_w(mode8, cfg.mws_en, mode8 ? wts[mm][b][i] : (h ? wts[mm][b][i][7:4] : wts[mm][b][i][3:0]), p, n);
                rp.push_back(p); rn.push_back(n); ra.push_back(act[(mm - first)*NUM_ROWS + i]);
              end
            split_w(mode8, cfg.mws_en, mode8 ? wts[m][b][NUM_ROWS] : (h ? wts[m][b][NUM_ROWS][7:4] : wts[m][b][NUM_ROWS][3:0]), tp, tn);
            r = run_neuron(rp, rn, ra, tp, tn, cfg.fold_en, cfg.es_en, int'(cfg.t_es), int'(cfg.v_es), VFOLD);
            exp_cnt = r.count;
          end
          checks++;
          if (got[k] != exp_cnt) begin
            failures++; errs++;
            if (errs < 10) $display("FAIL %s macro %0d bank %0d neuron %0d: %0d exp %0d", tag, m, b, h, got[k], exp_cnt);
          end
        end
    $display("%s: outputs checked, %0d mismatches", tag, errs);
  endtask

  initial begin
    int cyc, exp_cyc, bl_a, bl_d, spikes_a;
    stats_t s0;
    cfg = '0;
    cfg.in_base = SRAM_AW'(IN_BASE); cfg.out_base = SRAM_AW'(OUT_BASE);
    exp_cyc = NM*NUM_ROWS + 2*T_STEPS + NM*NB*2 + 2;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- A: 8b, MWS
    cfg.wmode = WMODE_8B; cfg.mws_en = 1; cfg.fold_en = 0; cfg.es_en = 0; cfg.agg_pass = '0;
    foreach (wts[m, b, r]) wts[m][b][r] = (r == NUM_ROWS) ? 8'(-int'($urandom_range(10, 100))) : rand_w(1'b1);
    foreach (act[c]) act[c] = $urandom_range(0, 15);
    load_weights();
    load_acts();
    s0 = stats;
    run_and_read(cyc);
    chk(cyc == exp_cyc, $sformatf("A latency %0d exp %0d", cyc, exp_cyc));
    check_outputs("A 8b MWS", 1'b1);
    bl_a = stats.bl_discharges - s0.bl_discharges;
    spikes_a = stats.spikes - s0.spikes;

    // ---- C: aggregation chains of three macros, folding on
    cfg.fold_en = 1;
    for (int m = 0; m < NM; m++) cfg.agg_pass[m] = (m % 3 != 2);
    for (int m = 0; m < NM; m++)
      for (int b = 0; b < NB; b++) wts[m][b][NUM_ROWS] = 8'(-int'($urandom_range(60, 128)));
    for (int m = 0; m < NM; m++)
      for (int b = 0; b < NB; b++) for (int r = 0; r < NUM_ROWS; r++)
        if (b < 4) wts[m][b][r] = 8'($urandom_range(60, 127));   // large sums cross the fold
    load_weights();
    run_and_read(cyc);
    chk(cyc == exp_cyc, "C latency");
    check_outputs("C aggregation", 1'b1);
    n_agg_ops++;

    // ---- B: 4b weights, early stopping
    cfg.wmode = WMODE_4B; cfg.agg_pass = '0; cfg.es_en = 1; cfg.t_es = 4'd4; cfg.v_es = -17'sd6;
    foreach (wts[m, b, r]) wts[m][b][r] = (r == NUM_ROWS) ? {4'(-int'($urandom_range(3, 8))), 4'(-int'($urandom_range(3, 8)))} : rand_w(1'b0);
    foreach (act[c]) act[c] = $urandom_range(0, 15);
    load_weights();
    load_acts();
    run_and_read(cyc);
    chk(cyc == exp_cyc, "B latency");
    check_outputs("B 4b ES", 1'b0);
    n_mode4++;

    // ---- A again, then D: same 8b weights without MWS
    cfg.wmode = WMODE_8B; cfg.es_en = 0; cfg.fold_en = 0;
    foreach (wts[m, b, r]) wts[m][b][r] = (r == NUM_ROWS) ? 8'(-int'($urandom_range(10, 100))) : rand_w(1'b1);
    load_weights();
    s0 = stats;
    run_and_read(cyc);
    check_outputs("A2 8b MWS", 1'b1);
    bl_a = stats.bl_discharges - s0.bl_discharges;
    cfg.mws_en = 0;
    load_weights();
    s0 = stats;
    run_and_read(cyc);
    check_outputs("D 8b no MWS", 1'b1);
    bl_d = stats.bl_discharges - s0.bl_discharges;
    $display("bit-line discharges: with MWS %0d, without %0d (%0d%% less)", bl_a, bl_d, 100 - (100 * bl_a) / (bl_d > 0 ? bl_d : 1));
    chk(bl_a < bl_d, "MWS lowers bit-line activity");

    $display("mechanisms: mws_flags=%0d es_stops=%0d fold_evals=%0d agg_steps=%0d 4b_ops=%0d spikes=%0d ops=%0d",
             stats.mws_flags, stats.es_stops, stats.fold_evals, stats.agg_steps, n_mode4, stats.spikes, stats.ops);
    chk(stats.mws_flags > 0, "MWS flag written");
    chk(stats.es_stops > 0, "early stop happened");
    chk(stats.fold_evals > 0, "folded decision happened");
    chk(stats.agg_steps > 0 && n_agg_ops > 0, "aggregation happened");
    chk(n_mode4 > 0, "4b mode ran");
    chk(stats.spikes > 0, "spikes fired");
    chk(stats.ops == 5, "operation count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
