// tb_cim_bank -- full operations of one bank (64 rows) in 8b and 4b mode,
// with MWS, folding and early stopping switched on and off. Weights are
// small and bell-shaped; activations random 4b. Each neuron's spike count
// and early-stop events are compared with the reference neuron model; the
// bit-line activity of the same operation with and without MWS is compared.
module tb_cim_bank;
  import ncim_pkg::*;
  import ncim_tb_pkg::*;

  logic clk = 0, rst_n = 0, we = 0, start = 0, acc = 0, fire = 0, es_chk = 0, pass = 0;
  bank_cfg_t cfg;
  logic [ROW_AW-1:0] waddr = '0;
  logic [NUM_COLS-1:0] wdata = '0;
  logic [NUM_ROWS-1:0] spikes = '0;
  volt_t agg_in_pos [2], agg_in_neg [2], agg_out_pos [2], agg_out_neg [2];
  logic [1:0] stop_in = '0, stop_out;
  logic [SPK_W-1:0] spike_cnt [2];
  bank_ev_t ev;
  int checks = 0, failures = 0;
  int n_stop = 0, n_fold = 0, n_fire = 0, n_less = 0;

  cim_bank dut (.clk, .rst_n, .cfg, .we, .waddr, .wdata, .spikes, .start, .acc, .fire, .es_chk,
    .pass, .agg_in_pos, .agg_in_neg, .agg_out_pos, .agg_out_neg, .stop_in, .stop_out, .spike_cnt, .ev);

  always #5 clk = ~clk;

  logic [7:0] wts [NUM_ROWS];
  logic [7:0] thr_w;
  int act [NUM_ROWS];

  task automatic load(bit mode8, bit mws);
    for (int r = 0; r <= NUM_ROWS; r++) begin
      @(negedge clk);
      we = 1; waddr = ROW_AW'(r);
      wdata = enc_row(mode8, mws, (r < NUM_ROWS) ? wts[r] : thr_w);
    end
    @(negedge clk); we = 0;
  endtask

  // one operation; returns the bit-line discharges counted
  task automatic run_op(output int bl_total, output int stops, output int folds);
    bit [15:0] tr [NUM_ROWS];
    bl_total = 0; stops = 0; folds = 0;
    foreach (act[i]) tr[i] = spike_train(act[i]);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int t = 0; t < 16; t++) begin
      for (int i = 0; i < NUM_ROWS; i++) spikes[i] = tr[i][t];
      acc = 1;
      #1; bl_total += ev.bl;
      @(negedge clk); acc = 0; fire = 1; es_chk = (t == cfg.t_es);
      #1; stops += ev.stopped[0] + ev.stopped[1]; folds += ev.folded[0] + ev.folded[1];
      @(negedge clk); fire = 0; es_chk = 0;
    end
  endtask

  initial begin
    for (int h = 0; h < 2; h++) begin agg_in_pos[h] = '0; agg_in_neg[h] = '0; end
    cfg = '{wmode: WMODE_8B, fold_en: 1'b0, es_en: 1'b0, t_es: '0, v_es: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 24; op++) begin
      automatic bit mode8 = (op % 2 == 0);
      automatic int bl_mws = 0, bl_plain = 0, st = 0, fo = 0, st2 = 0, fo2 = 0;
      automatic int cnt_plain [2];
      cfg.wmode   = mode8 ? WMODE_8B : WMODE_4B;
      cfg.fold_en = op[1];
      cfg.es_en   = op[2];
      cfg.t_es    = T_W'($urandom_range(2, 8));
      cfg.v_es    = 17'(int'($urandom_range(0, 200)) - 150);
      foreach (wts[i]) wts[i] = rand_w(mode8);
      if (op >= 20) foreach (wts[i]) wts[i] = mode8 ? 8'($urandom_range(0, 127)) : 8'h77;  // large: folding
      // 4b: neuron 0 fires often, neuron 1 rarely, so their threshold re-adds differ
      if (op == 21 || op == 23) foreach (wts[i]) wts[i] = {4'(i < 3), 4'h7};
      thr_w = mode8 ? 8'(-int'($urandom_range(20, 128))) : {4'(-int'($urandom_range(2, 8))), 4'(-int'($urandom_range(2, 8)))};
      foreach (act[i]) act[i] = $urandom_range(0, 15);
      // same operation without and with MWS: identical results, fewer discharges with MWS
      load(mode8, 1'b0);
      run_op(bl_plain, st2, fo2);
      cnt_plain[0] = spike_cnt[0]; cnt_plain[1] = spike_cnt[1];
      load(mode8, 1'b1);
      run_op(bl_mws, st, fo);
      for (int h = 0; h < (mode8 ? 1 : 2); h++) begin
        automatic int rp[$], rn[$], ra[$];
        automatic int tp, tn;
        automatic nres_t r;
        for (int i = 0; i < NUM_ROWS; i++) begin
          automatic int p, n;
          split_w(mode8, 1'b1, mode8 ? wts[i] : (h ? wts[i][7:4] : wts[i][3:0]), p, n);
          rp.push_back(p); rn.push_back(n); ra.push_back(act[i]);
        end
        split_w(mode8, 1'b1, mode8 ? thr_w : (h ? thr_w[7:4] : thr_w[3:0]), tp, tn);
        r = run_neuron(rp, rn, ra, tp, tn, cfg.fold_en, cfg.es_en, cfg.t_es, cfg.v_es, VFOLD);
        checks++;
        if (cnt_plain[h] != r.count) begin
          failures++; $display("FAIL op %0d neuron %0d (plain) count %0d exp %0d", op, h, cnt_plain[h], r.count);
        end
        checks++;
        if (spike_cnt[h] != r.count) begin
          failures++; $display("FAIL op %0d neuron %0d (mws) count %0d exp %0d", op, h, spike_cnt[h], r.count);
        end
        n_fire += r.count;
      end
      checks++;
      if (bl_mws > bl_plain) begin failures++; $display("FAIL op %0d MWS raised activity %0d > %0d", op, bl_mws, bl_plain); end
      if (bl_mws < bl_plain) n_less++;
      n_stop += st; n_fold += fo;
    end
    checks++;
    if (n_less == 0) begin failures++; $display("FAIL MWS never reduced activity"); end
    $display("mechanisms: fires=%0d es_stops=%0d fold_evals=%0d", n_fire, n_stop, n_fold);
    checks++;
    if (n_stop == 0 || n_fold == 0 || n_fire == 0) begin failures++; $display("FAIL mechanism not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
