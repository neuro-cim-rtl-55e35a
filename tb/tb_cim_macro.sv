// tb_cim_macro -- a macro of 4 banks (reduced from 16) sharing one spike
// vector. Each bank gets its own random weights and threshold; spike counts
// of every neuron are checked against the reference model in 8b and 4b mode.
// In pass mode the forwarded partial sums of every bank are checked against
// the weights of the spiking rows.
module tb_cim_macro;
  import ncim_pkg::*;
  import ncim_tb_pkg::*;

  localparam int NB = 4;
  logic clk = 0, rst_n = 0, we = 0, start = 0, acc = 0, fire = 0, es_chk = 0, pass = 0;
  bank_cfg_t cfg;
  logic [1:0] wbank = '0;
  logic [ROW_AW-1:0] waddr = '0;
  logic [NUM_COLS-1:0] wdata = '0;
  logic [NUM_ROWS-1:0] spikes = '0;
  volt_t agg_in_pos [NB][2], agg_in_neg [NB][2], agg_out_pos [NB][2], agg_out_neg [NB][2];
  logic [1:0] stop_in [NB], stop_out [NB];
  logic [SPK_W-1:0] spike_cnt [NB][2];
  bank_ev_t ev [NB];
  int checks = 0, failures = 0;
  logic [7:0] wts [NB][NUM_ROWS+1];
  int act [NUM_ROWS];

  cim_macro #(.NB(NB)) dut (.clk, .rst_n, .cfg, .we, .wbank, .waddr, .wdata, .spikes, .start, .acc, .fire,
    .es_chk, .pass, .agg_in_pos, .agg_in_neg, .agg_out_pos, .agg_out_neg, .stop_in, .stop_out, .spike_cnt, .ev);

  always #5 clk = ~clk;

  initial begin
    for (int b = 0; b < NB; b++) begin
      stop_in[b] = '0;
      for (int h = 0; h < 2; h++) begin agg_in_pos[b][h] = '0; agg_in_neg[b][h] = '0; end
    end
    cfg = '{wmode: WMODE_8B, fold_en: 1'b1, es_en: 1'b0, t_es: '0, v_es: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 4; op++) begin
      automatic bit mode8 = (op % 2 == 0);
      bit [15:0] tr [NUM_ROWS];
      cfg.wmode = mode8 ? WMODE_8B : WMODE_4B;
      for (int b = 0; b < NB; b++) begin
        for (int r = 0; r < NUM_ROWS; r++) wts[b][r] = rand_w(mode8);
        wts[b][NUM_ROWS] = mode8 ? 8'(-int'($urandom_range(10, 60))) : 8'hEE;
        for (int r = 0; r <= NUM_ROWS; r++) begin
          @(negedge clk); we = 1; wbank = 2'(b); waddr = ROW_AW'(r); wdata = enc_row(mode8, 1'b1, wts[b][r]);
        end
      end
      @(negedge clk); we = 0;
      foreach (act[i]) begin act[i] = $urandom_range(0, 15); tr[i] = spike_train(act[i]); end
      start = 1; @(negedge clk); start = 0;
      for (int t = 0; t < 16; t++) begin
        for (int i = 0; i < NUM_ROWS; i++) spikes[i] = tr[i][t];
        acc = 1; @(negedge clk); acc = 0; fire = 1; @(negedge clk); fire = 0;
      end
      for (int b = 0; b < NB; b++)
        for (int h = 0; h < (mode8 ? 1 : 2); h++) begin
          automatic int rp[$], rn[$], ra[$];
          automatic int tp, tn;
          automatic nres_t r;
          for (int i = 0; i < NUM_ROWS; i++) begin
            automatic int p, n;
            split_w(mode8, 1'b1, mode8 ? wts[b][i] : (h ? wts[b][i][7:4] : wts[b][i][3:0]), p, n);
            rp.push_back(p); rn.push_back(n); ra.push_back(act[i]);
          end
          split_w(mode8, 1'b1, mode8 ? wts[b][NUM_ROWS] : (h ? wts[b][NUM_ROWS][7:4] : wts[b][NUM_ROWS][3:0]), tp, tn);
          r = run_neuron(rp, rn, ra, tp, tn, 1'b1, 1'b0, 0, 0, VFOLD);
          checks++;
          if (spike_cnt[b][h] != r.count) begin
            failures++; $display("FAIL op %0d bank %0d neuron %0d count %0d exp %0d", op, b, h, spike_cnt[b][h], r.count);
          end
        end
      // pass mode: forwarded sums of one accumulate phase
      pass = 1; start = 1; @(negedge clk); start = 0;
      spikes = {$urandom, $urandom};
      for (int b = 0; b < NB; b++) begin agg_in_pos[b][0] = volt_t'(b + 5); agg_in_neg[b][0] = volt_t'(2 * b); end
      acc = 1; #1;
      for (int b = 0; b < NB; b++) begin
        automatic int ep = b + 5, en = 2 * b;
        for (int i = 0; i < NUM_ROWS; i++) if (spikes[i]) begin
          automatic int p, n;
          split_w(mode8, 1'b1, mode8 ? wts[b][i] : wts[b][i][3:0], p, n);
          ep += p; en += n;
        end
        checks++;
        if (agg_out_pos[b][0] != ep || agg_out_neg[b][0] != en) begin
          failures++; $display("FAIL pass bank %0d got %0d/%0d exp %0d/%0d", b, agg_out_pos[b][0], agg_out_neg[b][0], ep, en);
        end
      end
      @(negedge clk); acc = 0; pass = 0;
      for (int b = 0; b < NB; b++) begin agg_in_pos[b][0] = '0; agg_in_neg[b][0] = '0; end
    end
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
