// tb_neuron_unit -- random operations of one neuron with a small folding
// range (FOLD=64) so that folding and clamping occur. Every timestep is
// checked against a reference integrate-and-fire model: threshold-row
// requests, spikes, early stops and the final spike count. Pass mode is
// checked for partial-sum forwarding, disabled firing and the stop chain.
module tb_neuron_unit;
  import ncim_pkg::*;

  localparam int F = 64;

  logic clk = 0, rst_n = 0, start = 0, acc = 0, fire = 0, es_chk = 0, pass = 0, stop_in = 0;
  bank_cfg_t cfg;
  volt_t dpos = '0, dneg = '0, agg_in_pos = '0, agg_in_neg = '0, agg_out_pos, agg_out_neg;
  logic stop_out, active, thr_pending, ev_fired, ev_stopped, ev_folded;
  logic [SPK_W-1:0] spike_cnt;
  int checks = 0, failures = 0, n_fire = 0, n_stop = 0, n_fold = 0, n_clamp = 0;

  neuron_unit #(.FOLD(F)) dut (.clk, .rst_n, .cfg, .start, .acc, .fire, .es_chk, .dpos, .dneg,
    .pass, .agg_in_pos, .agg_in_neg, .agg_out_pos, .agg_out_neg, .stop_in, .stop_out,
    .active, .thr_pending, .spike_cnt, .ev_fired, .ev_stopped, .ev_folded);

  always #5 clk = ~clk;

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", msg, $time); end
  endtask

  initial begin
    cfg = '{wmode: WMODE_8B, fold_en: 1'b0, es_en: 1'b0, t_es: '0, v_es: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 300; op++) begin
      int vp, vn, lim, cnt, tpos, tneg, ai_p, ai_n;
      bit thr, stopped, exp_spk, exp_stop;
      @(negedge clk);
      cfg.fold_en = op[0];
      cfg.es_en   = op[1];
      cfg.t_es    = T_W'($urandom_range(0, 15));
      cfg.v_es    = 17'(int'($urandom_range(0, 40)) - 20);
      pass = 0;
      start = 1;
      @(negedge clk); start = 0;
      lim = cfg.fold_en ? 3*F - 1 : F - 1;
      vp = 0; vn = 0; cnt = 0; thr = 1; stopped = 0;
      tpos = $urandom_range(0, 10); tneg = $urandom_range(10, 60);
      for (int t = 0; t < 16; t++) begin
        int ip, in_;
        chk(thr_pending == (thr && !stopped) || stopped, "thr_pending");
        chk(active == !stopped, "active");
        ip = stopped ? 0 : $urandom_range(0, (op % 3 == 0) ? 120 : 30);
        in_ = stopped ? 0 : $urandom_range(0, 25);
        ai_p = $urandom_range(0, 3); ai_n = $urandom_range(0, 3);
        if (thr && !stopped) begin ip += tpos; in_ += tneg; end
        dpos = volt_t'(ip); dneg = volt_t'(in_);
        agg_in_pos = volt_t'(ai_p); agg_in_neg = volt_t'(ai_n);
        acc = 1;
        @(negedge clk); acc = 0; dpos = '0; dneg = '0; agg_in_pos = '0; agg_in_neg = '0;
        if (!stopped) begin
          vp += ip + ai_p; vn += in_ + ai_n;
          if (vp > lim) begin vp = lim; n_clamp++; end
          if (vn > lim) begin vn = lim; n_clamp++; end
          thr = 0;
        end
        fire = 1; es_chk = (t == cfg.t_es);
        #1;
        exp_spk  = !stopped && (vp > vn);
        exp_stop = !stopped && !exp_spk && cfg.es_en && (t == cfg.t_es) && ((vp - vn) < cfg.v_es);
        chk(ev_fired == exp_spk, "spike");
        chk(ev_stopped == exp_stop, "es stop");
        chk(ev_folded == (!stopped && (vp >= F || vn >= F)), "fold event");
        if (ev_folded) n_fold++;
        if (exp_spk) begin cnt++; n_fire++; vp = 0; vn = 0; thr = 1; end
        if (exp_stop) begin stopped = 1; n_stop++; end
        @(negedge clk); fire = 0; es_chk = 0;
      end
      chk(spike_cnt == cnt, "spike count");
    end
    // pass mode: forwarding and stop chain
    @(negedge clk); pass = 1; start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < 50; i++) begin
      int a, b, c, d;
      a = $urandom_range(0, 1000); b = $urandom_range(0, 1000);
      c = $urandom_range(0, 1000); d = $urandom_range(0, 1000);
      dpos = volt_t'(a); dneg = volt_t'(b); agg_in_pos = volt_t'(c); agg_in_neg = volt_t'(d);
      stop_in = i[0]; fire = 1; acc = 1;
      #1;
      chk(agg_out_pos == a + c && agg_out_neg == b + d, "pass forward");
      chk(!ev_fired && !thr_pending, "pass no fire");
      chk(active == !i[0] && stop_out == i[0], "stop chain");
      @(negedge clk);
    end
    fire = 0; acc = 0; pass = 0;
    #1; chk(spike_cnt == 0, "pass count");
    chk(agg_out_pos == 0, "no forward when not passing");
    $display("events: fire=%0d stop=%0d fold=%0d clamp=%0d", n_fire, n_stop, n_fold, n_clamp);
    chk(n_fire > 0 && n_stop > 0 && n_fold > 0 && n_clamp > 0, "all mechanisms exercised");
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
