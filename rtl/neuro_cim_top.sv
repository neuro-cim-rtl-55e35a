// neuro_cim_top -- neuromorphic computing-in-memory processor.
//
// Sixteen CIM macros of sixteen banks each hold the weights of one layer as
// MWS-encoded rows. For an operation the controller loads 4b activations from
// the 32 KB data SRAM, the spike encoder turns them into spikes for 16
// timesteps, every bank integrates V_POS/V_NEG, fires, and may stop early, and
// the spike counts are written back to the SRAM.
//
// Multi-macro aggregation: when cfg.agg_pass[m] is set, macro m does not fire
// but passes its partial sums to macro m+1, and macro m+1 takes the next 64
// input channels (64 * position in the chain). A chain of three macros thus
// covers 192 input channels, which the x3 range of voltage folding holds.
//
// Interface: host writes weights through w_* (each byte passes the MWS
// encoder), reads and writes the data SRAM through h_* while not busy, and
// starts an operation with start; busy/done report progress; stats counts
// activity and mechanism events. Configuration must be stable while busy.
// The structure follows the documented architecture; the host interface,
// memory map and counters are this design's choices.
module neuro_cim_top
  import ncim_pkg::*;
#(
  parameter int unsigned NM   = NUM_MACROS,
  parameter int unsigned NB   = NUM_BANKS,
  parameter int unsigned FOLD = VFOLD
) (
  input  logic               clk,
  input  logic               rst_n,
  input  top_cfg_t           cfg,
  // weight write
  input  logic               w_we,
  input  logic [3:0]         w_macro,
  input  logic [3:0]         w_bank,
  input  logic [ROW_AW-1:0]  w_row,      // 0..63 weights, 64 = negated threshold
  input  logic [7:0]         w_data,     // 8b weight or {w_L, w_U} 4b weights
  // data SRAM host port (ignored while busy)
  input  logic               h_en,
  input  logic               h_we,
  input  logic [SRAM_AW-1:0] h_addr,
  input  logic [7:0]         h_wdata,
  output logic [7:0]         h_rdata,
  // operation control
  input  logic               start,
  output logic               busy,
  output logic               done,
  output stats_t             stats
);

  localparam int unsigned NCH  = NM * NUM_ROWS;
  localparam int unsigned NOUT = NM * NB * 2;

  bank_cfg_t bcfg;
  assign bcfg = '{wmode: cfg.wmode, fold_en: cfg.fold_en, es_en: cfg.es_en,
                  t_es: cfg.t_es, v_es: cfg.v_es};

  // ---------------- weight write path with MSB word skipping
  logic [NUM_COLS-1:0] w_row_bits;
  mws_encoder u_mws (.wmode(cfg.wmode), .mws_en(cfg.mws_en), .weight(w_data), .row(w_row_bits));

  // ---------------- controller and data SRAM
  logic               c_en, c_we, nstart, acc, fire, es_chk;
  logic [SRAM_AW-1:0] c_addr;
  logic [7:0]         c_wdata, rdata;
  logic [T_W-1:0]     t;
  logic [3:0]         act [NCH];
  logic [SPK_W-1:0]   cnt_flat [NOUT];

  ncim_controller #(.NCH(NCH), .NOUT(NOUT)) u_ctrl (
    .clk, .rst_n, .start(start && !busy), .t_es(cfg.t_es),
    .in_base(cfg.in_base), .out_base(cfg.out_base),
    .busy, .done,
    .m_en(c_en), .m_we(c_we), .m_addr(c_addr), .m_wdata(c_wdata), .m_rdata(rdata),
    .act, .cnt_in(cnt_flat),
    .nstart, .acc, .fire, .es_chk, .t
  );

  data_sram #(.DEPTH(SRAM_DEPTH), .WIDTH(8)) u_sram (
    .clk,
    .en   (busy ? c_en   : h_en),
    .we   (busy ? c_we   : h_we),
    .addr (busy ? c_addr : h_addr),
    .wdata(busy ? c_wdata : h_wdata),
    .rdata
  );
  assign h_rdata = rdata;

  // ---------------- macros and aggregation chain
  logic [NM-1:0] pass;
  logic [3:0] chain_pos [NM];
  bank_ev_t   ev [NM][NB];
  logic [SPK_W-1:0] cnt [NM][NB][2];

  // position of each macro in its aggregation chain selects its input channels
  always_comb begin
    pass = cfg.agg_pass[NM-1:0];
    pass[NM-1] = 1'b0;          // the last macro always fires
    chain_pos[0] = '0;
    for (int m = 1; m < NM; m++) chain_pos[m] = pass[m-1] ? chain_pos[m-1] + 4'd1 : 4'd0;
  end

  for (genvar m = 0; m < NM; m++) begin : g_macro
    logic [3:0]          m_act [NUM_ROWS];
    logic [NUM_ROWS-1:0] m_spk;
    volt_t               ai_pos [NB][2], ai_neg [NB][2];   // from macro m-1
    volt_t               ao_pos [NB][2], ao_neg [NB][2];   // to macro m+1
    logic [1:0]          si [NB], so [NB];                 // stop chain from m+1 / to m-1

    for (genvar r = 0; r < NUM_ROWS; r++) begin : g_act
      assign m_act[r] = act[{chain_pos[m], 6'(r)}];
    end
    spike_encoder #(.N(NUM_ROWS)) u_enc (.act(m_act), .t, .spikes(m_spk));

    for (genvar b = 0; b < NB; b++) begin : g_link
      if (m == 0) begin : g_first
        assign ai_pos[b] = '{default: '0};
        assign ai_neg[b] = '{default: '0};
      end else begin : g_next
        assign ai_pos[b] = g_macro[m-1].ao_pos[b];
        assign ai_neg[b] = g_macro[m-1].ao_neg[b];
      end
      if (m == NM - 1) begin : g_last
        assign si[b] = 2'b00;
      end else begin : g_prev
        assign si[b] = g_macro[m+1].so[b];
      end
    end

    cim_macro #(.NB(NB), .ROWS(NUM_ROWS), .FOLD(FOLD)) u_macro (
      .clk, .rst_n, .cfg(bcfg),
      .we(w_we && !busy && w_macro == m), .wbank(w_bank[$clog2(NB)-1:0]),
      .waddr(w_row), .wdata(w_row_bits),
      .spikes(m_spk), .start(nstart), .acc, .fire, .es_chk, .pass(pass[m]),
      .agg_in_pos(ai_pos), .agg_in_neg(ai_neg),
      .agg_out_pos(ao_pos), .agg_out_neg(ao_neg),
      .stop_in(si), .stop_out(so),
      .spike_cnt(cnt[m]), .ev(ev[m])
    );

    for (genvar b = 0; b < NB; b++) begin : g_cnt
      assign cnt_flat[(m*NB + b)*2]     = cnt[m][b][0];
      assign cnt_flat[(m*NB + b)*2 + 1] = cnt[m][b][1];
    end
  end

  // ---------------- activity and mechanism counters
  logic [31:0] s_wl, s_bl, s_fire, s_stop, s_fold;

  always_comb begin
    s_wl = '0; s_bl = '0; s_fire = '0; s_stop = '0; s_fold = '0;
    for (int m = 0; m < NM; m++) begin
      for (int b = 0; b < NB; b++) begin
        s_wl   = s_wl   + 32'(ev[m][b].wl);
        s_bl   = s_bl   + 32'(ev[m][b].bl);
        s_fire = s_fire + 32'(ev[m][b].fired[0]) + 32'(ev[m][b].fired[1]);
        s_stop = s_stop + 32'(ev[m][b].stopped[0]) + 32'(ev[m][b].stopped[1]);
        s_fold = s_fold + 32'(ev[m][b].folded[0]) + 32'(ev[m][b].folded[1]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stats <= '0;
    end else begin
      stats.wl_drives     <= stats.wl_drives + s_wl;
      stats.bl_discharges <= stats.bl_discharges + s_bl;
      stats.spikes        <= stats.spikes + s_fire;
      stats.es_stops      <= stats.es_stops + s_stop;
      stats.fold_evals    <= stats.fold_evals + s_fold;
      if (acc && pass != '0)                  stats.agg_steps <= stats.agg_steps + 1;
      if (w_we && !busy && w_row_bits[0])     stats.mws_flags <= stats.mws_flags + 1;
      else if (w_we && !busy && w_row_bits[5]) stats.mws_flags <= stats.mws_flags + 1;
      if (done)                               stats.ops <= stats.ops + 1;
    end
  end

endmodule
