// cim_bank -- one bank: cell array, positive/negative adders and two neurons.
//
// During an accumulate phase the input spikes drive the array's word lines;
// each 5-column group is gated by the Sub-WL enable of the neuron that owns it
// and the threshold row is added for a neuron that has just started or fired.
// The capacitive adders turn the bit-line levels into V_POS/V_NEG increments.
// In 8b mode one neuron owns both groups (output channel = bank); in 4b mode
// the bridge capacitor is open and each group feeds its own neuron (two output
// channels per bank). The array, adders and Sub-WL gating are documented; the
// ownership of groups in the two modes is this design's choice.
// Interface: per-neuron aggregation inputs/outputs and stop chain for
// multi-macro accumulation; ev reports this cycle's activity and events.
// Timing: as neuron_unit; array reads are combinational within the acc cycle.
module cim_bank
  import ncim_pkg::*;
#(
  parameter int unsigned ROWS = NUM_ROWS,
  parameter int unsigned FOLD = VFOLD
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bank_cfg_t         cfg,
  input  logic              we,
  input  logic [ROW_AW-1:0] waddr,
  input  logic [NUM_COLS-1:0] wdata,
  input  logic [ROWS-1:0]   spikes,
  input  logic              start,
  input  logic              acc,
  input  logic              fire,
  input  logic              es_chk,
  input  logic              pass,
  input  volt_t             agg_in_pos  [2],
  input  volt_t             agg_in_neg  [2],
  output volt_t             agg_out_pos [2],
  output volt_t             agg_out_neg [2],
  input  logic [1:0]        stop_in,
  output logic [1:0]        stop_out,
  output logic [SPK_W-1:0]  spike_cnt [2],
  output bank_ev_t          ev
);

  blcnt_t     bl_cnt [NUM_COLS];
  volt_t      dpos [2], dneg [2];
  logic [1:0] active, thr_pending, sub_wl_en, thr_en;
  logic [1:0] fired, stopped, folded;
  logic [7:0] wl_cnt;
  logic [9:0] bl_ones;
  logic       split;

  assign split = (cfg.wmode == WMODE_4B);

  always_comb begin
    if (split) begin
      sub_wl_en = {acc && active[1], acc && active[0]};
      thr_en    = thr_pending;
    end else begin
      sub_wl_en = {2{acc && active[0]}};
      thr_en    = {2{thr_pending[0]}};
    end
  end

  cim_bank_array #(.ROWS(ROWS)) u_array (
    .clk, .we, .waddr, .wdata, .spikes, .thr_en, .sub_wl_en,
    .bl_cnt, .wl_cnt, .bl_ones
  );

  cap_adder u_adder (.wmode(cfg.wmode), .bl_cnt, .dpos, .dneg);

  for (genvar h = 0; h < 2; h++) begin : g_neuron
    logic run;
    // neuron 1 is idle in 8b mode
    assign run = (h == 0) || split;
    neuron_unit #(.FOLD(FOLD)) u_neuron (
      .clk, .rst_n, .cfg,
      .start, .acc(acc && run), .fire(fire && run), .es_chk,
      .dpos(dpos[h]), .dneg(dneg[h]),
      .pass,
      .agg_in_pos(agg_in_pos[h]), .agg_in_neg(agg_in_neg[h]),
      .agg_out_pos(agg_out_pos[h]), .agg_out_neg(agg_out_neg[h]),
      .stop_in(stop_in[h]), .stop_out(stop_out[h]),
      .active(active[h]), .thr_pending(thr_pending[h]),
      .spike_cnt(spike_cnt[h]),
      .ev_fired(fired[h]), .ev_stopped(stopped[h]), .ev_folded(folded[h])
    );
  end

  assign ev = '{wl: wl_cnt, bl: bl_ones, fired: fired, stopped: stopped, folded: folded};

endmodule
