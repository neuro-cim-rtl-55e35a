// neuron_unit -- one integrate-and-fire neuron of a bank.
//
// The membrane is held as two non-negative voltages, V_POS (positive part of
// sum(W*S) - threshold) and V_NEG (negative part). Each timestep has an
// accumulate phase (acc), in which the adder increments of the driven cells are
// added, and a fire phase (fire), in which voltage_folder splits both voltages
// into folding count and residue and firing_logic decides V_POS > V_NEG. On a
// spike both voltages return to zero and the threshold row is driven again in
// the next accumulate phase. In the fire phase of timestep T_ES (es_chk) a
// neuron that did not fire is stopped when V_POS - V_NEG < V_ES; a stopped
// neuron drives no word lines until the next start.
// Without folding the analog voltages clamp at VFOLD-1, with folding at
// 3*VFOLD-1. In multi-macro aggregation (pass=1) the neuron does not fire: it
// adds its increments to those arriving from the upstream macro and hands the
// sum to the downstream macro, and it follows the downstream neuron's stop
// state. The firing, reset, early stop, folding and aggregation behaviours are
// documented; the phase order, the clamp and the stop chain are this design's.
// Timing: state changes on the clock edge of the acc/fire/start cycle.
module neuron_unit
  import ncim_pkg::*;
#(
  parameter int unsigned FOLD = VFOLD
) (
  input  logic       clk,
  input  logic       rst_n,
  input  bank_cfg_t  cfg,
  input  logic       start,
  input  logic       acc,
  input  logic       fire,
  input  logic       es_chk,
  input  volt_t      dpos,
  input  volt_t      dneg,
  input  logic       pass,
  input  volt_t      agg_in_pos,
  input  volt_t      agg_in_neg,
  output volt_t      agg_out_pos,
  output volt_t      agg_out_neg,
  input  logic       stop_in,
  output logic       stop_out,
  output logic       active,        // Sub-WL enable of this neuron's columns
  output logic       thr_pending,   // drive the threshold row in the next acc
  output logic [SPK_W-1:0] spike_cnt,
  output logic       ev_fired,
  output logic       ev_stopped,
  output logic       ev_folded
);

  volt_t vpos, vneg;
  logic  stopped, thr_due;
  logic  [V_W:0] sum_pos, sum_neg, limit;
  logic  [1:0] pcnt, ncnt;
  logic  [RES_W-1:0] pres, nres;
  logic  spike, es_stop, eval;

  assign limit       = cfg.fold_en ? (V_W+1)'(NFOLD * FOLD - 1) : (V_W+1)'(FOLD - 1);
  assign agg_out_pos = pass ? dpos + agg_in_pos : '0;
  assign agg_out_neg = pass ? dneg + agg_in_neg : '0;
  assign stop_out    = pass ? stop_in : stopped;
  assign active      = pass ? !stop_in : !stopped;
  assign thr_pending = !pass && thr_due;

  assign sum_pos = {1'b0, vpos} + {1'b0, dpos} + {1'b0, agg_in_pos};
  assign sum_neg = {1'b0, vneg} + {1'b0, dneg} + {1'b0, agg_in_neg};

  voltage_folder #(.FOLD(FOLD)) u_fold_pos (.v_in(vpos), .fold_cnt(pcnt), .v_sel(pres), .sel_x());
  voltage_folder #(.FOLD(FOLD)) u_fold_neg (.v_in(vneg), .fold_cnt(ncnt), .v_sel(nres), .sel_x());

  assign eval = fire && !pass && !stopped;

  firing_logic u_fire (
    .clk, .rst_n, .clear(start), .eval,
    .pos_cnt(pcnt), .pos_res(pres), .neg_cnt(ncnt), .neg_res(nres),
    .spike, .spike_cnt
  );

  es_logic u_es (
    .es_en(eval && es_chk && cfg.es_en && !spike),
    .v_pos(vpos), .v_neg(vneg), .v_es(cfg.v_es), .stop(es_stop)
  );

  assign ev_fired   = spike;
  assign ev_stopped = es_stop;
  assign ev_folded  = eval && (pcnt != 2'd0 || ncnt != 2'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpos    <= '0;
      vneg    <= '0;
      stopped <= 1'b0;
      thr_due <= 1'b1;
    end else if (start) begin
      vpos    <= '0;
      vneg    <= '0;
      stopped <= 1'b0;
      thr_due <= 1'b1;
    end else if (acc && !pass && !stopped) begin
      vpos    <= (sum_pos > limit) ? volt_t'(limit) : volt_t'(sum_pos);
      vneg    <= (sum_neg > limit) ? volt_t'(limit) : volt_t'(sum_neg);
      thr_due <= 1'b0;
    end else if (spike) begin
      vpos    <= '0;
      vneg    <= '0;
      thr_due <= 1'b1;
    end else if (es_stop) begin
      stopped <= 1'b1;
    end
  end

endmodule
