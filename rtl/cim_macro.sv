// cim_macro -- one CIM macro: 16 banks sharing 64 input-channel word lines.
//
// Every bank sees the same 64 input spikes; bank b produces output channel b
// (8b weights) or channels 2b and 2b+1 (4b weights). The aggregation ports
// carry each neuron's partial V_POS/V_NEG sums to the next macro when this
// macro is in pass mode (multi-macro aggregation), and the stop chain carries
// the aggregating neuron's early-stop state back. Bank count is documented;
// the wiring of write ports and events is this design's choice.
// Timing: as cim_bank.
module cim_macro
  import ncim_pkg::*;
#(
  parameter int unsigned NB   = NUM_BANKS,
  parameter int unsigned ROWS = NUM_ROWS,
  parameter int unsigned FOLD = VFOLD
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bank_cfg_t         cfg,
  input  logic              we,
  input  logic [$clog2(NB)-1:0] wbank,
  input  logic [ROW_AW-1:0] waddr,
  input  logic [NUM_COLS-1:0] wdata,
  input  logic [ROWS-1:0]   spikes,
  input  logic              start,
  input  logic              acc,
  input  logic              fire,
  input  logic              es_chk,
  input  logic              pass,
  input  volt_t             agg_in_pos  [NB][2],
  input  volt_t             agg_in_neg  [NB][2],
  output volt_t             agg_out_pos [NB][2],
  output volt_t             agg_out_neg [NB][2],
  input  logic [1:0]        stop_in  [NB],
  output logic [1:0]        stop_out [NB],
  output logic [SPK_W-1:0]  spike_cnt [NB][2],
  output bank_ev_t          ev [NB]
);

  for (genvar b = 0; b < NB; b++) begin : g_bank
    cim_bank #(.ROWS(ROWS), .FOLD(FOLD)) u_bank (
      .clk, .rst_n, .cfg,
      .we(we && wbank == b), .waddr, .wdata,
      .spikes, .start, .acc, .fire, .es_chk, .pass,
      .agg_in_pos(agg_in_pos[b]), .agg_in_neg(agg_in_neg[b]),
      .agg_out_pos(agg_out_pos[b]), .agg_out_neg(agg_out_neg[b]),
      .stop_in(stop_in[b]), .stop_out(stop_out[b]),
      .spike_cnt(spike_cnt[b]), .ev(ev[b])
    );
  end

endmodule
