// firing_logic -- mixed-mode spike decision and output spike counter.
//
// V_POS and V_NEG each arrive as a digital folding count plus an analog residue.
// The decision is mixed-mode: different folding counts decide digitally; equal
// counts are resolved by the 1-bit comparator on the residues. The neuron
// fires when V_POS > V_NEG, i.e. when sum(W*S) exceeds the threshold. The
// spike counter keeps the number of output spikes for the output memory.
// The comparison rule V_POS > V_NEG and the spike counter are documented; the
// count-first ordering, counter width and saturation are this design's choices.
// Timing: spike is combinational and valid while eval is high; the counter
// increments on the clock edge when eval and spike are both high.
module firing_logic
  import ncim_pkg::*;
#(
  parameter int unsigned CW = SPK_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              eval,
  input  logic [1:0]        pos_cnt,
  input  logic [RES_W-1:0]  pos_res,
  input  logic [1:0]        neg_cnt,
  input  logic [RES_W-1:0]  neg_res,
  output logic              spike,
  output logic [CW-1:0]     spike_cnt
);

  logic comp_analog;   // 1b comparator on the residues

  always_comb begin
    comp_analog = pos_res > neg_res;
    if (pos_cnt != neg_cnt) spike = eval && (pos_cnt > neg_cnt);
    else                    spike = eval && comp_analog;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         spike_cnt <= '0;
    else if (clear)                     spike_cnt <= '0;
    else if (spike && spike_cnt != '1)  spike_cnt <= spike_cnt + 1'b1;
  end

endmodule
