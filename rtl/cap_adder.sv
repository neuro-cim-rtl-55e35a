// cap_adder -- behavioural model of the positive and negative capacitive adders.
//
// Kind: behavioural model of a switched-capacitor circuit, written in integer
// arithmetic so it also synthesizes as its digital equivalent. A voltage is an
// integer in units of one weight LSB.
// The data columns connect through binary-weighted capacitors (8C/4C/2C/1C) to
// the positive adder; sign and '-1' flag columns connect to the negative adder.
// In 8b mode a 16/15C bridge joins the two column groups so the upper group
// counts x16. In 4b mode the bridge is opened and each group is a separate 4b
// adder (two neurons per bank). The 8b capacitor map is the documented one;
// the 4b map (sign 8, flag 4) is this design's reading of the '11'->'100' rule.
// dpos[h]/dneg[h] are the increments of neuron h (h=1 unused in 8b mode).
// Purely combinational.
module cap_adder
  import ncim_pkg::*;
(
  input  wmode_e  wmode,
  input  blcnt_t  bl_cnt [NUM_COLS],
  output volt_t   dpos [2],
  output volt_t   dneg [2]
);

  always_comb begin
    int unsigned h;
    for (int i = 0; i < 2; i++) begin
      dpos[i] = '0;
      dneg[i] = '0;
    end
    for (int c = 0; c < NUM_COLS; c++) begin
      h = (wmode == WMODE_4B && c >= 5) ? 1 : 0;
      dpos[h] = dpos[h] + volt_t'(pos_weight(wmode, c) * bl_cnt[c]);
      dneg[h] = dneg[h] + volt_t'(neg_weight(wmode, c) * bl_cnt[c]);
    end
  end

endmodule
