// voltage_folder -- behavioural model of the voltage folding circuit.
//
// Kind: behavioural model of an analog folding amplifier (two cross-coupled
// differential-pair stages producing V_X and V_Y 180 degrees apart), written in
// integer arithmetic. The membrane voltage V_IN is split into a digital folding
// count and an analog residue V_SEL, which is whichever of V_X/V_Y rises with
// V_IN: V_Y in ranges 0 and 2, V_X in range 1, as in the measured waveforms.
// Three ranges triple the usable membrane range. The folding step in LSBs and
// clamping above the third range are this design's choices.
// Purely combinational.
module voltage_folder
  import ncim_pkg::*;
#(
  parameter int unsigned FOLD = VFOLD,
  parameter int unsigned RW   = RES_W
) (
  input  volt_t          v_in,
  output logic [1:0]     fold_cnt,
  output logic [RW-1:0]  v_sel,
  output logic           sel_x
);

  always_comb begin
    if (v_in >= volt_t'(2 * FOLD)) begin
      fold_cnt = 2'd2;
      v_sel    = (v_in >= volt_t'(3 * FOLD)) ? RW'(FOLD - 1) : RW'(v_in - volt_t'(2 * FOLD));
    end else if (v_in >= volt_t'(FOLD)) begin
      fold_cnt = 2'd1;
      v_sel    = RW'(v_in - volt_t'(FOLD));
    end else begin
      fold_cnt = 2'd0;
      v_sel    = RW'(v_in);
    end
    sel_x = (fold_cnt == 2'd1);
  end

endmodule
