// es_logic -- early-stop decision of one neuron.
//
// At the early-stop timestep the control logic raises es_en. The difference
// V_DIFF = V_POS - V_NEG is compared with the programmable level V_ES; when
// V_DIFF < V_ES the neuron is predicted not to fire and stop is raised, which
// the bank turns into a low Sub-WL enable for the rest of the operation.
// This compare is documented; V_ES being a signed value in weight LSBs is this
// design's choice. Purely combinational.
module es_logic
  import ncim_pkg::*;
(
  input  logic                es_en,
  input  volt_t               v_pos,
  input  volt_t               v_neg,
  input  logic signed [V_W:0] v_es,
  output logic                stop
);

  logic signed [V_W:0] v_diff;

  always_comb begin
    v_diff = $signed({1'b0, v_pos}) - $signed({1'b0, v_neg});
    stop   = es_en && (v_diff < v_es);
  end

endmodule
