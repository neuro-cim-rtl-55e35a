// spike_encoder -- rate-codes 4b input activations into word-line spikes.
//
// An activation a (0..15) spikes at timestep t exactly when
// floor((t+1)*a/16) > floor(t*a/16), so over the 16 timesteps of one
// operation it emits exactly a spikes, spread evenly. The document shows only
// that inputs arrive as spike trains; this deterministic code is this design's
// choice. Purely combinational.
module spike_encoder
  import ncim_pkg::*;
#(
  parameter int unsigned N = NUM_ROWS
) (
  input  logic [3:0]     act [N],
  input  logic [T_W-1:0] t,
  output logic [N-1:0]   spikes
);

  always_comb begin
    logic [8:0] now, prev;
    for (int i = 0; i < N; i++) begin
      now       = ({5'd0, t} + 9'd1) * {5'd0, act[i]};
      prev      = {5'd0, t} * {5'd0, act[i]};
      spikes[i] = now[8:4] != prev[8:4];
    end
  end

endmodule
