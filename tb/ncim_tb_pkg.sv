// ncim_tb_pkg -- reference models shared by the testbenches.
//
// Everything here is computed from weight values and activations directly,
// not from the RTL's column map: the positive/negative split of a weight
// under MSB word skipping, an accumulator-based rate coder, and an
// integrate-and-fire neuron with separate V_POS/V_NEG, clamp, reset on
// spike and early stop.
package ncim_tb_pkg;

  // Positive and negative parts of a weight as stored (value = pos - neg).
  // mode8: 8b weight w; else the 4b weight w[3:0].
  function automatic void split_w(input bit mode8, input bit mws, input int unsigned w,
                                  output int pos, output int neg);
    if (mode8) begin
      if (mws && (w & 8'hF0) == 8'hF0) begin pos = w & 15;  neg = 16; end
      else begin pos = w & 127; neg = (w & 128) ? 128 : 0; end
    end else begin
      if (mws && (w & 4'hC) == 4'hC) begin pos = w & 3; neg = 4; end
      else begin pos = w & 7; neg = (w & 8) ? 8 : 0; end
    end
  endfunction

  // Rate coder: spike train of activation a, as an accumulator with carry.
  function automatic bit [15:0] spike_train(input int unsigned a);
    int acc = 0;
    bit [15:0] s = '0;
    for (int t = 0; t < 16; t++) begin
      acc += a;
      if (acc >= 16) begin s[t] = 1; acc -= 16; end
    end
    return s;
  endfunction

  // Reference integrate-and-fire neuron over 16 timesteps.
  // rpos/rneg/ract: per input row; tpos/tneg: threshold row parts.
  typedef struct { int count; bit stopped; bit folded; int fires; } nres_t;

  function automatic nres_t run_neuron(input int rpos[$], input int rneg[$], input int ract[$],
                                       input int tpos, input int tneg,
                                       input bit fold_en, input bit es_en, input int t_es,
                                       input int v_es, input int vfold);
    nres_t r;
    int vp = 0, vn = 0, lim;
    bit thr = 1;
    bit [15:0] tr [$];
    r.count = 0; r.stopped = 0; r.folded = 0; r.fires = 0;
    lim = fold_en ? 3 * vfold - 1 : vfold - 1;
    foreach (ract[i]) tr.push_back(spike_train(ract[i]));
    for (int t = 0; t < 16; t++) begin
      if (r.stopped) continue;
      // accumulate
      begin
        int dp = 0, dn = 0;
        foreach (rpos[i]) if (tr[i][t]) begin dp += rpos[i]; dn += rneg[i]; end
        if (thr) begin dp += tpos; dn += tneg; end
        vp += dp; vn += dn;
        if (vp > lim) vp = lim;
        if (vn > lim) vn = lim;
        thr = 0;
      end
      // fire
      if (vp >= vfold || vn >= vfold) r.folded = 1;
      if (vp > vn) begin
        if (r.count < 31) r.count++;
        r.fires++;
        vp = 0; vn = 0; thr = 1;
      end else if (es_en && t == t_es && (vp - vn) < v_es) begin
        r.stopped = 1;
      end
    end
    return r;
  endfunction

  // Row image of a weight in the bank's column order (the array's contract):
  // group U = cols 0..4 [flag, sign, b, b, b], group L = cols 5..9.
  function automatic logic [9:0] enc_row(input bit mode8, input bit mws, input logic [7:0] w);
    logic [9:0] r = '0;
    if (mode8) begin
      if (mws && w[7:4] == 4'hF) r[0] = 1;
      else begin r[1] = w[7]; r[2] = w[6]; r[3] = w[5]; r[4] = w[4]; end
      r[6] = w[3]; r[7] = w[2]; r[8] = w[1]; r[9] = w[0];
    end else begin
      for (int g = 0; g < 2; g++) begin
        logic [3:0] q = g ? w[7:4] : w[3:0];
        if (mws && q[3:2] == 2'b11) begin r[g*5] = 1; r[g*5+3] = q[1]; r[g*5+4] = q[0]; end
        else begin r[g*5+1] = q[3]; r[g*5+2] = q[2]; r[g*5+3] = q[1]; r[g*5+4] = q[0]; end
      end
    end
    return r;
  endfunction

  // Small, roughly bell-shaped random weight (sum of uniforms), as trained
  // weights are; range of the precision.
  function automatic logic [7:0] rand_w(input bit mode8);
    int v;
    if (mode8) begin
      v = int'($urandom_range(0, 24)) + int'($urandom_range(0, 24)) - 26;
      return 8'(v);
    end else begin
      v = int'($urandom_range(0, 7)) + int'($urandom_range(0, 7)) - 8;
      return {4'(int'($urandom_range(0, 7)) + int'($urandom_range(0, 7)) - 8), 4'(v)};
    end
  endfunction

endpackage
