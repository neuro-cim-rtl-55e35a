// mws_encoder -- MSB word skipping: writes a weight into the 10 cells of a row.
//
// Most trained weights are small, so the upper bits of a negative weight are a
// run of sign-extension ones. Those ones would discharge bit lines on every
// spike. The encoder replaces such a run by a single '-1' flag cell plus zeros,
// which carries the same value through the negative adder:
//   8b mode: upper nibble 1111 (value -16)  -> flag=1, nibble 0000
//   4b mode: top two bits  11  (value  -4)  -> flag=1, bits   00
// These two rules are the documented ones. The row layout (see ncim_pkg) and
// writing the lower flag as 0 in 8b mode are this design's choices.
// With mws_en=0 the weight is stored as plain two's complement, flags cleared.
// Purely combinational.
module mws_encoder
  import ncim_pkg::*;
(
  input  wmode_e              wmode,
  input  logic                mws_en,
  input  logic [7:0]          weight,   // 8b weight, or {w_L[3:0], w_U[3:0]} in 4b mode
  output logic [NUM_COLS-1:0] row       // row[c] = cell of column c
);

  // One 4b weight into a 5-column group [flag, sign, b2, b1, b0] (bit 0 = flag).
  function automatic logic [4:0] enc4(logic [3:0] w, logic en);
    logic [4:0] g;
    if (en && w[3:2] == 2'b11) g = {w[0], w[1], 2'b00, 1'b1};
    else                       g = {w[0], w[1], w[2], w[3], 1'b0};
    return g;
  endfunction

  logic [4:0] grp_u, grp_l;

  always_comb begin
    if (wmode == WMODE_8B) begin
      if (mws_en && weight[7:4] == 4'b1111) grp_u = 5'b0000_1;
      else grp_u = {weight[4], weight[5], weight[6], weight[7], 1'b0};
      grp_l = {weight[0], weight[1], weight[2], weight[3], 1'b0};
    end else begin
      grp_u = enc4(weight[3:0], mws_en);
      grp_l = enc4(weight[7:4], mws_en);
    end
    row = {grp_l, grp_u};
  end

endmodule
