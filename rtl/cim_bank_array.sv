// cim_bank_array -- the 64x10 8T SRAM cell array of one bank, plus its threshold row.
//
// Each input spike drives one word line. Per 5-column group a Sub-WL enable is
// ANDed into every word line of that group, so a stopped neuron drives no cells.
// A driven cell holding 1 discharges its read bit line by one step; the output
// bl_cnt[c] is therefore the number of driven cells holding 1 in column c, the
// bit-line voltage in units of one step. The threshold row (address 64) holds
// the negated firing threshold and is driven by thr_en instead of a spike.
// The array and the per-group Sub-WL gating follow the architecture; the
// separate threshold row address, the synchronous one-row write port and the
// activity outputs (wl_cnt, bl_ones) are this design's choices.
// Timing: write on the clock edge; the read side is combinational.
module cim_bank_array
  import ncim_pkg::*;
#(
  parameter int unsigned ROWS = NUM_ROWS
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [ROW_AW-1:0]     waddr,
  input  logic [NUM_COLS-1:0]   wdata,
  input  logic [ROWS-1:0]       spikes,
  input  logic [1:0]            thr_en,      // drive the threshold row, per group
  input  logic [1:0]            sub_wl_en,   // per group: 0 = U (cols 0-4), 1 = L (cols 5-9)
  output blcnt_t                bl_cnt [NUM_COLS],
  output logic [7:0]            wl_cnt,      // driven (row, group) pairs
  output logic [9:0]            bl_ones      // driven cells holding 1
);

  logic [NUM_COLS-1:0] cells [ROWS+1];

  always_ff @(posedge clk) begin
    if (we && waddr <= ROW_AW'(ROWS)) cells[waddr] <= wdata;
  end

  always_comb begin
    logic drv;
    wl_cnt  = '0;
    bl_ones = '0;
    for (int c = 0; c < NUM_COLS; c++) bl_cnt[c] = '0;
    for (int g = 0; g < 2; g++) begin
      for (int r = 0; r <= ROWS; r++) begin
        drv = sub_wl_en[g] && ((r < ROWS) ? spikes[r] : thr_en[g]);
        if (drv) begin
          wl_cnt = wl_cnt + 8'd1;
          for (int c = g * 5; c < g * 5 + 5; c++) begin
            if (cells[r][c]) begin
              bl_cnt[c] = bl_cnt[c] + blcnt_t'(1);
              bl_ones   = bl_ones + 10'd1;
            end
          end
        end
      end
    end
  end

endmodule
