// ncim_pkg -- constants and types shared by the neuromorphic CIM processor.
//
// Array geometry (16 macros x 16 banks x 64 rows x 10 columns) follows the
// architecture description. The time-step count, the folding range in weight
// LSBs and all bit widths below are this design's own choices.
//
// Column map of a bank row (index = column):
//   group U: 0 '-1' flag, 1 sign, 2..4 data   (8b mode: w[7], w[6], w[5], w[4])
//   group L: 5 '-1' flag, 6..9 data           (8b mode: w[3], w[2], w[1], w[0])
// In 4b mode each group holds one 4b weight [flag, sign, b2, b1, b0].
package ncim_pkg;

  localparam int NUM_MACROS = 16;
  localparam int NUM_BANKS  = 16;
  localparam int NUM_ROWS   = 64;            // weight word lines per bank
  localparam int NUM_COLS   = 10;            // cells per row
  localparam int ROW_AW     = 7;             // row address width, 64 = threshold row
  localparam int CNT_W      = 7;             // bit-line level width (0..65)

  localparam int T_STEPS    = 16;            // timesteps per operation (4b input rate code)
  localparam int T_W        = 4;
  localparam int SPK_W      = 5;             // output spike counter width (0..16)

  localparam int V_W        = 16;            // membrane voltage width, weight LSBs
  localparam int VFOLD      = 8192;          // one folding range, weight LSBs
  localparam int RES_W      = 13;            // residue width (log2 VFOLD)
  localparam int NFOLD      = 3;             // ranges reachable with folding

  localparam int NUM_CH     = NUM_MACROS * NUM_ROWS;   // input channels buffered
  localparam int SRAM_DEPTH = 32768;         // 32 KB digital SRAM
  localparam int SRAM_AW    = 15;

  typedef enum logic { WMODE_8B = 1'b0, WMODE_4B = 1'b1 } wmode_e;

  typedef logic [CNT_W-1:0] blcnt_t;
  typedef logic [V_W-1:0]   volt_t;

  // Configuration shared by all banks.
  typedef struct packed {
    wmode_e             wmode;     // weight precision
    logic               fold_en;   // voltage folding (x3 range) on
    logic               es_en;     // early stopping on
    logic [T_W-1:0]     t_es;      // timestep at which ES is evaluated
    logic signed [V_W:0] v_es;     // early-stop level for V_POS - V_NEG
  } bank_cfg_t;

  // Per-step events reported by a bank (for activity and mechanism counters).
  typedef struct packed {
    logic [7:0] wl;        // word-line group activations
    logic [9:0] bl;        // cells that discharged a bit line
    logic [1:0] fired;     // spikes per neuron
    logic [1:0] stopped;   // early stops per neuron
    logic [1:0] folded;    // neuron whose V_POS or V_NEG crossed a fold
  } bank_ev_t;

  // Capacitor weights of the adders, in weight LSBs, for one column.
  // Positive adder: data columns. Negative adder: sign and '-1' flag columns.
  function automatic int unsigned pos_weight(wmode_e m, int col);
    if (m == WMODE_8B) begin
      case (col)
        2: return 64;  3: return 32;  4: return 16;   // 4C/2C/1C behind the x16 bridge
        6: return 8;   7: return 4;   8: return 2;  9: return 1;
        default: return 0;
      endcase
    end else begin
      case (col)
        2, 7: return 4;  3, 8: return 2;  4, 9: return 1;
        default: return 0;
      endcase
    end
  endfunction

  function automatic int unsigned neg_weight(wmode_e m, int col);
    if (m == WMODE_8B) begin
      case (col)
        1: return 128;  // sign, 8C behind the bridge
        0: return 16;   // '-1' flag of the MSB nibble, 1C behind the bridge
        5: return 1;    // '-1' flag of the lower group, 1C
        default: return 0;
      endcase
    end else begin
      case (col)
        1, 6: return 8;  // sign of each 4b weight
        0, 5: return 4;  // '-1' flag replacing '11'
        default: return 0;
      endcase
    end
  endfunction

  // Processor configuration (held stable while an operation runs).
  typedef struct packed {
    wmode_e                  wmode;     // weight precision
    logic                    mws_en;    // MSB word skipping on the weight-write path
    logic                    fold_en;   // voltage folding
    logic                    es_en;     // early stopping
    logic [T_W-1:0]          t_es;      // early-stop timestep
    logic signed [V_W:0]     v_es;      // early-stop level
    logic [NUM_MACROS-1:0]   agg_pass;  // macro m hands its partial sums to macro m+1
    logic [SRAM_AW-1:0]      in_base;   // first activation byte in the data SRAM
    logic [SRAM_AW-1:0]      out_base;  // first spike-count byte in the data SRAM
  } top_cfg_t;

  // Activity and mechanism counters of the processor (since reset).
  typedef struct packed {
    logic [31:0] wl_drives;     // word-line group activations
    logic [31:0] bl_discharges; // cells that discharged a bit line
    logic [31:0] spikes;        // output spikes fired
    logic [31:0] es_stops;      // neurons stopped early
    logic [31:0] fold_evals;    // fire evaluations decided with a non-zero folding count
    logic [31:0] agg_steps;     // accumulate phases with multi-macro aggregation
    logic [31:0] mws_flags;     // weight rows written with a '-1' flag
    logic [31:0] ops;           // completed operations
  } stats_t;

endpackage
