// ncim_controller -- sequencer of one layer operation.
//
// On start it walks through four phases:
//   LOAD  : reads NCH activation bytes (low nibble used) from in_base onwards
//           into the activation buffer, one byte per cycle;
//   INIT  : one cycle of nstart, which clears every neuron and spike counter;
//   RUN   : T_STEPS timesteps of two cycles each, an accumulate cycle (acc)
//           and a fire cycle (fire); es_chk is raised in the fire cycle of
//           timestep t_es;
//   STORE : writes NOUT spike counts to out_base onwards, one byte per cycle,
//           index k = (macro*16 + bank)*2 + neuron.
// done pulses for one cycle at the end. The timestep structure follows the
// documented neuron operation; the memory map, the phase lengths and the
// two-cycle timestep are this design's choices. done is high
// NCH + 2*T_STEPS + NOUT + 1 cycles after the clock edge that takes start.
module ncim_controller
  import ncim_pkg::*;
#(
  parameter int unsigned NCH  = NUM_CH,
  parameter int unsigned NOUT = NUM_MACROS * NUM_BANKS * 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [T_W-1:0]     t_es,
  input  logic [SRAM_AW-1:0] in_base,
  input  logic [SRAM_AW-1:0] out_base,
  output logic               busy,
  output logic               done,
  // data SRAM port
  output logic               m_en,
  output logic               m_we,
  output logic [SRAM_AW-1:0] m_addr,
  output logic [7:0]         m_wdata,
  input  logic [7:0]         m_rdata,
  // activation buffer
  output logic [3:0]         act [NCH],
  // spike counts to store
  input  logic [SPK_W-1:0]   cnt_in [NOUT],
  // phase strobes
  output logic               nstart,
  output logic               acc,
  output logic               fire,
  output logic               es_chk,
  output logic [T_W-1:0]     t
);

  typedef enum logic [2:0] { S_IDLE, S_LOAD, S_INIT, S_ACC, S_FIRE, S_STORE, S_DONE } state_e;

  localparam int IW = $clog2(NCH + 1) > $clog2(NOUT + 1) ? $clog2(NCH + 1) : $clog2(NOUT + 1);

  localparam int OW = $clog2(NOUT);
  localparam int AW = $clog2(NCH);

  state_e        state;
  logic [IW-1:0] idx;
  logic          rd_valid;
  logic [IW-1:0] rd_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      idx      <= '0;
      t        <= '0;
      rd_valid <= 1'b0;
      rd_idx   <= '0;
    end else begin
      rd_valid <= (state == S_LOAD);
      rd_idx   <= idx;
      case (state)
        S_IDLE:  if (start) begin state <= S_LOAD; idx <= '0; end
        S_LOAD:  if (idx == IW'(NCH - 1)) state <= S_INIT;
                 else idx <= idx + 1'b1;
        S_INIT:  begin state <= S_ACC; t <= '0; end
        S_ACC:   state <= S_FIRE;
        S_FIRE:  if (t == T_W'(T_STEPS - 1)) begin state <= S_STORE; idx <= '0; end
                 else begin state <= S_ACC; t <= t + 1'b1; end
        S_STORE: if (idx == IW'(NOUT - 1)) state <= S_DONE;
                 else idx <= idx + 1'b1;
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // activation buffer filled from the SRAM read data
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++) act[i] <= '0;
    end else if (rd_valid) begin
      act[rd_idx[AW-1:0]] <= m_rdata[3:0];
    end
  end

  always_comb begin
    m_en    = (state == S_LOAD) || (state == S_STORE);
    m_we    = (state == S_STORE);
    m_addr  = (state == S_STORE) ? out_base + SRAM_AW'(idx) : in_base + SRAM_AW'(idx);
    m_wdata = 8'(cnt_in[idx[OW-1:0]]);
  end

  assign busy   = (state != S_IDLE);
  assign done   = (state == S_DONE);
  assign nstart = (state == S_INIT);
  assign acc    = (state == S_ACC);
  assign fire   = (state == S_FIRE);
  assign es_chk = (state == S_FIRE) && (t == t_es);

endmodule
