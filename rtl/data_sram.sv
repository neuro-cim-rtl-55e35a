// data_sram -- on-chip digital SRAM for input activations and output spike counts.
//
// 32 KB, byte wide, single port. The size is documented; the organisation is
// this design's choice. Timing: synchronous write; read data appears on rdata
// the cycle after en is high with we low.
module data_sram #(
  parameter int unsigned DEPTH = 32768,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
