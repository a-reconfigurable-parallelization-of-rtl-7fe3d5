// global_imem: global instruction memory.
//
// Holds the program of the global controller: DEPTH instructions of GI_W
// bits.  The host writes it in HOST_DW-bit pieces (wr_piece selects which
// piece of word wr_addr); the controller reads whole instructions with one
// cycle of latency.  The source design only names this memory; its size,
// width and write organisation are this implementation's choices.
module global_imem
  import dprap_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic                          clk,
  input  logic                          wr_en,
  input  logic [$clog2(DEPTH)-1:0]      wr_addr,
  input  logic [$clog2(GI_W/HOST_DW)-1:0] wr_piece,
  input  logic [HOST_DW-1:0]            wr_data,
  input  logic                          rd_en,
  input  logic [$clog2(DEPTH)-1:0]      rd_addr,
  output logic [GI_W-1:0]               rd_data
);

  logic [GI_W/HOST_DW-1:0][HOST_DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr][wr_piece] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
