// output_memory: data output memory (DOM) bank of one PE group.
//
// Holds the intermediate deconvolution result and the final convolution
// result, column by column.  Port B belongs to the group's send / distribution
// PE (PE33), which both writes results and, after the context switch, reads
// the stored deconvolution result back; port A is the host read port.  Both
// reads have one cycle of latency.  Size, width and ports are this
// implementation's choices.
module output_memory
  import dprap_pkg::*;
#(
  parameter int DEPTH = 2 ** MEM_AW
) (
  input  logic   clk,
  input  logic   a_re,
  input  maddr_t a_addr,
  output data_t  a_rdata,
  input  logic   b_re,
  input  logic   b_we,
  input  maddr_t b_addr,
  input  data_t  b_wdata,
  output data_t  b_rdata
);

  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    if (b_re) b_rdata <= mem[b_addr];
    if (a_re) a_rdata <= mem[a_addr];
  end

endmodule
