// input_memory: data input memory (DIM) bank of one PE group.
//
// Holds the kernels and the input feature map, the map stored column by
// column as in the source design (word src + x*side + y holds pixel (y, x)).
// Port A is the host write port; port B is the read port of the group's
// kernel-load / distribution PE, with one cycle of read latency.  The size,
// width and two-port organisation are this implementation's choices.
module input_memory
  import dprap_pkg::*;
#(
  parameter int DEPTH = 2 ** MEM_AW
) (
  input  logic   clk,
  input  logic   a_we,
  input  maddr_t a_addr,
  input  data_t  a_wdata,
  input  logic   b_re,
  input  maddr_t b_addr,
  output data_t  b_rdata
);

  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_re) b_rdata <= mem[b_addr];
  end

endmodule
