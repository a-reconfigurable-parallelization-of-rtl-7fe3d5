// peg: processing element group (PEG) of 4x4 PEs.
//
// Sixteen dprap_pe instances share three group-wide buses, each formed by
// OR-ing the (otherwise zero) outputs of all PEs:
//   * the distribution bus carries WEIGHT / KDONE / PIXEL / DDONE tokens from
//     the kernel-load and distribution PEs to all others;
//   * the product bus carries one product per kernel tap (lane = tap), with
//     the coordinates of the pixel it came from, to the integrating PEs;
//   * the readout bus carries the buffer index driven by the send PE; the
//     partial sums of all PEs at that index are added here and returned.
// PE00 is wired to the group's input memory (DIM) bank, PE33 to its output
// memory (DOM) bank, as in the source design's mapping where PE00 loads the
// input and PE33 writes all results.  Which PE does what in a layer comes
// entirely from the contexts written over the H-tree; a call command switches
// the whole group between deconvolution and convolution.
//
// Interface: hleaf[p] is the H-tree leaf of PE p (p = row*4 + col); done
// pulses for one cycle when the send PE has written the last result.
// Latency of a layer (side n, kernel K x K, result side m):
//   K*K + n*n + m*m + about 8 cycles after the RUN packet reaches the PEs.
module peg
  import dprap_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  hpkt_t  hleaf [PE_N],
  // input memory bank (read by PE00)
  output logic   dim_re,
  output maddr_t dim_addr,
  input  data_t  dim_rdata,
  // output memory bank (read and written by PE33)
  output logic   dom_re,
  output logic   dom_we,
  output maddr_t dom_addr,
  output data_t  dom_wdata,
  input  data_t  dom_rdata,
  output logic   done,
  output logic   active_slot
);

  tok_t                         tok_out  [PE_N];
  pcoord_t                      pc_out   [PE_N];
  logic [NTAP-1:0][ACC_W-1:0]   prod_out [PE_N];
  logic                         rd_en    [PE_N];
  bidx_t                        rd_idx   [PE_N];
  acc_t                         rd_part  [PE_N];
  logic                         mem_re   [PE_N];
  logic                         mem_we   [PE_N];
  maddr_t                       mem_addr [PE_N];
  data_t                        mem_wd   [PE_N];
  logic [PE_N-1:0]              pe_done;
  logic [PE_N-1:0]              pe_slot;

  tok_t                         tok_bus;
  pcoord_t                      pc_bus;
  logic [NTAP-1:0][ACC_W-1:0]   prod_bus;
  bidx_t                        rd_idx_bus;
  acc_t                         rd_sum;

  always_comb begin
    tok_bus    = '0;
    pc_bus     = '0;
    prod_bus   = '0;
    rd_idx_bus = '0;
    rd_sum     = '0;
    for (int p = 0; p < PE_N; p++) begin
      tok_bus  = tok_bus  | tok_out[p];
      pc_bus   = pc_bus   | pc_out[p];
      prod_bus = prod_bus | prod_out[p];
      if (rd_en[p]) rd_idx_bus = rd_idx_bus | rd_idx[p];
      rd_sum   = rd_sum + rd_part[p];
    end
  end

  for (genvar p = 0; p < PE_N; p++) begin : g_pe
    data_t rdata;
    assign rdata = (p == 0) ? dim_rdata : (p == PE_N - 1) ? dom_rdata : '0;

    dprap_pe u_pe (
      .clk        (clk),
      .rst_n      (rst_n),
      .hin        (hleaf[p]),
      .tok_bus    (tok_bus),
      .tok_out    (tok_out[p]),
      .pc_bus     (pc_bus),
      .prod_bus   (prod_bus),
      .pc_out     (pc_out[p]),
      .prod_out   (prod_out[p]),
      .rd_en_out  (rd_en[p]),
      .rd_idx_out (rd_idx[p]),
      .rd_idx_bus (rd_idx_bus),
      .rd_part    (rd_part[p]),
      .rd_sum     (rd_sum),
      .mem_re     (mem_re[p]),
      .mem_we     (mem_we[p]),
      .mem_addr   (mem_addr[p]),
      .mem_wdata  (mem_wd[p]),
      .mem_rdata  (rdata),
      .done       (pe_done[p]),
      .active_slot(pe_slot[p])
    );
  end

  assign dim_re      = mem_re[0];
  assign dim_addr    = mem_addr[0];
  assign dom_re      = mem_re[PE_N-1];
  assign dom_we      = mem_we[PE_N-1];
  assign dom_addr    = mem_addr[PE_N-1];
  assign dom_wdata   = mem_wd[PE_N-1];
  assign done        = |pe_done;
  assign active_slot = pe_slot[0];

endmodule
