// dprap_top: dynamically programmable reconfigurable array processor.
//
// A host writes kernels and feature maps into the input memory (DIM) banks,
// a program into the global instruction memory, and starts the global
// controller.  The controller sends configuration words, context-switch calls
// and run commands down the H-tree to N_PEG groups of 4x4 PEs; each group
// reads its DIM bank through PE00 and writes its output memory (DOM) bank
// through PE33.  With the DCGAN program, every group first runs a stride-2
// deconvolution from context PC1 (result to DOM), is switched by one call to
// context PC2, and runs a convolution over that result (result to DOM),
// without reloading any configuration.  The host reads results from DOM.
//
// The block set (host interface, global controller, global instruction
// memory, H-tree, PE groups of 16 PEs with instruction and data storage,
// input and output memories) follows the source design; four groups follow
// its array drawing.  One DIM and one DOM bank per group, the bus map and
// all timing are this implementation's choices (see host_if for the map).
module dprap_top
  import dprap_pkg::*;
#(
  parameter int N_PEG     = 4,
  parameter int GIM_DEPTH = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               host_valid,
  input  logic               host_wr,
  input  logic [15:0]        host_addr,
  input  logic [HOST_DW-1:0] host_wdata,
  output logic [HOST_DW-1:0] host_rdata,
  output logic               host_rvalid,
  output logic               busy,
  output logic               halted,
  output logic [N_PEG-1:0]   peg_done,
  output logic [N_PEG-1:0]   peg_slot,
  output logic [15:0]        n_call
);

  logic                         start;
  logic                         gim_we, gim_piece;
  logic [$clog2(GIM_DEPTH)-1:0] gim_waddr, gim_raddr;
  logic [HOST_DW-1:0]           gim_wdata;
  logic                         gim_re;
  logic [GI_W-1:0]              gim_rdata;
  logic [N_PEG-1:0]             dim_we, dom_re;
  maddr_t                       dim_haddr, dom_haddr;
  data_t                        dim_hwdata;
  data_t                        dom_hrdata [N_PEG];
  hpkt_t                        hroot;
  hpkt_t                        hleaf [N_PEG][PE_N];

  host_if #(.N_PEG(N_PEG), .GIM_DEPTH(GIM_DEPTH)) u_host (
    .clk, .rst_n,
    .host_valid, .host_wr, .host_addr, .host_wdata, .host_rdata, .host_rvalid,
    .start, .busy, .halted,
    .gim_we, .gim_addr(gim_waddr), .gim_piece, .gim_wdata,
    .dim_we, .dim_addr(dim_haddr), .dim_wdata(dim_hwdata),
    .dom_re, .dom_addr(dom_haddr), .dom_rdata(dom_hrdata)
  );

  global_imem #(.DEPTH(GIM_DEPTH)) u_gim (
    .clk,
    .wr_en(gim_we), .wr_addr(gim_waddr), .wr_piece(gim_piece), .wr_data(gim_wdata),
    .rd_en(gim_re), .rd_addr(gim_raddr), .rd_data(gim_rdata)
  );

  global_ctrl #(.N_PEG(N_PEG), .DEPTH(GIM_DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .busy, .halted,
    .imem_rd_en(gim_re), .imem_rd_addr(gim_raddr), .imem_rd_data(gim_rdata),
    .hroot, .peg_done, .n_call
  );

  htree #(.N_PEG(N_PEG)) u_htree (
    .clk, .rst_n, .root(hroot), .leaf(hleaf)
  );

  for (genvar g = 0; g < N_PEG; g++) begin : g_peg
    logic   dim_re, dom_re_p, dom_we_p;
    maddr_t dim_addr, dom_addr;
    data_t  dim_rdata, dom_wdata, dom_rdata;

    input_memory u_dim (
      .clk,
      .a_we(dim_we[g]), .a_addr(dim_haddr), .a_wdata(dim_hwdata),
      .b_re(dim_re), .b_addr(dim_addr), .b_rdata(dim_rdata)
    );

    output_memory u_dom (
      .clk,
      .a_re(dom_re[g]), .a_addr(dom_haddr), .a_rdata(dom_hrdata[g]),
      .b_re(dom_re_p), .b_we(dom_we_p), .b_addr(dom_addr), .b_wdata(dom_wdata),
      .b_rdata(dom_rdata)
    );

    peg u_peg (
      .clk, .rst_n,
      .hleaf(hleaf[g]),
      .dim_re, .dim_addr, .dim_rdata,
      .dom_re(dom_re_p), .dom_we(dom_we_p), .dom_addr, .dom_wdata, .dom_rdata,
      .done(peg_done[g]),
      .active_slot(peg_slot[g])
    );
  end

endmodule
