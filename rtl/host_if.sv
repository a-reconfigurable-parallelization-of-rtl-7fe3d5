// host_if: host interface of the array.
//
// Decodes the host bus - address, flag (1 = write) and data, the three items
// of the source design's bus information - into accesses of the array's
// memories and control register.  Address map (16-bit word address):
//   [15:12] = 0  control: write bit 0 = start the global controller;
//                read = {30'b0, halted, busy}
//   [15:12] = 1  global instruction memory: [6:1] instruction, [0] 32-bit piece
//   [15:12] = 2  input memory (write): [11:8] group bank, [7:0] word
//   [15:12] = 3  output memory (read): [11:8] group bank, [7:0] word
// Reads return host_rvalid with the data one cycle after the request.  The
// map, widths and timing are this implementation's choices; the source
// design does not give them.
module host_if
  import dprap_pkg::*;
#(
  parameter int N_PEG     = 4,
  parameter int GIM_DEPTH = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host bus
  input  logic                         host_valid,
  input  logic                         host_wr,
  input  logic [15:0]                  host_addr,
  input  logic [HOST_DW-1:0]           host_wdata,
  output logic [HOST_DW-1:0]           host_rdata,
  output logic                         host_rvalid,
  // global controller
  output logic                         start,
  input  logic                         busy,
  input  logic                         halted,
  // global instruction memory
  output logic                         gim_we,
  output logic [$clog2(GIM_DEPTH)-1:0] gim_addr,
  output logic                         gim_piece,
  output logic [HOST_DW-1:0]           gim_wdata,
  // input memory banks
  output logic [N_PEG-1:0]             dim_we,
  output maddr_t                       dim_addr,
  output data_t                        dim_wdata,
  // output memory banks
  output logic [N_PEG-1:0]             dom_re,
  output maddr_t                       dom_addr,
  input  data_t                        dom_rdata [N_PEG]
);

  logic [3:0]        region;
  logic [3:0]        bank;
  logic              rd_ctrl_q, rd_dom_q;
  logic [3:0]        bank_q;
  logic [1:0]        status_q;

  assign region    = host_addr[15:12];
  assign bank      = host_addr[11:8];

  assign start     = host_valid && host_wr && region == 4'd0 && host_wdata[0];
  assign gim_we    = host_valid && host_wr && region == 4'd1;
  assign gim_addr  = host_addr[$clog2(GIM_DEPTH):1];
  assign gim_piece = host_addr[0];
  assign gim_wdata = host_wdata;
  assign dim_addr  = host_addr[7:0];
  assign dim_wdata = host_wdata[DATA_W-1:0];
  assign dom_addr  = host_addr[7:0];

  always_comb begin
    dim_we = '0;
    dom_re = '0;
    for (int g = 0; g < N_PEG; g++) begin
      dim_we[g] = host_valid &&  host_wr && region == 4'd2 && int'(bank) == g;
      dom_re[g] = host_valid && !host_wr && region == 4'd3 && int'(bank) == g;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ctrl_q <= 1'b0; rd_dom_q <= 1'b0; bank_q <= '0; status_q <= '0;
    end else begin
      rd_ctrl_q <= host_valid && !host_wr && region == 4'd0;
      rd_dom_q  <= host_valid && !host_wr && region == 4'd3;
      bank_q    <= bank;
      status_q  <= {halted, busy};
    end
  end

  always_comb begin
    host_rvalid = rd_ctrl_q || rd_dom_q;
    host_rdata  = '0;
    if (rd_ctrl_q) host_rdata = HOST_DW'(status_q);
    else if (rd_dom_q && int'(bank_q) < N_PEG)
      host_rdata = HOST_DW'($unsigned(dom_rdata[bank_q[$clog2(N_PEG)-1:0]]));
  end

endmodule
