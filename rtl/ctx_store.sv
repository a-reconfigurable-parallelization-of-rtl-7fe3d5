// ctx_store: configuration (instruction) store of one PE.
//
// Holds N_CTX configuration words, one per context (PC1 = slot 0, PC2 =
// slot 1), and a pointer to the active one.  A write from the H-tree may
// target any slot at any time, including the active one, without stalling the
// PE: the new word is seen from the next cycle on.  A call command moves the
// active pointer; the PE's behaviour changes from the next cycle on, which is
// the context switch that turns a deconvolution group into a convolution
// group.  After reset every slot is zero (an idle PE) and PC1 is active, the
// default context of the source design.
//
// Interface: wr_en/wr_slot/wr_cfg write a slot; call_en/call_slot select the
// active slot; active_cfg and active_slot come straight from registers.
module ctx_store
  import dprap_pkg::*;
#(
  parameter int N = N_CTX
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [$clog2(N)-1:0]  wr_slot,
  input  cfg_t                  wr_cfg,
  input  logic                  call_en,
  input  logic [$clog2(N)-1:0]  call_slot,
  output cfg_t                  active_cfg,
  output logic [$clog2(N)-1:0]  active_slot
);

  cfg_t store [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) store[i] <= '0;
      active_slot <= '0;
    end else begin
      if (wr_en)   store[wr_slot] <= wr_cfg;
      if (call_en) active_slot    <= call_slot;
    end
  end

  assign active_cfg = store[active_slot];

endmodule
