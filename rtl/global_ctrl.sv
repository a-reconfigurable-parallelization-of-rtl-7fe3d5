// global_ctrl: global controller of the array.
//
// Runs the program held in the global instruction memory, one instruction
// every two cycles (fetch, execute), and turns it into H-tree packets:
//   GI_CFG  writes a configuration word into context 'slot' of the addressed
//           PE(s) - legal while the PEs are running, as only the named slot
//           changes;
//   GI_CALL switches the addressed group(s) to context 'slot';
//   GI_RUN  starts one layer in the addressed group(s) and marks them pending;
//   GI_WAIT stalls until every pending group has pulsed done;
//   GI_HALT stops and raises 'halted'.
// This realises the flow of the source design: initialise instructions, send
// configuration, reconstruct the array, compute in parallel, and on a
// finished configuration switch command and continue.  The instruction set,
// its encoding and the two-cycle issue are this implementation's own.
//
// Interface: 'start' (one cycle) runs the program from address 0; 'busy' is
// high while it runs; 'n_call' counts context switches issued.
module global_ctrl
  import dprap_pkg::*;
#(
  parameter int N_PEG = 4,
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     busy,
  output logic                     halted,
  output logic                     imem_rd_en,
  output logic [$clog2(DEPTH)-1:0] imem_rd_addr,
  input  logic [GI_W-1:0]          imem_rd_data,
  output hpkt_t                    hroot,
  input  logic [N_PEG-1:0]         peg_done,
  output logic [15:0]              n_call
);

  typedef enum logic [2:0] {C_IDLE, C_FETCH, C_EXEC, C_WAIT, C_HALT} cst_e;

  cst_e                     st;
  logic [$clog2(DEPTH)-1:0] pc;
  logic [N_PEG-1:0]         pending, tmask;
  ginstr_t                  gi;

  assign gi           = ginstr_t'(imem_rd_data);
  assign imem_rd_en   = (st == C_FETCH);
  assign imem_rd_addr = pc;
  assign busy         = (st != C_IDLE) && (st != C_HALT);
  assign halted       = (st == C_HALT);

  always_comb begin
    tmask = '0;
    for (int g = 0; g < N_PEG; g++)
      if (gi.all_peg || int'(gi.peg) == g) tmask[g] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; pc <= '0; pending <= '0; hroot <= '0; n_call <= '0;
    end else begin
      hroot   <= '0;
      pending <= pending & ~peg_done;
      case (st)
        C_IDLE, C_HALT: begin
          if (start) begin
            st <= C_FETCH;
            pc <= '0;
          end
        end
        C_FETCH: st <= C_EXEC;
        C_EXEC, C_WAIT: begin
          case (gi.op)
            GI_CFG, GI_CALL, GI_RUN: begin
              hroot.cmd     <= (gi.op == GI_CFG)  ? HC_CFG :
                               (gi.op == GI_CALL) ? HC_CALL : HC_RUN;
              hroot.all_peg <= gi.all_peg;
              hroot.peg     <= gi.peg;
              hroot.all_pe  <= gi.all_pe;
              hroot.pe      <= gi.pe;
              hroot.slot    <= gi.slot;
              hroot.cfg     <= gi.cfg;
              if (gi.op == GI_RUN)  pending <= (pending & ~peg_done) | tmask;
              if (gi.op == GI_CALL) n_call  <= n_call + 16'd1;
              pc <= pc + 1'b1;
              st <= C_FETCH;
            end
            GI_WAIT: begin
              if ((pending & ~peg_done) == '0) begin
                pc <= pc + 1'b1;
                st <= C_FETCH;
              end else begin
                st <= C_WAIT;
              end
            end
            default: st <= C_HALT;
          endcase
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
