// tb_global_ctrl: checks the global controller against a small program.
// The program mixes configuration writes, context calls, runs of one group
// and of all groups, waits and a halt.  Model groups pulse done a different
// number of cycles after their run command.  Checked: the packets leave the
// controller in program order with the instruction's fields; nothing is sent
// after a WAIT before every started group has finished; 'halted' rises at the
// end; the call counter; and a second start re-runs the program.
module tb_global_ctrl;
  import dprap_pkg::*;

  localparam int NP = 4;

  logic            clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic            busy, halted, imem_rd_en;
  logic [5:0]      imem_rd_addr;
  logic [GI_W-1:0] imem_rd_data;
  hpkt_t           hroot;
  logic [NP-1:0]   peg_done = '0;
  logic [15:0]     n_call;

  global_ctrl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program memory model
  ginstr_t prog [64];
  always_ff @(posedge clk) if (imem_rd_en) imem_rd_data <= prog[imem_rd_addr];

  // group models: done DLY[g] cycles after a run addressed to them
  int     cnt [NP];
  longint cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int g = 0; g < NP; g++) begin
      peg_done[g] <= 1'b0;
      if (cnt[g] > 0) begin
        cnt[g] <= cnt[g] - 1;
        if (cnt[g] == 1) peg_done[g] <= 1'b1;
      end
      if (hroot.cmd == HC_RUN && (hroot.all_peg || int'(hroot.peg) == g)) cnt[g] <= 20 + 13 * g;
    end
  end

  // packet log
  hpkt_t  sent [$];
  longint sent_t [$];
  always @(posedge clk) if (hroot.cmd != HC_NOP) begin sent.push_back(hroot); sent_t.push_back(cyc); end

  function automatic ginstr_t gi(input gop_e op, input bit allg, input int peg, input bit allpe, input int pe, input bit slot);
    ginstr_t g;
    g = ginstr_t'({$urandom, $urandom});
    g.op = op; g.all_peg = allg; g.peg = 2'(peg); g.all_pe = allpe; g.pe = 4'(pe); g.slot = slot;
    return g;
  endfunction

  int n_instr;
  int wait_after [$];   // index of the packet that follows each WAIT

  initial begin
    for (int g = 0; g < NP; g++) cnt[g] = 0;
    n_instr = 0;
    prog[n_instr++] = gi(GI_CFG,  1, 0, 0, 5, 0);
    prog[n_instr++] = gi(GI_CFG,  0, 2, 1, 0, 1);
    prog[n_instr++] = gi(GI_CALL, 1, 0, 1, 0, 0);
    prog[n_instr++] = gi(GI_RUN,  0, 1, 1, 0, 0);
    prog[n_instr++] = gi(GI_CFG,  1, 0, 0, 9, 1);
    prog[n_instr++] = gi(GI_RUN,  1, 0, 1, 0, 0);
    prog[n_instr++] = gi(GI_WAIT, 1, 0, 1, 0, 0);
    prog[n_instr++] = gi(GI_CALL, 1, 0, 1, 0, 1);
    prog[n_instr++] = gi(GI_RUN,  0, 3, 1, 0, 0);
    prog[n_instr++] = gi(GI_WAIT, 1, 0, 1, 0, 0);
    prog[n_instr++] = gi(GI_CFG,  0, 3, 0, 15, 0);
    prog[n_instr++] = gi(GI_HALT, 1, 0, 1, 0, 0);
    for (int i = n_instr; i < 64; i++) prog[i] = gi(GI_HALT, 0, 0, 0, 0, 0);

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      int   pk;
      sent.delete(); sent_t.delete();
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      checks++; if (!busy) begin failures++; $display("not busy after start"); end
      while (!halted) @(negedge clk);
      // compare packets with the program
      pk = 0;
      for (int i = 0; i < n_instr; i++) begin
        if (prog[i].op == GI_WAIT) continue;
        if (prog[i].op == GI_HALT) break;
        checks++;
        if (pk >= sent.size()) begin failures++; $display("packet %0d missing", pk); continue; end
        if (sent[pk].cmd != (prog[i].op == GI_CFG ? HC_CFG : prog[i].op == GI_CALL ? HC_CALL : HC_RUN) ||
            sent[pk].all_peg != prog[i].all_peg || sent[pk].peg != prog[i].peg ||
            sent[pk].all_pe != prog[i].all_pe || sent[pk].pe != prog[i].pe ||
            sent[pk].slot != prog[i].slot || sent[pk].cfg != prog[i].cfg) begin
          failures++; $display("packet %0d differs from instruction %0d", pk, i);
        end
        pk++;
      end
      checks++;
      if (sent.size() != pk) begin failures++; $display("%0d packets sent, %0d expected", sent.size(), pk); end
      // the packet after the first WAIT (index 6) must follow the done pulses of the run of all groups (index 5)
      checks++;
      if (sent.size() > 6 && sent_t[6] <= sent_t[5] + 20 + 13 * 3) begin
        failures++; $display("controller did not wait for the slowest group");
      end
      // the packet after the second WAIT (index 8) must follow the done of group 3's run (index 7)
      checks++;
      if (sent.size() > 8 && sent_t[8] <= sent_t[7] + 20 + 13 * 3) begin
        failures++; $display("controller did not wait for group 3");
      end
      checks++;
      if (n_call != 16'(2 * (run + 1))) begin failures++; $display("call count %0d", n_call); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
