// tb_dprap_top: end-to-end test of the whole array at its default size.
//
// Over the host bus it loads, for every PE group, a random 5x5 input image, a
// deconvolution kernel and a convolution kernel into the group's input memory,
// and loads the DCGAN program into the global instruction memory:
//   configure PC1 of all PEs (deconvolution roles), call PC1, run,
//   configure PC2 of all PEs while the deconvolution runs, wait,
//   call PC2 (the context switch), run the convolution, wait,
//   rewrite PC2 for a second input channel (the same deconvolution result with
//   a third kernel, accum set, result to a second area), run, wait, halt.
// It then reads both results of every group from the output memories and
// compares them with the reference model.  Group 3 gets large values so that
// the output saturation is exercised.  Checked: the deconvolution result, the
// one-channel convolution and the two-channel accumulated convolution.  It also counts the mechanisms the
// design relies on and fails if one never happened: kernel-load and
// distribution handshakes, overlapping deconvolution products, configuration
// written during a run, the controller's wait stall, the context switch,
// channel accumulation and output saturation.  Cycle budget per layer is checked against the group's
// latency formula.
module tb_dprap_top;
  import dprap_pkg::*;
  import dprap_ref_pkg::*;

  localparam int NP   = 4;          // default number of groups
  localparam int IN1  = 5;          // deconvolution input side
  localparam int S1   = 2;
  localparam int CROP = 1;
  localparam int OUT1 = (IN1 - 1) * S1 + K - 2 * CROP;   // 9
  localparam int OUT2 = OUT1 - K + 1;                      // 7
  localparam int KB1 = 0, KB2 = 16, KB3 = 64, SRC1 = 32, DST1 = 0, DST2 = 128, DST3 = 192;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               host_valid = 1'b0, host_wr = 1'b0;
  logic [15:0]        host_addr = '0;
  logic [HOST_DW-1:0] host_wdata = '0;
  logic [HOST_DW-1:0] host_rdata;
  logic               host_rvalid, busy, halted;
  logic [NP-1:0]      peg_done, peg_slot;
  logic [15:0]        n_call;

  dprap_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host bus helpers ----------------
  task automatic hwrite(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    host_valid = 1'b1; host_wr = 1'b1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_valid = 1'b0; host_wr = 1'b0;
  endtask

  task automatic hread(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    host_valid = 1'b1; host_wr = 1'b0; host_addr = a;
    @(negedge clk);
    host_valid = 1'b0;
    if (!host_rvalid) begin failures++; $display("no read data for %h", a); end
    d = host_rdata;
  endtask

  int pc = 0;
  task automatic put_instr(input ginstr_t gi);
    hwrite(16'h1000 | 16'(pc*2),     32'(gi[31:0]));
    hwrite(16'h1000 | 16'(pc*2 + 1), 32'(gi[63:32]));
    pc++;
  endtask

  function automatic ginstr_t mk(input gop_e op, input int slot, input int pe, input cfg_t c);
    ginstr_t gi;
    gi = '0;
    gi.op = op; gi.all_peg = 1'b1; gi.all_pe = (pe < 0); gi.pe = 4'(pe < 0 ? 0 : pe);
    gi.slot = slot[0]; gi.cfg = c;
    return gi;
  endfunction

  // ---------------- mechanism monitors (group 0) ----------------
  int n_kdone = 0, n_ddone = 0, n_cfg_while_run = 0, n_wait_stall = 0, n_overlap = 0;
  int n_slot_switch = 0, n_accum_runs = 0;
  logic slot_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_peg[0].u_peg.tok_bus.kind == TK_KDONE) n_kdone++;
    if (dut.g_peg[0].u_peg.tok_bus.kind == TK_DDONE) n_ddone++;
    if (dut.hroot.cmd == HC_CFG && dut.u_ctrl.pending != '0) n_cfg_while_run++;
    if (dut.u_ctrl.st == dut.u_ctrl.C_WAIT) n_wait_stall++;
    slot_q <= peg_slot[0];
    if (peg_slot[0] != slot_q) n_slot_switch++;
  end

  // ---------------- data ----------------
  img_t img [NP], d1 [NP], d2 [NP], d3 [NP];
  ker_t w1 [NP], w2 [NP], w3 [NP];

  initial begin
    logic [31:0] r;
    longint t_run1, t_done1, t_done2;
    int lat1, lat2;
    bit seen1, seen2;

    for (int g = 0; g < NP; g++) begin
      int rng;
      rng = (g == 3) ? 32767 : 511;
      for (int y = 0; y < BUF_DIM; y++)
        for (int x = 0; x < BUF_DIM; x++)
          img[g][y][x] = (y < IN1 && x < IN1) ? data_t'($signed($urandom_range(2*rng, 0)) - rng) : '0;
      for (int k = 0; k < NTAP; k++) begin
        w1[g][k] = data_t'($signed($urandom_range(2*rng, 0)) - rng);
        w2[g][k] = data_t'($signed($urandom_range(511, 0)) - 256);
        w3[g][k] = data_t'($signed($urandom_range(511, 0)) - 256);
      end
      deconv_ref(img[g], w1[g], IN1, S1, CROP, d1[g]);
      conv_ref(d1[g], w2[g], OUT1, d2[g]);
      conv2_ref(d1[g], w2[g], d1[g], w3[g], OUT1, d3[g]);
    end
    // overlapping deconvolution products in one layer: output positions hit by more than one product
    for (int y = 0; y < (IN1-1)*S1+K; y++)
      for (int x = 0; x < (IN1-1)*S1+K; x++) begin
        int hits;
        hits = 0;
        for (int iy = 0; iy < IN1; iy++) for (int ix = 0; ix < IN1; ix++)
          for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++)
            if (iy*S1+ky == y && ix*S1+kx == x) hits++;
        if (hits > 1) n_overlap++;
      end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // input memories: kernels and column-major images
    for (int g = 0; g < NP; g++) begin
      for (int k = 0; k < NTAP; k++) begin
        hwrite(16'h2000 | 16'(g << 8) | 16'(KB1 + k), 32'($unsigned(w1[g][k])));
        hwrite(16'h2000 | 16'(g << 8) | 16'(KB2 + k), 32'($unsigned(w2[g][k])));
        hwrite(16'h2000 | 16'(g << 8) | 16'(KB3 + k), 32'($unsigned(w3[g][k])));
      end
      for (int x = 0; x < IN1; x++)
        for (int y = 0; y < IN1; y++)
          hwrite(16'h2000 | 16'(g << 8) | 16'(SRC1 + x*IN1 + y), 32'($unsigned(img[g][y][x])));
    end

    // program
    for (int p = 0; p < PE_N; p++)
      put_instr(mk(GI_CFG, 0, p, dcgan_role(p, 1'b0, IN1, S1, CROP, KB1, SRC1, DST1)));
    put_instr(mk(GI_CALL, 0, -1, '0));
    put_instr(mk(GI_RUN, 0, -1, '0));
    for (int p = 0; p < PE_N; p++)
      put_instr(mk(GI_CFG, 1, p, dcgan_role(p, 1'b1, OUT1, 1, 0, KB2, DST1, DST2)));
    put_instr(mk(GI_WAIT, 0, -1, '0));
    put_instr(mk(GI_CALL, 1, -1, '0));
    put_instr(mk(GI_RUN, 0, -1, '0));
    put_instr(mk(GI_WAIT, 0, -1, '0));
    for (int p = 0; p < PE_N; p++)
      put_instr(mk(GI_CFG, 1, p, dcgan_role(p, 1'b1, OUT1, 1, 0, KB3, DST1, DST3, 1'b1)));
    put_instr(mk(GI_RUN, 0, -1, '0));
    put_instr(mk(GI_WAIT, 0, -1, '0));
    put_instr(mk(GI_HALT, 0, -1, '0));

    hwrite(16'h0000, 32'd1);
    t_run1 = cyc; seen1 = 0; seen2 = 0; t_done1 = 0; t_done2 = 0;
    while (!halted) begin
      @(posedge clk);
      if (peg_done[0] && !seen1) begin seen1 = 1; t_done1 = cyc; end
      else if (peg_done[0] && seen1 && !seen2) begin seen2 = 1; t_done2 = cyc; end
      else if (peg_done[0] && seen2) n_accum_runs++;
    end
    hread(16'h0000, r);
    checks++;
    if (r[1:0] != 2'b10) begin failures++; $display("status %b, expected halted", r[1:0]); end

    // layer latencies: K*K + n*n + m*m + small constant
    lat1 = int'(t_done1 - t_run1);
    lat2 = int'(t_done2 - t_done1);
    $display("deconvolution done %0d cycles after start, convolution %0d cycles later", lat1, lat2);
    checks++;
    if (!(seen1 && seen2) || lat1 > 16*2 + 16*2 + NTAP + IN1*IN1 + OUT1*OUT1 + 20 ||
        lat2 > 10 + NTAP + OUT1*OUT1 + OUT2*OUT2 + 20) begin
      failures++; $display("layer latency out of budget");
    end

    // results
    for (int g = 0; g < NP; g++) begin
      for (int x = 0; x < OUT1; x++)
        for (int y = 0; y < OUT1; y++) begin
          hread(16'h3000 | 16'(g << 8) | 16'(DST1 + x*OUT1 + y), r);
          checks++;
          if (data_t'(r[15:0]) != d1[g][y][x]) begin
            failures++;
            $display("group %0d deconv (%0d,%0d): got %0d expected %0d", g, y, x, data_t'(r[15:0]), d1[g][y][x]);
          end
        end
      for (int x = 0; x < OUT2; x++)
        for (int y = 0; y < OUT2; y++) begin
          hread(16'h3000 | 16'(g << 8) | 16'(DST2 + x*OUT2 + y), r);
          checks++;
          if (data_t'(r[15:0]) != d2[g][y][x]) begin
            failures++;
            $display("group %0d conv (%0d,%0d): got %0d expected %0d", g, y, x, data_t'(r[15:0]), d2[g][y][x]);
          end
          hread(16'h3000 | 16'(g << 8) | 16'(DST3 + x*OUT2 + y), r);
          checks++;
          if (data_t'(r[15:0]) != d3[g][y][x]) begin
            failures++;
            $display("group %0d two-channel conv (%0d,%0d): got %0d expected %0d", g, y, x, data_t'(r[15:0]), d3[g][y][x]);
          end
        end
    end

    $display("mechanisms: kdone=%0d ddone=%0d overlap_positions=%0d cfg_during_run=%0d wait_stall_cycles=%0d context_switches=%0d calls=%0d accumulating_runs=%0d saturated=%0d",
             n_kdone, n_ddone, n_overlap, n_cfg_while_run, n_wait_stall, n_slot_switch, n_call, n_accum_runs, n_saturated);
    checks++; if (n_accum_runs != 1)    begin failures++; $display("accumulating run count wrong"); end
    checks++; if (n_kdone != 3)         begin failures++; $display("kernel-load handshake count wrong"); end
    checks++; if (n_ddone != 3)         begin failures++; $display("distribution handshake count wrong"); end
    checks++; if (n_overlap == 0)       begin failures++; $display("no overlapping deconvolution output"); end
    checks++; if (n_cfg_while_run == 0) begin failures++; $display("no configuration during a run"); end
    checks++; if (n_wait_stall == 0)    begin failures++; $display("controller never waited"); end
    checks++; if (n_slot_switch != 1)   begin failures++; $display("context switch count wrong"); end
    checks++; if (n_saturated == 0)     begin failures++; $display("saturation never exercised"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
