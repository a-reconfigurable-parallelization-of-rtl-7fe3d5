// tb_peg: checks one PE group running the DCGAN mapping on its own.
// Model input and output memories are attached to PE00 and PE33.  Packets are
// delivered to the PEs' H-tree leaves directly.  The group is configured with
// the deconvolution roles in PC1 and the convolution roles in PC2, runs the
// deconvolution, is switched to PC2 by one call, and runs the convolution
// over the stored deconvolution result.  Both results are compared with the
// reference model, for several random images, and each layer's cycle count is
// checked against K*K + n*n + m*m + 8.  Finally a convolution with two input
// channels is run as two RUNs, the second with accum set, and both the
// single-channel intermediate and the two-channel sum are checked.
module tb_peg;
  import dprap_pkg::*;
  import dprap_ref_pkg::*;

  localparam int N1 = 5, S1 = 2, CROP = 1;
  localparam int M1 = (N1 - 1) * S1 + K - 2 * CROP;   // 9
  localparam int M2 = M1 - K + 1;                      // 7
  localparam int KB1 = 0, KB2 = 16, SRC1 = 32, DST1 = 0, DST2 = 128;

  logic   clk = 1'b0, rst_n = 1'b0;
  hpkt_t  hleaf [PE_N];
  logic   dim_re, dom_re, dom_we, done, active_slot;
  maddr_t dim_addr, dom_addr;
  data_t  dim_rdata, dom_wdata, dom_rdata;

  peg dut (.*);

  always #5 clk = ~clk;

  data_t dim [256], dom [256];
  always_ff @(posedge clk) begin
    if (dim_re) dim_rdata <= dim[dim_addr];
    if (dom_we) dom[dom_addr] <= dom_wdata;
    if (dom_re) dom_rdata <= dom[dom_addr];
  end

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input hcmd_e cmd, input int pe, input bit slot, input cfg_t c);
    @(negedge clk);
    for (int p = 0; p < PE_N; p++) begin
      hleaf[p] = '0;
      if (pe < 0 || pe == p) begin
        hleaf[p].cmd = cmd; hleaf[p].slot = slot; hleaf[p].cfg = c; hleaf[p].pe = 4'(p);
      end
    end
    @(negedge clk);
    for (int p = 0; p < PE_N; p++) hleaf[p] = '0;
  endtask

  task automatic run_and_time(input int budget, input string what);
    longint t0;
    send(HC_RUN, -1, 1'b0, '0);
    t0 = cyc;
    while (!done) @(posedge clk);
    checks++;
    if (int'(cyc - t0) > budget) begin failures++; $display("%s took %0d cycles", what, cyc - t0); end
    @(negedge clk);
  endtask

  initial begin
    img_t img, r1, r2;
    ker_t w1, w2;
    for (int p = 0; p < PE_N; p++) hleaf[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 3; trial++) begin
      for (int y = 0; y < BUF_DIM; y++) for (int x = 0; x < BUF_DIM; x++) img[y][x] = '0;
      for (int x = 0; x < N1; x++)
        for (int y = 0; y < N1; y++) begin
          img[y][x] = data_t'($signed($urandom_range(1024, 0)) - 512);
          dim[SRC1 + x*N1 + y] = img[y][x];
        end
      for (int k = 0; k < NTAP; k++) begin
        w1[k] = data_t'($signed($urandom_range(1024, 0)) - 512);
        w2[k] = data_t'($signed($urandom_range(1024, 0)) - 512);
        dim[KB1 + k] = w1[k];
        dim[KB2 + k] = w2[k];
      end
      deconv_ref(img, w1, N1, S1, CROP, r1);
      conv_ref(r1, w2, M1, r2);

      for (int p = 0; p < PE_N; p++) begin
        send(HC_CFG, p, 1'b0, dcgan_role(p, 1'b0, N1, S1, CROP, KB1, SRC1, DST1));
        send(HC_CFG, p, 1'b1, dcgan_role(p, 1'b1, M1, 1, 0, KB2, DST1, DST2));
      end
      send(HC_CALL, -1, 1'b0, '0);
      checks++; if (active_slot != 1'b0) begin failures++; $display("PC1 not active"); end
      run_and_time(NTAP + N1*N1 + M1*M1 + 8, "deconvolution");
      send(HC_CALL, -1, 1'b1, '0);
      checks++; if (active_slot != 1'b1) begin failures++; $display("PC2 not active"); end
      run_and_time(NTAP + M1*M1 + M2*M2 + 8, "convolution");

      for (int x = 0; x < M1; x++)
        for (int y = 0; y < M1; y++) begin
          checks++;
          if (dom[DST1 + x*M1 + y] !== r1[y][x]) begin
            failures++; $display("deconv (%0d,%0d) got %0d expected %0d", y, x, dom[DST1 + x*M1 + y], r1[y][x]);
          end
        end
      for (int x = 0; x < M2; x++)
        for (int y = 0; y < M2; y++) begin
          checks++;
          if (dom[DST2 + x*M2 + y] !== r2[y][x]) begin
            failures++; $display("conv (%0d,%0d) got %0d expected %0d", y, x, dom[DST2 + x*M2 + y], r2[y][x]);
          end
        end
    end
    // two input channels: 5x5 maps in the output memory at 200 and 225,
    // kernels in the input memory at 48 and 64, 3x3 result at 0
    begin
      img_t a, b, ra, rab;
      ker_t wa, wb;
      for (int y = 0; y < BUF_DIM; y++)
        for (int x = 0; x < BUF_DIM; x++) begin a[y][x] = '0; b[y][x] = '0; end
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) begin
          a[y][x] = data_t'($signed($urandom_range(1024, 0)) - 512);
          b[y][x] = data_t'($signed($urandom_range(1024, 0)) - 512);
          dom[200 + x*5 + y] = a[y][x];
          dom[225 + x*5 + y] = b[y][x];
        end
      for (int k = 0; k < NTAP; k++) begin
        wa[k] = data_t'($signed($urandom_range(1024, 0)) - 512);
        wb[k] = data_t'($signed($urandom_range(1024, 0)) - 512);
        dim[48 + k] = wa[k];
        dim[64 + k] = wb[k];
      end
      conv_ref(a, wa, 5, ra);
      conv2_ref(a, wa, b, wb, 5, rab);
      for (int p = 0; p < PE_N; p++)
        send(HC_CFG, p, 1'b1, dcgan_role(p, 1'b1, 5, 1, 0, 48, 200, 0, 1'b0));
      run_and_time(NTAP + 25 + 9 + 8, "channel 0");
      for (int x = 0; x < 3; x++)
        for (int y = 0; y < 3; y++) begin
          checks++;
          if (dom[x*3 + y] !== ra[y][x]) begin
            failures++; $display("channel 0 (%0d,%0d) got %0d expected %0d", y, x, dom[x*3 + y], ra[y][x]);
          end
        end
      for (int p = 0; p < PE_N; p++)
        send(HC_CFG, p, 1'b1, dcgan_role(p, 1'b1, 5, 1, 0, 64, 225, 0, 1'b1));
      run_and_time(NTAP + 25 + 9 + 8, "channel 1");
      for (int x = 0; x < 3; x++)
        for (int y = 0; y < 3; y++) begin
          checks++;
          if (dom[x*3 + y] !== rab[y][x]) begin
            failures++; $display("channels 0+1 (%0d,%0d) got %0d expected %0d", y, x, dom[x*3 + y], rab[y][x]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
