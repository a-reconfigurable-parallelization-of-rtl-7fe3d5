// tb_dprap_pe: checks one PE that holds every role at once.
// The PE's bus outputs are looped back to its bus inputs, so it loads the
// kernel from a model memory, distributes the image to itself, multiplies by
// the weight of its single tap, integrates into its own buffer and sends the
// rescaled result back to the memory.  The result must equal the reference
// layer computed with a kernel whose only non-zero tap is the PE's tap.
// Run 1: deconvolution (stride 2, border 1) from context PC1, while context PC2
// is rewritten during the run.  Run 2: convolution from PC2 after a call.
// Several taps are tried.  The cycle count from RUN to done is checked
// against K*K + n*n + m*m + 8.
module tb_dprap_pe;
  import dprap_pkg::*;
  import dprap_ref_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  hpkt_t  hin = '0;
  tok_t   tok;
  pcoord_t pc;
  logic [NTAP-1:0][ACC_W-1:0] prod;
  logic   rd_en, mem_re, mem_we, done, active_slot;
  bidx_t  rd_idx;
  acc_t   rd_part;
  maddr_t mem_addr;
  data_t  mem_wdata, mem_rdata;

  dprap_pe dut (
    .clk, .rst_n, .hin,
    .tok_bus(tok), .tok_out(tok),
    .pc_bus(pc), .prod_bus(prod), .pc_out(pc), .prod_out(prod),
    .rd_en_out(rd_en), .rd_idx_out(rd_idx), .rd_idx_bus(rd_idx), .rd_part(rd_part), .rd_sum(rd_part),
    .mem_re, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .done, .active_slot
  );

  always #5 clk = ~clk;

  data_t mem [256];
  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    if (mem_re) mem_rdata <= mem[mem_addr];
  end

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 5, DST = 100;

  task automatic send_pkt(input hcmd_e cmd, input bit slot, input cfg_t c);
    @(negedge clk);
    hin = '0; hin.cmd = cmd; hin.slot = slot; hin.cfg = c;
    @(negedge clk);
    hin = '0;
  endtask

  function automatic cfg_t mkcfg(input bit conv, input int tap);
    cfg_t c;
    c = '0;
    c.kld = 1; c.db = 1; c.op = 1; c.inte = 1; c.send = 1; c.conv = conv;
    c.tap = 4'(tap); c.mask = 9'(1 << tap);
    c.in_dim = coord_t'(N); c.stride = conv ? 2'd1 : 2'd2; c.crop = conv ? 2'd0 : 2'd1;
    c.kbase = 8'd0; c.src = 8'd32; c.dst = 8'(DST);
    return c;
  endfunction

  task automatic run_layer(input bit conv, input img_t img, input ker_t w, input int tap);
    ker_t  w1;
    img_t  ref_o;
    int    m, lat;
    longint t0;
    for (int k = 0; k < NTAP; k++) w1[k] = (k == tap) ? w[k] : '0;
    if (conv) begin conv_ref(img, w1, N, ref_o); m = N - K + 1; end
    else begin deconv_ref(img, w1, N, 2, 1, ref_o); m = (N - 1) * 2 + K - 2; end
    send_pkt(HC_CALL, conv, '0);
    checks++; if (active_slot != conv) begin failures++; $display("context not switched"); end
    @(negedge clk);
    hin.cmd = HC_RUN;
    t0 = cyc;
    @(negedge clk);
    hin = '0;
    // rewrite the other context while the layer runs
    send_pkt(HC_CFG, !conv, mkcfg(!conv, (tap + 3) % NTAP));
    while (!done) @(posedge clk);
    lat = int'(cyc - t0);
    checks++;
    if (lat > NTAP + N*N + m*m + 8) begin failures++; $display("latency %0d too long", lat); end
    @(negedge clk);
    for (int x = 0; x < m; x++)
      for (int y = 0; y < m; y++) begin
        checks++;
        if (mem[DST + x*m + y] !== ref_o[y][x]) begin
          failures++;
          $display("%s tap %0d (%0d,%0d): got %0d expected %0d", conv ? "conv" : "deconv", tap, y, x,
                   mem[DST + x*m + y], ref_o[y][x]);
        end
      end
  endtask

  initial begin
    img_t img;
    ker_t w;
    for (int i = 0; i < 256; i++) mem[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 4; trial++) begin
      int tap;
      tap = (trial * 4 + 1) % NTAP;
      for (int y = 0; y < BUF_DIM; y++)
        for (int x = 0; x < BUF_DIM; x++) img[y][x] = '0;
      for (int x = 0; x < N; x++)
        for (int y = 0; y < N; y++) begin
          img[y][x] = data_t'($signed($urandom_range(2000, 0)) - 1000);
          mem[32 + x*N + y] = img[y][x];
        end
      for (int k = 0; k < NTAP; k++) begin
        w[k] = data_t'($signed($urandom_range(1000, 0)) - 500);
        mem[k] = w[k];
      end
      send_pkt(HC_CFG, 1'b0, mkcfg(1'b0, tap));
      run_layer(1'b0, img, w, tap);
      send_pkt(HC_CFG, 1'b1, mkcfg(1'b1, tap));
      run_layer(1'b1, img, w, tap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
