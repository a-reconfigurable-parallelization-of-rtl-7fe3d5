// dprap_pe: one processing element of a PE group.
//
// What it does depends on the active word of its context store (ctx_store);
// the role bits of cfg_t may be combined:
//   kld  - on RUN, reads the NTAP kernel weights from its memory port and puts
//          them on the group's distribution bus as WEIGHT tokens, then a KDONE
//          token (the handshake that lets distribution start).
//   db   - on KDONE, streams the input feature map from its memory port, column
//          by column, as PIXEL tokens tagged with (y, x), then a DDONE token.
//   op   - keeps the weight of tap cfg.tap and multiplies every PIXEL by it; the
//          product goes on lane cfg.tap of the group's product bus one cycle
//          later, with the pixel coordinates.
//   inte - adds the products of the taps in cfg.mask into its partial-sum
//          buffer (the PE's data storage).  Deconvolution addressing puts the
//          product of input (y, x) and tap (ky, kx) at (y*S+ky, x*S+kx), so the
//          overlapping parts of neighbouring pixels' windows are summed here.
//          Convolution addressing puts it at (y-ky, x-kx) when that output
//          exists, which sums a K x K window without zero insertion.
//   send - on DDONE, waits two cycles for the products to settle, then walks
//          the result in column order (skipping cfg.crop border pixels), drives
//          the buffer index onto the readout bus, takes the sum of all PEs'
//          partial buffers, rescales it (arithmetic shift by FRAC, saturation
//          to DATA_W) and writes it through its memory port; then pulses done.
// The roles, the kernel-load / distribution / integration / send split and the
// handshakes follow the source design; the bus-based token exchange, the
// scatter-add buffers and all timing are this implementation's own.
//
// Input channels: a RUN clears the partial-sum buffer unless cfg.accum is
// set, so a layer with several input maps is run once per map (new kernel and
// map addresses, accum set from the second map on) and the sums of all maps
// add up in the buffers; each send writes the running total, the last one the
// finished output map.
//
// Timing: memory reads have one cycle of latency; a token is on the bus in
// the cycle the read data returns; products are registered (one cycle);
// buffers are updated at the end of the product cycle; readout is
// combinational through the group's adder.
module dprap_pe
  import dprap_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // H-tree leaf
  input  hpkt_t                         hin,
  // distribution bus
  input  tok_t                          tok_bus,
  output tok_t                          tok_out,
  // product bus
  input  pcoord_t                       pc_bus,
  input  logic [NTAP-1:0][ACC_W-1:0]    prod_bus,
  output pcoord_t                       pc_out,
  output logic [NTAP-1:0][ACC_W-1:0]    prod_out,
  // readout bus
  output logic                          rd_en_out,
  output bidx_t                         rd_idx_out,
  input  bidx_t                         rd_idx_bus,
  output acc_t                          rd_part,
  input  acc_t                          rd_sum,
  // memory port (input memory for PE00, output memory for PE33)
  output logic                          mem_re,
  output logic                          mem_we,
  output maddr_t                        mem_addr,
  output data_t                         mem_wdata,
  input  data_t                         mem_rdata,
  // status
  output logic                          done,
  output logic                          active_slot
);

  // ---------------- context store ----------------
  cfg_t cfg;
  logic run;

  ctx_store #(.N(N_CTX)) u_ctx (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_en      (hin.cmd == HC_CFG),
    .wr_slot    (hin.slot),
    .wr_cfg     (hin.cfg),
    .call_en    (hin.cmd == HC_CALL),
    .call_slot  (hin.slot),
    .active_cfg (cfg),
    .active_slot(active_slot)
  );

  assign run = (hin.cmd == HC_RUN);

  // ---------------- kernel load ----------------
  logic       kact, krv_q, kfin_q, kdone_q;
  logic [3:0] kcnt, ktap_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kact <= 1'b0; kcnt <= '0; krv_q <= 1'b0; ktap_q <= '0; kfin_q <= 1'b0; kdone_q <= 1'b0;
    end else begin
      krv_q   <= kact;
      ktap_q  <= kcnt;
      kfin_q  <= kact && (kcnt == 4'(NTAP - 1));
      kdone_q <= kfin_q;
      if (run) begin
        kact <= cfg.kld;
        kcnt <= '0;
      end else if (kact) begin
        kcnt <= kcnt + 4'd1;
        if (kcnt == 4'(NTAP - 1)) kact <= 1'b0;
      end
    end
  end

  // ---------------- data distribution ----------------
  logic   dact, drv_q, dfin_q, ddone_q;
  coord_t dy, dx, dy_q, dx_q;
  logic   dlast;

  assign dlast = (dy == cfg.in_dim - 1) && (dx == cfg.in_dim - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dact <= 1'b0; dy <= '0; dx <= '0; drv_q <= 1'b0; dy_q <= '0; dx_q <= '0;
      dfin_q <= 1'b0; ddone_q <= 1'b0;
    end else begin
      drv_q   <= dact;
      dy_q    <= dy;
      dx_q    <= dx;
      dfin_q  <= dact && dlast;
      ddone_q <= dfin_q;
      if (run) begin
        dact <= 1'b0;
      end else if (cfg.db && tok_bus.kind == TK_KDONE) begin
        dact <= 1'b1;
        dy   <= '0;
        dx   <= '0;
      end else if (dact) begin
        if (dlast) dact <= 1'b0;
        if (dy == cfg.in_dim - 1) begin
          dy <= '0;
          dx <= dx + 1'b1;
        end else begin
          dy <= dy + 1'b1;
        end
      end
    end
  end

  // tokens driven by this PE (zero when idle so that the group can OR them)
  always_comb begin
    tok_out = '0;
    if (krv_q) begin
      tok_out.kind = TK_WEIGHT;
      tok_out.tap  = ktap_q;
      tok_out.data = mem_rdata;
    end else if (kdone_q) begin
      tok_out.kind = TK_KDONE;
    end else if (drv_q) begin
      tok_out.kind = TK_PIXEL;
      tok_out.y    = dy_q;
      tok_out.x    = dx_q;
      tok_out.data = mem_rdata;
    end else if (ddone_q) begin
      tok_out.kind = TK_DDONE;
    end
  end

  // ---------------- Op: multiply ----------------
  data_t   w;
  acc_t    prod_q;
  pcoord_t pc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w <= '0; prod_q <= '0; pc_q <= '0;
    end else begin
      if (cfg.op && tok_bus.kind == TK_WEIGHT && tok_bus.tap == cfg.tap)
        w <= tok_bus.data;
      pc_q.valid <= cfg.op && tok_bus.kind == TK_PIXEL;
      pc_q.y     <= tok_bus.y;
      pc_q.x     <= tok_bus.x;
      prod_q     <= acc_t'(tok_bus.data) * acc_t'(w);
    end
  end

  always_comb begin
    prod_out = '0;
    pc_out   = '0;
    if (cfg.op && pc_q.valid) begin
      pc_out = pc_q;
      for (int k = 0; k < NTAP; k++)
        if (cfg.tap == 4'(k)) prod_out[k] = prod_q;
    end
  end

  // ---------------- Inte: scatter-add into the data storage ----------------
  acc_t            pbuf [BUF_N];
  bidx_t           tidx [NTAP];
  logic [NTAP-1:0] tok_ok;

  always_comb begin
    for (int k = 0; k < NTAP; k++) begin
      int ky, kx, oy, ox, lim;
      ky  = k / K;
      kx  = k % K;
      lim = int'(cfg.in_dim) - K;
      if (!cfg.conv) begin
        oy = int'(pc_bus.y) * int'(cfg.stride) + ky;
        ox = int'(pc_bus.x) * int'(cfg.stride) + kx;
      end else begin
        oy = int'(pc_bus.y) - ky;
        ox = int'(pc_bus.x) - kx;
      end
      tok_ok[k] = cfg.mask[k] && oy >= 0 && ox >= 0 && oy < BUF_DIM && ox < BUF_DIM &&
                  (!cfg.conv || (oy <= lim && ox <= lim));
      tidx[k]   = bidx_t'(oy * BUF_DIM + ox);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BUF_N; i++) pbuf[i] <= '0;
    end else if (run && !cfg.accum) begin
      for (int i = 0; i < BUF_N; i++) pbuf[i] <= '0;
    end else if (cfg.inte && pc_bus.valid) begin
      // the taps of one pixel land on distinct positions, so the writes never collide
      for (int k = 0; k < NTAP; k++)
        if (tok_ok[k]) pbuf[tidx[k]] <= pbuf[tidx[k]] + acc_t'(prod_bus[k]);
    end
  end

  assign rd_part = (cfg.inte && int'(rd_idx_bus) < BUF_N) ? pbuf[rd_idx_bus] : '0;

  // ---------------- Send ----------------
  logic   swait, sdrain, sact;
  coord_t sy, sx;
  int     od;
  logic   slast;

  assign od    = full_side(cfg.conv, int'(cfg.in_dim), int'(cfg.stride)) - 2 * int'(cfg.crop);
  assign slast = (int'(sy) == od - 1) && (int'(sx) == od - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      swait <= 1'b0; sdrain <= 1'b0; sact <= 1'b0; sy <= '0; sx <= '0; done <= 1'b0;
    end else begin
      done   <= sact && slast;
      sdrain <= swait;
      if (run) begin
        swait <= 1'b0; sdrain <= 1'b0; sact <= 1'b0;
      end else begin
        swait <= cfg.send && tok_bus.kind == TK_DDONE;
        if (sdrain) begin
          sact <= 1'b1; sy <= '0; sx <= '0;
        end else if (sact) begin
          if (slast) sact <= 1'b0;
          if (int'(sy) == od - 1) begin
            sy <= '0;
            sx <= sx + 1'b1;
          end else begin
            sy <= sy + 1'b1;
          end
        end
      end
    end
  end

  function automatic data_t rescale(input acc_t v);
    acc_t s;
    s = v >>> FRAC;
    if (s > acc_t'(2 ** (DATA_W - 1) - 1)) return data_t'(2 ** (DATA_W - 1) - 1);
    if (s < -acc_t'(2 ** (DATA_W - 1)))    return data_t'(-(2 ** (DATA_W - 1)));
    return data_t'(s);
  endfunction

  assign rd_en_out  = sact;
  assign rd_idx_out = sact ? bidx_t'((int'(sy) + int'(cfg.crop)) * BUF_DIM + int'(sx) + int'(cfg.crop)) : '0;

  // ---------------- memory port ----------------
  always_comb begin
    mem_re    = kact || dact;
    mem_we    = sact;
    mem_wdata = sact ? rescale(rd_sum) : '0;
    if (kact)      mem_addr = cfg.kbase + maddr_t'(kcnt);
    else if (dact) mem_addr = cfg.src + maddr_t'(int'(dx) * int'(cfg.in_dim) + int'(dy));
    else if (sact) mem_addr = cfg.dst + maddr_t'(int'(sx) * od + int'(sy));
    else           mem_addr = '0;
  end

endmodule
