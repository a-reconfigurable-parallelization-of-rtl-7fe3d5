// dprap_pkg: shared types and constants of the reconfigurable array processor.
//
// The array runs the two layer kinds of a DCGAN on one 4x4 processing-element
// group (PEG): a strided deconvolution and a convolution, both with a K x K
// kernel.  Every PE holds two configuration contexts (PC1 and PC2); a call
// command sent down the H-tree switches all PEs of a group from one context to
// the other in the same cycle.  This package defines:
//   * the number formats (16-bit signed data, 32-bit accumulators, Q8.8),
//   * the per-PE configuration word (cfg_t),
//   * the token that travels on a group's shared distribution bus (tok_t),
//   * the H-tree packet (hpkt_t) and the global instruction (ginstr_t),
//   * dcgan_role(), which builds the role map of one PEG for the
//     deconvolution (PC1) / convolution (PC2) mapping.
// The 4x4 group, the 3x3 kernel, the stride of 2, the two contexts and the
// role names follow the source design; every width, field, encoding and the
// exact division of kernel taps among PEs are choices of this implementation.
package dprap_pkg;

  // ---------------- sizes ----------------
  parameter int DATA_W  = 16;              // feature-map / weight word
  parameter int ACC_W   = 32;              // product and partial-sum word
  parameter int FRAC    = 8;               // fraction bits of data words (Q8.8)
  parameter int K       = 3;               // kernel side
  parameter int NTAP    = K * K;           // taps per kernel
  parameter int MAX_IN  = 5;               // largest deconvolution input side
  parameter int MAX_S   = 2;               // largest deconvolution stride
  parameter int BUF_DIM = (MAX_IN - 1) * MAX_S + K;  // side of a PE partial-sum buffer (11)
  parameter int BUF_N   = BUF_DIM * BUF_DIM;
  parameter int BUF_AW  = $clog2(BUF_N);
  parameter int CW      = $clog2(BUF_DIM + 1);  // coordinate width (4)
  parameter int MEM_AW  = 8;               // input / output memory word address
  parameter int PEG_SIDE = 4;
  parameter int PE_N    = PEG_SIDE * PEG_SIDE;  // PEs per group (16)
  parameter int PE_AW   = $clog2(PE_N);
  parameter int N_CTX   = 2;               // contexts per PE (PC1, PC2)
  parameter int PEG_AW  = 2;               // group address bits in packets
  parameter int GI_W    = 64;              // global instruction width
  parameter int HOST_DW = 32;              // host data bus width

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic [CW-1:0]            coord_t;
  typedef logic [MEM_AW-1:0]        maddr_t;
  typedef logic [BUF_AW-1:0]        bidx_t;

  // ---------------- PE configuration word ----------------
  // One context of a PE.  Role bits may be combined (e.g. Db + Op).
  typedef struct packed {
    logic              kld;     // kernel load: read NTAP weights from the PE memory port
    logic              db;      // data distribution: stream the feature map from the memory port
    logic              op;      // multiply each distributed pixel by the held weight
    logic              inte;    // integrate products into the partial-sum buffer
    logic              send;    // read out the reduced buffers and write the result
    logic              conv;    // 0: deconvolution addressing, 1: convolution addressing
    logic              accum;   // keep the partial sums of the previous RUN (next input channel)
    logic [3:0]        tap;     // kernel tap held by an Op PE (ky*K + kx)
    logic [NTAP-1:0]   mask;    // taps integrated by an Inte PE
    coord_t            in_dim;  // input feature-map side
    logic [1:0]        stride;  // deconvolution stride
    logic [1:0]        crop;    // border removed on each side of the result
    maddr_t            kbase;   // kernel address (kld)
    maddr_t            src;     // feature-map address (db)
    maddr_t            dst;     // result address (send)
  } cfg_t;

  // ---------------- group distribution bus ----------------
  typedef enum logic [2:0] {
    TK_NONE   = 3'd0,
    TK_WEIGHT = 3'd1,   // one kernel weight for tap 'tap'
    TK_KDONE  = 3'd2,   // handshake: kernel fully distributed
    TK_PIXEL  = 3'd3,   // one input pixel at (y, x)
    TK_DDONE  = 3'd4    // handshake: all pixels distributed
  } tok_kind_e;

  typedef struct packed {
    tok_kind_e   kind;
    logic [3:0]  tap;
    coord_t      y;
    coord_t      x;
    data_t       data;
  } tok_t;

  // coordinates that travel with a row of products
  typedef struct packed {
    logic   valid;
    coord_t y;
    coord_t x;
  } pcoord_t;

  // ---------------- H-tree packet ----------------
  typedef enum logic [1:0] {
    HC_NOP  = 2'd0,
    HC_CFG  = 2'd1,   // write cfg into context 'slot' of the addressed PE(s)
    HC_CALL = 2'd2,   // make context 'slot' active
    HC_RUN  = 2'd3    // start one layer with the active context
  } hcmd_e;

  typedef struct packed {
    hcmd_e              cmd;
    logic               all_peg;
    logic [PEG_AW-1:0]  peg;
    logic               all_pe;
    logic [PE_AW-1:0]   pe;
    logic               slot;
    cfg_t               cfg;
  } hpkt_t;

  // ---------------- global instruction ----------------
  typedef enum logic [2:0] {
    GI_CFG  = 3'd0,   // send a configuration word
    GI_CALL = 3'd1,   // context switch
    GI_RUN  = 3'd2,   // start the addressed group(s), do not wait
    GI_WAIT = 3'd3,   // wait until every started group has finished
    GI_HALT = 3'd4    // end of program
  } gop_e;

  typedef struct packed {
    gop_e               op;
    logic               all_peg;
    logic [PEG_AW-1:0]  peg;
    logic               all_pe;
    logic [PE_AW-1:0]   pe;
    logic               slot;
    cfg_t               cfg;
  } ginstr_t;

  // ---------------- layer geometry helpers ----------------
  // side of the uncropped result of a layer
  function automatic int full_side(input logic conv, input int in_dim, input int stride);
    return conv ? (in_dim - K + 1) : ((in_dim - 1) * stride + K);
  endfunction

  // ---------------- DCGAN role map of one group ----------------
  // PE index = row*4 + col.  Op PEs (tap order 0..8): PE00 PE01 PE03 PE10 PE12
  // PE21 PE22 PE30 PE31.  PC1 (deconvolution, stride 2): PE00 loads the kernel
  // and distributes the input; PE02/PE20/PE23/PE32 integrate the four output
  // phases (even/even, even/odd, odd/even, odd/odd); PE33 sends.  PC2
  // (convolution): PE00 loads the kernel, PE33 distributes the stored
  // deconvolution result and sends; PE12/22/30/31 integrate their own tap,
  // PE02 the taps of PE00 and PE01, PE11 of PE10, PE13 of PE03, PE20 of PE21.
  function automatic int op_tap(input int pe);
    case (pe)
      0: return 0;  1: return 1;  3: return 2;  4: return 3;  6: return 4;
      9: return 5; 10: return 6; 12: return 7; 13: return 8;
      default: return -1;
    endcase
  endfunction

  function automatic cfg_t dcgan_role(input int pe, input logic conv,
                                      input int in_dim, input int stride, input int crop,
                                      input int kbase, input int src, input int dst,
                                      input logic accum = 1'b0);
    cfg_t c;
    c        = '0;
    c.conv   = conv;
    c.accum  = accum;
    c.in_dim = coord_t'(in_dim);
    c.stride = 2'(stride);
    c.crop   = 2'(crop);
    c.kbase  = maddr_t'(kbase);
    c.src    = maddr_t'(src);
    c.dst    = maddr_t'(dst);
    if (op_tap(pe) >= 0) begin
      c.op  = 1'b1;
      c.tap = 4'(op_tap(pe));
    end
    if (pe == 0)  c.kld  = 1'b1;
    if (pe == 15) c.send = 1'b1;
    if (!conv) begin
      if (pe == 0) c.db = 1'b1;
      case (pe)
        2:  begin c.inte = 1'b1; c.mask = 9'b101_000_101; end  // taps 0,2,6,8
        8:  begin c.inte = 1'b1; c.mask = 9'b010_000_010; end  // taps 1,7
        11: begin c.inte = 1'b1; c.mask = 9'b000_101_000; end  // taps 3,5
        14: begin c.inte = 1'b1; c.mask = 9'b000_010_000; end  // tap 4
        default: ;
      endcase
    end else begin
      if (pe == 15) c.db = 1'b1;
      case (pe)
        2:  begin c.inte = 1'b1; c.mask = 9'b000_000_011; end  // taps 0,1
        5:  begin c.inte = 1'b1; c.mask = 9'b000_001_000; end  // tap 3
        7:  begin c.inte = 1'b1; c.mask = 9'b000_000_100; end  // tap 2
        8:  begin c.inte = 1'b1; c.mask = 9'b000_100_000; end  // tap 5
        6:  begin c.inte = 1'b1; c.mask = 9'b000_010_000; end  // tap 4
        10: begin c.inte = 1'b1; c.mask = 9'b001_000_000; end  // tap 6
        12: begin c.inte = 1'b1; c.mask = 9'b010_000_000; end  // tap 7
        13: begin c.inte = 1'b1; c.mask = 9'b100_000_000; end  // tap 8
        default: ;
      endcase
    end
    return c;
  endfunction

endpackage
