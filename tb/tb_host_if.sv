// tb_host_if: checks the host interface address decoding (4 groups).
// Random host accesses are checked cycle by cycle against the address map:
// start on a control write with bit 0 set, instruction-memory piece writes,
// per-bank input-memory writes and output-memory reads; read data (status or
// the selected bank's word, driven by a one-cycle model memory per bank) must
// come back with host_rvalid one cycle later.
module tb_host_if;
  import dprap_pkg::*;

  localparam int NP = 4;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               host_valid = 1'b0, host_wr = 1'b0;
  logic [15:0]        host_addr = '0;
  logic [31:0]        host_wdata = '0, host_rdata;
  logic               host_rvalid;
  logic               start, busy = 1'b0, halted = 1'b0;
  logic               gim_we, gim_piece;
  logic [5:0]         gim_addr;
  logic [31:0]        gim_wdata;
  logic [NP-1:0]      dim_we, dom_re;
  maddr_t             dim_addr, dom_addr;
  data_t              dim_wdata;
  data_t              dom_rdata [NP];

  host_if dut (.*);

  always #5 clk = ~clk;

  // one-cycle-latency output memory banks whose word at a is a + 1000*bank
  always_ff @(posedge clk)
    for (int g = 0; g < NP; g++)
      if (dom_re[g]) dom_rdata[g] <= data_t'(int'(dom_addr) + 1000 * g);

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++; $display("%s (addr %h wr %0d)", s, host_addr, host_wr);
  endtask

  initial begin
    bit         exp_rv;
    logic [31:0] exp_rd;
    exp_rv = 0; exp_rd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      logic [3:0] region, bank;
      @(negedge clk);
      // response to the previous access
      checks++;
      if (host_rvalid !== exp_rv || (exp_rv && host_rdata !== exp_rd)) fail("read response");
      busy   = $urandom_range(1, 0);
      halted = $urandom_range(1, 0);
      region = 4'($urandom_range(4, 0));
      bank   = 4'($urandom_range(NP - 1, 0));
      host_valid = $urandom_range(3, 0) != 0;
      host_wr    = $urandom_range(1, 0);
      host_addr  = {region, bank, 8'($urandom)};
      host_wdata = $urandom;
      #1;
      checks++;
      if (start !== (host_valid && host_wr && region == 0 && host_wdata[0])) fail("start");
      checks++;
      if (gim_we !== (host_valid && host_wr && region == 1) ||
          (gim_we && (gim_addr !== host_addr[6:1] || gim_piece !== host_addr[0] || gim_wdata !== host_wdata)))
        fail("instruction memory write");
      for (int g = 0; g < NP; g++) begin
        checks++;
        if (dim_we[g] !== (host_valid && host_wr && region == 2 && bank == g)) fail("input memory bank select");
        if (dom_re[g] !== (host_valid && !host_wr && region == 3 && bank == g)) fail("output memory bank select");
      end
      if (|dim_we && (dim_addr !== host_addr[7:0] || dim_wdata !== host_wdata[15:0])) fail("input memory data");
      exp_rv = host_valid && !host_wr && (region == 0 || region == 3);
      if (region == 0) exp_rd = {30'b0, halted, busy};
      else             exp_rd = 32'($unsigned(data_t'(int'(host_addr[7:0]) + 1000 * int'(bank))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
