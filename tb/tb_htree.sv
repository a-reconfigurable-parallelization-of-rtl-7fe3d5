// tb_htree: checks delivery and filtering of the H-tree network (4 groups).
// Random packets (single PE, all PEs of one group, all PEs of all groups,
// with random commands and payloads) are sent one per cycle back to back.
// Every leaf must see exactly the packets addressed to it, exactly three
// cycles after they entered the root, and HC_NOP otherwise.
module tb_htree;
  import dprap_pkg::*;

  localparam int NP  = 4;
  localparam int LAT = 3;

  logic  clk = 1'b0, rst_n = 1'b0;
  hpkt_t root = '0;
  hpkt_t leaf [NP][PE_N];

  htree dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, delivered = 0;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  hpkt_t hist [$];

  function automatic logic addressed(input hpkt_t p, input int g, input int pe);
    return p.cmd != HC_NOP && (p.all_peg || int'(p.peg) == g) && (p.all_pe || int'(p.pe) == pe);
  endfunction

  initial begin
    for (int i = 0; i < LAT; i++) hist.push_back('0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      hpkt_t p, old;
      @(negedge clk);
      p = hpkt_t'({$urandom, $urandom});
      p.all_peg = ($urandom_range(3, 0) == 0);
      p.all_pe  = ($urandom_range(3, 0) == 0);
      if ($urandom_range(7, 0) == 0) p.cmd = HC_NOP;
      root = p;
      // leaves now show the packet sent LAT cycles ago
      old = hist.pop_front();
      for (int g = 0; g < NP; g++)
        for (int pe = 0; pe < PE_N; pe++) begin
          checks++;
          if (addressed(old, g, pe)) begin
            delivered++;
            if (leaf[g][pe] !== old) begin
              failures++;
              $display("leaf %0d.%0d missed a packet", g, pe);
            end
          end else if (leaf[g][pe].cmd != HC_NOP) begin
            failures++;
            $display("leaf %0d.%0d got a packet not addressed to it", g, pe);
          end
        end
      hist.push_back(p);
    end
    checks++;
    if (delivered < 100) failures++;
    $display("packets delivered to leaves: %0d", delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
