// tb_ctx_store: checks the two-context configuration store of a PE.
// After reset both contexts are zero and PC1 (slot 0) is active.  Random
// words are written to both slots; the active output must follow the call
// commands, a write to the inactive slot must not disturb the active word,
// and a write to the active slot must show from the next cycle on.
module tb_ctx_store;
  import dprap_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, call_en = 1'b0;
  logic wr_slot = 1'b0, call_slot = 1'b0;
  cfg_t wr_cfg = '0, active_cfg;
  logic active_slot;

  ctx_store dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cfg_t model [2];
  logic act;

  task automatic chk(input string what);
    checks++;
    if (active_cfg !== model[act] || active_slot !== act) begin
      failures++;
      $display("%s: active slot %0d cfg %h, expected slot %0d cfg %h", what, active_slot, active_cfg, act, model[act]);
    end
  endtask

  function automatic cfg_t rnd();
    return cfg_t'({$urandom, $urandom});
  endfunction

  initial begin
    model[0] = '0; model[1] = '0; act = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk("after reset");
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      wr_en     = $urandom_range(1, 0);
      wr_slot   = $urandom_range(1, 0);
      wr_cfg    = rnd();
      call_en   = ($urandom_range(3, 0) == 0);
      call_slot = $urandom_range(1, 0);
      // output before the edge still shows the old state
      chk("before edge");
      @(posedge clk);
      if (wr_en)   model[wr_slot] = wr_cfg;
      if (call_en) act = call_slot;
      @(negedge clk);
      wr_en = 1'b0; call_en = 1'b0;
      chk("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
