// tb_global_imem: writes random 64-bit instructions in 32-bit pieces, in
// random order, and reads them back; read data appears one cycle after the
// request.
module tb_global_imem;
  import dprap_pkg::*;

  logic              clk = 1'b0;
  logic              wr_en = 1'b0, rd_en = 1'b0;
  logic [5:0]        wr_addr = '0, rd_addr = '0;
  logic              wr_piece = 1'b0;
  logic [31:0]       wr_data = '0;
  logic [GI_W-1:0]   rd_data;

  global_imem dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [GI_W-1:0] model [64];

  initial begin
    for (int i = 0; i < 64; i++) model[i] = {$urandom, $urandom};
    for (int i = 63; i >= 0; i--)
      for (int p = 1; p >= 0; p--) begin
        @(negedge clk);
        wr_en = 1'b1; wr_addr = 6'(i); wr_piece = p[0];
        wr_data = model[i][p*32 +: 32];
      end
    @(negedge clk); wr_en = 1'b0;
    for (int i = 0; i < 300; i++) begin
      int a;
      a = $urandom_range(63, 0);
      @(negedge clk);
      rd_en = 1'b1; rd_addr = 6'(a);
      // also overwrite the high piece of another word now and then
      if ($urandom_range(3, 0) == 0) begin
        int b;
        b = (a + 1) % 64;
        wr_en = 1'b1; wr_addr = 6'(b); wr_piece = 1'b1; wr_data = $urandom;
        model[b][63:32] = wr_data;
      end else wr_en = 1'b0;
      @(negedge clk);
      rd_en = 1'b0; wr_en = 1'b0;
      checks++;
      if (rd_data !== model[a]) begin
        failures++; $display("word %0d: got %h expected %h", a, rd_data, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
