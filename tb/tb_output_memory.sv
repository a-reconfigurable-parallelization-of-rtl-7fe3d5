// tb_output_memory: random writes and reads on the PE port and reads on the
// host port against a model array; both read ports return data one cycle
// after the request and hold it while idle.
module tb_output_memory;
  import dprap_pkg::*;

  logic   clk = 1'b0;
  logic   a_re = 1'b0, b_re = 1'b0, b_we = 1'b0;
  maddr_t a_addr = '0, b_addr = '0;
  data_t  b_wdata = '0, a_rdata, b_rdata;

  output_memory dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  data_t model [256];

  initial begin
    data_t ea, eb;
    bit    pa, pb;
    pa = 0; pb = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      b_we = 1'b1; b_addr = maddr_t'(i); b_wdata = data_t'($urandom);
      model[i] = b_wdata;
    end
    @(negedge clk); b_we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (pa) begin checks++; if (a_rdata !== ea) begin failures++; $display("host read %h expected %h", a_rdata, ea); end end
      if (pb) begin checks++; if (b_rdata !== eb) begin failures++; $display("PE read %h expected %h", b_rdata, eb); end end
      b_we = $urandom_range(1, 0); b_re = $urandom_range(1, 0);
      b_addr = maddr_t'($urandom); b_wdata = data_t'($urandom);
      a_re = $urandom_range(1, 0); a_addr = maddr_t'($urandom);
      if (a_re) begin ea = model[a_addr]; pa = 1; end
      if (b_re) begin eb = model[b_addr]; pb = 1; end
      if (b_we) model[b_addr] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
