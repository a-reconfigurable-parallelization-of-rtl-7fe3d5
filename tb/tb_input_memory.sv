// tb_input_memory: random writes on the host port and reads on the PE port
// against a model array; read data must appear one cycle after the request
// and hold while no read is requested.
module tb_input_memory;
  import dprap_pkg::*;

  logic   clk = 1'b0;
  logic   a_we = 1'b0, b_re = 1'b0;
  maddr_t a_addr = '0, b_addr = '0;
  data_t  a_wdata = '0, b_rdata;

  input_memory dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  data_t model [256];
  bit    known [256];

  initial begin
    data_t expect_q;
    bit    pending;
    pending = 0;
    // fill every word once so that all reads are defined
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      a_we = 1'b1; a_addr = maddr_t'(i); a_wdata = data_t'($urandom);
      model[i] = a_wdata; known[i] = 1;
    end
    @(negedge clk); a_we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (b_rdata !== expect_q) begin
          failures++; $display("read got %h expected %h", b_rdata, expect_q);
        end
      end
      a_we = $urandom_range(1, 0); a_addr = maddr_t'($urandom); a_wdata = data_t'($urandom);
      b_re = $urandom_range(1, 0); b_addr = maddr_t'($urandom);
      // a read of the word being written returns the old contents
      if (b_re) begin expect_q = model[b_addr]; pending = 1; end
      if (a_we) model[a_addr] = a_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
