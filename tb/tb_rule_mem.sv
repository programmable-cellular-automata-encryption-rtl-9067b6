// tb_rule_mem: writes random rule words to every address of the rule RAM,
// reads them all back through the asynchronous port (data valid in the same
// clock as the address), and checks that a write to one address leaves the
// others unchanged.
module tb_rule_mem;
  import pca_pkg::*;
  logic clk = 0, we = 0;
  logic [5:0] waddr = 0, raddr = 0;
  rule_word_t wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [11:0] model [64];

  rule_mem #(.DEPTH(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic read_all();
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); raddr = 6'(a); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d: %h vs %h", a, rdata, model[a]); end
    end
  endtask

  initial begin
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a); wdata = rule_word_t'(12'($urandom)); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    read_all();
    for (int n = 0; n < 20; n++) begin
      int a;
      a = $urandom % 64;
      @(negedge clk); we = 1; waddr = 6'(a); wdata = rule_word_t'(12'($urandom)); model[a] = wdata;
      @(negedge clk); we = 0;
    end
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
