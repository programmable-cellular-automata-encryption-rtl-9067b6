// tb_msg_mem: fills the 1 KB message memory with random bytes, reads every
// location back through the asynchronous port, and checks that the write
// enable gates writes.
module tb_msg_mem;
  logic clk = 0, we = 0;
  logic [9:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [1024];
  int checks = 0, failures = 0;

  msg_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); we = 1; waddr = 10'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    // writes with we = 0 must not land
    for (int a = 0; a < 1024; a += 7) begin
      @(negedge clk); we = 0; waddr = 10'(a); wdata = ~model[a];
    end
    @(negedge clk);
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); raddr = 10'(a); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
