// tb_byte_fifo: random pushes and pops against a queue model of the FIFO,
// including filling it completely (full, overflow pulse, dropped write) and
// draining it to empty.  Uses a depth of 16 to reach the full state quickly.
module tb_byte_fifo;
  logic clk = 0, rst_n = 0, wr_en = 0, full, overflow, rd_valid, rd_ready = 0;
  logic [8:0] wr_data = 0, rd_data;
  logic [4:0] level;
  int checks = 0, failures = 0, overflows = 0;
  logic [8:0] q [$];

  byte_fifo #(.WIDTH(9), .DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic cycle_once(input bit push, input bit pop);
    bit was_full;
    @(negedge clk);
    wr_en = push; wr_data = 9'($urandom); rd_ready = pop;
    #1;
    checks++;
    if (rd_valid !== (q.size() != 0) || full !== (q.size() == 16) || level !== 5'(q.size())) begin
      failures++; $display("FAIL flags valid=%b full=%b level=%0d model=%0d", rd_valid, full, level, q.size());
    end
    if (pop && q.size() != 0) begin
      checks++;
      if (rd_data !== q[0]) begin failures++; $display("FAIL data %h vs %h", rd_data, q[0]); end
    end
    was_full = (q.size() == 16);
    @(posedge clk);
    if (pop && q.size() != 0) void'(q.pop_front());
    if (push && !was_full) q.push_back(wr_data);
    #1;
    checks++;
    if (overflow !== (push && was_full)) begin failures++; $display("FAIL overflow flag"); end
    if (overflow) overflows++;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) cycle_once(1, 0);   // overfill
    for (int i = 0; i < 40; i++) cycle_once(0, 1);   // drain
    for (int i = 0; i < 3000; i++) cycle_once(($urandom % 3) != 0, ($urandom % 2) != 0);
    for (int i = 0; i < 40; i++) cycle_once(0, 1);
    checks++;
    if (overflows == 0) begin failures++; $display("FAIL overflow never flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
