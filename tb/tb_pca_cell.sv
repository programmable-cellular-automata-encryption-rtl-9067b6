// tb_pca_cell: exhaustive check of one PCA cell: every combination of
// load/run/data/neighbours/rule lines from both flip-flop states, against the
// rule truth tables (51: 00110011, 60: 00111100, 102: 01100110 over the
// neighbourhood left,self,right = 111..000).
module tb_pca_cell;
  logic clk = 0, load_data, run, data_in, left, right, s1, s0, q;
  int checks = 0, failures = 0;

  pca_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic expect_q(logic qq, logic ld, logic rn, logic di, logic l, logic r,
                                    logic a, logic b);
    logic [7:0] tt;
    if (ld) return di;
    if (!rn) return qq;
    tt = !a ? 8'd51 : (b ? 8'd102 : 8'd60);
    return tt[{l, qq, r}];
  endfunction

  initial begin
    logic e;
    for (int st = 0; st < 2; st++)
      for (int v = 0; v < 64; v++) begin
        // set the flip-flop to st
        @(negedge clk);
        load_data = 1; run = 0; data_in = st[0]; left = 0; right = 0; s1 = 0; s0 = 0;
        @(negedge clk);
        {load_data, run, data_in, left, right, s1} = v[5:0];
        s0 = v[0] ^ v[3];
        e = expect_q(q, load_data, run, data_in, left, right, s1, s0);
        @(negedge clk);
        checks++;
        if (q !== e) begin
          failures++;
          $display("FAIL st=%0d v=%0d q=%b exp=%b", st, v, q, e);
        end
      end
    // full evolution with s0=1 and s1=1 explicitly
    @(negedge clk); load_data = 1; data_in = 1; @(negedge clk);
    load_data = 0; run = 1; s1 = 1; s0 = 1; right = 1; left = 0; @(negedge clk);
    checks++; if (q !== 1'b0) begin failures++; $display("FAIL rule102"); end
    s0 = 0; left = 1; @(negedge clk);
    checks++; if (q !== 1'b1) begin failures++; $display("FAIL rule60"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
