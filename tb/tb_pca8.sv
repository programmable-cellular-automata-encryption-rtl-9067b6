// tb_pca8: checks the 8-cell PCA.
//  1. Configuration <51,51,60,60,60,60,51,51> from seeds 0 and 190 must walk
//     the two 8-state cycles 0,195,4,207,16,243,20,255 and
//     190,65,130,69,142,81,178,85 and return to the seed.
//  2. Random seeds, rule lines and run patterns against the reference model.
module tb_pca8;
  import pca_ref_pkg::*;
  logic clk = 0, load_data = 0, run = 0, sel102 = 0;
  logic [7:0] data_in = 0, rule_cells = 0, state;
  int checks = 0, failures = 0;

  pca8 dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (state !== exp) begin
      failures++;
      $display("FAIL %s: state=%0d expected=%0d", what, state, exp);
    end
  endtask

  byte unsigned cyc0 [8] = '{0, 195, 4, 207, 16, 243, 20, 255};
  byte unsigned cyc1 [8] = '{190, 65, 130, 69, 142, 81, 178, 85};

  initial begin
    logic [7:0] model;
    // rule configuration list is cell 0 first: 51,51,60,60,60,60,51,51
    rule_cells = 8'b0011_1100; sel102 = 0;
    for (int c = 0; c < 2; c++) begin
      @(negedge clk); load_data = 1; data_in = (c == 0) ? cyc0[0] : cyc1[0];
      @(negedge clk); load_data = 0; run = 1;
      for (int k = 1; k <= 8; k++) begin
        @(negedge clk);
        check((c == 0) ? cyc0[k % 8] : cyc1[k % 8], "Fig5 cycle");
      end
      run = 0;
    end
    // random operation
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      load_data = 1; data_in = 8'($urandom);
      model = data_in;
      @(negedge clk);
      check(model, "load");
      load_data = 0;
      for (int k = 0; k < 8; k++) begin
        rule_cells = 8'($urandom); sel102 = 1'($urandom); run = 1'($urandom);
        if (run) model = ref_step(model, rule_cells, sel102);
        @(negedge clk);
        check(model, "step");
      end
      run = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
