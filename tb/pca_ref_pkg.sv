// pca_ref_pkg: reference model of the PCA cipher for the testbenches,
// written from the rule definitions (rule 51: NOT self; rule 60: self XOR
// left neighbour; rule 102: self XOR right neighbour; null boundary).
package pca_ref_pkg;

  // one evolution step; cells[i]=0 -> rule 51, else 60 (sel=0) / 102 (sel=1)
  function automatic logic [7:0] ref_step(input logic [7:0] s, input logic [7:0] cells,
                                          input logic sel);
    logic [7:0] n;
    logic l, r;
    for (int i = 0; i < 8; i++) begin
      l = (i > 0) ? s[i-1] : 1'b0;
      r = (i < 7) ? s[i+1] : 1'b0;
      if (!cells[i]) n[i] = !s[i];
      else n[i] = sel ? (s[i] ^ r) : (s[i] ^ l);
    end
    return n;
  endfunction

  function automatic logic [7:0] ref_run(input logic [7:0] s, input logic [7:0] cells,
                                         input logic sel, input int steps);
    for (int k = 0; k < steps; k++) s = ref_step(s, cells, sel);
    return s;
  endfunction

  // 1 if every state returns to itself after 8 steps
  function automatic bit period_divides_8(input logic [7:0] cells, input logic sel);
    for (int s = 0; s < 256; s++)
      if (ref_run(8'(s), cells, sel, 8) != 8'(s)) return 0;
    return 1;
  endfunction

  // word = {steps[2:0], sel, cells[7:0]}
  function automatic logic [7:0] ref_encrypt(input logic [7:0] p, input logic [11:0] w [4]);
    for (int k = 0; k < 4; k++) p = ref_run(p, w[k][7:0], w[k][8], int'(w[k][11:9]));
    return p;
  endfunction

endpackage
