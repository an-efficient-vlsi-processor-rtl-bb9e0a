// tb_regc: loads REGC word by word in a random order, then applies random
// rotations, loads and idle clocks, and checks all 64 slots after every clock
// against a reference that tracks, for each slot, which image row it holds.
module tb_regc;
  import ime_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rot_en, rot_dn, ld_en; logic [5:0] ld_idx; word_t ld_word;
  word_t [3:0][3:0][3:0] q;
  regc dut (.*);

  logic [31:0] m [4][4][4];
  logic [31:0] n [4][4][4];
  int n_rot_up = 0, n_rot_dn = 0, n_ld = 0;

  task automatic compare(string what);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) for (int k = 0; k < 4; k++) begin
      checks++;
      if (q[i][j][k] !== m[i][j][k]) begin
        failures++;
        if (failures < 10) $display("%s: q[%0d][%0d][%0d]=%h expected %h", what, i, j, k, q[i][j][k], m[i][j][k]);
      end
    end
  endtask

  initial begin
    rot_en = 0; rot_dn = 0; ld_en = 0; ld_idx = 0; ld_word = 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) for (int k = 0; k < 4; k++) m[i][j][k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // word w = image row w/4, columns 4*(w%4): subblock row (w/4)/4, slot (w/4)%4, subblock column w%4
    for (int w = 0; w < 64; w++) begin
      ld_en = 1; ld_idx = 6'(w); ld_word = $urandom;
      m[w/16][w%4][(w/4)%4] = ld_word;
      @(negedge clk);
      compare("load");
      n_ld++;
    end
    for (int it = 0; it < 3000; it++) begin
      automatic int c = $urandom_range(0, 9);
      ld_en = (c == 0); rot_en = (c >= 3); rot_dn = $urandom_range(0, 1);
      ld_idx = 6'($urandom); ld_word = $urandom;
      n = m;
      if (ld_en) begin
        n[ld_idx/16][ld_idx%4][(ld_idx/4)%4] = ld_word; n_ld++;
      end else if (rot_en) begin
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) for (int k = 0; k < 4; k++)
          n[i][j][k] = rot_dn ? m[i][j][(k+3)%4] : m[i][j][(k+1)%4];
        if (rot_dn) n_rot_dn++; else n_rot_up++;
      end
      @(negedge clk);
      m = n;
      compare("op");
    end
    checks += 3;
    if (n_rot_dn == 0) failures++;
    if (n_rot_up == 0) failures++;
    if (n_ld == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
