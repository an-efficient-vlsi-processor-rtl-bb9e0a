// tb_regs: drives REGS with random operations (shift left/right, rotate
// forward/reverse, down, load, hold) and random input words, and compares all
// 80 row slots after every clock with a reference kept in unpacked arrays.
module tb_regs;
  import ime_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  regop_e op; logic [3:0] sel; word_t [3:0] col_in; word_t [4:0] row_in;
  word_t [3:0][4:0][3:0] q;
  regs dut (.*);

  logic [31:0] m [4][5][4];
  logic [31:0] n [4][5][4];
  int seen [7];

  initial begin
    op = OP_HOLD; sel = '0; col_in = '0; row_in = '0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 5; j++) for (int k = 0; k < 4; k++) m[i][j][k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 4000; it++) begin
      automatic int o = $urandom_range(0, 6);
      op = regop_e'(o);
      sel = 4'($urandom);
      for (int i = 0; i < 4; i++) col_in[i] = $urandom;
      for (int j = 0; j < 5; j++) row_in[j] = $urandom;
      seen[o]++;
      n = m;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 5; j++)
          case (op)
            OP_SHL: begin
              n[i][j][0] = (j == 4) ? col_in[i] : m[i][j+1][3];
              n[i][j][1] = m[i][j][0]; n[i][j][2] = m[i][j][1]; n[i][j][3] = m[i][j][2];
            end
            OP_SHR: begin
              n[i][j][3] = (j == 0) ? col_in[i] : m[i][j-1][0];
              n[i][j][0] = m[i][j][1]; n[i][j][1] = m[i][j][2]; n[i][j][2] = m[i][j][3];
            end
            OP_ROTF: for (int k = 0; k < 4; k++) n[i][j][(k+1)%4] = m[i][j][k];
            OP_ROTR: for (int k = 0; k < 4; k++) n[i][j][k] = m[i][j][(k+1)%4];
            OP_DOWN: n[i][j][sel%4] = (i == 3) ? row_in[j] : m[i+1][j][sel%4];
            OP_LOAD: if (i == sel/4) n[i][j][sel%4] = row_in[j];
            default: ;
          endcase
      @(negedge clk);
      m = n;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 5; j++) for (int k = 0; k < 4; k++) begin
        checks++;
        if (q[i][j][k] !== m[i][j][k]) begin
          failures++;
          if (failures < 10) $display("op %s: q[%0d][%0d][%0d]=%h expected %h", op.name(), i, j, k, q[i][j][k], m[i][j][k]);
        end
      end
    end
    for (int o = 0; o < 7; o++) begin
      checks++;
      if (seen[o] == 0) begin failures++; $display("operation %0d never exercised", o); end
    end
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
