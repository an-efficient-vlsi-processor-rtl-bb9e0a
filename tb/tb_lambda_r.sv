// tb_lambda_r: checks lambda*R = 2*lambda(QP)*(|vx|+|vy|+1) for every QP with
// random and extreme vectors, one clock after the inputs. The lambda values
// are the published QP table, kept here as an independent copy.
module tb_lambda_r;
  import ime_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mv_t v; logic [5:0] qp; logic [LR_W-1:0] lr;
  lambda_r dut (.*);

  int lam_tab [52] = '{1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,
                       5,6,6,7,8,9,10,11,13,14,16,18,20,23,25,29,32,36,40,45,51,57,64,72,81,91};

  initial begin
    v = '0; qp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int q = 0; q < 52; q++)
      for (int i = 0; i < 40; i++) begin
        int vx, vy, e;
        vx = (i == 0) ? -32 : (i == 1) ? 32 : (i == 2) ? 0 : $urandom_range(0, 64) - 32;
        vy = (i == 0) ? -32 : (i == 1) ? 32 : (i == 2) ? 0 : $urandom_range(0, 64) - 32;
        @(negedge clk);
        v.x = MV_W'(vx); v.y = MV_W'(vy); qp = 6'(q);
        e = 2 * lam_tab[q] * ((vx < 0 ? -vx : vx) + (vy < 0 ? -vy : vy) + 1);
        @(negedge clk);
        checks++;
        if (int'(lr) != e) begin
          failures++;
          if (failures < 10) $display("qp %0d v (%0d,%0d): %0d expected %0d", q, vx, vy, lr, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
