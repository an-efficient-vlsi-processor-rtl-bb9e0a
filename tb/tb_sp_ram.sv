// tb_sp_ram: writes random words to every address of a 180-word and a
// 64-word single-port RAM (the sizes of the MV memory and the macroblock
// memory), reads them back in random order and checks the one-clock read
// latency.
module tb_sp_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en3, we3; logic [7:0] a3; logic [31:0] w3, r3;
  logic en2, we2; logic [5:0] a2; logic [31:0] w2, r2;
  sp_ram #(.DEPTH(180), .WIDTH(32)) dut3 (.clk, .en(en3), .we(we3), .addr(a3), .wdata(w3), .rdata(r3));
  sp_ram #(.DEPTH(64),  .WIDTH(32)) dut2 (.clk, .en(en2), .we(we2), .addr(a2), .wdata(w2), .rdata(r2));

  logic [31:0] m3 [180];
  logic [31:0] m2 [64];

  initial begin
    en3 = 0; we3 = 0; a3 = 0; w3 = 0; en2 = 0; we2 = 0; a2 = 0; w2 = 0;
    for (int i = 0; i < 180; i++) begin
      @(negedge clk);
      en3 = 1; we3 = 1; a3 = 8'(i); w3 = $urandom; m3[i] = w3;
      en2 = (i < 64); we2 = 1; a2 = 6'(i % 64); w2 = $urandom; if (i < 64) m2[i] = w2;
    end
    for (int k = 0; k < 400; k++) begin
      automatic int i3 = $urandom_range(0, 179);
      automatic int i2 = $urandom_range(0, 63);
      @(negedge clk);
      en3 = 1; we3 = 0; a3 = 8'(i3);
      en2 = 1; we2 = 0; a2 = 6'(i2);
      @(negedge clk);
      en3 = 0; en2 = 0;
      checks += 2;
      if (r3 !== m3[i3]) begin failures++; $display("ram3[%0d] %h expected %h", i3, r3, m3[i3]); end
      if (r2 !== m2[i2]) begin failures++; $display("ram2[%0d] %h expected %h", i2, r2, m2[i2]); end
      // a disabled clock keeps the read data
      @(negedge clk);
      checks++;
      if (r3 !== m3[i3]) begin failures++; $display("ram3 output not held"); end
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
