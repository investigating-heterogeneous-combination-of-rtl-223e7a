// tb_gcph_reg: shifts random groups of 0..6 bits into the criticality
// history and compares with a reference register after every cycle;
// checks that the newest bit lands in bit 0 and that bits older than 8
// instructions fall off.
module tb_gcph_reg;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] in_cnt;
  logic [5:0] in_bits;
  logic [7:0] hist;
  int checks = 0, failures = 0;

  gcph_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit q[$];
    logic [7:0] exp;
    in_cnt = '0; in_bits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // directed: one 1 then seven 0s moves it to bit 7, one more drops it
    @(negedge clk); in_cnt = 1; in_bits = 6'b1;
    @(negedge clk); in_cnt = 6; in_bits = 0;
    @(negedge clk); in_cnt = 1;
    @(negedge clk); in_cnt = 0; #1;
    checks++; if (hist != 8'h80) begin failures++; $display("hist %b exp 10000000", hist); end
    @(negedge clk); in_cnt = 1;
    @(negedge clk); in_cnt = 0; #1;
    checks++; if (hist != 8'h00) begin failures++; $display("old bit not dropped %b", hist); end
    for (int i = 0; i < 8; i++) q.push_back(0);
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_cnt  = 3'($urandom_range(0, 6));
      in_bits = 6'($urandom);
      for (int b = 0; b < int'(in_cnt); b++) q.push_back(in_bits[b]);
      while (q.size() > 8) void'(q.pop_front());
      @(posedge clk); #1;
      for (int b = 0; b < 8; b++) exp[b] = q[7 - b];
      checks++;
      if (hist != exp) begin failures++; $display("hist %b exp %b", hist, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
