// tb_fast_alu: random operations through the fast ALU; each result must be
// on the bus exactly one cycle after issue with the reference value and the
// issuing tag, and the unit must accept back-to-back operations. The next
// operation is already driven when a result is checked, so a result taken
// from the live inputs instead of the registered ones is caught.
module tb_fast_alu;
  import clp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  alu_req_t in_req;
  logic in_ready;
  result_t result;
  int checks = 0, failures = 0;

  fast_alu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_req_t exp_req;
    logic     exp_v;
    in_valid = 1'b0;
    in_req   = '0;
    exp_v    = 1'b0;
    exp_req  = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in_valid   = ($urandom_range(0, 3) != 0);
      in_req.op  = rand_op();
      in_req.a   = (i % 7 == 0) ? 32'h8000_0000 : $urandom;
      in_req.b   = (i % 5 == 0) ? 32'(i % 40) : $urandom;
      in_req.tag = tag_t'(i);
      #1;
      checks++;
      if (result.valid !== exp_v) begin failures++; $display("valid mismatch at %0d", i); end
      if (exp_v) begin
        checks++;
        if (result.value !== ref_alu(exp_req.op, exp_req.a, exp_req.b) || result.tag !== exp_req.tag) begin
          failures++;
          $display("op %s a=%h b=%h got %h exp %h", exp_req.op.name(), exp_req.a, exp_req.b,
                   result.value, ref_alu(exp_req.op, exp_req.a, exp_req.b));
        end
      end
      checks++;
      if (!in_ready) failures++;
      exp_v   = in_valid;
      exp_req = in_req;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
