// tb_slow_alu: random operations through the slow ALU. Each result must
// appear exactly two cycles after issue with the reference value; the unit
// must refuse a new operation in the cycle after issue and accept one in the
// cycle its result is on the bus, giving one operation per two cycles.
module tb_slow_alu;
  import clp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  alu_req_t in_req;
  logic in_ready;
  result_t result;
  int checks = 0, failures = 0;

  slow_alu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int issue_cyc, cyc, nres;
    alu_req_t exp_req;
    logic pending;
    in_valid = 1'b0;
    in_req   = '0;
    pending  = 1'b0;
    exp_req  = '0;
    issue_cyc = 0;
    nres = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    cyc = 0;
    // Offer an operation every cycle; only accepted ones count.
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      cyc++;
      if (pending && cyc == issue_cyc + 1) begin
        checks++;
        if (in_ready || result.valid) begin failures++; $display("ready/valid too early at %0d", cyc); end
      end
      if (pending && cyc == issue_cyc + 2) begin
        checks += 2;
        if (!result.valid || !in_ready) begin failures++; $display("no result at +2, cyc %0d", cyc); end
        if (result.value !== ref_alu(exp_req.op, exp_req.a, exp_req.b) || result.tag !== exp_req.tag) begin
          failures++;
          $display("op %s got %h exp %h", exp_req.op.name(), result.value, ref_alu(exp_req.op, exp_req.a, exp_req.b));
        end
        pending = 1'b0;
        nres++;
      end else if (!pending) begin
        checks++;
        if (result.valid) begin failures++; $display("spurious result at %0d", cyc); end
      end
      in_valid   = ($urandom_range(0, 4) != 0);
      in_req.op  = rand_op();
      in_req.a   = $urandom;
      in_req.b   = (i % 3 == 0) ? 32'(i % 33) : $urandom;
      in_req.tag = tag_t'(i);
      if (in_valid && in_ready) begin
        pending   = 1'b1;
        issue_cyc = cyc;
        exp_req   = in_req;
      end
    end
    checks++;
    if (nres < 500) begin failures++; $display("too few results %0d", nres); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
