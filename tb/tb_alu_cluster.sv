// tb_alu_cluster: issues random operations to all six ALUs whenever they are
// ready and checks that units 0-1 answer after exactly one cycle and units
// 2-5 after exactly two, with the reference value, and that a slow unit is
// not ready in the cycle after it accepts an operation.
module tb_alu_cluster;
  import clp_pkg::*;
  import tb_ref_pkg::*;

  localparam int NF = 2, NS = 4, NA = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic     iss_valid [NA];
  alu_req_t iss_req   [NA];
  logic     unit_ready[NA];
  result_t  result    [NA];
  int checks = 0, failures = 0;

  alu_cluster dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int       due  [NA];
    alu_req_t held [NA];
    int       nres [NA];
    for (int u = 0; u < NA; u++) begin
      iss_valid[u] = 0; iss_req[u] = '0; due[u] = -1; nres[u] = 0; held[u] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int u = 0; u < NA; u++) begin
        checks++;
        if (result[u].valid != (due[u] == c)) begin
          failures++; $display("unit %0d valid %0d at %0d, due %0d", u, result[u].valid, c, due[u]);
        end else if (due[u] == c) begin
          checks++;
          nres[u]++;
          if (result[u].value != ref_alu(held[u].op, held[u].a, held[u].b) || result[u].tag != held[u].tag) begin
            failures++; $display("unit %0d wrong value", u);
          end
        end
        if (u >= NF && due[u] == c + 1) begin
          checks++;
          if (unit_ready[u]) begin failures++; $display("slow unit %0d ready while busy", u); end
        end
        iss_valid[u] = unit_ready[u] && ($urandom_range(0, 3) != 0);
        iss_req[u]   = '{op: rand_op(), a: $urandom, b: $urandom, tag: tag_t'(c * NA + u)};
        if (iss_valid[u]) begin
          held[u] = iss_req[u];
          due[u]  = c + ((u < NF) ? 1 : 2);
        end
      end
    end
    for (int u = 0; u < NA; u++) begin
      checks++;
      if (nres[u] < ((u < NF) ? 1800 : 900)) begin failures++; $display("unit %0d only %0d results", u, nres[u]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
