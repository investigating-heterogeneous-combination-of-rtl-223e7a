// tb_cpht: random lookups and updates (several per cycle, often to the same
// entry) against a reference array of counters using the +8 / -1
// saturating rule; checks every read counter and its threshold flag
// (critical when the counter is 8 or more), and explicitly checks
// saturation at 63 and at 0 and the threshold boundary 7/8.
module tb_cpht;
  import clp_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 2048, NRD = 4, NUPD = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [10:0] rd_idx [NRD];
  logic [5:0]  rd_ctr [NRD];
  logic        rd_crit[NRD];
  logic        upd_valid [NUPD];
  logic [10:0] upd_idx   [NUPD];
  logic        upd_crit  [NUPD];
  int ref_m [N];
  int checks = 0, failures = 0;

  cpht dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int r = 0; r < NRD; r++) begin
      checks++;
      if (int'(rd_ctr[r]) != ref_m[rd_idx[r]] || rd_crit[r] != (ref_m[rd_idx[r]] >= 8)) begin
        failures++;
        $display("idx %0d ctr %0d crit %0d exp %0d", rd_idx[r], rd_ctr[r], rd_crit[r], ref_m[rd_idx[r]]);
      end
    end
  endtask

  initial begin
    int sat_hi = 0, sat_lo = 0, thr = 0;
    for (int e = 0; e < N; e++) ref_m[e] = 0;
    for (int u = 0; u < NUPD; u++) begin upd_valid[u] = 0; upd_idx[u] = '0; upd_crit[u] = 0; end
    for (int r = 0; r < NRD; r++) rd_idx[r] = 11'(r);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Directed: entry 5 up to saturation, then down through the threshold to 0.
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      upd_valid[0] = 1; upd_idx[0] = 11'd5; upd_crit[0] = 1;
      @(posedge clk); #1;
      ref_m[5] = ref_ctr_step(ref_m[5], 1'b1);
    end
    upd_valid[0] = 0;
    @(negedge clk); rd_idx[0] = 11'd5; #1;
    checks++; if (rd_ctr[0] != 6'd63 || !rd_crit[0]) begin failures++; $display("no saturation at 63"); end
    for (int i = 0; i < 70; i++) begin
      @(negedge clk);
      upd_valid[0] = 1; upd_idx[0] = 11'd5; upd_crit[0] = 0;
      @(posedge clk); #1;
      ref_m[5] = ref_ctr_step(ref_m[5], 1'b0);
      upd_valid[0] = 0;
      #1;
      if (ref_m[5] == 7) begin checks++; thr++; if (rd_crit[0]) begin failures++; $display("7 predicted critical"); end end
      if (ref_m[5] == 8) begin checks++; thr++; if (!rd_crit[0]) begin failures++; $display("8 not critical"); end end
    end
    checks++; if (rd_ctr[0] != 6'd0) begin failures++; $display("no saturation at 0"); end
    // Random traffic over a small set of entries so that collisions happen.
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      for (int r = 0; r < NRD; r++) rd_idx[r] = 11'($urandom_range(0, 15) * 131);
      for (int u = 0; u < NUPD; u++) begin
        upd_valid[u] = $urandom_range(0, 1);
        upd_idx[u]   = 11'($urandom_range(0, 15) * 131);
        upd_crit[u]  = ($urandom_range(0, 5) == 0);
      end
      #1;
      check_reads();
      @(posedge clk);
      for (int u = 0; u < NUPD; u++)
        if (upd_valid[u]) begin
          ref_m[upd_idx[u]] = ref_ctr_step(ref_m[upd_idx[u]], upd_crit[u]);
          if (ref_m[upd_idx[u]] == 63) sat_hi++;
          if (ref_m[upd_idx[u]] == 0)  sat_lo++;
        end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0 || thr < 2) begin failures++; $display("corner cases not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
