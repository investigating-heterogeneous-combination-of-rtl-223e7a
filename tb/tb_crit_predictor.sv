// tb_crit_predictor: random lookups and training of the BOTH-type
// predictor against a reference model: the index must be
// (PC >> 3) ^ GBH ^ GCPH over 11 bits, the prediction must follow the
// reference counters, and the GCPH must shift in one bit per trained
// instruction, the critical flag first. Also trains one instruction
// repeatedly as critical and checks it becomes predicted critical.
module tb_crit_predictor;
  import clp_pkg::*;
  import tb_ref_pkg::*;

  localparam int NRD = 4, NUPD = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  word_t     lk_pc   [NRD];
  cpht_idx_t lk_idx  [NRD];
  logic      lk_crit [NRD];
  logic [7:0] gbh;
  logic      upd_valid [NUPD];
  cpht_idx_t upd_idx   [NUPD];
  logic      upd_crit  [NUPD];
  logic [7:0] gcph;
  int ref_m [2048];
  logic [7:0] rgcph;
  int checks = 0, failures = 0;

  crit_predictor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ncrit_pred = 0;
    for (int e = 0; e < 2048; e++) ref_m[e] = 0;
    rgcph = 0;
    gbh = 0;
    for (int r = 0; r < NRD; r++) lk_pc[r] = 0;
    for (int u = 0; u < NUPD; u++) begin upd_valid[u] = 0; upd_idx[u] = 0; upd_crit[u] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int n, exp_idx;
      logic anyc;
      @(negedge clk);
      gbh = 8'($urandom);
      for (int r = 0; r < NRD; r++) lk_pc[r] = 32'h0040_0000 + 32'($urandom_range(0, 63) * 8);
      // train the entries just looked up, one of them possibly critical
      n = $urandom_range(0, NUPD);
      #1;
      for (int r = 0; r < NRD; r++) begin
        exp_idx = ((lk_pc[r] / 8) ^ gbh ^ rgcph) % 2048;
        checks += 2;
        if (int'(lk_idx[r]) != exp_idx) begin failures++; $display("idx %h exp %h", lk_idx[r], exp_idx); end
        if (lk_crit[r] != (ref_m[exp_idx] >= 8)) begin failures++; $display("crit mismatch idx %0d", exp_idx); end
        if (lk_crit[r]) ncrit_pred++;
      end
      anyc = 0;
      for (int u = 0; u < NUPD; u++) begin
        upd_valid[u] = (u < n);
        upd_idx[u]   = lk_idx[u % NRD];
        upd_crit[u]  = (u == 0) && (i % 3 == 0 || lk_pc[0][5:3] == 3'd0);
        if (upd_valid[u]) anyc |= upd_crit[u];
      end
      @(posedge clk);
      for (int u = 0; u < NUPD; u++)
        if (upd_valid[u]) ref_m[upd_idx[u]] = ref_ctr_step(ref_m[upd_idx[u]], upd_crit[u]);
      if (n > 0) begin
        rgcph = {rgcph[6:0], anyc};
        for (int k = 1; k < n; k++) rgcph = {rgcph[6:0], 1'b0};
      end
      #1;
      checks++;
      if (gcph != rgcph) begin failures++; $display("gcph %b exp %b", gcph, rgcph); end
    end
    checks++;
    if (ncrit_pred == 0) begin failures++; $display("no critical prediction seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
