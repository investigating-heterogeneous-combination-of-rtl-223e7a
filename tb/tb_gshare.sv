// tb_gshare: trains the gshare predictor with random branches and compares
// the prediction, the index history and every counter state with a
// reference model. Branches resolve three predictions after they were
// predicted, so the history at resolution differs from the one the
// prediction used and must be handed back. Also checks that a loop branch with a fixed pattern
// becomes predictable through its history.
module tb_gshare;
  import clp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  word_t pred_pc, upd_pc;
  logic pred_taken, upd_valid, upd_taken;
  logic [7:0] pred_ghr, upd_ghr, ghr;
  typedef struct { word_t pc; logic [7:0] h; logic t; } br_t;
  br_t pq [$];
  int ctr [4096];
  logic [7:0] rghr;
  int checks = 0, failures = 0;

  gshare dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ridx(word_t pc, logic [7:0] h);
    return int'((pc / 8) % 4096) ^ int'(h);
  endfunction

  initial begin
    int correct_late = 0;
    for (int e = 0; e < 4096; e++) ctr[e] = 1;
    rghr = 0;
    upd_valid = 0; upd_pc = 0; upd_ghr = 0; upd_taken = 0; pred_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      logic t;
      @(negedge clk);
      // resolve the branch predicted three cycles ago
      upd_valid = 0;
      if (pq.size() == 3) begin
        br_t b;
        b = pq.pop_front();
        upd_valid = 1; upd_pc = b.pc; upd_ghr = b.h; upd_taken = b.t;
      end
      // a handful of branch addresses; branch 0 follows the pattern T T T N
      pred_pc = 32'h400000 + 32'($urandom_range(0, 3) * 8 * 37);
      if (i >= 3000) pred_pc = 32'h400000;
      t = (pred_pc == 32'h400000) ? (i % 4 != 3) : ($urandom_range(0, 1) == 1);
      #1;
      checks += 2;
      if (pred_ghr != rghr) begin failures++; $display("ghr %h exp %h", pred_ghr, rghr); end
      if (pred_taken != (ctr[ridx(pred_pc, rghr)] >= 2)) begin failures++; $display("pred mismatch at %0d", i); end
      if (i >= 5000 && pred_taken == t) correct_late++;
      pq.push_back('{pc: pred_pc, h: pred_ghr, t: t});
      @(posedge clk);
      if (upd_valid) begin
        if (upd_taken && ctr[ridx(upd_pc, upd_ghr)] < 3) ctr[ridx(upd_pc, upd_ghr)]++;
        if (!upd_taken && ctr[ridx(upd_pc, upd_ghr)] > 0) ctr[ridx(upd_pc, upd_ghr)]--;
        rghr = {rghr[6:0], upd_taken};
      end
    end
    checks++;
    if (correct_late < 990) begin failures++; $display("pattern not learned: %0d/1000", correct_late); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
