// tb_rename_unit: dispatches random groups of four instructions and
// completes in-flight ones in random order on six result buses. A reference
// model of the latest writer of each register and of the register file
// gives, for every source, the expected value or producer tag (including
// same-group dependences and a producer whose result is on a bus in the
// dispatch cycle). The register file is read back through the inspection
// port every cycle and in full at the end. Counts the three ways a source
// is resolved and fails if one never occurs.
module tb_rename_unit;
  import clp_pkg::*;

  localparam int DW = 4, NA = 6, NI = 20000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic    in_valid [DW];
  dinstr_t in_instr [DW];
  logic    fire;
  alu_op_e out_op  [DW];
  opnd_t   out_s1  [DW];
  opnd_t   out_s2  [DW];
  tag_t    out_tag [DW];
  result_t result  [NA];
  areg_t   dbg_raddr;
  word_t   dbg_rdata;
  int checks = 0, failures = 0;

  rename_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t rf [32];
  int    last_w [32];     // latest in-flight writer id or -1
  word_t val [NI];
  int    rd_of [NI];
  bit    flying [NI];

  task automatic check_src(opnd_t got, int r, int k, int base, int rds [DW], ref int nf, ref int ng, ref int nb);
    opnd_t e;
    int p;
    e = '0;
    p = -1;
    if (r == 0) e.rdy = 1;
    else begin
      for (int j = 0; j < k; j++) if (rds[j] == r) p = base + j;
      if (p >= 0) begin e.rdy = 0; e.tag = tag_t'(p); ng++; end
      else if (last_w[r] >= 0) begin
        e.rdy = 0; e.tag = tag_t'(last_w[r]);
        for (int u = 0; u < NA; u++)
          if (result[u].valid && result[u].tag == tag_t'(last_w[r])) begin e.rdy = 1; e.val = result[u].value; nb++; end
        if (!e.rdy) ng++;
      end else begin e.rdy = 1; e.val = rf[r]; nf++; end
    end
    checks++;
    if (e.rdy != got.rdy || (e.rdy && e.val != got.val) || (!e.rdy && e.tag != got.tag)) begin
      failures++; $display("src r%0d of slot %0d: got %p exp %p", r, k, got, e);
    end
  endtask

  initial begin
    int next_id = 0, n_reg = 0, n_grp = 0, n_byp = 0, nfly = 0;
    for (int r = 0; r < 32; r++) begin rf[r] = 0; last_w[r] = -1; end
    for (int i = 0; i < NI; i++) flying[i] = 0;
    for (int k = 0; k < DW; k++) begin in_valid[k] = 0; in_instr[k] = '0; end
    for (int u = 0; u < NA; u++) result[u] = '0;
    fire = 0; dbg_raddr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000 || nfly > 0; c++) begin
      int rds [DW];
      int nval;
      @(negedge clk);
      // complete some in-flight instructions
      for (int u = 0; u < NA; u++) begin
        result[u] = '0;
        for (int i = 0; i < next_id; i++)
          if (flying[i] && $urandom_range(0, 5) == 0) begin
            result[u] = '{valid: 1'b1, tag: tag_t'(i), value: val[i]};
            flying[i] = 0;
            nfly--;
            break;
          end
      end
      nval = 0;
      fire = (c < 3000) && (nfly < 30);
      for (int k = 0; k < DW; k++) begin
        in_valid[k] = fire && ($urandom_range(0, 3) != 0);
        in_instr[k] = '0;
        in_instr[k].op  = alu_op_e'(k);
        in_instr[k].rs1 = areg_t'($urandom_range(0, 7));
        in_instr[k].rs2 = areg_t'($urandom_range(0, 7));
        in_instr[k].rd  = areg_t'($urandom_range(0, 7));
        in_instr[k].use_imm = ($urandom_range(0, 4) == 0);
        in_instr[k].imm = $urandom;
        rds[k] = -1;
        if (in_valid[k]) begin
          rds[k] = in_instr[k].rd;
          nval++;
        end
      end
      dbg_raddr = areg_t'($urandom_range(0, 7));
      #1;
      checks++;
      if (dbg_rdata != rf[dbg_raddr]) begin failures++; $display("r%0d reads %h exp %h", dbg_raddr, dbg_rdata, rf[dbg_raddr]); end
      begin
        int base, j;
        int grp_rd [DW];
        j = 0;
        for (int k = 0; k < DW; k++) grp_rd[k] = -1;
        base = next_id;
        for (int k = 0; k < DW; k++) if (in_valid[k]) begin
          int gk;
          gk = j;
          checks++;
          if (out_tag[k] != tag_t'(base + gk)) begin failures++; $display("tag wrong"); end
          check_src(out_s1[k], in_instr[k].rs1, gk, base, grp_rd, n_reg, n_grp, n_byp);
          if (in_instr[k].use_imm) begin
            checks++;
            if (!out_s2[k].rdy || out_s2[k].val != in_instr[k].imm) begin failures++; $display("imm wrong"); end
          end else check_src(out_s2[k], in_instr[k].rs2, gk, base, grp_rd, n_reg, n_grp, n_byp);
          grp_rd[gk] = in_instr[k].rd;
          j++;
        end
      end
      @(posedge clk);
      // reference writeback, then dispatch
      for (int u = 0; u < NA; u++)
        if (result[u].valid) begin
          for (int r = 1; r < 32; r++)
            if (last_w[r] >= 0 && tag_t'(last_w[r]) == result[u].tag) begin rf[r] = result[u].value; last_w[r] = -1; end
        end
      if (fire)
        for (int k = 0; k < DW; k++) if (in_valid[k]) begin
          val[next_id]    = $urandom;
          rd_of[next_id]  = in_instr[k].rd;
          flying[next_id] = 1;
          nfly++;
          if (in_instr[k].rd != 0) last_w[in_instr[k].rd] = next_id;
          next_id++;
        end
    end
    @(negedge clk);
    for (int u = 0; u < NA; u++) result[u] = '0;
    for (int k = 0; k < DW; k++) in_valid[k] = 0;
    for (int r = 0; r < 8; r++) begin
      dbg_raddr = areg_t'(r);
      #1;
      checks++;
      if (dbg_rdata != rf[r]) begin failures++; $display("final r%0d %h exp %h", r, dbg_rdata, rf[r]); end
    end
    checks++;
    if (n_reg == 0 || n_grp == 0 || n_byp == 0) begin failures++; $display("a source case never occurred"); end
    $display("from regfile=%0d from tag=%0d from bus=%0d", n_reg, n_grp, n_byp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
