// rename_unit: register alias table and architectural register file.
//
// At dispatch each source register is resolved to either a value or the tag
// of the in-flight instruction that will produce it. Tags are allotted in
// program order from a wrapping counter and also serve as the age used by
// the issue queue. A source is resolved, in order of priority, to: an older
// instruction of the same dispatch group that writes it; the producer named
// by the alias table (or its value, if that producer's result is on a
// result bus in this very cycle); the register file. Register 0 reads as
// zero and is never written. An immediate replaces the second source.
//
// Writeback: a result whose tag is still the latest producer of a register
// writes the register file and clears the alias entry; a result overtaken by
// a younger writer of the same register only reaches its consumers through
// the result bus. A group is accepted at the clock edge when fire is high;
// its alias-table updates take precedence over same-cycle writebacks.
// This is a plain tag-based renamer of this design's own; the described
// processor is out-of-order but its renaming is not specified.
module rename_unit
  import clp_pkg::*;
#(
  parameter int unsigned DW   = 4,
  parameter int unsigned NALU = 6
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid [DW],
  input  dinstr_t  in_instr [DW],
  input  logic     fire,
  output alu_op_e  out_op   [DW],
  output opnd_t    out_s1   [DW],
  output opnd_t    out_s2   [DW],
  output tag_t     out_tag  [DW],
  input  result_t  result   [NALU],
  input  areg_t    dbg_raddr,
  output word_t    dbg_rdata
);

  word_t arf     [NAREG];
  logic  rat_v   [NAREG];
  tag_t  rat_tag [NAREG];
  tag_t  seq_q;
  tag_t  nvalid;

  function automatic opnd_t lookup(areg_t r, int k, tag_t tags [DW]);
    opnd_t o;
    logic  found;
    o     = '0;
    found = 1'b0;
    if (r == '0) begin
      o.rdy = 1'b1;
      return o;
    end
    for (int j = 0; j < DW; j++)
      if (j < k && in_valid[j] && in_instr[j].rd == r) begin
        o.rdy = 1'b0;
        o.tag = tags[j];
        found = 1'b1;
      end
    if (found) return o;
    if (rat_v[r]) begin
      o.rdy = 1'b0;
      o.tag = rat_tag[r];
      for (int u = 0; u < NALU; u++)
        if (result[u].valid && result[u].tag == rat_tag[r]) begin
          o.rdy = 1'b1;
          o.val = result[u].value;
        end
      return o;
    end
    o.rdy = 1'b1;
    o.val = arf[r];
    return o;
  endfunction

  always_comb begin
    tag_t t;
    t      = seq_q;
    nvalid = '0;
    for (int k = 0; k < DW; k++) begin
      out_tag[k] = t;
      if (in_valid[k]) begin
        t      = t + 1'b1;
        nvalid = nvalid + 1'b1;
      end
    end
    for (int k = 0; k < DW; k++) begin
      out_op[k] = in_instr[k].op;
      out_s1[k] = lookup(in_instr[k].rs1, k, out_tag);
      if (in_instr[k].use_imm) begin
        out_s2[k]     = '0;
        out_s2[k].rdy = 1'b1;
        out_s2[k].val = in_instr[k].imm;
      end else begin
        out_s2[k] = lookup(in_instr[k].rs2, k, out_tag);
      end
    end
  end

  assign dbg_rdata = (dbg_raddr == '0) ? '0 : arf[dbg_raddr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_q <= '0;
      for (int r = 0; r < NAREG; r++) begin
        arf[r]     <= '0;
        rat_v[r]   <= 1'b0;
        rat_tag[r] <= '0;
      end
    end else begin
      for (int r = 1; r < NAREG; r++)
        for (int u = 0; u < NALU; u++)
          if (rat_v[r] && result[u].valid && result[u].tag == rat_tag[r]) begin
            arf[r]   <= result[u].value;
            rat_v[r] <= 1'b0;
          end
      if (fire) begin
        seq_q <= seq_q + nvalid;
        for (int k = 0; k < DW; k++)
          if (in_valid[k] && in_instr[k].rd != '0) begin
            rat_v[in_instr[k].rd]   <= 1'b1;
            rat_tag[in_instr[k].rd] <= out_tag[k];
          end
      end
    end
  end

endmodule
