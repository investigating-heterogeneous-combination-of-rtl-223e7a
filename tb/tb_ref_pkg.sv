// tb_ref_pkg: reference models shared by the testbenches.
//
// ref_alu computes each integer operation from its definition, independently
// of the design's ALU function; ref_ctr_step is the saturating +8/-1
// counter rule of the critical path history table.
package tb_ref_pkg;
  import clp_pkg::*;

  function automatic word_t ref_alu(alu_op_e op, word_t a, word_t b);
    longint sa, sb;
    word_t  r;
    sa = longint'($signed(a));
    sb = longint'($signed(b));
    case (op)
      OP_ADD:  r = word_t'(longint'(a) + longint'(b));
      OP_SUB:  r = word_t'(longint'(a) - longint'(b));
      OP_AND:  for (int i = 0; i < 32; i++) r[i] = a[i] & b[i];
      OP_OR:   for (int i = 0; i < 32; i++) r[i] = a[i] | b[i];
      OP_XOR:  for (int i = 0; i < 32; i++) r[i] = a[i] != b[i];
      OP_NOR:  for (int i = 0; i < 32; i++) r[i] = !(a[i] | b[i]);
      OP_SLL:  begin r = '0; for (int i = 0; i < 32; i++) if (i >= int'(b[4:0])) r[i] = a[i - int'(b[4:0])]; end
      OP_SRL:  begin r = '0; for (int i = 0; i < 32; i++) if (i + int'(b[4:0]) < 32) r[i] = a[i + int'(b[4:0])]; end
      OP_SRA:  begin for (int i = 0; i < 32; i++) r[i] = (i + int'(b[4:0]) < 32) ? a[i + int'(b[4:0])] : a[31]; end
      OP_SLT:  r = (sa < sb) ? 32'd1 : 32'd0;
      OP_SLTU: r = (longint'(a) < longint'(b)) ? 32'd1 : 32'd0;
      OP_LUI:  r = b * 32'h10000;
      default: r = '0;
    endcase
    return r;
  endfunction

  function automatic int ref_ctr_step(int v, bit crit);
    if (crit) return (v + 8 > 63) ? 63 : v + 8;
    return (v == 0) ? 0 : v - 1;
  endfunction

  function automatic alu_op_e rand_op();
    return alu_op_e'($urandom_range(0, 11));
  endfunction
endpackage
