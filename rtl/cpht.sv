// cpht: critical path history table.
//
// A direct-mapped table of ENTRIES saturating up-down counters of CTR_W bits.
// An instruction whose counter is at or above THRESH is predicted critical.
// Each update adds INC (critical) or subtracts DEC (not critical), saturating
// at both ends. NRD read ports are combinational. NUPD update ports are
// applied together at the clock edge; several updates of the same entry in
// one cycle are applied in port order, so none is lost. Reset clears every
// counter (all instructions start non-critical).
// Table size, counter width, increment, decrement and threshold follow the
// described predictor; port counts, reset and same-cycle ordering are this
// design's own.
module cpht
  import clp_pkg::*;
#(
  parameter int unsigned ENTRIES = CPHT_ENTRIES,
  parameter int unsigned CW      = CTR_W,
  parameter int unsigned INC     = CTR_INC,
  parameter int unsigned DEC     = CTR_DEC,
  parameter int unsigned THRESH  = CTR_THRESH,
  parameter int unsigned NRD     = 4,
  parameter int unsigned NUPD    = 6,
  localparam int unsigned IW     = $clog2(ENTRIES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [IW-1:0]        rd_idx  [NRD],
  output logic [CW-1:0]        rd_ctr  [NRD],
  output logic                 rd_crit [NRD],
  input  logic                 upd_valid [NUPD],
  input  logic [IW-1:0]        upd_idx   [NUPD],
  input  logic                 upd_crit  [NUPD]
);

  localparam int unsigned CMAX = (1 << CW) - 1;

  logic [CW-1:0] mem [ENTRIES];
  logic [CW-1:0] new_val [NUPD];

  function automatic logic [CW-1:0] step(logic [CW-1:0] v, logic crit);
    if (crit) return (int'(v) + int'(INC) > int'(CMAX)) ? CW'(CMAX) : CW'(int'(v) + int'(INC));
    else      return (int'(v) < int'(DEC)) ? '0 : CW'(int'(v) - int'(DEC));
  endfunction

  always_comb begin
    for (int r = 0; r < NRD; r++) begin
      rd_ctr[r]  = mem[rd_idx[r]];
      rd_crit[r] = int'(mem[rd_idx[r]]) >= int'(THRESH);
    end
  end

  // Value each update leaves behind, counting earlier same-entry updates.
  always_comb begin
    for (int u = 0; u < NUPD; u++) begin
      logic [CW-1:0] v;
      v = mem[upd_idx[u]];
      for (int w = 0; w < u; w++)
        if (upd_valid[w] && upd_idx[w] == upd_idx[u]) v = step(v, upd_crit[w]);
      new_val[u] = step(v, upd_crit[u]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) mem[e] <= '0;
    end else begin
      for (int u = 0; u < NUPD; u++)
        if (upd_valid[u]) mem[upd_idx[u]] <= new_val[u];
    end
  end

endmodule
