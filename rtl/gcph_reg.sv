// gcph_reg: global critical path history (GCPH) shift register.
//
// Holds the criticality of the LEN most recently issued instructions, newest
// in bit 0. Each cycle in_cnt (0..NIN) new bits are shifted in from the
// bottom, in_bits[0] first (the oldest of the group) and in_bits[in_cnt-1]
// last, so bit 0 ends up holding the youngest; the oldest bits fall off the
// top. The 8-instruction length follows the described predictor; the
// multi-bit-per-cycle shift is this design's own, for a core that issues
// several instructions per cycle. Reset clears the history.
module gcph_reg #(
  parameter int unsigned LEN = 8,
  parameter int unsigned NIN = 6,
  localparam int unsigned CW = $clog2(NIN + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [CW-1:0]  in_cnt,
  input  logic [NIN-1:0] in_bits,
  output logic [LEN-1:0] hist
);

  logic [LEN-1:0] hist_q, hist_d;

  always_comb begin
    hist_d = hist_q;
    for (int i = 0; i < NIN; i++)
      if (i < int'(in_cnt)) hist_d = {hist_d[LEN-2:0], in_bits[i]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hist_q <= '0;
    else        hist_q <= hist_d;
  end

  assign hist = hist_q;

endmodule
