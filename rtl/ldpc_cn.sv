// ldpc_cn: granular 16-input check node (magnitude, sign and syndrome trees).
//
// Because the variable nodes do the marginalization, the check node only
// finds the smallest and second smallest input magnitude and the XOR of the
// input signs. A first level sorts input pairs into ascending order; each
// following compare-select (CS) level keeps the two smallest of two sorted
// pairs. The tree is 8 sorters, 4 CS, 2 CS and 1 CS. The outputs of the two
// CS of the third level are the results of the top half (inputs 0-7) and the
// bottom half (inputs 8-15); the last CS gives the result of all 16 inputs.
// A check node processing two non-overlapping layers uses the two half
// results; one processing a single layer uses the full result. The sign XOR
// tree and the hard-decision XOR tree (the syndrome of the current hard
// decisions) are split the same way.
//
// An input whose valid bit is low is not connected in this sub-iteration: it
// counts as maximum magnitude with positive sign and hard decision 0, so it
// changes no result. Purely combinational; the decoder registers the
// outputs. The tree shape follows the design; the treatment of unconnected
// inputs and the syndrome tree are this implementation's own.
module ldpc_cn
  import ldpc_pkg::*;
(
  input  v2c_t   in [CNW],
  output cnres_t res_top,
  output cnres_t res_bot,
  output cnres_t res_all
);

  typedef struct packed {
    logic [MAGW-1:0] m1;
    logic [MAGW-1:0] m2;
  } pair_t;

  function automatic pair_t cs(pair_t a, pair_t b);
    pair_t r;
    if (a.m1 <= b.m1) begin
      r.m1 = a.m1;
      r.m2 = (a.m2 <= b.m1) ? a.m2 : b.m1;
    end else begin
      r.m1 = b.m1;
      r.m2 = (b.m2 <= a.m1) ? b.m2 : a.m1;
    end
    return r;
  endfunction

  logic [MAGW-1:0] mag [CNW];
  pair_t l1 [8];
  pair_t l2 [4];
  pair_t l3 [2];
  pair_t l4;
  logic [1:0] sgn, syn, vld;

  always_comb begin
    for (int i = 0; i < CNW; i++) mag[i] = in[i].valid ? in[i].mag : MAG_MAX;
    for (int i = 0; i < 8; i++) begin
      if (mag[2*i] <= mag[2*i+1]) l1[i] = '{m1: mag[2*i],   m2: mag[2*i+1]};
      else                        l1[i] = '{m1: mag[2*i+1], m2: mag[2*i]};
    end
    for (int i = 0; i < 4; i++) l2[i] = cs(l1[2*i], l1[2*i+1]);
    for (int i = 0; i < 2; i++) l3[i] = cs(l2[2*i], l2[2*i+1]);
    l4 = cs(l3[0], l3[1]);
    for (int h = 0; h < 2; h++) begin
      sgn[h] = 1'b0;
      syn[h] = 1'b0;
      vld[h] = 1'b0;
      for (int i = 8*h; i < 8*h + 8; i++) begin
        sgn[h] ^= in[i].valid & in[i].sign;
        syn[h] ^= in[i].valid & in[i].hd;
        vld[h] |= in[i].valid;
      end
    end
    res_top = '{valid: vld[0], synd: syn[0], sign: sgn[0], min1: l3[0].m1, min2: l3[0].m2};
    res_bot = '{valid: vld[1], synd: syn[1], sign: sgn[1], min1: l3[1].m1, min2: l3[1].m2};
    res_all = '{valid: |vld, synd: ^syn, sign: ^sgn, min1: l4.m1, min2: l4.m2};
  end

endmodule
