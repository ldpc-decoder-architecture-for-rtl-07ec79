// ldpc_post_router: chooses, for each variable node group, which check node
// result it receives.
//
// With one layer per sub-iteration every VNG takes the result of the whole
// 16-input tree. With two non-overlapping layers a VNG of the first layer
// takes the top half tree and a VNG of the second layer the bottom half tree
// (post_bot set). VNGs without an edge in the sub-iteration receive an
// unconnected result. One instance serves one check node. Combinational: a
// two-input multiplexer per VNG plus the single/dual selection.
module ldpc_post_router
  import ldpc_pkg::*;
(
  input  cnres_t           res_top,
  input  cnres_t           res_bot,
  input  cnres_t           res_all,
  input  logic             dual,
  input  logic [NVNG-1:0]  active,
  input  logic [NVNG-1:0]  post_bot,
  output cnres_t           vng_out [NVNG]
);

  always_comb begin
    for (int g = 0; g < NVNG; g++) begin
      if (!active[g])      vng_out[g] = cnres_none();
      else if (!dual)      vng_out[g] = res_all;
      else if (post_bot[g]) vng_out[g] = res_bot;
      else                 vng_out[g] = res_top;
    end
  end

endmodule
