// ldpc_pre_router: chooses which variable node group feeds each check node
// input slot.
//
// With a single layer per sub-iteration the router does not move anything:
// slot i carries VNG i, connected when that VNG has an edge in the layer.
// With two non-overlapping layers the first layer's VNGs must reach slots
// 0-7 (top half tree) and the second layer's slots 8-15 (bottom half tree);
// each slot then takes the VNG named by slot_sel and is connected when
// slot_valid is set. One router instance serves one check node; all 42
// check nodes use the same selection in a given sub-iteration.
//
// The design only says the routers are a small number of multiplexers; here
// every slot is a full NVNG-to-1 multiplexer so any code description can be
// routed. Combinational.
module ldpc_pre_router
  import ldpc_pkg::*;
(
  input  v2c_t             vng_in [NVNG],   // one message from each VNG
  input  logic             dual,
  input  logic [NVNG-1:0]  active,
  input  logic [CNW-1:0]   slot_valid,
  input  logic [CNW-1:0][VSELW-1:0] slot_sel,
  output v2c_t             cn_in  [CNW]
);

  always_comb begin
    for (int i = 0; i < CNW; i++) begin
      if (dual) begin
        cn_in[i]       = vng_in[slot_sel[i]];
        cn_in[i].valid = vng_in[slot_sel[i]].valid & slot_valid[i];
      end else begin
        cn_in[i]       = vng_in[i];
        cn_in[i].valid = vng_in[i].valid & active[i];
      end
    end
  end

endmodule
