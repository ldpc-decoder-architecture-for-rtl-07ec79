// ldpc_decoder: fully pipelined, rate-flexible LDPC decoder for the IEEE
// 802.11ad codes (672-bit blocks, 42x42 submatrices, 16 base columns).
//
// All 672 variable nodes exist in hardware, grouped into 16 variable node
// groups (VNGs) of 42; the 42 check nodes are time-multiplexed over the
// layers of the base matrix, one sub-iteration per cycle, and are granular:
// a check node handles one layer of up to 16 edges or two non-overlapping
// layers of up to 8 edges each, so the rate 1/2 and 5/8 codes need only four
// sub-iterations per iteration. Two independent frames are decoded at once,
// each occupying the pipeline every other window, which hides the
// accumulate-to-send dependency of the flooding schedule.
//
// Five pipeline stages, each ending in a register:
//   1  VNs form marginalized V2C messages; front barrel shifters (one per
//      VNG) apply the submatrix shifts
//   2  pre-routers place VNG messages onto check node input slots
//   3  check nodes find first/second minimum, sign product and syndrome
//   4  post-routers pick the top/bottom/full result per VNG, back barrel
//      shifters undo the shift, VNs marginalize the C2V messages
//   5  VNs accumulate
//
// Interface: cfg describes the code (see ldpc_pkg::codecfg_t) and must stay
// constant while frames are in flight. A frame is offered on in_prior with
// in_valid and taken in the cycle in_ready is high; priors are 5-bit two's
// complement LLRs in [-15, 15], positive meaning bit 0, indexed
// [VNG][position], codeword bit = 42*VNG + position. A finished frame shows
// for one cycle with out_valid: out_hd are its hard decisions, out_iter the
// number of iterations behind them, out_ok whether they satisfy every
// parity check (otherwise max_iter stopped the decoding). Frames may finish
// out of order; out_frame names the slot (0/1) a frame was loaded into,
// which in_ready's cycle reveals as load_slot.
//
// The stage split, grouping and dataflow follow the design; the code
// description format, the handshake and syndrome-based early termination
// are this implementation's choices.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned BETA = 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  codecfg_t                           cfg,
  input  logic [ITW-1:0]                     max_iter,
  input  logic                               in_valid,
  output logic                               in_ready,
  output logic                               load_slot,
  input  logic [NVNG-1:0][Z-1:0][QW-1:0]     in_prior,
  output logic                               out_valid,
  output logic                               out_frame,
  output logic [ITW-1:0]                     out_iter,
  output logic                               out_ok,
  output logic [NVNG-1:0][Z-1:0]             out_hd
);

  localparam int unsigned VW = $bits(v2c_t);
  localparam int unsigned RW = $bits(cnres_t);

  logic  nsub4;
  assign nsub4 = (cfg.nsub == 3'd4);

  // ---------------- controller ----------------
  pctl_t prep, p1, p2, p3, p4;
  logic  load, load_frame, prep_latch_hd, bubble;
  logic  cn_synd;

  ldpc_ctrl u_ctrl (
    .clk, .rst_n, .nsub(cfg.nsub), .max_iter,
    .in_valid, .in_ready, .load, .load_frame,
    .prep, .prep_latch_hd, .bubble,
    .cn_ctl(p3), .cn_synd,
    .out_valid, .out_frame, .out_iter, .out_ok
  );
  assign load_slot = load_frame;

  subcfg_t c0, c1, c3;
  assign c0 = cfg.sub[prep.sub];
  assign c1 = cfg.sub[p1.sub];
  assign c3 = cfg.sub[p3.sub];

  // ---------------- per-VNG signals ----------------
  logic [VW-1:0] v2c_vn   [NVNG][Z];   // stage 1, VN order
  logic [VW-1:0] v2c_sh   [NVNG][Z];   // stage 1, CN order
  v2c_t          s1_q     [NVNG][Z];
  v2c_t          s2_q     [Z][CNW];
  cnres_t        r3_top   [Z];
  cnres_t        r3_bot   [Z];
  cnres_t        r3_all   [Z];
  logic [RW-1:0] c2v_cn   [NVNG][Z];   // stage 4, CN order
  logic [RW-1:0] c2v_vn   [NVNG][Z];   // stage 4, VN order
  logic [1:0]    hd_vn    [NVNG][Z];

  for (genvar g = 0; g < NVNG; g++) begin : g_vng
    for (genvar z = 0; z < Z; z++) begin : g_vn
      logic            sgn, hdb;
      logic [MAGW-1:0] mag;
      cnres_t          cr;
      v2c_t            vm;
      assign cr = cnres_t'(c2v_vn[g][z]);
      ldpc_vn #(.BETA(BETA)) u_vn (
        .clk, .rst_n, .nsub4,
        .load, .load_frame, .prior(in_prior[g][z]),
        .prep_frame(prep.frame), .prep_first(prep.first),
        .prep_latch_hd(prep_latch_hd),
        .v2c_sign(sgn), .v2c_mag(mag), .v2c_hd(hdb),
        .mg_active(p3.valid && c3.active[g]),
        .cn_min1(cr.min1), .cn_min2(cr.min2), .cn_sign(cr.sign),
        .acc_en(p4.valid), .acc_frame(p4.frame), .acc_first(p4.sub == '0),
        .hd(hd_vn[g][z])
      );
      always_comb begin
        vm = '{valid: prep.valid && c0.active[g], hd: hdb, sign: sgn, mag: mag};
        v2c_vn[g][z] = VW'(vm);
      end
      assign out_hd[g][z] = hd_vn[g][z][out_frame];
    end

    // front shifter: VN (r + shift) mod Z -> CN r
    ldpc_barrel_shifter #(.N(Z), .W(VW), .INVERSE(1'b0)) u_front (
      .din(v2c_vn[g]), .shift(c0.shift[g]), .dout(v2c_sh[g])
    );
    // back shifter: CN (c - shift) mod Z -> VN c
    ldpc_barrel_shifter #(.N(Z), .W(RW), .INVERSE(1'b1)) u_back (
      .din(c2v_cn[g]), .shift(c3.shift[g]), .dout(c2v_vn[g])
    );
  end

  // ---------------- per-CN signals ----------------
  logic [Z-1:0] synd_z;
  for (genvar r = 0; r < Z; r++) begin : g_cn
    v2c_t   vin [NVNG];
    v2c_t   cin [CNW];
    cnres_t rt, rb, ra;
    cnres_t po [NVNG];
    for (genvar g = 0; g < NVNG; g++) begin : g_w
      assign vin[g]       = s1_q[g][r];
      assign c2v_cn[g][r] = RW'(po[g]);
    end
    ldpc_pre_router u_pre (
      .vng_in(vin), .dual(c1.dual), .active(c1.active),
      .slot_valid(c1.slot_valid), .slot_sel(c1.slot_sel), .cn_in(cin)
    );
    ldpc_cn u_cn (.in(s2_q[r]), .res_top(rt), .res_bot(rb), .res_all(ra));
    ldpc_post_router u_post (
      .res_top(r3_top[r]), .res_bot(r3_bot[r]), .res_all(r3_all[r]),
      .dual(c3.dual), .active(c3.active), .post_bot(c3.post_bot), .vng_out(po)
    );
    assign synd_z[r] = c3.dual ? (r3_top[r].synd | r3_bot[r].synd) : r3_all[r].synd;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < CNW; i++) s2_q[r][i] <= '0;
        r3_top[r] <= cnres_none();
        r3_bot[r] <= cnres_none();
        r3_all[r] <= cnres_none();
      end else begin
        s2_q[r]   <= cin;
        r3_top[r] <= rt;
        r3_bot[r] <= rb;
        r3_all[r] <= ra;
      end
    end
  end
  assign cn_synd = |synd_z;

  // ---------------- stage registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1 <= '0;
      p2 <= '0;
      p3 <= '0;
      p4 <= '0;
      for (int g = 0; g < NVNG; g++)
        for (int z = 0; z < Z; z++) s1_q[g][z] <= '0;
    end else begin
      p1 <= prep;
      p2 <= p1;
      p3 <= p2;
      p4 <= p3;
      for (int g = 0; g < NVNG; g++)
        for (int z = 0; z < Z; z++) s1_q[g][z] <= v2c_t'(v2c_sh[g][z]);
    end
  end

endmodule
