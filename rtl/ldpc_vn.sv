// ldpc_vn: variable node holding two frames.
//
// The VN keeps, for each of two independent frames, a prior register and an
// accumulator, and performs both marginalizations of offset min-sum so that
// the check nodes only have to find two minima and a sign product.
//
//  Stage 1 (prepare V2C): V2C = accumulator(frame) - C2V stored for this
//    sub-iteration one iteration ago (zero on a frame's first pass), saturated
//    to +/-MAG_MAX and converted to sign-magnitude. The hard decision, the
//    accumulator's sign, rides along for the syndrome check and is latched per
//    frame at sub-iteration 0.
//  Stage 4 (marginalize C2V): the returned first minimum is compared with the
//    magnitude this VN sent three cycles earlier; on a match the second
//    minimum is used. The sign is the returned sign product XOR the sent sign.
//    The offset BETA is subtracted (floored at zero) and the result converted
//    to two's complement and registered.
//  Stage 5 (accumulate): the first C2V of an iteration is added to the prior,
//    later ones to the accumulator. Every C2V also enters a free-running
//    four-deep shift register; the V2C of the same sub-iteration in the next
//    iteration reads tap 3 (four sub-iterations) or tap 2 (three
//    sub-iterations, where the schedule has one idle cycle per period).
//
// A load writes a frame's prior and accumulator and takes priority over an
// accumulation of the same frame in the same cycle. Two's complement adders,
// the accumulator width ACCW, saturation and BETA=1 are implementation
// choices; the two-frame registers, the two shift registers, the min
// selection by magnitude compare and the sign XOR follow the design.
module ldpc_vn
  import ldpc_pkg::*;
#(
  parameter int unsigned BETA = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   nsub4,        // 1: four sub-iterations, 0: three
  // load a new frame
  input  logic                   load,
  input  logic                   load_frame,
  input  logic signed [QW-1:0]   prior,        // two's complement channel LLR
  // stage 1
  input  logic                   prep_frame,
  input  logic                   prep_first,
  input  logic                   prep_latch_hd,
  output logic                   v2c_sign,
  output logic [MAGW-1:0]        v2c_mag,
  output logic                   v2c_hd,
  // stage 4
  input  logic                   mg_active,    // edge present and pipeline valid
  input  logic [MAGW-1:0]        cn_min1,
  input  logic [MAGW-1:0]        cn_min2,
  input  logic                   cn_sign,
  // stage 5
  input  logic                   acc_en,
  input  logic                   acc_frame,
  input  logic                   acc_first,    // sub-iteration 0: start from prior
  // hard decisions latched per frame
  output logic [1:0]             hd
);

  localparam int signed VMAX = int'(MAG_MAX);
  localparam int signed AMAX = (1 <<< (ACCW - 1)) - 1;

  logic signed [ACCW-1:0] prior_q [2];
  logic signed [ACCW-1:0] acc_q   [2];
  logic signed [QW-1:0]   c2v_sr  [4];
  logic signed [QW-1:0]   c2v_q;
  logic                   sent_sign [3];
  logic [MAGW-1:0]        sent_mag  [3];

  // ---------------- stage 1: V2C marginalization ----------------
  logic signed [ACCW:0] diff;
  logic signed [QW-1:0] c2v_prev;
  always_comb begin
    c2v_prev = prep_first ? '0 : (nsub4 ? c2v_sr[3] : c2v_sr[2]);
    diff     = (ACCW+1)'(acc_q[prep_frame]) - (ACCW+1)'(c2v_prev);
    if (diff > (ACCW+1)'(VMAX))       diff = (ACCW+1)'(VMAX);
    else if (diff < -(ACCW+1)'(VMAX)) diff = -(ACCW+1)'(VMAX);
    v2c_sign = diff[ACCW];
    v2c_mag  = MAGW'(v2c_sign ? -diff : diff);
    v2c_hd   = acc_q[prep_frame][ACCW-1];
  end

  // ---------------- stage 4: C2V marginalization ----------------
  logic [MAGW-1:0]      sel_mag, cor_mag;
  logic                 c2v_sign;
  logic signed [QW-1:0] c2v_d;
  always_comb begin
    sel_mag  = (sent_mag[2] == cn_min1) ? cn_min2 : cn_min1;
    cor_mag  = (sel_mag > MAGW'(BETA)) ? sel_mag - MAGW'(BETA) : '0;
    c2v_sign = cn_sign ^ sent_sign[2];
    if (!mg_active)    c2v_d = '0;
    else if (c2v_sign) c2v_d = -$signed({1'b0, cor_mag});
    else               c2v_d = $signed({1'b0, cor_mag});
  end

  // ---------------- stage 5: accumulation ----------------
  logic signed [ACCW:0] sum;
  always_comb begin
    sum = (ACCW+1)'(acc_first ? prior_q[acc_frame] : acc_q[acc_frame]) + (ACCW+1)'(c2v_q);
    if (sum > (ACCW+1)'(AMAX))       sum = (ACCW+1)'(AMAX);
    else if (sum < -(ACCW+1)'(AMAX)) sum = -(ACCW+1)'(AMAX);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < 2; f++) begin
        prior_q[f] <= '0;
        acc_q[f]   <= '0;
        hd[f]      <= 1'b0;
      end
      for (int i = 0; i < 4; i++) c2v_sr[i] <= '0;
      for (int i = 0; i < 3; i++) begin
        sent_sign[i] <= 1'b0;
        sent_mag[i]  <= '0;
      end
      c2v_q <= '0;
    end else begin
      // stored V2C waits for its C2V (three cycles)
      sent_sign[0] <= v2c_sign;
      sent_mag[0]  <= v2c_mag;
      for (int i = 1; i < 3; i++) begin
        sent_sign[i] <= sent_sign[i-1];
        sent_mag[i]  <= sent_mag[i-1];
      end
      c2v_q <= c2v_d;
      // stored C2V waits for the next iteration
      c2v_sr[0] <= c2v_q;
      for (int i = 1; i < 4; i++) c2v_sr[i] <= c2v_sr[i-1];
      if (prep_latch_hd) hd[prep_frame] <= acc_q[prep_frame][ACCW-1];
      if (acc_en && !(load && load_frame == acc_frame))
        acc_q[acc_frame] <= ACCW'(sum);
      if (load) begin
        prior_q[load_frame] <= ACCW'(prior);
        acc_q[load_frame]   <= ACCW'(prior);
      end
    end
  end

endmodule
