// tb_ldpc_decoder: end-to-end test of the decoder at its default size (672
// variable nodes, 42 check nodes), run for three codes in turn:
//   A  the IEEE 802.11ad rate-1/2 base matrix (8 layers), decoded as four
//      pairs of non-overlapping layers: dual mode in every sub-iteration
//   B  its first six layers as two layer pairs plus two single layers:
//      dual and single mode within one iteration
//   C  a three-layer code of weight up to 16 in single mode: three
//      sub-iterations, period 7 with a pipeline bubble
// Random codewords (found by solving the parity checks over GF(2)) are sent
// over a Gaussian channel quantized to 5-bit LLRs; some frames are noise
// only (they run to max_iter) and some noiseless (they stop at once).
// With the rate-1/2 code, frames that end with all checks satisfied must
// equal the codeword sent; the two derived test codes are weak (code B leaves
// base columns 14 and 15 unchecked), so there only the model comparison holds. An independent reference decoder, a
// straightforward flooding offset min-sum over the base matrix with the
// same quantization and saturation, predicts each frame's hard decisions,
// iteration count and parity result. The testbench also checks the
// latency of each frame ((iterations + 1) * period cycles) and counts how
// often each mechanism occurred: dual and single sub-iterations, bubbles,
// both frame slots busy, early termination, max-iteration stop,
// out-of-order retirement.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  localparam int N = NVNG * Z;
  localparam int MAXF = 40;
  localparam int MAXIT = 15;

  logic clk = 1'b0, rst_n = 1'b0;
  codecfg_t cfg;
  logic [ITW-1:0] max_iter;
  logic in_valid, in_ready, load_slot;
  logic [NVNG-1:0][Z-1:0][QW-1:0] in_prior;
  logic out_valid, out_frame, out_ok;
  logic [ITW-1:0] out_iter;
  logic [NVNG-1:0][Z-1:0] out_hd;

  ldpc_decoder dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_dual = 0, n_single = 0, n_bubble = 0, n_both = 0;
  int n_early = 0, n_max = 0, n_ooo = 0, n_frames = 0, n_zero_it = 0, n_correct = 0;
  longint cyc = 0;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- codes ----------------
  int B [8][NVNG];        // base matrix shift, -1 = empty
  int nrows;
  int sub_a [NSUB], sub_b [NSUB];  // rows of each sub-iteration (-1: none)
  int nsub;

  function automatic void set_row(int j, int cols[$], int sh[$]);
    for (int g = 0; g < NVNG; g++) B[j][g] = -1;
    foreach (cols[i]) B[j][cols[i]] = sh[i];
  endfunction

  function automatic void code_rate12();
    set_row(0, '{0, 2, 4, 6, 8},            '{40, 38, 13, 5, 18});
    set_row(1, '{0, 2, 4, 7, 8, 9},         '{34, 35, 27, 30, 2, 1});
    set_row(2, '{1, 3, 5, 7, 9, 10},        '{36, 31, 7, 34, 10, 41});
    set_row(3, '{1, 3, 5, 6, 10, 11},       '{27, 18, 12, 20, 15, 6});
    set_row(4, '{0, 2, 4, 6, 8, 11, 12},    '{35, 41, 40, 39, 28, 3, 28});
    set_row(5, '{0, 2, 5, 7, 9, 11, 13},    '{29, 0, 22, 4, 28, 27, 23});
    set_row(6, '{1, 3, 5, 7, 10, 13, 14},   '{31, 23, 21, 20, 12, 0, 13});
    set_row(7, '{1, 3, 4, 6, 8, 12, 14, 15}, '{22, 34, 31, 14, 4, 13, 22, 24});
  endfunction

  function automatic void select_code(int c);
    code_rate12();
    case (c)
      0: begin
        nrows = 8; nsub = 4;
        sub_a = '{0, 1, 4, 5}; sub_b = '{2, 3, 6, 7};
      end
      1: begin
        nrows = 6; nsub = 4;
        sub_a = '{0, 1, 4, 5}; sub_b = '{2, 3, -1, -1};
      end
      default: begin
        nrows = 3; nsub = 3;
        for (int j = 0; j < 3; j++)
          for (int g = 0; g < NVNG; g++)
            B[j][g] = ((5 * j + g) % 11 == 0) ? -1 : (13 * j + 7 * g + 5) % Z;
        sub_a = '{0, 1, 2, -1}; sub_b = '{-1, -1, -1, -1};
      end
    endcase
  endfunction

  // build the hardware code description from the base matrix
  function automatic codecfg_t build_cfg();
    codecfg_t c;
    c = '0;
    c.nsub = 3'(nsub);
    for (int s = 0; s < nsub; s++) begin
      int a, b, nt, nb;
      a = sub_a[s]; b = sub_b[s];
      c.sub[s].dual = (b >= 0);
      nt = 0; nb = 8;
      for (int g = 0; g < NVNG; g++) begin
        if (B[a][g] >= 0) begin
          c.sub[s].active[g] = 1'b1;
          c.sub[s].shift[g]  = SHW'(B[a][g]);
          if (b >= 0) begin
            c.sub[s].slot_valid[nt] = 1'b1;
            c.sub[s].slot_sel[nt]   = VSELW'(g);
            nt++;
          end
        end
        if (b >= 0 && B[b][g] >= 0) begin
          c.sub[s].active[g]   = 1'b1;
          c.sub[s].shift[g]    = SHW'(B[b][g]);
          c.sub[s].post_bot[g] = 1'b1;
          c.sub[s].slot_valid[nb] = 1'b1;
          c.sub[s].slot_sel[nb]   = VSELW'(g);
          nb++;
        end
      end
      if (nt > 8 || nb > 16) $display("code error: layer too heavy for a half tree");
    end
    return c;
  endfunction

  // ---------------- reference decoder ----------------
  int r_hd [MAXF][N];
  int r_iter [MAXF], r_ok [MAXF];
  int pri [MAXF][N];

  function automatic int sat(int v, int m);
    return (v > m) ? m : (v < -m) ? -m : v;
  endfunction

  function automatic void ref_decode(int id);
    int acc [N], nacc [N];
    int c2v [8][NVNG][Z], nc2v [8][NVNG][Z];
    int pass, ok;
    for (int n = 0; n < N; n++) acc[n] = pri[id][n];
    pass = 0;
    forever begin
      ok = 1;
      for (int j = 0; j < nrows; j++)
        for (int r = 0; r < Z; r++) begin
          int p;
          p = 0;
          for (int g = 0; g < NVNG; g++)
            if (B[j][g] >= 0) p ^= int'(acc[g * Z + (r + B[j][g]) % Z] < 0);
          if (p != 0) ok = 0;
        end
      if (ok || pass == MAXIT) break;
      for (int j = 0; j < nrows; j++)
        for (int r = 0; r < Z; r++) begin
          int v [NVNG];
          int m1, m2, sp;
          m1 = 15; m2 = 15; sp = 0;
          for (int g = 0; g < NVNG; g++) if (B[j][g] >= 0) begin
            int n, mg;
            n = g * Z + (r + B[j][g]) % Z;
            v[g] = sat(acc[n] - (pass == 0 ? 0 : c2v[j][g][r]), 15);
            mg = (v[g] < 0) ? -v[g] : v[g];
            sp ^= int'(v[g] < 0);
            if (mg < m1) begin m2 = m1; m1 = mg; end
            else if (mg < m2) m2 = mg;
          end
          for (int g = 0; g < NVNG; g++) if (B[j][g] >= 0) begin
            int mg, m, sg;
            mg = (v[g] < 0) ? -v[g] : v[g];
            m = (mg == m1) ? m2 : m1;
            m = (m > 1) ? m - 1 : 0;
            sg = sp ^ int'(v[g] < 0);
            nc2v[j][g][r] = sg ? -m : m;
          end
        end
      for (int g = 0; g < NVNG; g++)
        for (int z = 0; z < Z; z++) begin
          int n, a;
          n = g * Z + z;
          a = pri[id][n];
          for (int s = 0; s < nsub; s++) begin
            int cv;
            cv = 0;
            if (B[sub_a[s]][g] >= 0) cv = nc2v[sub_a[s]][g][(z + Z - B[sub_a[s]][g]) % Z];
            if (sub_b[s] >= 0 && B[sub_b[s]][g] >= 0)
              cv = nc2v[sub_b[s]][g][(z + Z - B[sub_b[s]][g]) % Z];
            a = sat(a + cv, 127);
          end
          nacc[n] = a;
        end
      acc = nacc;
      c2v = nc2v;
      pass++;
    end
    for (int n = 0; n < N; n++) r_hd[id][n] = int'(acc[n] < 0);
    r_iter[id] = pass;
    r_ok[id] = ok;
  endfunction

  // random codeword of the current code: reduce H to row echelon form over
  // GF(2), draw the free bits at random, solve for the pivot bits
  logic [N-1:0] cw [MAXF];

  function automatic logic [N-1:0] make_codeword();
    logic [N-1:0] h [8 * Z];
    logic [N-1:0] c;
    int pc [8 * Z];
    int m, rank;
    m = nrows * Z;
    for (int j = 0; j < nrows; j++)
      for (int r = 0; r < Z; r++) begin
        h[j * Z + r] = '0;
        for (int g = 0; g < NVNG; g++)
          if (B[j][g] >= 0) h[j * Z + r][g * Z + (r + B[j][g]) % Z] = 1'b1;
      end
    rank = 0;
    for (int col = 0; col < N && rank < m; col++) begin
      int k;
      k = -1;
      for (int i = rank; i < m; i++) if (h[i][col] && k < 0) k = i;
      if (k < 0) continue;
      if (k != rank) begin
        logic [N-1:0] t;
        t = h[k]; h[k] = h[rank]; h[rank] = t;
      end
      for (int i = 0; i < m; i++) if (i != rank && h[i][col]) h[i] ^= h[rank];
      pc[rank] = col;
      rank++;
    end
    for (int n = 0; n < N; n++) c[n] = 1'($urandom);
    for (int i = 0; i < rank; i++) c[pc[i]] = 1'b0;
    for (int i = 0; i < rank; i++) c[pc[i]] = ^(h[i] & c);
    return c;
  endfunction

  function automatic int syndrome_ok(logic [N-1:0] c);
    for (int j = 0; j < nrows; j++)
      for (int r = 0; r < Z; r++) begin
        logic p;
        p = 1'b0;
        for (int g = 0; g < NVNG; g++)
          if (B[j][g] >= 0) p ^= c[g * Z + (r + B[j][g]) % Z];
        if (p) return 0;
      end
    return 1;
  endfunction

  function automatic void make_frame(int id, int kind, real mu);
    cw[id] = make_codeword();
    for (int n = 0; n < N; n++) begin
      real x;
      x = 0.0;
      for (int k = 0; k < 12; k++) x += real'($urandom_range(0, 1000000)) / 1.0e6;
      x -= 6.0;
      case (kind)
        0: pri[id][n] = sat($rtoi(mu + $sqrt(2.0 * mu) * x + 100.5) - 100, 15);  // noisy channel
        1: pri[id][n] = sat($rtoi(6.0 * x + 100.5) - 100, 15);         // noise only
        default: pri[id][n] = 8;                                        // clean
      endcase
      if (cw[id][n]) pri[id][n] = -pri[id][n];
    end
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d at cycle %0d", what, got, exp, cyc);
    end
  endtask

  // ---------------- monitors ----------------
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.prep.valid &&  cfg.sub[dut.prep.sub].dual) n_dual++;
    if (dut.prep.valid && !cfg.sub[dut.prep.sub].dual) n_single++;
    if (dut.bubble) n_bubble++;
    if (dut.u_ctrl.busy == 2'b11) n_both++;
  end

  // ---------------- stimulus and scoreboard ----------------
  int slot_id [2];
  longint slot_t0 [2];
  int next_in, nret, last_ret, it_sum;
  longint t_start;

  task automatic run_code(int c, int nfr);
    int period;
    select_code(c);
    cfg = build_cfg();
    period = (nsub == 4) ? 8 : 7;
    for (int i = 0; i < nfr; i++) begin
      make_frame(i, (i % 7 == 3) ? 1 : (i % 7 == 5) ? 2 : 0, (c == 0) ? 4.0 : (c == 1) ? 5.5 : 11.0);
      chk($sformatf("code %0d frame %0d codeword generation", c, i), syndrome_ok(cw[i]), 1);
      ref_decode(i);
    end
    next_in = 0; nret = 0; last_ret = -1; it_sum = 0; t_start = cyc;
    @(negedge clk);
    while (nret < nfr) begin
      in_valid = (next_in < nfr);
      if (next_in < nfr)
        for (int g = 0; g < NVNG; g++)
          for (int z = 0; z < Z; z++) in_prior[g][z] = QW'(pri[next_in][g * Z + z]);
      #1;
      if (out_valid) begin
        int id, ok;
        id = slot_id[out_frame];
        ok = 1;
        for (int g = 0; g < NVNG; g++)
          for (int z = 0; z < Z; z++)
            if (int'(out_hd[g][z]) != r_hd[id][g * Z + z]) ok = 0;
        chk($sformatf("code %0d frame %0d hard decisions", c, id), ok, 1);
        chk($sformatf("code %0d frame %0d iterations", c, id), int'(out_iter), r_iter[id]);
        if (out_ok && c == 0) begin
          chk($sformatf("code %0d frame %0d decoded to the sent codeword", c, id),
              int'(out_hd == cw[id]), 1);
          n_correct++;
        end
        chk($sformatf("code %0d frame %0d parity", c, id), int'(out_ok), r_ok[id]);
        chk($sformatf("code %0d frame %0d latency", c, id), int'(cyc - slot_t0[out_frame]),
            (r_iter[id] + 1) * period);
        if (r_ok[id] && r_iter[id] < MAXIT) n_early++;
        if (!r_ok[id]) n_max++;
        if (r_iter[id] == 0) n_zero_it++;
        if (id < last_ret) n_ooo++;
        last_ret = id;
        it_sum += int'(out_iter);
        nret++; n_frames++;
      end
      if (in_valid && in_ready) begin
        slot_id[load_slot] = next_in;
        slot_t0[load_slot] = cyc;
        next_in++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (20) @(negedge clk);
    $display("code %0d: %0d frames in %0d cycles, %0.2f iterations per frame on average",
             c, nfr, cyc - t_start, real'(it_sum) / nfr);
  endtask

  initial begin
    cfg = '0; cfg.nsub = 3'd4;
    max_iter = ITW'(MAXIT);
    in_valid = 0; in_prior = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_code(0, 16);
    run_code(1, 12);
    run_code(2, 12);
    $display("dual %0d single %0d bubble %0d both-busy %0d early %0d max %0d zero-iter %0d out-of-order %0d",
             n_dual, n_single, n_bubble, n_both, n_early, n_max, n_zero_it, n_ooo);
    checks++;
    if (n_dual == 0 || n_single == 0 || n_bubble == 0 || n_both == 0 || n_early == 0 ||
        n_max == 0 || n_zero_it == 0 || n_ooo == 0 || n_frames != 40 || n_correct == 0) begin
      failures++;
      $display("FAIL mechanism coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
