// tb_ldpc_vn: one variable node driven with the decoder's two-frame schedule
// (four sub-iterations, period 8, then three sub-iterations, period 7 with a
// bubble), random check node results and periodic frame reloads at the slot
// turn-over cycle. A behavioural model tracks each frame's prior,
// accumulator and stored C2V per sub-iteration and predicts every V2C
// message and latched hard decision; the final accumulator values are
// also compared.
module tb_ldpc_vn;
  import ldpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic nsub4;
  logic load, load_frame;
  logic signed [QW-1:0] prior;
  logic prep_frame, prep_first, prep_latch_hd;
  logic v2c_sign, v2c_hd;
  logic [MAGW-1:0] v2c_mag;
  logic mg_active;
  logic [MAGW-1:0] cn_min1, cn_min2;
  logic cn_sign;
  logic acc_en, acc_frame, acc_first;
  logic [1:0] hd;
  int checks = 0, failures = 0;
  int n_match = 0, n_reload = 0, n_sat = 0;

  ldpc_vn dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int r_prior [2], r_acc [2], r_pass [2];
  int r_c2v [2][4];
  // per-issue records, indexed by cycle mod 16
  bit q_valid [16];
  int q_f [16], q_s [16], q_sign [16], q_mag [16], q_c2v [16];

  function automatic int sat(int v, int m);
    return (v > m) ? m : (v < -m) ? -m : v;
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic run(int nsub, int ncyc);
    int period;
    period = (nsub == 4) ? 8 : 7;
    nsub4 = (nsub == 4);
    for (int i = 0; i < 16; i++) q_valid[i] = 0;
    // both frames loaded before the first window
    for (int f = 0; f < 2; f++) begin
      @(negedge clk);
      load = 1; load_frame = 1'(f);
      prior = QW'($urandom_range(0, 30) - 15);
      r_prior[f] = int'(prior); r_acc[f] = int'(prior); r_pass[f] = 0;
      @(posedge clk);
    end
    @(negedge clk);
    load = 0;
    for (int t = 0; t < ncyc; t++) begin
      int ph, f, s, i3, i4, reload_f;
      bit bub;
      ph = t % period;
      bub = (ph >= 2 * nsub);
      f = (ph < nsub) ? 0 : 1;
      s = (ph < nsub) ? ph : ph - nsub;
      i3 = (t + 16 - 3) % 16;
      i4 = (t + 16 - 4) % 16;
      // stage 1 drive
      prep_frame = 1'(f);
      prep_first = (r_pass[f] == 0);
      prep_latch_hd = !bub && s == 0;
      // stage 4 drive
      mg_active = q_valid[i3] && ($urandom_range(0, 5) != 0);
      cn_min1 = ($urandom_range(0, 2) == 0) ? MAGW'(q_mag[i3]) : MAGW'($urandom);
      cn_min2 = cn_min1 + MAGW'($urandom_range(0, 15 - int'(cn_min1)));
      cn_sign = 1'($urandom);
      // stage 5 drive
      acc_en = q_valid[i4];
      acc_frame = 1'(q_f[i4]);
      acc_first = (q_s[i4] == 0);
      // reload at the turn-over cycle of a slot now and then
      reload_f = -1;
      if (t > 20 && $urandom_range(0, 9) == 0) begin
        if (ph == period - 1) reload_f = 0;
        if (ph == nsub - 1) reload_f = 1;
      end
      load = (reload_f >= 0);
      load_frame = 1'(reload_f == 1);
      prior = QW'($urandom_range(0, 30) - 15);
      #1;
      // check stage 1
      q_valid[t % 16] = !bub;
      if (!bub) begin
        int e, hd_exp;
        e = sat(r_acc[f] - (r_pass[f] == 0 ? 0 : r_c2v[f][s]), 15);
        chk("v2c sign", int'(v2c_sign), int'(e < 0));
        chk("v2c mag", int'(v2c_mag), (e < 0) ? -e : e);
        chk("v2c hd", int'(v2c_hd), int'(r_acc[f] < 0));
        q_f[t % 16] = f; q_s[t % 16] = s;
        q_sign[t % 16] = int'(e < 0); q_mag[t % 16] = (e < 0) ? -e : e;
      end
      // expected stage 4 result
      if (q_valid[i3]) begin
        int m;
        if (cn_min1 == MAGW'(q_mag[i3])) n_match++;
        m = (int'(cn_min1) == q_mag[i3]) ? int'(cn_min2) : int'(cn_min1);
        m = (m > 1) ? m - 1 : 0;
        if (!mg_active) m = 0;
        q_c2v[i3] = (int'(cn_sign) ^ q_sign[i3]) ? -m : m;
      end
      @(posedge clk);
      // reference updates at the clock edge
      if (!bub && s == 0) begin
        #1;
        chk("hd latch", int'(hd[f]), int'(r_acc[f] < 0));
      end
      if (q_valid[i4]) begin
        int g, ss, v;
        g = q_f[i4]; ss = q_s[i4];
        v = ((ss == 0) ? r_prior[g] : r_acc[g]) + q_c2v[i4];
        if (v > 127 || v < -127) n_sat++;
        r_acc[g] = sat(v, 127);
        r_c2v[g][ss] = q_c2v[i4];
        if (ss == nsub - 1) r_pass[g]++;
      end
      if (reload_f >= 0) begin
        n_reload++;
        r_prior[reload_f] = int'(prior);
        r_acc[reload_f] = int'(prior);
        r_pass[reload_f] = 0;
      end
      @(negedge clk);
    end
    load = 0; acc_en = 0; mg_active = 0; prep_latch_hd = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    load = 0; load_frame = 0; prior = '0; nsub4 = 1;
    prep_frame = 0; prep_first = 1; prep_latch_hd = 0;
    mg_active = 0; cn_min1 = '0; cn_min2 = '0; cn_sign = 0;
    acc_en = 0; acc_frame = 0; acc_first = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(4, 1200);
    run(3, 1050);
    checks++;
    if (n_match == 0 || n_reload == 0) begin
      failures++;
      $display("FAIL coverage: min matches %0d reloads %0d", n_match, n_reload);
    end
    $display("min1 matches %0d, reloads %0d, saturations %0d", n_match, n_reload, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
