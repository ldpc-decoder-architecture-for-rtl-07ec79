// tb_ldpc_ctrl: the two-frame scheduler on its own. The check node path is
// replaced by a three-cycle delay line carrying the issued control word and
// a syndrome bit: each frame is given a random number K of passes after
// which its syndrome turns clean. A reference model of the slot schedule
// predicts every issued frame/sub-iteration, the bubble of the
// three-sub-iteration mode, when frames are taken and retired, the iteration
// count and the ok flag, and the number of cycles from load to retirement
// ((iterations + 1) * period).
module tb_ldpc_ctrl;
  import ldpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] nsub;
  logic [ITW-1:0] max_iter;
  logic in_valid, in_ready, load, load_frame;
  pctl_t prep, cn_ctl;
  logic prep_latch_hd, bubble, cn_synd;
  logic out_valid, out_frame, out_ok;
  logic [ITW-1:0] out_iter;
  int checks = 0, failures = 0;
  int n_bubble = 0, n_early = 0, n_max = 0, n_empty = 0;

  ldpc_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check node path stand-in
  pctl_t dl_c [3];
  bit    dl_s [3];
  bit    r_busy [2];
  int    r_pass [2], r_k [2], r_t0 [2];

  always_ff @(posedge clk) begin
    dl_c[0] <= prep; dl_c[1] <= dl_c[0]; dl_c[2] <= dl_c[1];
    dl_s[0] <= prep.valid && (r_pass[prep.frame] < r_k[prep.frame]);
    dl_s[1] <= dl_s[0]; dl_s[2] <= dl_s[1];
  end
  assign cn_ctl = dl_c[2];
  assign cn_synd = dl_s[2];

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic run(int ns, int ncyc);
    int period;
    rst_n = 0;
    nsub = 3'(ns);
    max_iter = ITW'(6);
    in_valid = 0;
    for (int f = 0; f < 2; f++) begin r_busy[f] = 0; r_pass[f] = 0; r_k[f] = 0; end
    dl_c[0] = '0; dl_c[1] = '0; dl_c[2] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    period = (ns == 4) ? 8 : 7;
    for (int t = 0; t < ncyc; t++) begin
      int ph, f, s, tf;
      bit bub, turn, ret, rdy, taken;
      if (!in_valid && $urandom_range(0, 3) != 0) in_valid = 1;
      ph = t % period;
      bub = ph >= 2 * ns;
      f = (ph < ns) ? 0 : 1;
      s = (ph < ns) ? ph : ph - ns;
      turn = (ph == period - 1) || (ph == ns - 1);
      tf = (ph == ns - 1) ? 1 : 0;
      #1;
      chk("bubble", int'(bubble), int'(bub));
      if (bub) n_bubble++;
      chk("prep.valid", int'(prep.valid), int'(!bub && r_busy[f]));
      if (!bub) begin
        chk("prep.frame", int'(prep.frame), f);
        chk("prep.sub", int'(prep.sub), s);
        if (r_busy[f]) chk("prep.first", int'(prep.first), int'(r_pass[f] == 0));
        chk("latch", int'(prep_latch_hd), int'(r_busy[f] && s == 0));
      end
      taken = in_valid && in_ready;
      ret = 0; rdy = 0;
      if (turn) begin
        if (r_busy[tf]) begin
          ret = (r_pass[tf] >= r_k[tf]) || (r_pass[tf] == 6);
          if (!ret) r_pass[tf]++;
        end
        rdy = !r_busy[tf] || ret;
        if (!r_busy[tf]) n_empty++;
      end
      chk("out_valid", int'(out_valid), int'(ret));
      chk("in_ready", int'(in_ready), int'(rdy));
      if (ret) begin
        chk("out_frame", int'(out_frame), tf);
        chk("out_iter", int'(out_iter), r_pass[tf]);
        chk("out_ok", int'(out_ok), int'(r_pass[tf] >= r_k[tf]));
        chk("latency", t - r_t0[tf], (r_pass[tf] + 1) * period);
        if (r_pass[tf] >= r_k[tf]) n_early++; else n_max++;
        r_busy[tf] = 0;
      end
      if (rdy && in_valid) begin
        chk("load", int'(load), 1);
        chk("load_frame", int'(load_frame), tf);
        r_busy[tf] = 1; r_pass[tf] = 0; r_t0[tf] = t;
        r_k[tf] = $urandom_range(0, 8);
      end else begin
        chk("no load", int'(load), 0);
      end
      @(posedge clk);
      @(negedge clk);
      if (taken) in_valid = 0;
    end
  endtask

  initial begin
    nsub = 4; max_iter = 6; in_valid = 0;
    run(4, 3000);
    run(3, 3000);
    checks++;
    if (n_bubble == 0 || n_early == 0 || n_max == 0 || n_empty == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("bubbles %0d early %0d max %0d empty turns %0d", n_bubble, n_early, n_max, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
