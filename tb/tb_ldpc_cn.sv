// tb_ldpc_cn: random stimulus for the granular check node. The expected first
// and second minimum, sign product and hard-decision parity of the top half,
// bottom half and all 16 inputs are found by a direct scan over the inputs,
// independent of the compare-select tree.
module tb_ldpc_cn;
  import ldpc_pkg::*;
  v2c_t   in [CNW];
  cnres_t rt, rb, ra;
  int checks = 0, failures = 0;

  ldpc_cn dut (.in(in), .res_top(rt), .res_bot(rb), .res_all(ra));

  function automatic cnres_t ref_res(int lo, int hi);
    cnres_t r;
    r = cnres_none();
    for (int i = lo; i < hi; i++) begin
      if (!in[i].valid) continue;
      r.valid = 1'b1;
      r.sign ^= in[i].sign;
      r.synd ^= in[i].hd;
      if (in[i].mag < r.min1) begin
        r.min2 = r.min1;
        r.min1 = in[i].mag;
      end else if (in[i].mag < r.min2) begin
        r.min2 = in[i].mag;
      end
    end
    return r;
  endfunction

  task automatic check(string what, cnres_t got, cnres_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %p exp %p", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < CNW; i++) begin
        in[i].valid = ($urandom_range(0, 3) != 0);
        in[i].sign  = 1'($urandom);
        in[i].hd    = 1'($urandom);
        in[i].mag   = (t % 3 == 0) ? MAGW'($urandom_range(0, 3)) : MAGW'($urandom);
      end
      #1;
      check("top", rt, ref_res(0, 8));
      check("bot", rb, ref_res(8, 16));
      check("all", ra, ref_res(0, 16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
