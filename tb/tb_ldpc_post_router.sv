// tb_ldpc_post_router: random top/bottom/full results and routing
// descriptions; each VNG output is compared with the result it should get.
module tb_ldpc_post_router;
  import ldpc_pkg::*;
  cnres_t rt, rb, ra;
  cnres_t vo [NVNG];
  logic dual;
  logic [NVNG-1:0] active, post_bot;
  int checks = 0, failures = 0;

  ldpc_post_router dut (.res_top(rt), .res_bot(rb), .res_all(ra), .dual(dual),
                        .active(active), .post_bot(post_bot), .vng_out(vo));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      rt = cnres_t'($urandom);
      rb = cnres_t'($urandom);
      ra = cnres_t'($urandom);
      dual = 1'($urandom);
      active = NVNG'($urandom);
      post_bot = NVNG'($urandom);
      #1;
      for (int g = 0; g < NVNG; g++) begin
        cnres_t e;
        e = !active[g] ? cnres_none() : !dual ? ra : post_bot[g] ? rb : rt;
        checks++;
        if (vo[g] !== e) begin
          failures++;
          $display("FAIL t=%0d vng %0d", t, g);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
