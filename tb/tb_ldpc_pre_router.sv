// tb_ldpc_pre_router: random messages and routing descriptions in single and
// dual mode; each check node slot is compared with the VNG message the
// description names (single mode: the slot's own VNG).
module tb_ldpc_pre_router;
  import ldpc_pkg::*;
  v2c_t vin [NVNG];
  v2c_t cin [CNW];
  logic dual;
  logic [NVNG-1:0] active;
  logic [CNW-1:0] slot_valid;
  logic [CNW-1:0][VSELW-1:0] slot_sel;
  int checks = 0, failures = 0;
  int nd = 0, ns = 0;

  ldpc_pre_router dut (.vng_in(vin), .dual(dual), .active(active),
                       .slot_valid(slot_valid), .slot_sel(slot_sel), .cn_in(cin));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int g = 0; g < NVNG; g++) vin[g] = v2c_t'($urandom);
      dual       = 1'($urandom);
      active     = NVNG'($urandom);
      slot_valid = CNW'($urandom);
      for (int i = 0; i < CNW; i++) slot_sel[i] = VSELW'($urandom);
      #1;
      if (dual) nd++; else ns++;
      for (int i = 0; i < CNW; i++) begin
        v2c_t e;
        if (dual) begin
          e = vin[slot_sel[i]];
          e.valid = e.valid & slot_valid[i];
        end else begin
          e = vin[i];
          e.valid = e.valid & active[i];
        end
        checks++;
        if (cin[i] !== e) begin
          failures++;
          $display("FAIL t=%0d slot %0d", t, i);
        end
      end
    end
    checks++;
    if (nd == 0 || ns == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
