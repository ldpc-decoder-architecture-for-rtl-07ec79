// tb_ldpc_barrel_shifter: every shift amount 0..41 with random data, for the
// front (forward) and back (inverse) shifter. Expected outputs are computed
// with direct modulo indexing; the back shifter is also checked to undo the
// front shifter.
module tb_ldpc_barrel_shifter;
  localparam int N = 42, W = 7, SW = $clog2(N);
  logic [W-1:0]  din [N];
  logic [W-1:0]  fwd [N];
  logic [W-1:0]  inv [N];
  logic [W-1:0]  rt  [N];
  logic [SW-1:0] sh;
  int checks = 0, failures = 0;

  ldpc_barrel_shifter #(.N(N), .W(W), .INVERSE(1'b0)) u_f (.din(din), .shift(sh), .dout(fwd));
  ldpc_barrel_shifter #(.N(N), .W(W), .INVERSE(1'b1)) u_i (.din(din), .shift(sh), .dout(inv));
  ldpc_barrel_shifter #(.N(N), .W(W), .INVERSE(1'b1)) u_r (.din(fwd), .shift(sh), .dout(rt));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int s = 0; s < N; s++) begin
        for (int i = 0; i < N; i++) din[i] = W'($urandom);
        sh = SW'(s);
        #1;
        for (int i = 0; i < N; i++) begin
          checks += 3;
          if (fwd[i] !== din[(i + s) % N]) begin
            failures++;
            $display("FAIL fwd s=%0d i=%0d", s, i);
          end
          if (inv[i] !== din[(i + N - s) % N]) begin
            failures++;
            $display("FAIL inv s=%0d i=%0d", s, i);
          end
          if (rt[i] !== din[i]) begin
            failures++;
            $display("FAIL roundtrip s=%0d i=%0d", s, i);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
