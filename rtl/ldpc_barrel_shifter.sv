// ldpc_barrel_shifter: N-input cyclic shifter for one variable node group.
//
// Realizes one cyclically shifted identity submatrix. With INVERSE=0 (front
// shifter, VNs to CNs) output r carries input (r + shift) mod N, so check
// node r sees the variable node its submatrix row connects to. With
// INVERSE=1 (back shifter, CNs to VNs) output c carries input
// (c - shift) mod N, undoing the front shift. shift must be below N.
//
// The rotation is built from log2 stages; stage b rotates by 2^b mod N when
// bit b of the amount is set. Because rotations add modulo N this works for
// any N, including the 42 of this code. Purely combinational. The element
// width W is a parameter so the same module moves V2C and C2V bundles.
module ldpc_barrel_shifter #(
  parameter int unsigned N  = 42,
  parameter int unsigned W  = 7,
  parameter bit INVERSE     = 1'b0,
  localparam int unsigned SW = $clog2(N)
) (
  input  logic [W-1:0]  din  [N],
  input  logic [SW-1:0] shift,
  output logic [W-1:0]  dout [N]
);

  logic [SW-1:0] amt;
  logic [W-1:0]  stg [SW+1][N];

  always_comb begin
    // left rotation amount
    if (INVERSE) amt = (shift == '0) ? '0 : SW'(N - int'(shift));
    else         amt = shift;
    for (int i = 0; i < N; i++) stg[0][i] = din[i];
    for (int b = 0; b < SW; b++) begin
      for (int i = 0; i < N; i++)
        stg[b+1][i] = amt[b] ? stg[b][(i + ((1 << b) % N)) % N] : stg[b][i];
    end
    for (int i = 0; i < N; i++) dout[i] = stg[SW][i];
  end

endmodule
