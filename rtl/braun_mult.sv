// braun_mult: N x N unsigned Braun array multiplier (combinational).
//
// The array has N rows. Row 0 holds the partial products a[j]&b[0]. Each
// following row i adds the partial products a[j]&b[i] to the sums of the row
// above, shifted one place, and to the carries of the row above, in full
// adders whose carries go straight down (carry-save). The low product bit of
// each row is p[i]. A last row of full adders ripples the remaining sums and
// carries into p[2N-1:N]. This is the 8x8 array of the multiplier the
// controller is built around; N defaults to 8.
//
// Timing: purely combinational. Small operands settle early because only
// the lower product bits, reached through few cells, depend on them; the
// controller exploits this by grading operand magnitude.
//
// The 8x8 array organisation is that of the original design; the cell
// equations are the standard Braun ones, written here as loops.
module braun_mult #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  always_comb begin
    logic [N-1:0] s [N];   // sum outputs of row i, weight i+j
    logic [N-1:0] c [N];   // carry outputs of row i, weight i+j+1
    logic         rc;      // ripple carry of the final row
    logic         pp;

    for (int j = 0; j < N; j++) begin
      s[0][j] = a[j] & b[0];
      c[0][j] = 1'b0;
    end
    for (int i = 1; i < N; i++) begin
      for (int j = 0; j < N-1; j++) begin
        pp      = a[j] & b[i];
        s[i][j] = pp ^ s[i-1][j+1] ^ c[i-1][j];
        c[i][j] = (pp & s[i-1][j+1]) | (pp & c[i-1][j]) | (s[i-1][j+1] & c[i-1][j]);
      end
      s[i][N-1] = a[N-1] & b[i];
      c[i][N-1] = 1'b0;
    end

    p = '0;
    for (int i = 0; i < N; i++) p[i] = s[i][0];

    rc = 1'b0;
    for (int j = 0; j < N-1; j++) begin
      p[N+j] = s[N-1][j+1] ^ c[N-1][j] ^ rc;
      rc     = (s[N-1][j+1] & c[N-1][j]) | (s[N-1][j+1] & rc) | (c[N-1][j] & rc);
    end
    p[2*N-1] = rc;
  end

endmodule
