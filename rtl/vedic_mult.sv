// vedic_mult: unsigned A_W x B_W multiplier organised by the Urdhva-Tiryakbhyam
// ("vertically and crosswise") rule of Vedic arithmetic.
//
// Product bit k is formed column by column, as in the decimal hand method:
// column k adds every crosswise bit product a[i]&b[j] with i+j = k, all of
// which are generated at once, plus the carry handed on by column k-1. The
// column's lowest bit is product bit k and the rest is the carry to column
// k+1. All partial products are formed in parallel; only the small column
// carries ripple from column to column.
//
// Purely combinational: p = a * b in the same cycle. The column/carry
// organisation follows the sutra as described; the bit-level adders are left
// to synthesis (the source does not give them).
module vedic_mult #(
  parameter int unsigned A_W = 16,
  parameter int unsigned B_W = 16
) (
  input  logic [A_W-1:0]     a,
  input  logic [B_W-1:0]     b,
  output logic [A_W+B_W-1:0] p
);

  // A column sum never exceeds min(A_W,B_W) + carry, and the carry stays
  // below min(A_W,B_W); CW bits hold both with room to spare.
  localparam int unsigned CW = $clog2(A_W + B_W) + 2;

  always_comb begin
    logic [CW-1:0] carry;
    logic [CW-1:0] col;
    carry = '0;
    p     = '0;
    for (int k = 0; k < int'(A_W + B_W); k++) begin
      col = carry;
      for (int i = 0; i < int'(A_W); i++) begin
        if (k - i >= 0 && k - i < int'(B_W))
          col = col + CW'(a[i] & b[k-i]);
      end
      p[k]  = col[0];
      carry = col >> 1;
    end
  end

endmodule
