// fpfa_mac: 16 x 16 multiplier-adder, p = x * y + z, with radix-4 Booth
// recoding and a Wallace tree of carry-save adders.
//
// Each operand is signed or unsigned on its own (x_signed, y_signed), so all
// four combinations work: the operands are first extended to 17-bit two's
// complement. The 17-bit multiplier y is Booth recoded into 9 digits in
// {-2,-1,0,1,2}; each digit selects 0, x or 2x, inverted for a negative digit,
// with the +1 of the negation gathered in one extra row. Those 10 rows and the
// sign-extended addend z are reduced by layers of 3:2 carry-save adders
// (11 -> 8 -> 6 -> 4 -> 3 -> 2 rows) and a final carry-propagate adder.
// z is a signed 16-bit word. The result p is PW = 34 bits, two's complement,
// which holds every product plus addend without overflow.
//
// Purely combinational: the ALU that uses it registers the result.
// The Booth-recoded Wallace-tree structure with signed/unsigned operands
// follows the described multiplier-adder; row handling and the width of p are
// choices of this implementation.
module fpfa_mac
  import fpfa_pkg::*;
(
  input  word_t          x,
  input  word_t          y,
  input  word_t          z,
  input  logic           x_signed,
  input  logic           y_signed,
  output logic [PW-1:0]  p
);

  localparam int NDIG  = 9;           // Booth digits of an 18-bit multiplier
  localparam int NROW0 = NDIG + 2;    // digit rows + negation row + addend

  function automatic int rows_after(int n);
    return 2 * (n / 3) + n % 3;
  endfunction

  function automatic int rows_at(int level);
    int n = NROW0;
    for (int l = 0; l < level; l++) n = rows_after(n);
    return n;
  endfunction

  function automatic int num_levels();
    int n = NROW0;
    int l = 0;
    while (n > 2) begin
      n = rows_after(n);
      l++;
    end
    return l;
  endfunction

  localparam int NLEV = num_levels();

  logic [PW-1:0] xe;                  // x extended to PW bits
  logic [17:0]   ye;                  // y extended to 18 bits
  logic [PW-1:0] r0 [NROW0];          // Booth rows and addend
  logic [PW-1:0] sum_row, carry_row;  // tree output

  assign xe = PW'($signed({x_signed & x[W-1], x}));
  assign ye = 18'($signed({y_signed & y[W-1], y}));

  // Booth recoding and partial-product rows
  always_comb begin
    logic [PW-1:0] negrow;
    negrow = '0;
    for (int r = 0; r < NROW0; r++) r0[r] = '0;
    for (int j = 0; j < NDIG; j++) begin
      logic b2, b1, b0, one, two;
      logic [PW-1:0] mag;
      b2  = ye[2*j+1];
      b1  = ye[2*j];
      b0  = (j == 0) ? 1'b0 : ye[2*j-1];
      one = b1 ^ b0;
      two = (b2 & ~b1 & ~b0) | (~b2 & b1 & b0);
      mag = one ? xe : (two ? (xe << 1) : '0);
      r0[j] = (b2 ? ~mag : mag) << (2 * j);
      negrow[2*j] = b2;
    end
    r0[NDIG]     = negrow;
    r0[NDIG + 1] = PW'($signed(z));
  end

  // Wallace tree: each level compresses groups of three rows into two
  always_comb begin
    logic [PW-1:0] cur [NROW0];
    logic [PW-1:0] nxt [NROW0];
    cur = r0;
    for (int l = 0; l < NLEV; l++) begin
      for (int r = 0; r < NROW0; r++) nxt[r] = '0;
      for (int g = 0; g < rows_at(l) / 3; g++) begin
        nxt[2*g]   = cur[3*g] ^ cur[3*g+1] ^ cur[3*g+2];
        nxt[2*g+1] = ((cur[3*g] & cur[3*g+1]) | (cur[3*g] & cur[3*g+2]) |
                      (cur[3*g+1] & cur[3*g+2])) << 1;
      end
      for (int r = 3 * (rows_at(l) / 3); r < rows_at(l); r++)
        nxt[2*(rows_at(l)/3) + r - 3*(rows_at(l)/3)] = cur[r];
      cur = nxt;
    end
    sum_row   = cur[0];
    carry_row = cur[1];
  end

  // final carry-propagate adder
  assign p = sum_row + carry_row;

endmodule
