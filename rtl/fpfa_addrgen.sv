// fpfa_addrgen: 1D, 2D and 3D addressing mode for table interpolation.
//
// A continuous function f(x), f(x,y) or f(x,y,z) is tabulated in the
// 64-entry LUTs of an ALU-block and evaluated between the table points by
// ALUs doing linear interpolation. For that, the 2, 4 or 8 table points
// around the coordinate must be read in the same cycle, one per LUT, and the
// fractions of the coordinate must reach the interpolating ALUs.
//
// Coordinates are unsigned fixed-point words with FRAC_W = 8 fraction bits.
// Each of the 8 LUTs keeps a full copy of the table; LUT n (n = 4dz+2dy+dx)
// receives the address of corner (i+dx, j+dy, k+dz), where i, j, k are the
// integer parts, wrapped to the table size:
//   1D: 64 points,    addr = i+dx                     (LUTs 0,1 used)
//   2D: 8 x 8 grid,   addr = {j+dy, i+dx}, 3 bits each (LUTs 0..3 used)
//   3D: 4 x 4 x 4,    addr = {k+dz, j+dy, i+dx}, 2 bits each (all 8)
// The addresses are combinational, for the LUTs' synchronous read. The
// fractions are registered and staggered to suit an interpolation tree of
// single-cycle ALUs: frac_x is valid together with the LUT data (1 cycle
// after the coordinate), frac_y one cycle later, frac_z two cycles later.
// Mode AG_OFF drives all addresses to 0. The fractions are full bus words
// whose upper 8 bits are always zero. An ALU uses such a word directly as
// the unsigned multiplier operand h with a scaling shift of 8.
//
// 1D/2D/3D addressing with 2/4/8 LUTs and 1/3/7 interpolating ALUs follows
// the described design; the number format, the table shapes, wrap-around at
// the table edge and the staggered fractions are this implementation's
// choices.
module fpfa_addrgen
  import fpfa_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  ag_mode_e            mode,
  input  word_t               cx,
  input  word_t               cy,
  input  word_t               cz,
  output logic [7:0][LUT_AW-1:0] addr,
  output word_t               frac_x,
  output word_t               frac_y,
  output word_t               frac_z
);

  always_comb begin
    for (int n = 0; n < 8; n++) begin
      logic dx, dy, dz;
      logic [5:0] i1;
      logic [2:0] i2, j2;
      logic [1:0] i3, j3, k3;
      dx = n[0]; dy = n[1]; dz = n[2];
      i1 = cx[FRAC_W +: 6] + 6'(dx);
      i2 = cx[FRAC_W +: 3] + 3'(dx);
      j2 = cy[FRAC_W +: 3] + 3'(dy);
      i3 = cx[FRAC_W +: 2] + 2'(dx);
      j3 = cy[FRAC_W +: 2] + 2'(dy);
      k3 = cz[FRAC_W +: 2] + 2'(dz);
      case (mode)
        AG_1D:   addr[n] = i1;
        AG_2D:   addr[n] = {j2, i2};
        AG_3D:   addr[n] = {k3, j3, i3};
        default: addr[n] = '0;
      endcase
    end
  end

  word_t fy1, fz1, fz2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frac_x <= '0; frac_y <= '0; frac_z <= '0;
      fy1 <= '0; fz1 <= '0; fz2 <= '0;
    end else begin
      frac_x <= W'(cx[FRAC_W-1:0]);
      fy1    <= W'(cy[FRAC_W-1:0]);
      frac_y <= fy1;
      fz1    <= W'(cz[FRAC_W-1:0]);
      fz2    <= fz1;
      frac_z <= fz2;
    end
  end

endmodule
