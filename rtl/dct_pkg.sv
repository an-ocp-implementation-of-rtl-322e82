// dct_pkg: types and constants shared by the 8x8 DCT-2D / IDCT-2D core.
//
// The core computes the orthonormal 8-point transform
//   F(u) = C(u) * sum_i f(i) * cos((2i+1) u pi / 16),  C(0) = 1/(2*sqrt(2)), C(u>0) = 1/2
// first along the lines of an 8x8 block and then along its columns. The
// coefficient A(u,i) = C(u) cos((2i+1) u pi / 16) is produced here from a base
// table of eight values, TBL[k] = round(65536 * 0.5 * cos(k pi / 16)), k = 0..8,
// folded by the symmetries of the cosine and rounded to COEF_FRAC fractional
// bits. The IDCT uses the transposed matrix, A(i,u). Note A(0,i) = TBL[4].
//
// The OCP command codes follow the basic OCP encoding (000 idle, 001 write,
// 010 read); the core uses only these three.
package dct_pkg;

  localparam int unsigned N = 8;  // transform size (8x8 blocks)

  typedef enum logic [2:0] {
    OCP_IDLE  = 3'b000,
    OCP_WRITE = 3'b001,
    OCP_READ  = 3'b010
  } ocp_cmd_e;

  typedef enum logic [1:0] {
    OCP_RESP_NULL = 2'b00,
    OCP_RESP_DVA  = 2'b01
  } ocp_resp_e;

  // 0.5*cos(k*pi/16) with 16 fractional bits, k = 0..8
  function automatic int unsigned half_cos_q16(input int unsigned k);
    case (k)
      0:       return 32768;
      1:       return 32138;
      2:       return 30274;
      3:       return 27246;
      4:       return 23170;
      5:       return 18205;
      6:       return 12540;
      7:       return 6393;
      default: return 0;
    endcase
  endfunction

  // Forward DCT matrix entry A(u,i), rounded to frac fractional bits (frac <= 15).
  function automatic int dct_coef(input int unsigned u, input int unsigned i,
                                  input int unsigned frac);
    int unsigned k;
    bit          neg;
    int          mag;
    if (u == 0) k = 4;
    else        k = ((2 * i + 1) * u) % 32;
    if (k > 16) k = 32 - k;
    neg = 1'b0;
    if (k > 8) begin
      k   = 16 - k;
      neg = 1'b1;
    end
    mag = int'((half_cos_q16(k) + (32'd1 << (15 - frac))) >> (16 - frac));
    return neg ? -mag : mag;
  endfunction

  // Matrix used by the core: A for the DCT, its transpose for the IDCT.
  // out_idx is the output position (LB or CB number), in_idx the position of
  // the incoming sample.
  function automatic int xform_coef(input bit inverse, input int unsigned out_idx,
                                    input int unsigned in_idx, input int unsigned frac);
    return inverse ? dct_coef(in_idx, out_idx, frac) : dct_coef(out_idx, in_idx, frac);
  endfunction

endpackage
