// fft8_bfly: radix-2 decimation-in-time butterfly for an 8-point FFT/IFFT.
//
//   x = a + W*b,  y = a - W*b,  W = exp(-j*2*pi*tw/8)  (inverse = 0)
//                               W = exp(+j*2*pi*tw/8)  (inverse = 1)
//
// There is no general multiplier. Of the four twiddle factors of an 8-point
// transform, 1 and -/+j are only swaps and negations; (1 -/+ j)/sqrt(2) is a
// sum or difference of the two parts followed by a constant multiply by
// 46341/65536 ~ 1/sqrt(2), built from shifts and adds
// (46341 = 2^15 + 2^13 + 2^12 + 2^10 + 2^8 + 2^2 + 2^0), rounded to the
// nearest integer. Keeping multipliers and dividers out of the
// transform follows the original design's aim of a small gate count; the particular
// constant and its 16-bit precision are this design's choice.
// With scale = 1 both results are halved, rounding half up; the IFFT uses
// this in each of its three stages for its overall 1/8. Results saturate to
// DW bits. Purely combinational.
module fft8_bfly
  import ofdm_pkg::*;
(
  input  logic       inverse,  // 1: conjugate twiddle (IFFT)
  input  logic       scale,    // 1: halve both outputs
  input  logic [1:0] tw,       // twiddle index t of W8^t
  input  cplx_t      a,
  input  cplx_t      b,
  output cplx_t      x,
  output cplx_t      y
);

  localparam int PW = DW + 2;  // width of the twiddled b
  localparam int SW = DW + 3;  // width of a +/- W*b

  // round(x * 46341 / 65536) with shifts and adds, x is DW+1 bits wide
  function automatic logic signed [PW-1:0] inv_sqrt2(input logic signed [DW:0] v);
    logic signed [DW+17:0] e;
    logic signed [DW+17:0] acc;
    e   = (DW+18)'(v);
    acc = (e <<< 15) + (e <<< 13) + (e <<< 12) + (e <<< 10) + (e <<< 8) + (e <<< 2) + e
        + (DW+18)'(1 <<< 15);
    return PW'(acc >>> 16);
  endfunction

  localparam logic signed [SW-1:0] MAXV = SW'((1 <<< (DW-1)) - 1);
  localparam logic signed [SW-1:0] MINV = -SW'(1 <<< (DW-1));

  function automatic word_t sat(input logic signed [SW-1:0] v);
    if (v > MAXV) return word_t'(MAXV);
    if (v < MINV) return word_t'(MINV);
    return word_t'(v);
  endfunction

  logic signed [DW:0]   bsum, bdif_ri;   // br+bi, br-bi
  logic signed [PW-1:0] ksum, kdif_ri;
  logic signed [PW-1:0] wr, wi;                   // W*b
  logic signed [SW-1:0] xr, xi, yr, yi;

  always_comb begin
    bsum    = (DW+1)'(b.re) + (DW+1)'(b.im);
    bdif_ri = (DW+1)'(b.re) - (DW+1)'(b.im);
    ksum    = inv_sqrt2(bsum);
    kdif_ri = inv_sqrt2(bdif_ri);
    unique case ({inverse, tw})
      3'b0_00, 3'b1_00: begin wr = PW'(b.re);  wi = PW'(b.im);  end
      3'b0_01:          begin wr = ksum;       wi = -kdif_ri;   end  // (1-j)/sqrt2
      3'b0_10:          begin wr = PW'(b.im);  wi = -PW'(b.re); end  // -j
      3'b0_11:          begin wr = -kdif_ri;   wi = -ksum;      end  // (-1-j)/sqrt2
      3'b1_01:          begin wr = kdif_ri;    wi = ksum;       end  // (1+j)/sqrt2
      3'b1_10:          begin wr = -PW'(b.im); wi = PW'(b.re);  end  // +j
      default:          begin wr = -ksum;      wi = kdif_ri;    end  // (-1+j)/sqrt2
    endcase
    xr = SW'(a.re) + SW'(wr);
    xi = SW'(a.im) + SW'(wi);
    yr = SW'(a.re) - SW'(wr);
    yi = SW'(a.im) - SW'(wi);
    if (scale) begin
      xr = (xr + SW'(1)) >>> 1;
      xi = (xi + SW'(1)) >>> 1;
      yr = (yr + SW'(1)) >>> 1;
      yi = (yi + SW'(1)) >>> 1;
    end
    x.re = sat(xr);
    x.im = sat(xi);
    y.re = sat(yr);
    y.im = sat(yi);
  end

endmodule
