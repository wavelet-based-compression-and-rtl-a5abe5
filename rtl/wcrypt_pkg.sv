// Shared constants and helpers of the wavelet compression / key hashing
// encryption datapath.
//
// CDF 9/7 analysis filter taps: the decimal values of the low-pass (9 taps)
// and high-pass (7 taps) filters are quantised to signed fixed point with
// COEF_FRAC fractional bits, coefficient = round(value * 2**COEF_FRAC).
// Both filters are symmetric, so only the centre tap and one side are stored
// (index k stands for taps +k and -k). The decimal values are the usual
// CDF 9/7 analysis taps normalised to unit DC gain for the low-pass filter
// (0.6029, 0.2666, -0.0782, -0.0168, 0.0267) and zero DC gain for the
// high-pass filter (1.1150, -0.5912, -0.0575, 0.0912).
//
// SHA-1 constants: the five initial chaining words H0..H4, the four round
// constants Kt and the round function Ft, as in FIPS 180.
package wcrypt_pkg;

  // ---------------- wavelet filter bank ----------------
  localparam int COEF_W    = 18;   // signed coefficient width
  localparam int COEF_FRAC = 14;   // fractional bits of the coefficients

  typedef logic signed [COEF_W-1:0] coef_t;

  // low-pass taps h[0], h[±1] .. h[±4]
  localparam coef_t LP_TAP [5] = '{
    18'sd9878,    //  0.6029
    18'sd4368,    //  0.2666
   -18'sd1281,    // -0.0782
   -18'sd275,     // -0.0168
    18'sd437      //  0.0267
  };

  // high-pass taps g[0], g[±1] .. g[±3]
  localparam coef_t HP_TAP [4] = '{
    18'sd18268,   //  1.1150
   -18'sd9686,    // -0.5912
   -18'sd942,     // -0.0575
    18'sd1494     //  0.0912
  };

  // ---------------- SHA-1 ----------------
  localparam logic [31:0] SHA1_H0 = 32'h67452301;
  localparam logic [31:0] SHA1_H1 = 32'hefcdab89;
  localparam logic [31:0] SHA1_H2 = 32'h98badcfe;
  localparam logic [31:0] SHA1_H3 = 32'h10325476;
  localparam logic [31:0] SHA1_H4 = 32'hc3d2e1f0;

  localparam logic [159:0] SHA1_IV = {SHA1_H0, SHA1_H1, SHA1_H2, SHA1_H3, SHA1_H4};

  localparam int SHA1_ROUNDS = 80;

  function automatic logic [31:0] sha1_k(input logic [6:0] t);
    if (t < 7'd20)      return 32'h5a827999;
    else if (t < 7'd40) return 32'h6ed9eba1;
    else if (t < 7'd60) return 32'h8f1bbcdc;
    else                return 32'hca62c1d6;
  endfunction

  function automatic logic [31:0] sha1_f(input logic [6:0] t,
                                         input logic [31:0] x,
                                         input logic [31:0] y,
                                         input logic [31:0] z);
    if (t < 7'd20)      return (x & y) | (~x & z);          // choose
    else if (t < 7'd40) return x ^ y ^ z;                   // parity
    else if (t < 7'd60) return (x & y) | (x & z) | (y & z); // majority
    else                return x ^ y ^ z;                   // parity
  endfunction

  function automatic logic [31:0] rol32(input logic [31:0] v, input int unsigned n);
    return (v << n) | (v >> (32 - n));
  endfunction

endpackage
