// Reference models used by the testbenches, written independently of the RTL:
//  * CDF 9/7 analysis of one line with whole-sample symmetric extension,
//    direct convolution with the decimal taps rounded to 2**-14;
//  * the SHA-1 compression function (FIPS 180) on one 512-bit block;
//  * SHA-1 padding of a byte string into 512-bit blocks, and its digest.
package tb_ref_pkg;

  localparam int FRAC = 14;
  localparam real LPR [5] = '{0.6029, 0.2666, -0.0782, -0.0168, 0.0267};
  localparam real HPR [4] = '{1.1150, -0.5912, -0.0575, 0.0912};

  int ref_line [4096];   // line to transform, filled by the caller

  function automatic int q(real v);
    return int'(v * real'(1 << FRAC));   // real to int rounds to nearest
  endfunction

  function automatic int ext(int n, int i);
    if (i < 0)      return ref_line[-i];
    else if (i >= n) return ref_line[2*(n-1) - i];
    else             return ref_line[i];
  endfunction

  // coefficient at centre c of a line of length n, saturated to dw bits
  function automatic int ref_dwt_coef(int n, int c, int dw);
    longint acc;
    longint r;
    longint mx, mn;
    acc = 0;
    if (c % 2 == 0) begin
      for (int k = -4; k <= 4; k++)
        acc += longint'(q(LPR[k < 0 ? -k : k])) * longint'(ext(n, c + k));
    end else begin
      for (int k = -3; k <= 3; k++)
        acc += longint'(q(HPR[k < 0 ? -k : k])) * longint'(ext(n, c + k));
    end
    r  = (acc + (longint'(1) << (FRAC - 1))) >>> FRAC;
    mx = (longint'(1) << (dw - 1)) - 1;
    mn = -(longint'(1) << (dw - 1));
    if (r > mx) r = mx;
    if (r < mn) r = mn;
    return int'(r);
  endfunction

  // position of coefficient c of a line of length n after sub-band split
  function automatic int ref_dest(int n, int c);
    return (c % 2 == 0) ? c / 2 : n / 2 + c / 2;
  endfunction

  function automatic logic [31:0] rl(logic [31:0] v, int s);
    return (v << s) | (v >> (32 - s));
  endfunction

  function automatic logic [159:0] ref_sha1_block(logic [159:0] hin, logic [511:0] blk);
    logic [31:0] w [80];
    logic [31:0] a, b, c, d, e, f, k, t;
    for (int i = 0; i < 16; i++) w[i] = blk[511 - 32*i -: 32];
    for (int i = 16; i < 80; i++) w[i] = rl(w[i-3] ^ w[i-8] ^ w[i-14] ^ w[i-16], 1);
    a = hin[159:128]; b = hin[127:96]; c = hin[95:64]; d = hin[63:32]; e = hin[31:0];
    for (int i = 0; i < 80; i++) begin
      if (i < 20)      begin f = (b & c) | (~b & d);          k = 32'h5a827999; end
      else if (i < 40) begin f = b ^ c ^ d;                   k = 32'h6ed9eba1; end
      else if (i < 60) begin f = (b & c) | (b & d) | (c & d); k = 32'h8f1bbcdc; end
      else             begin f = b ^ c ^ d;                   k = 32'hca62c1d6; end
      t = rl(a, 5) + f + e + k + w[i];
      e = d; d = c; c = rl(b, 30); b = a; a = t;
    end
    return {hin[159:128] + a, hin[127:96] + b, hin[95:64] + c, hin[63:32] + d, hin[31:0] + e};
  endfunction

  localparam logic [159:0] IV = 160'h67452301_efcdab89_98badcfe_10325476_c3d2e1f0;

  // message bytes, filled by the caller
  byte unsigned ref_msg [4096];

  // number of 512-bit blocks after padding a message of n bytes
  function automatic int ref_nblocks(int n);
    return (n + 8) / 64 + 1;
  endfunction

  // block k of the padded message of n bytes
  function automatic logic [511:0] ref_block(int n, int k);
    logic [511:0] b;
    int total;
    total = ref_nblocks(n) * 64;
    for (int j = 0; j < 64; j++) begin
      int i;
      byte unsigned v;
      i = k * 64 + j;
      if (i < n)               v = ref_msg[i];
      else if (i == n)         v = 8'h80;
      else if (i >= total - 8) v = 8'(64'(n) * 64'd8 >> (8 * (total - 1 - i)));
      else                     v = 8'h00;
      b[511 - 8*j -: 8] = v;
    end
    return b;
  endfunction

  // SHA-1 digest of the message of n bytes
  function automatic logic [159:0] ref_sha1(int n);
    logic [159:0] h;
    h = IV;
    for (int k = 0; k < ref_nblocks(n); k++) h = ref_sha1_block(h, ref_block(n, k));
    return h;
  endfunction

endpackage
