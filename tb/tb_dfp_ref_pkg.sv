// tb_dfp_ref_pkg: reference model of Decimal64 addition/subtraction for the
// testbenches, written with plain integer arithmetic (128-bit values),
// independent of the BCD datapath. It covers:
//  - DPD declet encode/decode by the IEEE 754-2008 tables,
//  - packing and unpacking Decimal64 values (sign, biased exponent, integer
//    coefficient),
//  - exact addition followed by rounding to 16 digits with the preferred
//    exponent min(qa, qb) for exact results, seven rounding modes, overflow,
//    and the special-value rules of the design (NaN result 0 11111 0..0,
//    invalid on sNaN and on infinity minus infinity).
package tb_dfp_ref_pkg;

  typedef logic [127:0] u128_t;
  typedef logic signed [129:0] s130_t;

  function automatic u128_t pow10(int k);
    u128_t r = 1;
    for (int i = 0; i < k; i++) r = r * 10;
    return r;
  endfunction

  function automatic int ndigits(u128_t v);
    int n = 0;
    while (v != 0) begin v = v / 10; n++; end
    return n;
  endfunction

  // binary <-> BCD (up to 32 digits)
  function automatic logic [127:0] to_bcd(u128_t v);
    logic [127:0] r = '0;
    for (int i = 0; i < 32; i++) begin r[4*i +: 4] = 4'(v % 10); v = v / 10; end
    return r;
  endfunction

  function automatic u128_t from_bcd(logic [127:0] x, int ndig);
    u128_t r = 0;
    for (int i = ndig - 1; i >= 0; i--) r = r * 10 + u128_t'(x[4*i +: 4]);
    return r;
  endfunction

  // digits d1 d2 d3 (0..9 each) -> declet, written from the encoding table
  function automatic logic [9:0] dpd_enc(int v);
    logic [3:0] d1, d2, d3;
    logic [9:0] r;
    d1 = 4'(v / 100); d2 = 4'((v / 10) % 10); d3 = 4'(v % 10);
    case ({d1[3], d2[3], d3[3]})
      3'b000: r = {d1[2:0], d2[2:0], 1'b0, d3[2:0]};
      3'b001: r = {d1[2:0], d2[2:0], 4'b1000 | {3'b0, d3[0]}};
      3'b010: r = {d1[2:0], d3[2:1], d2[0], 4'b1010 | {3'b0, d3[0]}};
      3'b011: r = {d1[2:0], 3'b100 | {2'b0, d2[0]}, 4'b1110 | {3'b0, d3[0]}};
      3'b100: r = {d3[2:1], d1[0], d2[2:0], 4'b1100 | {3'b0, d3[0]}};
      3'b101: r = {d2[2:1], d1[0], 3'b010 | {2'b0, d2[0]}, 4'b1110 | {3'b0, d3[0]}};
      3'b110: r = {d3[2:1], d1[0], 3'b000 | {2'b0, d2[0]}, 4'b1110 | {3'b0, d3[0]}};
      default: r = {2'b00, d1[0], 3'b110 | {2'b0, d2[0]}, 4'b1110 | {3'b0, d3[0]}};
    endcase
    return r;
  endfunction

  // declet -> value 0..999, written from the decoding table
  function automatic int dpd_dec(logic [9:0] x);
    int d1, d2, d3;
    logic b0, b1, b2, b3, b4, b5, b6, b7, b8, b9;
    {b0, b1, b2, b3, b4, b5, b6, b7, b8, b9} = x;
    if (!b6) begin
      d1 = 4*b0 + 2*b1 + b2; d2 = 4*b3 + 2*b4 + b5; d3 = 4*b7 + 2*b8 + b9;
    end else if ({b7, b8} == 2'b00) begin
      d1 = 4*b0 + 2*b1 + b2; d2 = 4*b3 + 2*b4 + b5; d3 = 8 + b9;
    end else if ({b7, b8} == 2'b01) begin
      d1 = 4*b0 + 2*b1 + b2; d2 = 8 + b5; d3 = 4*b3 + 2*b4 + b9;
    end else if ({b7, b8} == 2'b10) begin
      d1 = 8 + b2; d2 = 4*b3 + 2*b4 + b5; d3 = 4*b0 + 2*b1 + b9;
    end else if ({b3, b4} == 2'b00) begin
      d1 = 8 + b2; d2 = 8 + b5; d3 = 4*b0 + 2*b1 + b9;
    end else if ({b3, b4} == 2'b01) begin
      d1 = 8 + b2; d2 = 4*b0 + 2*b1 + b5; d3 = 8 + b9;
    end else if ({b3, b4} == 2'b10) begin
      d1 = 4*b0 + 2*b1 + b2; d2 = 8 + b5; d3 = 8 + b9;
    end else begin
      d1 = 8 + b2; d2 = 8 + b5; d3 = 8 + b9;
    end
    return 100*d1 + 10*d2 + d3;
  endfunction

  // finite Decimal64 from sign, biased exponent (0..767), coefficient < 10^16
  function automatic logic [63:0] pack(bit s, int e, u128_t c);
    logic [63:0] r;
    int lead;
    u128_t t;
    lead = int'(c / pow10(15));
    t = c % pow10(15);
    r[63] = s;
    if (lead >= 8) r[62:58] = {2'b11, 2'(e >> 8), 1'(lead & 1)};
    else           r[62:58] = {2'(e >> 8), 3'(lead)};
    r[57:50] = 8'(e & 255);
    for (int i = 0; i < 5; i++) begin
      r[10*i +: 10] = dpd_enc(int'(t % 1000));
      t = t / 1000;
    end
    return r;
  endfunction

  // 0 finite, 1 infinity, 2 qNaN, 3 sNaN
  function automatic int cls_of(logic [63:0] x);
    if (x[62:58] == 5'b11111) return x[57] ? 3 : 2;
    if (x[62:58] == 5'b11110) return 1;
    return 0;
  endfunction

  function automatic void unpack(logic [63:0] x, output bit s, output int e, output u128_t c);
    int lead;
    s = x[63];
    if (x[62:61] == 2'b11) begin
      e = int'({x[60:59], x[57:50]}); lead = 8 + int'(x[58]);
    end else begin
      e = int'({x[62:61], x[57:50]}); lead = int'(x[60:58]);
    end
    c = u128_t'(lead);
    for (int i = 4; i >= 0; i--) c = c * 1000 + u128_t'(dpd_dec(x[10*i +: 10]));
  endfunction

  localparam logic [63:0] QNAN = {1'b0, 5'b11111, 58'd0};
  localparam logic [62:0] INF  = {5'b11110, 58'd0};
  localparam logic [62:0] MAXF = {5'b11101, 8'hFF, {5{10'b0011111111}}};

  function automatic void add(logic [63:0] xa, logic [63:0] xb, bit sign_in, int rm,
                              output logic [63:0] res, output bit inexact,
                              output bit overflow, output bit invalid);
    bit sa, sb, sl, ss, sr;
    int ea, eb, el, es, d, la, dp, e0, k, shamt, n, cmpv;
    u128_t ca, cb, cl, cs, A, B, mag, q, r, half;
    s130_t v;
    bit sticky, up, to_max;
    int cla = cls_of(xa), clb = cls_of(xb);
    inexact = 0; overflow = 0; invalid = 0;
    if (cla == 3 || clb == 3) begin res = QNAN; invalid = 1; return; end
    if (cla == 2 || clb == 2) begin res = QNAN; return; end
    if (cla == 1) begin
      if (clb == 1 && (sign_in ^ xa[63] ^ xb[63])) begin res = QNAN; invalid = 1; end
      else res = {xa[63], INF};
      return;
    end
    if (clb == 1) begin res = {sign_in ^ xb[63], INF}; return; end
    unpack(xa, sa, ea, ca);
    unpack(xb, sb, eb, cb);
    sb = sb ^ sign_in;
    if (ea >= eb) begin el = ea; cl = ca; sl = sa; es = eb; cs = cb; ss = sb; end
    else          begin el = eb; cl = cb; sl = sb; es = ea; cs = ca; ss = sa; end
    if (cl == 0 && cs == 0) begin
      sr = (sa == sb) ? sa : (rm == 3);
      res = pack(sr, es, 0);
      return;
    end
    if (cl == 0) begin res = pack(ss, es, cs); return; end
    d = el - es;
    la = 16 - ndigits(cl);
    sticky = 0;
    if (d <= la + 3) begin
      A = cl * pow10(d); B = cs; e0 = es;
    end else begin
      dp = la + 3; shamt = d - dp;
      A = cl * pow10(dp) * 10;
      if (shamt > 20) begin B = 0; sticky = (cs != 0); end
      else begin B = cs / pow10(shamt); sticky = (cs % pow10(shamt)) != 0; end
      B = B * 10 + u128_t'(sticky);
      e0 = el - dp - 1;
    end
    v = (sl ? -s130_t'(A) : s130_t'(A)) + (ss ? -s130_t'(B) : s130_t'(B));
    if (v == 0) begin
      sr = (sl == ss) ? sl : (rm == 3);
      res = pack(sr, es, 0);
      return;
    end
    sr = (v < 0);
    mag = u128_t'(sr ? -v : v);
    n = ndigits(mag);
    if (n <= 16) begin
      res = pack(sr, e0, mag);
      return;
    end
    k = n - 16;
    q = mag / pow10(k); r = mag % pow10(k); half = 5 * pow10(k - 1);
    cmpv = (r == 0) ? 0 : (r < half) ? 1 : (r == half) ? 2 : 3;
    inexact = (r != 0);
    case (rm)
      1: up = (cmpv != 0);
      2: up = (cmpv != 0) && !sr;
      3: up = (cmpv != 0) && sr;
      4: up = 0;
      5: up = (cmpv >= 2);
      6: up = (cmpv == 3);
      default: up = (cmpv == 3) || (cmpv == 2 && q[0]);
    endcase
    if (up) q = q + 1;
    if (q == pow10(16)) begin q = pow10(15); k++; end
    if (e0 + k > 767) begin
      overflow = 1; inexact = 1;
      to_max = (rm == 4) || (rm == 2 && sr) || (rm == 3 && !sr);
      res = {sr, to_max ? MAXF : INF};
      return;
    end
    res = pack(sr, e0 + k, q);
  endfunction

endpackage
