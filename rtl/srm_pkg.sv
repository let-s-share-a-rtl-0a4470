// srm_pkg: types, field arithmetic and share bookkeeping for the share-reduced
// masked AES S-box.
//
// Field representation. The S-box inverts in the tower field
// GF(((2^2)^2)^2) with a normal basis at every level, following Canright's
// compact S-box:
//   GF(2^2)  : basis (W^2, W),   W^2 + W + 1 = 0.   1 = 2'b11.
//   GF(2^4)  : basis (Z^4, Z),   Z^2 + Z + N = 0,   N = W^2 (2'b10).
//   GF(2^8)  : basis (Y^16, Y),  Y^2 + Y + NU = 0,  NU = Z*W (4'b0001).
// A tower byte is {a, b} with a (bits 7:4) the Y^16 coefficient and b (3:0)
// the Y coefficient; nibbles split the same way into GF(2^2) pairs.
// Inside the AES field (x^8+x^4+x^3+x+1) the roots used are W = 0xBC,
// Z = 0xE0 and Y = 0x12. P2T and T2P are the change-of-basis matrices between
// the AES polynomial basis and this tower basis; row r holds the input bits
// that are XORed into output bit r, and T2P column k is the AES-field value of
// tower basis element k (T2P * P2T = identity). N and NU are this design's
// choice; any roots with irreducible defining polynomials work.
//
// Share layout (SDEP = number of dependent shares, 1 or 2). The value x and
// its tag alpha*x each have three shares. Value shares are 0..2, tag shares
// are TS..TS+2 with TS = 3-SDEP, so shares TS..2 are common to both:
//   SDEP=2 (four shares):  x0 r0 r1 y0   x = x0^r0^r1,  tag = r0^r1^y0
//   SDEP=1 (five shares):  x0 x1 r y0 y1 x = x0^x1^r,   tag = r^y0^y1
//
// Multiplication bookkeeping. A masked product a*b needs every cross product
// a_i*b_j with i,j both in the value set, and with i,j both in the tag set;
// products with both indices in the shared set are computed once. That gives
// NPROD = 18 - SDEP^2 cross products. Product (i,j) is assigned to output
// share i if i is an independent share or both are shared, otherwise to j.
// The products are numbered value set first (grouped by output share, the
// independent shares first and the shared ones last), then the tag-only
// products. Ring refreshing: value product k (0..8) gets R_k ^ R_(k+1 mod 9);
// the tag-only products form a chain that starts at R_0, runs through fresh
// randoms R_9.. and closes at R_s, s = 9-SDEP^2 being the first shared
// product. The masks then cancel in the value sum and in the tag sum. This
// needs NRAND = 17 - SDEP^2 random words per multiplier.
package srm_pkg;

  typedef logic [7:0] byte_t;
  typedef logic [3:0] nib_t;
  typedef logic [1:0] crumb_t;

  // Matrices, rows [7:0].
  localparam logic [7:0][7:0] P2T = {8'hc5, 8'ha9, 8'h89, 8'hff, 8'h15, 8'h0b, 8'h87, 8'h23};
  localparam logic [7:0][7:0] T2P = {8'h9f, 8'h39, 8'h60, 8'h2e, 8'h65, 8'hfc, 8'hbb, 8'hda};
  localparam crumb_t GF4_N   = 2'b10;
  localparam nib_t   GF16_NU = 4'b0001;
  localparam byte_t  AES_C   = 8'h63;

  // ---------------- share bookkeeping ----------------
  function automatic int nshares(int sdep);
    return 6 - sdep;
  endfunction
  function automatic int nprod(int sdep);
    return 18 - sdep * sdep;
  endfunction
  function automatic int nrand(int sdep);
    return 17 - sdep * sdep;
  endfunction
  function automatic int tag_start(int sdep);
    return 3 - sdep;
  endfunction

  // Field selectors for prod_info.
  localparam int PI_I = 0, PI_J = 1, PI_O = 2, PI_RA = 3, PI_RB = 4, PI_FIRST = 5;

  // Returns one field of cross product number p (see header).
  function automatic int prod_info(int sdep, int p, int field);
    int k, ts, hi, s, mt, q, res, jj;
    int ii [18];
    int jv [18];
    int ov [18];
    k  = 0;
    ts = 3 - sdep;      // first shared share
    hi = 5 - sdep;      // last tag share
    for (int n = 0; n < 18; n++) begin
      ii[n] = 0; jv[n] = 0; ov[n] = 0;
    end
    // value set {0,1,2}, then tag-only outputs {3..hi}
    for (int o = 0; o <= hi; o++) begin
      int lo_s, hi_s;
      if (o < 3) begin lo_s = 0;  hi_s = 2;  end
      else       begin lo_s = ts; hi_s = hi; end
      if (o < ts || o > 2) begin
        // independent output: (o,o), (o,j) ascending, then (h,o) for shared h
        ii[k] = o; jv[k] = o; ov[k] = o; k++;
        for (int j = lo_s; j <= hi_s; j++)
          if (j != o) begin ii[k] = o; jv[k] = j; ov[k] = o; k++; end
        for (int h = ts; h <= 2; h++) begin
          ii[k] = h; jv[k] = o; ov[k] = o; k++;
        end
      end else begin
        // shared output: (o,h) for shared h ascending
        for (int h = ts; h <= 2; h++) begin
          ii[k] = o; jv[k] = h; ov[k] = o; k++;
        end
      end
    end
    s  = 9 - sdep * sdep;
    mt = 9 - sdep * sdep;
    res = 0;
    case (field)
      PI_I: res = ii[p];
      PI_J: res = jv[p];
      PI_O: res = ov[p];
      PI_RA: begin
        if (p < 9) res = p;
        else begin q = p - 9; res = (q == 0) ? 0 : 8 + q; end
      end
      PI_RB: begin
        if (p < 9) res = (p + 1) % 9;
        else begin q = p - 9; res = (q == mt - 1) ? s : 9 + q; end
      end
      PI_FIRST: begin
        res = 1;
        for (int n = 0; n < p; n++)
          if (ov[n] == ov[p]) res = 0;
      end
      default: res = 0;
    endcase
    jj = res;
    return jj;
  endfunction

  // Output share of every cross product, packed, entry p = product p.
  function automatic logic [17:0][2:0] out_sel(int sdep);
    logic [17:0][2:0] v;
    v = '0;
    for (int p = 0; p < nprod(sdep); p++) v[p] = 3'(prod_info(sdep, p, PI_O));
    return v;
  endfunction

  // ---------------- GF(2^2), normal basis (W^2, W) ----------------
  function automatic crumb_t gf4_mul(crumb_t a, crumb_t b);
    logic e;
    e = (a[1] ^ a[0]) & (b[1] ^ b[0]);
    return {(a[1] & b[1]) ^ e, (a[0] & b[0]) ^ e};
  endfunction

  // Squaring, which is also inversion in GF(2^2), swaps the two bits.
  function automatic crumb_t gf4_sq(crumb_t a);
    return {a[0], a[1]};
  endfunction

  // Square-and-scale of Fig. 2 Stage 3: (a+b)^2 * N for a nibble {a,b}.
  function automatic crumb_t gf4_sqsc(nib_t x);
    return gf4_mul(gf4_sq(x[3:2] ^ x[1:0]), GF4_N);
  endfunction

  // ---------------- GF(2^4), normal basis (Z^4, Z) ----------------
  function automatic nib_t gf16_mul(nib_t x, nib_t y);
    crumb_t e;
    e = gf4_mul(gf4_mul(x[3:2] ^ x[1:0], y[3:2] ^ y[1:0]), GF4_N);
    return {gf4_mul(x[3:2], y[3:2]) ^ e, gf4_mul(x[1:0], y[1:0]) ^ e};
  endfunction

  // Square-and-scale of Fig. 2 Stage 2: (a+b)^2 * NU for a byte {a,b}.
  function automatic nib_t gf16_sqsc(byte_t x);
    nib_t s;
    s = x[7:4] ^ x[3:0];
    return gf16_mul(gf16_mul(s, s), GF16_NU);
  endfunction

  // ---------------- AES field, polynomial basis ----------------
  function automatic byte_t gf256_mul(byte_t a, byte_t b);
    byte_t r, t;
    r = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r = r ^ t;
      t = t[7] ? ((t << 1) ^ 8'h1b) : (t << 1);
    end
    return r;
  endfunction

  // Linear part L of the AES affine map.
  function automatic byte_t aes_lin(byte_t x);
    return x ^ {x[6:0], x[7]} ^ {x[5:0], x[7:6]} ^ {x[4:0], x[7:5]} ^ {x[3:0], x[7:4]};
  endfunction

  // GF(2)-matrix times vector, rows[r] selects the inputs of output bit r.
  function automatic byte_t mat8(logic [7:0][7:0] rows, byte_t x);
    byte_t y;
    for (int r = 0; r < 8; r++) y[r] = ^(rows[r] & x);
    return y;
  endfunction

endpackage
