// tb_srm_ref_pkg: reference models for the testbenches, written without the
// RTL's arithmetic. AES-field arithmetic is plain shift-and-reduce; the S-box
// is x^254 followed by the affine map; the tower basis is rebuilt from its
// roots (W = 0xBC, Z = 0xE0, Y = 0x12 in the AES field) by powering, and the
// conversion into the tower basis is done by table search.
package tb_srm_ref_pkg;

  function automatic logic [7:0] gm(logic [7:0] a, logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] gpow(logic [7:0] a, int n);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 0; i < n; i++) r = gm(r, a);
    return r;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] v, s;
    v = gpow(x, 254);
    for (int i = 0; i < 8; i++)
      s[i] = v[i] ^ v[(i+4)%8] ^ v[(i+5)%8] ^ v[(i+6)%8] ^ v[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  // tower element (bits as documented in srm_pkg) -> AES-field value
  function automatic logic [7:0] g4v(logic [1:0] g);
    logic [7:0] w;
    w = 8'hbc;
    return (g[1] ? gm(w, w) : 8'h00) ^ (g[0] ? w : 8'h00);
  endfunction
  function automatic logic [7:0] g16v(logic [3:0] n);
    logic [7:0] z;
    z = 8'he0;
    return gm(g4v(n[3:2]), gpow(z, 4)) ^ gm(g4v(n[1:0]), z);
  endfunction
  function automatic logic [7:0] t2p(logic [7:0] t);
    logic [7:0] y;
    y = 8'h12;
    return gm(g16v(t[7:4]), gpow(y, 16)) ^ gm(g16v(t[3:0]), y);
  endfunction
  function automatic logic [7:0] p2t(logic [7:0] p);
    for (int t = 0; t < 256; t++) if (t2p(8'(t)) == p) return 8'(t);
    return 8'h00;
  endfunction

  // subfield products via the embedding into the AES field
  function automatic logic [3:0] mul16(logic [3:0] a, logic [3:0] b);
    logic [7:0] p;
    p = gm(g16v(a), g16v(b));
    for (int t = 0; t < 16; t++) if (g16v(4'(t)) == p) return 4'(t);
    return 4'h0;
  endfunction
  function automatic logic [1:0] mul4(logic [1:0] a, logic [1:0] b);
    logic [7:0] p;
    p = gm(g4v(a), g4v(b));
    for (int t = 0; t < 4; t++) if (g4v(2'(t)) == p) return 2'(t);
    return 2'h0;
  endfunction

endpackage
