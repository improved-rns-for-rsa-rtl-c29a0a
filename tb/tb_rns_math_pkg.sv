// tb_rns_math_pkg: reference arithmetic for the testbenches (64-bit integers).
// It builds the residue bases B = {2^n-1}, B' = {2^n+1} and m_r = 2^R of a
// small configuration, computes the per-key constants of the improved RNS
// Montgomery multiplication the way a host would, and converts numbers to and
// from residue form.  Independent of the RTL.
package tb_rns_math_pkg;

  typedef longint unsigned u64;

  function automatic u64 mulmod(u64 a, u64 b, u64 m);
    return ((a % m) * (b % m)) % m;
  endfunction

  function automatic u64 powmod(u64 a, u64 e, u64 m);
    u64 r = 1 % m;
    u64 x = a % m;
    while (e != 0) begin
      if (e[0]) r = mulmod(r, x, m);
      x = mulmod(x, x, m);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic u64 modinv(u64 a, u64 m);
    longint t = 0, nt = 1, r = longint'(m), nr = longint'(a % m), q, tmp;
    while (nr != 0) begin
      q = r / nr;
      tmp = t - q * nt; t = nt; nt = tmp;
      tmp = r - q * nr; r = nr; nr = tmp;
    end
    if (t < 0) t = t + longint'(m);
    return u64'(t);
  endfunction

  function automatic u64 negmod(u64 a, u64 m);
    return (m - (a % m)) % m;
  endfunction

  // diminished-1 word of residue v modulo 2^n+1
  function automatic u64 to_d1(u64 v, int unsigned n);
    return (v == 0) ? (u64'(1) << n) : v - 1;
  endfunction

  function automatic u64 from_d1(u64 w, int unsigned n);
    return ((w >> n) & 1) != 0 ? 0 : w + 1;
  endfunction

  // A small residue configuration and its constants, indexed like the RTL's
  // constant memories.
  class rns_cfg #(int K = 3);
    int unsigned nb [K];
    int unsigned nbp[K];
    int unsigned r;
    u64 m [K];      // 2^nb-1
    u64 mp[K];      // 2^nbp+1
    u64 mr;
    u64 bigm, bigmp, n;
    u64 c_b  [K][K+2];
    u64 c_bp [K][K+2];   // diminished-1
    u64 c_r  [2*K+2];

    function new(int unsigned nb_i[K], int unsigned nbp_i[K], int unsigned r_i, u64 n_i);
      nb = nb_i; nbp = nbp_i; r = r_i; n = n_i;
      bigm = 1; bigmp = 1;
      for (int i = 0; i < K; i++) begin
        m[i]  = (u64'(1) << nb[i]) - 1;
        mp[i] = (u64'(1) << nbp[i]) + 1;
        bigm  = bigm * m[i];
        bigmp = bigmp * mp[i];
      end
      mr = u64'(1) << r;
      build();
    endfunction

    function void build();
      u64 mi, mpj, v;
      for (int i = 0; i < K; i++) begin
        mi = bigm / m[i];
        v = mulmod(negmod(modinv(n % m[i], m[i]), m[i]), modinv(mi % m[i], m[i]), m[i]);
        c_b[i][0] = v;
        for (int t = 0; t < K; t++) c_b[i][t+1] = (bigmp / mp[t]) % m[i];
        c_b[i][K+1] = negmod(bigmp % m[i], m[i]);
      end
      for (int j = 0; j < K; j++) begin
        mpj = bigmp / mp[j];
        v = mulmod(modinv(bigm % mp[j], mp[j]), modinv(mpj % mp[j], mp[j]), mp[j]);
        c_bp[j][0] = to_d1(v, nbp[j]);
        for (int t = 0; t < K; t++) begin
          v = mulmod(mulmod((bigm / m[t]) % mp[j], n, mp[j]),
                     mulmod(modinv(bigm % mp[j], mp[j]), modinv(mpj % mp[j], mp[j]), mp[j]), mp[j]);
          c_bp[j][t+1] = to_d1(v, nbp[j]);
        end
        c_bp[j][K+1] = to_d1(mpj % mp[j], nbp[j]);
      end
      c_r[0] = modinv(bigm % mr, mr);
      for (int t = 0; t < K; t++) begin
        c_r[t+1]   = mulmod(mulmod((bigm / m[t]) % mr, n, mr), modinv(bigm % mr, mr), mr);
        c_r[K+1+t] = mulmod(modinv(bigmp % mr, mr), (bigmp / mp[t]) % mr, mr);
      end
      c_r[2*K+1] = negmod(modinv(bigmp % mr, mr), mr);
    endfunction

    // CRT reconstruction from base B residues (result in [0, M))
    function u64 from_b(u64 res[K]);
      u64 s = 0, mi;
      for (int i = 0; i < K; i++) begin
        mi = bigm / m[i];
        s = (s + mulmod(mulmod(res[i], modinv(mi % m[i], m[i]), m[i]), mi, bigm)) % bigm;
      end
      return s;
    endfunction
  endclass

endpackage
