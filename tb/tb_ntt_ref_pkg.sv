// tb_ntt_ref_pkg: reference arithmetic for the testbenches, written with
// plain 64-bit modular arithmetic, independent of the Montgomery datapath.
//   mulmod(x, y)   = x*y mod q
//   powmod(x, e)   = x^e mod q
//   rinv()         = 2^-32 mod q (by Fermat: 2^32^(q-2))
//   mont(x, z)     = x*z*2^-32 mod q, what the hardware's "x.z" must return
//   to_mont(x)     = x*2^32 mod q, the form in which twiddles are stored
package tb_ntt_ref_pkg;
  localparam longint unsigned QL = 64'd8380417;

  function automatic longint unsigned mulmod(longint unsigned x, longint unsigned y);
    return ((x % QL) * (y % QL)) % QL;
  endfunction

  function automatic longint unsigned powmod(longint unsigned x, longint unsigned e);
    longint unsigned r, b;
    r = 1; b = x % QL;
    while (e != 0) begin
      if (e[0]) r = mulmod(r, b);
      b = mulmod(b, b);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic longint unsigned rinv();
    return powmod((64'd1 << 32) % QL, QL - 2);
  endfunction

  function automatic longint unsigned to_mont(longint unsigned x);
    return mulmod(x, (64'd1 << 32) % QL);
  endfunction

  function automatic longint unsigned mont(longint unsigned x, longint unsigned z);
    return mulmod(mulmod(x, z), rinv());
  endfunction

  function automatic logic [31:0] rand_q();
    return $urandom_range(32'd8380416, 0);
  endfunction
endpackage
