// goldbach_tb_pkg: reference arithmetic shared by the Goldbach testbenches.
//
// - a sieve of Eratosthenes (1 is not prime) and a direct count of G2(K),
//   the number of ordered prime pairs (p1, p2) with p1 + p2 = K;
// - the input streams of one pass: V1[i] = prime(2i+1) and
//   V2[i] = prime(P+2N-3-2i) for 0 <= i < (P+2N-2)/2;
// - decoding of a cell's two generator states: each generator's sequence is
//   stepped from zero to build a state -> position table, and the two
//   positions n1 (mod PA) and n2 (mod PB) are joined by the Chinese remainder
//   theorem, k = n1 + PA * ((n2 - n1) * u mod PB) with u * PA = 1 (mod PB).
package goldbach_tb_pkg;

  bit sieve[];

  function automatic void build_sieve(int unsigned max_n);
    sieve = new[max_n + 1];
    foreach (sieve[i]) sieve[i] = (i >= 2);
    for (int unsigned i = 2; i * i <= max_n; i++)
      if (sieve[i])
        for (int unsigned j = i * i; j <= max_n; j += i) sieve[j] = 1'b0;
  endfunction

  function automatic bit prime(int n);
    return (n >= 0 && n < sieve.size()) ? sieve[n] : 1'b0;
  endfunction

  function automatic int unsigned g2(int k);
    int unsigned g = 0;
    for (int i = 1; i < k; i += 2)
      if (prime(i) && prime(k - i)) g++;
    return g;
  endfunction

  function automatic bit v1_bit(int p, int n, int i);
    return (i < (p + 2 * n - 2) / 2) ? prime(2 * i + 1) : 1'b0;
  endfunction

  function automatic bit v2_bit(int p, int n, int i);
    return (i < (p + 2 * n - 2) / 2) ? prime(p + 2 * n - 3 - 2 * i) : 1'b0;
  endfunction

  // ---- decoding of generator states ----
  int unsigned pos_a[longint unsigned];
  int unsigned pos_b[longint unsigned];
  int unsigned period_a, period_b;
  longint unsigned crt_u;

  function automatic int unsigned build_table(ref int unsigned pos[longint unsigned],
                                              input int w, input longint unsigned key);
    longint unsigned c = 0, mask = (64'd1 << w) - 1;
    int unsigned n = 0;
    pos.delete();
    while (!pos.exists(c)) begin
      pos[c] = n;
      c = c[w-1] ? ((c << 1) & mask) : (((c << 1) & mask) ^ key);
      n++;
    end
    return n;
  endfunction

  function automatic void build_decoder(int wa, longint unsigned ka, int wb, longint unsigned kb);
    period_a = build_table(pos_a, wa, ka);
    period_b = build_table(pos_b, wb, kb);
    crt_u = 0;
    for (longint unsigned u = 1; u < longint'(period_b); u++)
      if ((u * period_a) % period_b == 1) begin crt_u = u; break; end
  endfunction

  // Returns the count, or -1 if a state is not on its generator's sequence.
  function automatic longint decode(longint unsigned sa, longint unsigned sb);
    longint unsigned n1, n2, d;
    if (!pos_a.exists(sa) || !pos_b.exists(sb)) return -1;
    n1 = pos_a[sa];
    n2 = pos_b[sb];
    d  = (n2 + period_b - (n1 % period_b)) % period_b;
    return longint'(n1 + period_a * ((d * crt_u) % period_b));
  endfunction

endpackage
