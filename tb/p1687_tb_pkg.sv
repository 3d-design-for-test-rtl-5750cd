// p1687_tb_pkg: test-bench helpers that build and decode scan vectors for
// P1687 networks of SIB-guarded TDRs (see p1687_network.sv), written from
// the network's structure and independent of its RTL.
// A network of ns segments, w-bit TDRs, with SIBs open_now[k] open has
// net_len bits. Its scan vector lists bits in shift order: bit 0 is shifted
// first and ends at the far end (SIB ns-1), followed by that SIB's TDR when
// open (TDR bit 0 first), then SIB ns-2, and so on. The same order is the
// order in which captured bits come out on TDO.
package p1687_tb_pkg;

  function automatic int net_len(int ns, int w, logic [7:0] open_now);
    int n = 0;
    for (int k = 0; k < ns; k++) n += 1 + (open_now[k] ? w : 0);
    return n;
  endfunction

  // sib_bits: value shifted into / captured from each SIB;
  // data[k]: value shifted into / captured from TDR k (when open).
  function automatic logic [255:0] net_vec(int ns, int w, logic [7:0] open_now,
                                           logic [7:0] sib_bits, logic [7:0][31:0] data);
    logic [255:0] v = '0;
    int p = 0;
    for (int k = ns - 1; k >= 0; k--) begin
      v[p] = sib_bits[k]; p++;
      if (open_now[k]) for (int b = 0; b < w; b++) begin v[p] = data[k][b]; p++; end
    end
    return v;
  endfunction

  // Read TDR k's bits out of a vector laid out as above.
  function automatic logic [31:0] net_field(int ns, int w, logic [7:0] open_now,
                                            logic [255:0] v, int seg);
    int p = 0;
    logic [31:0] r = '0;
    for (int k = ns - 1; k >= 0; k--) begin
      p++;
      if (open_now[k]) begin
        if (k == seg) for (int b = 0; b < w; b++) r[b] = v[p + b];
        p += w;
      end
    end
    return r;
  endfunction

endpackage
