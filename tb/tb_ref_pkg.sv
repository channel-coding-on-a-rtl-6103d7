// tb_ref_pkg: reference models for the codec testbenches, written
// independently of the RTL.
//
// ref_c1/ref_c2 give the CCSDS (7, 1/2) parities from an explicit bit
// history (G1 = 171: taps at delays 0,1,2,3,6; G2 = 133: delays 0,2,3,5,6).
// ref_viterbi decodes a stream of hard-decision branch-words block by block
// with integer path metrics: metrics start at 0 / 200, carry over between
// blocks, each block of tb_len words is traced back from its lowest-metric
// state (lowest index on ties), and an ACS tie keeps the even source state.
// It returns the decoded bits in time order.
package tb_ref_pkg;

  // Parities for input b with history h1..h6 (h1 = previous input).
  function automatic bit ref_c1(bit b, bit h1, bit h2, bit h3, bit h4, bit h5, bit h6);
    return b ^ h1 ^ h2 ^ h3 ^ h6;
  endfunction

  function automatic bit ref_c2(bit b, bit h1, bit h2, bit h3, bit h4, bit h5, bit h6);
    return b ^ h2 ^ h3 ^ h5 ^ h6;
  endfunction

  // Branch-word {C1, C2} leaving state p (bit 5 = previous input) on input b.
  function automatic bit [1:0] ref_bw(int p, bit b);
    bit h1, h2, h3, h4, h5, h6;
    h1 = p[5]; h2 = p[4]; h3 = p[3]; h4 = p[2]; h5 = p[1]; h6 = p[0];
    return {ref_c1(b, h1, h2, h3, h4, h5, h6), ref_c2(b, h1, h2, h3, h4, h5, h6)};
  endfunction

  // Encode bits to branch-words {C1, C2} (C2 not inverted).
  function automatic void ref_encode(input bit data[$], output bit [1:0] bws[$]);
    bit [5:0] st;
    st = '0;
    bws.delete();
    foreach (data[i]) begin
      bws.push_back(ref_bw(int'(st), data[i]));
      st = {data[i], st[5:1]};
    end
  endfunction

  function automatic int hd2(bit [1:0] a, bit [1:0] b);
    bit [1:0] x;
    x = a ^ b;
    return int'(x[0]) + int'(x[1]);
  endfunction

  function automatic void ref_viterbi(input bit [1:0] rx[$], input int tb_len, output bit out[$]);
    int pm[64], npm[64];
    bit dec[][64];
    int nblk;
    out.delete();
    foreach (pm[s]) pm[s] = (s == 0) ? 0 : 200;
    nblk = rx.size() / tb_len;
    dec = new[tb_len];
    for (int blk = 0; blk < nblk; blk++) begin
      bit ob[];
      int cur, best;
      for (int t = 0; t < tb_len; t++) begin
        bit [1:0] w;
        w = rx[blk * tb_len + t];
        for (int s = 0; s < 64; s++) begin
          int pa, pb, ma, mb;
          bit b;
          b  = s[5];
          pa = (s & 31) << 1;
          pb = pa | 1;
          ma = pm[pa] + hd2(w, ref_bw(pa, b));
          mb = pm[pb] + hd2(w, ref_bw(pb, b));
          dec[t][s] = ma > mb;
          npm[s]    = (ma > mb) ? mb : ma;
        end
        pm = npm;
      end
      best = 0;
      for (int s = 1; s < 64; s++) if (pm[s] < pm[best]) best = s;
      ob  = new[tb_len];
      cur = best;
      for (int t = tb_len - 1; t >= 0; t--) begin
        ob[t] = cur[5];
        cur   = ((cur & 31) << 1) | int'(dec[t][cur]);
      end
      foreach (ob[i]) out.push_back(ob[i]);
    end
  endfunction

endpackage
