// tb_ref_pkg: reference truth tables for the testbenches, written independently
// of the RTL tuning functions (integer arithmetic, and for the 6:1 multiplexer's
// L1 the sixteen Boolean expressions listed literally).
package tb_ref_pkg;

  // Truth table of TLUT j of a filter multiplier with coefficient c (8x8 bits,
  // two 4-bit digits, 12-bit partial products).
  function automatic logic [15:0] fir_tt(int c, int j);
    int d, b, v, pp;
    logic [15:0] t;
    d = j / 12;
    b = j % 12;
    for (int n = 0; n < 16; n++) begin
      v  = (d == 1 && n >= 8) ? n - 16 : n;
      pp = v * c;
      t[n] = (pp >>> b) & 1;
    end
    return t;
  endfunction

  // Truth table of TLUT g of a TCAM entry.
  function automatic logic [15:0] tcam_tt(logic [31:0] data, logic [31:0] mask,
                                          logic valid, int g);
    logic [15:0] t;
    for (int n = 0; n < 16; n++) begin
      bit ok;
      ok = valid;
      for (int k = 0; k < 4; k++)
        if (!mask[g*4+k] && (((n >> k) & 1) != data[g*4+k])) ok = 0;
      t[n] = ok;
    end
    return t;
  endfunction

  // 6:1 multiplexer. L1: the sixteen tuning functions of S0, S1.
  function automatic logic [15:0] mux6_tt(logic [2:0] s, int lut);
    logic [15:0] t;
    bit s0, s1;
    s0 = s[0];
    s1 = s[1];
    if (lut == 1) begin
      t[0]  = 0;
      t[1]  = s0 && s1;
      t[2]  = !s0 && s1;
      t[3]  = s1;
      t[4]  = s0 && !s1;
      t[5]  = s0;
      t[6]  = (!s0 && s1) || (s0 && !s1);
      t[7]  = s0 || s1;
      t[8]  = !s0 && !s1;
      t[9]  = (s0 && s1) || (!s0 && !s1);
      t[10] = !s0;
      t[11] = !s0 || s1;
      t[12] = !s1;
      t[13] = s0 || !s1;
      t[14] = !s0 || !s1;
      t[15] = 1;
    end else begin
      // address {0, L1, i5, i4}
      for (int n = 0; n < 16; n++)
        t[n] = s[2] ? ((n >> (s[0] ? 1 : 0)) & 1) : ((n >> 2) & 1);
    end
    return t;
  endfunction

  // 4:1 multiplexer with 3-input LUTs.
  function automatic logic [15:0] mux4_tt(logic [1:0] s, int lut);
    logic [15:0] t;
    t = '0;
    for (int n = 0; n < 8; n++) begin
      bit b2, b1, b0;
      b2 = (n >> 2) & 1; b1 = (n >> 1) & 1; b0 = n & 1;
      if (lut == 0) t[n] = (s >= 2) ? !((s == 3) ? b2 : b1) : 1;
      else          t[n] = !b2 || ((s == 1) ? b1 : (s == 0) ? b0 : 0);
    end
    return t;
  endfunction

  // Reference TCAM match.
  function automatic bit tcam_ref_hit(logic [31:0] key, logic [31:0] data,
                                  logic [31:0] mask, logic valid);
    return valid && (((key ^ data) & ~mask) == 0);
  endfunction

endpackage
