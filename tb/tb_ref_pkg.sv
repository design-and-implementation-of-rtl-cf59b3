// Reference models for the testbenches of the reconfigurable adders.
//
// They are written from the mode equations of the dual-mode cells, not from
// the RTL structure: rca_ref walks the bit cells in order, cla_ref derives
// every carry from a recursive (P, G) evaluation of the group ending just
// below that carry, applying the rule that a group is approximate only when
// all of its bits are. Widths up to 32 bits.
package tb_ref_pkg;

  // Bit i is approximate when i < da.
  function automatic bit is_app(input int i, input int da);
    return i < da;
  endfunction

  // Ripple-carry adder of dual-mode full adders. Returns {cout, sum}.
  function automatic logic [32:0] rca_ref(input int width, input logic [31:0] a,
                                          input logic [31:0] b, input bit cin,
                                          input int da);
    logic [32:0] r = '0;
    bit c = cin;
    for (int i = 0; i < width; i++) begin
      if (is_app(i, da)) begin
        r[i] = b[i];
        c    = a[i];
      end else begin
        r[i] = a[i] ^ b[i] ^ c;
        c    = (a[i] & b[i]) | (a[i] & c) | (b[i] & c);
      end
    end
    r[width] = c;
    return r;
  endfunction

  // (P, G) of bits lo..hi of the dual-mode CLA tree; returns {p, g}.
  function automatic logic [1:0] cla_group(input int lo, input int hi,
                                           input logic [31:0] a, input logic [31:0] b,
                                           input int da);
    logic [1:0] lw, up;
    int mid;
    if (lo == hi) begin
      if (is_app(lo, da)) return {b[lo], a[lo]};
      return {a[lo] ^ b[lo], a[lo] & b[lo]};
    end
    mid = (lo + hi + 1) / 2;
    lw  = cla_group(lo, mid - 1, a, b, da);
    up  = cla_group(mid, hi, a, b, da);
    if (is_app(hi, da)) return {lw[1], up[0]};           // P = PA, G = GB
    return {lw[1] & up[1], up[0] | (lw[0] & up[1])};     // exact merge
  endfunction

  // Reconfigurable CLA. Returns {cout, sum}.
  function automatic logic [32:0] cla_ref(input int width, input logic [31:0] a,
                                          input logic [31:0] b, input bit cin,
                                          input int da);
    logic [32:0] c = '0;   // c[m] = carry into bit m
    logic [32:0] r = '0;
    logic [1:0]  pg;
    int t;
    c[0] = cin;
    for (int m = 1; m <= width; m++) begin
      t = 0;
      while (((m >> t) & 1) == 0) t++;
      if (t == 0) begin
        // carry out of the type-1 bit cell m-1
        if (is_app(m - 1, da)) c[m] = a[m-1];
        else c[m] = (a[m-1] & b[m-1]) | ((a[m-1] ^ b[m-1]) & c[m-1]);
      end else begin
        pg   = cla_group(m - (1 << t), m - 1, a, b, da);
        c[m] = pg[0] | (pg[1] & c[m - (1 << t)]);
      end
    end
    for (int i = 0; i < width; i++)
      r[i] = is_app(i, da) ? b[i] : (a[i] ^ b[i] ^ c[i]);
    r[width] = c[width];
    return r;
  endfunction

endpackage
