// Reference models for the Ling adder testbenches, written independently of
// the RTL: bit-serial ripple carries and Ling group terms computed by
// straight loops over the bit positions.
package tb_ling_ref_pkg;

  // Carry into each bit (index 0..64, 64 = carry-out) by ripple.
  function automatic logic [64:0] ripple_carries(logic [63:0] a, logic [63:0] b, logic cin);
    logic [64:0] c;
    c[0] = cin;
    for (int i = 0; i < 64; i++)
      c[i+1] = (a[i] & b[i]) | ((a[i] | b[i]) & c[i]);
    return c;
  endfunction

  // Ling pseudo-carry of the whole word at bit i, including carry-in:
  // H_i = g_i + (carry into bit i).
  function automatic logic ling_h(logic [63:0] a, logic [63:0] b, logic cin, int i);
    logic [64:0] c;
    c = ripple_carries(a, b, cin);
    return (a[i] & b[i]) | c[i];
  endfunction

  // Group pseudo-carry H_{i:j} = g_i + G_{i-1:j} from per-bit g/p, bits
  // below 0 contributing nothing.
  function automatic logic group_h(logic [63:0] g, logic [63:0] p, int i, int j);
    logic gg;
    gg = 1'b0;
    for (int m = j; m < i; m++)
      if (m >= 0) gg = g[m] | (p[m] & gg);
    return g[i] | gg;
  endfunction

  // Group transmit I_{i:j} = p_{i-1} ... p_{j-1}; 0 if any index is below 0.
  function automatic logic group_i(logic [63:0] p, int i, int j);
    logic r;
    r = 1'b1;
    for (int m = j - 1; m <= i - 1; m++)
      r = r & ((m >= 0) ? p[m] : 1'b0);
    return r;
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

  // Random g/p with g implying p, as a generate always implies a propagate.
  function automatic void rand_gp(output logic [63:0] g, output logic [63:0] p);
    logic [63:0] x, y;
    x = rand64();
    y = rand64();
    g = x & y;
    p = x | y;
  endfunction

endpackage
