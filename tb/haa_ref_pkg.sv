// haa_ref_pkg -- bit-level reference model of the hybrid approximate adder
// for the testbenches.
//
// The model works region by region on plain integers and takes the
// approximate full adder from its truth table (a lookup indexed by the
// three inputs), not from its gate equations, so it is independent of the
// RTL. Operands up to 62 bits are supported.
package haa_ref_pkg;

  // Truth table of the approximate full adder, entry {sum, carry} indexed
  // by {A, B, C}.
  localparam logic [1:0] AFA_TT [8] = '{
    2'b00,  // A=0 B=0 C=0
    2'b10,  // A=0 B=0 C=1
    2'b01,  // A=0 B=1 C=0
    2'b01,  // A=0 B=1 C=1
    2'b10,  // A=1 B=0 C=0
    2'b10,  // A=1 B=0 C=1
    2'b01,  // A=1 B=1 C=0
    2'b11   // A=1 B=1 C=1
  };

  function automatic int unsigned p_of(int unsigned n);
    return n / 4 - 1;
  endfunction

  // One approximate full adder from the table: returns {sum, carry}.
  function automatic logic [1:0] afa(logic a, logic b, logic c);
    return AFA_TT[{a, b, c}];
  endfunction

  // Approximate MSR chain: cell pin A <- operand b bit, pin B <- operand a
  // bit, pin C <- previous carry. Returns the P sum bits in [P-1:0] and the
  // carry out in bit P.
  function automatic longint unsigned msr(int unsigned p, longint unsigned a,
                                          longint unsigned b, logic cin);
    longint unsigned s = 0;
    logic c = cin;
    logic [1:0] r;
    for (int i = 0; i < p; i++) begin
      r = afa(b[i], a[i], c);
      s |= longint'(r[1]) << i;
      c = r[0];
    end
    s |= longint'(c) << p;
    return s;
  endfunction

  // Whole approximate adder: returns {cout, sum} as an (n+1)-bit value.
  function automatic longint unsigned haa(int unsigned n, int unsigned corr,
                                          longint unsigned a, longint unsigned b);
    int unsigned p = p_of(n);
    longint unsigned mask_p = (64'd1 << p) - 1;
    longint unsigned res, m, hi_a, hi_b;
    res  = 64'(corr) & mask_p;
    res |= (((a >> p) | (b >> p)) & mask_p) << p;
    m    = msr(p, (a >> (2 * p)) & mask_p, (b >> (2 * p)) & mask_p, 1'b0);
    res |= (m & mask_p) << (2 * p);
    hi_a = a >> (3 * p);
    hi_b = b >> (3 * p);
    res |= (hi_a + hi_b + ((m >> p) & 1)) << (3 * p);
    return res & ((64'd1 << (n + 1)) - 1);
  endfunction

endpackage
