// rapcla_ref_pkg: reference models for the testbenches.
//
// The approximate carry is computed here by scanning, not by the
// sum-of-products form of the RTL: for the carry into bit i+1 the scan
// walks down from bit i; a bit with A = B = 1 gives a carry, a bit with
// A = B = 0 kills it, and a bit with A != B passes the scan on. In
// approximate mode the scan stops (no carry) after W bits; in exact mode it
// continues to bit 0 and then takes the carry-in.
package rapcla_ref_pkg;

  function automatic logic ref_carry(logic [63:0] a, logic [63:0] b, logic cin,
                                     logic approx, int n_i, int w, int apx_bits = 64);
    // carry into bit n_i; carries above apx_bits are always exact
    if (n_i > apx_bits) approx = 1'b0;
    for (int j = n_i - 1; j >= 0; j--) begin
      if (approx && (n_i - 1 - j) >= w) return 1'b0;
      if (a[j] && b[j]) return 1'b1;
      if (!a[j] && !b[j]) return 1'b0;
    end
    return approx ? 1'b0 : cin;
  endfunction

  // Returns {cout, sum} of an n-bit RAP-CLA addition, in the low n+1 bits.
  function automatic logic [64:0] ref_add(logic [63:0] a, logic [63:0] b, logic cin,
                                          logic approx, int n, int w, int apx_bits = 64);
    logic [64:0] r;
    r = '0;
    for (int i = 0; i < n; i++)
      r[i] = a[i] ^ b[i] ^ ((i == 0) ? cin : ref_carry(a, b, cin, approx, i, w, apx_bits));
    r[n] = ref_carry(a, b, cin, approx, n, w, apx_bits);
    return r;
  endfunction

  // Row-by-row product with n-bit RAP-CLA row additions.
  function automatic logic [127:0] ref_mul(logic [63:0] a, logic [63:0] b,
                                           logic approx, int n, int w);
    logic [127:0] prod;
    logic [63:0]  run, pp;
    logic [64:0]  s;
    prod = '0;
    pp   = b[0] ? a : '0;
    prod[0] = pp[0];
    run  = pp >> 1;
    for (int i = 1; i < n; i++) begin
      pp = b[i] ? a : '0;
      for (int k = n; k < 64; k++) pp[k] = 1'b0;
      s  = ref_add(run, pp, 1'b0, approx, n, w);
      prod[i] = s[0];
      run = s[64:1] & ((64'd1 << n) - 1);
      run[n-1] = s[n];
    end
    for (int k = 0; k < n; k++) prod[n + k] = run[k];
    return prod;
  endfunction

  // 16-bit ALU result for select code s (add 000, sub 001, mul 010, xor 011,
  // and 100, or 101, nand 110, zero 111), adder window w.
  function automatic logic [31:0] ref_alu(logic [15:0] x, logic [15:0] y,
                                          logic [2:0] s, logic m, int w);
    logic [64:0]  r;
    logic [127:0] q;
    case (s)
      3'd0: begin r = ref_add(64'(x), 64'(y), 1'b0, m, 16, w); return 32'(r[16:0]); end
      3'd1: begin r = ref_add(64'(x), 64'(~y), 1'b1, m, 16, w); return {{16{~r[16]}}, r[15:0]}; end
      3'd2: begin q = ref_mul(64'(x), 64'(y), m, 16, w); return q[31:0]; end
      3'd3: return 32'(x ^ y);
      3'd4: return 32'(x & y);
      3'd5: return 32'(x | y);
      3'd6: return 32'(16'(~(x & y)));
      default: return '0;
    endcase
  endfunction

endpackage
