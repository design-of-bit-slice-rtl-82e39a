// rapcla_carry: carry generator of the reconfigurable approximate carry
// look-ahead adder (RAP-CLA).
//
// Every carry C(i+1) of an N-bit carry look-ahead adder is the OR of two
// parts. The approximate part holds only the generate terms of the W bits
// just below it, G(j) * P(j+1)..P(i) for j = i-W+1 .. i. The augmenting
// part holds the rest: the generate terms of bits 0 .. i-W and the carry-in
// term Cin * P(0)..P(i). Because the OR of all generate terms below the
// window is the exact carry into the window, the augmenting part equals
// Cexact(i-W+1) * P(i-W+1)..P(i), which is how it is built here, with an
// exact look-ahead over the isolated signals.
// A multiplexer per carry selects, by the mode input, either the approximate
// part alone (approx = 1) or the OR of both parts (approx = 0, exact).
// In approximate mode the inputs of the augmenting logic of the
// reconfigurable carries are forced to zero (operand isolation); this stands in for the header-transistor power gate of
// the augmenting part, which is a circuit-level measure with no logic
// function of its own.
//
// Propagate is P = A ^ B, so that the sum bit is P ^ C. The window width W is
// this design's choice (the text gives no value); W >= N makes the adder
// exact in both modes apart from the carry-in, which always belongs to the
// augmenting part.
//
// The adder can be partitioned: only carries C(1) .. C(APX_BITS) are
// reconfigurable; carries above APX_BITS are always exact, which trades
// power for accuracy. The default, APX_BITS = N, uses the reconfigurable
// carry throughout the adder.
//
// Interface: g, p (N bits), cin, approx in; c (N+1 bits, c[0] = cin) out,
// and the two carry parts for observation. Purely combinational.
module rapcla_carry #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 4,
  parameter int unsigned APX_BITS = N
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  input  logic         cin,
  input  logic         approx,
  output logic [N:0]   c,
  output logic [N:0]   c_apx,   // approximate part of each carry
  output logic [N:0]   c_aug    // augmenting part of each carry (0 when isolated)
);

  // Exact look-ahead carries (sum-of-products form).
  function automatic logic [N:0] exact_carries(logic [N-1:0] gv, logic [N-1:0] pv, logic ci);
    logic [N:0] cv;
    logic       term;
    cv[0] = ci;
    for (int i = 0; i < int'(N); i++) begin
      term = ci;
      for (int k = 0; k <= i; k++) term = term & pv[k];
      cv[i+1] = term;
      for (int j = 0; j <= i; j++) begin
        term = gv[j];
        for (int k = j + 1; k <= i; k++) term = term & pv[k];
        cv[i+1] = cv[i+1] | term;
      end
    end
    return cv;
  endfunction

  // Inputs of the augmenting logic of the reconfigurable carries, isolated
  // in approximate mode, and the exact carries formed from them. Carries
  // above APX_BITS use the un-isolated inputs.
  logic [N-1:0] g_iso, p_iso;
  logic         cin_iso;
  logic [N:0]   c_ex_iso, c_ex_fix;

  assign g_iso    = approx ? '0 : g;
  assign p_iso    = approx ? '0 : p;
  assign cin_iso  = approx ? 1'b0 : cin;
  assign c_ex_iso = exact_carries(g_iso, p_iso, cin_iso);
  assign c_ex_fix = (APX_BITS < N) ? exact_carries(g, p, cin) : '0;

  // Approximate part: generate terms inside the window of W bits.
  always_comb begin
    logic term;
    c_apx[0] = 1'b0;
    for (int i = 0; i < int'(N); i++) begin
      c_apx[i+1] = 1'b0;
      for (int j = i; j >= 0 && j > i - int'(W); j--) begin
        term = g[j];
        for (int k = j + 1; k <= i; k++) term = term & p[k];
        c_apx[i+1] = c_apx[i+1] | term;
      end
    end
  end

  // Augmenting part: exact carry into the window, propagated across it.
  always_comb begin
    logic term;
    int   lo;
    c_aug[0] = cin_iso;
    for (int i = 0; i < int'(N); i++) begin
      lo = (i - int'(W) + 1 > 0) ? i - int'(W) + 1 : 0;
      if (i < int'(APX_BITS)) begin
        term = c_ex_iso[lo];
        for (int k = lo; k <= i; k++) term = term & p_iso[k];
      end else begin
        term = c_ex_fix[lo];
        for (int k = lo; k <= i; k++) term = term & p[k];
      end
      c_aug[i+1] = term;
    end
  end

  // Mode multiplexer per carry.
  always_comb begin
    c[0] = cin;
    for (int i = 1; i <= int'(N); i++)
      c[i] = (approx && i <= int'(APX_BITS)) ? c_apx[i] : (c_apx[i] | c_aug[i]);
  end

endmodule
