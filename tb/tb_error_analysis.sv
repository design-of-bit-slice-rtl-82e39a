// tb_error_analysis: error analysis of an 8-bit RAP-CLA adder.
//
// For windows W = 2, 3, 4 and 6 it adds all 65,536 operand pairs (carry-in
// zero) in approximate and in exact mode and reports the error rate, the
// mean error distance (MED), the normalised MED (divided by the largest
// exact sum, 510) and the mean relative error distance (MRED, over nonzero
// exact sums). It also reports the mean accuracy, AR = 1 - |error| / exact
// sum (pairs with a nonzero sum), and the probability of acceptance, the
// share of pairs whose accuracy reaches a threshold set level of 0.95 (a
// chosen level; pairs with an exact result count as accepted). Checks: exact mode never errs; the approximate error count
// matches a closed count worked out independently (an error occurs exactly
// when some carry must travel further than W bits); the error rate falls as
// the window grows.
module tb_error_analysis;
  import rapcla_ref_pkg::*;

  int checks = 0, failures = 0;

  localparam int NW = 4;
  localparam int WS [NW] = '{2, 3, 4, 6};

  logic [7:0] a, b;
  logic [7:0] s_apx [NW], s_ex [NW];
  logic       co_apx [NW], co_ex [NW];

  for (genvar k = 0; k < NW; k++) begin : g_w
    rapcla_adder #(.N(8), .W(WS[k])) u_apx (.a(a), .b(b), .cin(1'b0), .approx(1'b1),
                                            .sum(s_apx[k]), .cout(co_apx[k]));
    rapcla_adder #(.N(8), .W(WS[k])) u_ex  (.a(a), .b(b), .cin(1'b0), .approx(1'b0),
                                            .sum(s_ex[k]), .cout(co_ex[k]));
  end

  // True when the exact addition has a carry chain (a generate followed by
  // propagates) reaching more than w bit positions above the generate.
  function automatic bit long_chain(int x, int y, int w);
    for (int j = 0; j < 8; j++) begin
      if (x[j] && y[j]) begin
        int len = 1;
        int k = j + 1;
        while (k < 8 && (x[k] ^ y[k])) begin len++; k++; end
        // the carry from bit j reaches position j+len (bit k or the carry-out)
        if (len > w) return 1;
      end
    end
    return 0;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  nerr [NW], nlong [NW], exact_err [NW];
    real sed [NW], sred [NW];
    int  nacc [NW];
    foreach (nerr[k]) begin nerr[k] = 0; nacc[k] = 0; nlong[k] = 0; exact_err[k] = 0; sed[k] = 0; sred[k] = 0; end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        int ex;
        a = 8'(x); b = 8'(y);
        #1;
        ex = x + y;
        for (int k = 0; k < NW; k++) begin
          int ap, ed;
          ap = int'({co_apx[k], s_apx[k]});
          ed = (ap > ex) ? ap - ex : ex - ap;
          if (ed != 0) nerr[k]++;
          if (int'({co_ex[k], s_ex[k]}) != ex) exact_err[k]++;
          if (long_chain(x, y, WS[k])) nlong[k]++;
          sed[k] += ed;
          if (ex != 0) begin
            real rel;
            rel = $itor(ed) / $itor(ex);
            sred[k] = sred[k] + rel;
            if (1.0 - rel >= 0.95) nacc[k]++;
          end else if (ed == 0) begin
            nacc[k]++;
          end
        end
      end
    for (int k = 0; k < NW; k++) begin
      $display("W=%0d: error rate %f, MED %f, NMED %f, MRED %f",
               WS[k], real'(nerr[k]) / 65536.0, sed[k] / 65536.0,
               sed[k] / 65536.0 / 510.0, sred[k] / 65535.0);  // 65,535 pairs have a nonzero sum
      $display("W=%0d: mean accuracy %f, probability of acceptance (TSL 0.95) %f",
               WS[k], 1.0 - sred[k] / 65535.0, real'(nacc[k]) / 65536.0);
      checks++;
      if (nacc[k] < 65536 - nerr[k]) failures++;   // every exact result is accepted
      checks++;
      if (exact_err[k] != 0) begin failures++; $display("FAIL exact mode erred"); end
      checks++;
      if (nerr[k] != nlong[k]) begin
        failures++;
        $display("FAIL W=%0d: %0d errors, %0d long carry chains", WS[k], nerr[k], nlong[k]);
      end
      if (k > 0) begin
        checks++;
        if (nerr[k] >= nerr[k-1]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
