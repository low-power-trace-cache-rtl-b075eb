// tb_lptc_configs -- runs the fetch unit at several of the trace cache and
// instruction buffer sizes the paper sweeps (t32/i8, t128/i16, t256/i32,
// t512/i128), side by side, on the same generated program run three times by
// an outer loop.
//
// Each configuration checks its own instruction stream against a reference
// run (see lptc_env). On top of that this testbench checks that the share of
// fetches served by the trace (fast hit buffer plus trace cache) does not
// drop as the trace cache grows from 32 to 512 lines, and prints the hit
// rates of every configuration.
module tb_lptc_configs;
  localparam int N = 4;
  localparam int TCS [N] = '{32, 128, 256, 512};
  localparam int IBS [N] = '{8, 16, 32, 128};

  logic done [N];
  int   e_checks [N], e_failures [N], e_fetches [N], e_fhb [N], e_tc [N], e_ib [N];
  int   checks = 0, failures = 0;

  for (genvar g = 0; g < N; g++) begin : g_cfg
    lptc_env #(.TC_ENTRIES(TCS[g]), .IB_ENTRIES(IBS[g])) u_env (
      .done(done[g]), .checks(e_checks[g]), .failures(e_failures[g]),
      .fetches(e_fetches[g]), .fhb_hits(e_fhb[g]), .tc_hits(e_tc[g]), .ib_hits(e_ib[g])
    );
  end

  function automatic logic all_done();
    for (int i = 0; i < N; i++) if (!done[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #(4_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real trace_rate [N];
    #20;
    while (!all_done()) #1000;
    for (int i = 0; i < N; i++) begin
      checks   += e_checks[i];
      failures += e_failures[i];
      trace_rate[i] = real'(e_fhb[i] + e_tc[i]) / real'(e_fetches[i]);
      $display("t%0d/i%0d: fast hit buffer %0.3f  trace (fhb+tc) %0.3f  all (fhb+tc+ib) %0.3f",
               TCS[i], IBS[i], real'(e_fhb[i]) / e_fetches[i], trace_rate[i],
               real'(e_fhb[i] + e_tc[i] + e_ib[i]) / e_fetches[i]);
    end
    for (int i = 1; i < N; i++) begin
      checks++;
      if (trace_rate[i] + 0.001 < trace_rate[i-1]) begin
        failures++;
        $display("FAIL: trace hit rate drops from t%0d to t%0d", TCS[i-1], TCS[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
