// tb_mc_change_rate: the RCM under the configuration change rates quoted for
// multi-context FPGAs: 3% and 5% of the crosspoint bits change at each
// switch between consecutive contexts, over 8 contexts. Context 0 gets a
// random routing (each horizontal track driven by a random vertical track or
// left undriven); each later context re-routes enough tracks to flip the
// given share of the RCM_NOUT x RCM_NIN crosspoint bits (a re-route flips
// two). Each routing is compiled to switch elements. The testbench reports
// how many distinct complex patterns each routing needs against the N_CPLX
// generators of an RCM, and the configuration bits of the RCM against a
// crosspoint memory of one bit per context. Every track whose crosspoints
// all got their pattern is checked in all 8 contexts with random track
// values; tracks left without a generator are reported, not checked.
module tb_mc_change_rate;
  import mc_pkg::*;
  import tb_mc_util_pkg::*;

  localparam int N_ROUTINGS = 30;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  ctx_t ctx;
  rcm_cfg_t cfg;
  logic [RCM_NIN-1:0] vin;
  logic [RCM_NOUT-1:0] hout, hdriven;
  logic conflict;
  int checks = 0, failures = 0;

  mc_rcm dut (.ctx(ctx), .cfg(cfg), .vin(vin), .hout(hout), .hdriven(hdriven),
              .conflict(conflict));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    src_map_t m;
    rcm_stats_t st;
    int tracks_checked = 0;
    $display("RCM configuration bits: %0d; one bit per context per crosspoint: %0d",
             $bits(rcm_cfg_t), NCTX * RCM_NOUT * RCM_NIN);
    foreach (m[o, c]) m[o][c] = -1;
    for (int rate_pct = 3; rate_pct <= 5; rate_pct += 2) begin
      int need_sum, need_max, fit, tracks_ok;
      int n_reroute;
      need_sum = 0; need_max = 0; fit = 0; tracks_ok = 0;
      n_reroute = (rate_pct * RCM_NOUT * RCM_NIN + 100) / 200;  // rounded
      for (int r = 0; r < N_ROUTINGS; r++) begin
        for (int o = 0; o < RCM_NOUT; o++) m[o][0] = $urandom_range(0, RCM_NIN) - 1;
        for (int c = 1; c < NCTX; c++) begin
          int order [RCM_NOUT];
          for (int o = 0; o < RCM_NOUT; o++) begin m[o][c] = m[o][c-1]; order[o] = o; end
          order.shuffle();
          for (int j = 0; j < n_reroute && j < RCM_NOUT; j++) begin
            int o, s;
            o = order[j];
            do s = $urandom_range(0, RCM_NIN) - 1; while (s == m[o][c-1]);
            m[o][c] = s;
          end
        end
        compile_rcm(m, cfg, st);
        need_sum += st.n_need;
        if (st.n_need > need_max) need_max = st.n_need;
        if (st.ok) fit++;
        for (int c = 0; c < NCTX; c++) begin
          ctx = ctx_t'(c);
          repeat (2) begin
            vin = RCM_NIN'({$urandom, $urandom});
            @(posedge clk);
            for (int o = 0; o < RCM_NOUT; o++) begin
              if (st.out_ok[o]) begin
                logic e;
                e = (m[o][c] < 0) ? 1'b0 : vin[m[o][c]];
                checks++;
                if (hout[o] !== e) begin
                  failures++;
                  $display("FAIL rate=%0d r=%0d ctx=%0d track=%0d", rate_pct, r, c, o);
                end
              end
            end
          end
        end
        for (int o = 0; o < RCM_NOUT; o++) if (st.out_ok[o]) tracks_ok++;
      end
      tracks_checked += tracks_ok;
      $display("change rate %0d%%: complex patterns needed avg %0d.%0d max %0d (generators: %0d); routings that fit %0d of %0d; tracks fully served %0d of %0d",
               rate_pct, need_sum / N_ROUTINGS, (10 * need_sum / N_ROUTINGS) % 10, need_max,
               N_CPLX, fit, N_ROUTINGS, tracks_ok, N_ROUTINGS * RCM_NOUT);
    end
    checks++;
    if (tracks_checked == 0) begin failures++; $display("FAIL nothing checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
