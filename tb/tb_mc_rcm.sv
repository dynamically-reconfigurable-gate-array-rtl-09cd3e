// tb_mc_rcm: the RCM switch block. Random routings are described by intent
// (which vertical track drives each horizontal track in each context) and
// compiled into switch-element settings. Each horizontal track picks one of:
// a fixed source, two sources alternating on one context-ID bit, undriven,
// and (for at most one track per routing) a source present only in an
// irregular set of contexts, which needs a complex-pattern generator. In
// every context, with random track values, each output must equal its
// intended source (0 when undriven). A routing with a deliberate second
// driver must raise conflict only in the contexts where both are on.
module tb_mc_rcm;
  import mc_pkg::*;
  import tb_mc_util_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  ctx_t ctx;
  rcm_cfg_t cfg;
  logic [RCM_NIN-1:0] vin;
  logic [RCM_NOUT-1:0] hout, hdriven;
  logic conflict;
  int checks = 0, failures = 0;
  int tot_const = 0, tot_single = 0, tot_cplx = 0;

  mc_rcm dut (.ctx(ctx), .cfg(cfg), .vin(vin), .hout(hout), .hdriven(hdriven),
              .conflict(conflict));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    src_map_t m;
    rcm_stats_t st;
    for (int r = 0; r < 40; r++) begin
      bit cplx_done;
      m = empty_map();
      cplx_done = 1'b0;
      for (int o = 0; o < RCM_NOUT; o++) begin
        int kind, a, b, bit_sel;
        logic [NCTX-1:0] irr;
        kind = $urandom_range(0, 3);
        a = $urandom_range(0, RCM_NIN - 1);
        b = (a + 1 + $urandom_range(0, RCM_NIN - 2)) % RCM_NIN;
        bit_sel = $urandom_range(0, CTX_BITS - 1);
        if (!cplx_done && r % 2 == 0 && o == r % RCM_NOUT) begin
          kind = 4;
          cplx_done = 1'b1;
        end
        irr = 8'b1001_0110;  // odd parity of the context ID
        for (int c = 0; c < NCTX; c++) begin
          case (kind)
            0: m[o][c] = a;
            1: m[o][c] = c[bit_sel] ? a : b;
            2: m[o][c] = -1;
            3: m[o][c] = c[bit_sel] ? -1 : a;
            default: m[o][c] = irr[c] ? a : -1;
          endcase
        end
      end
      compile_rcm(m, cfg, st);
      checks++;
      if (!st.ok) begin failures++; $display("FAIL compile r=%0d", r); end
      tot_const  += st.n_const_on;
      tot_single += st.n_single;
      tot_cplx   += st.n_cplx;
      for (int c = 0; c < NCTX; c++) begin
        ctx = ctx_t'(c);
        repeat (3) begin
          vin = RCM_NIN'({$urandom, $urandom});
          @(posedge clk);
          for (int o = 0; o < RCM_NOUT; o++) begin
            logic e;
            e = (m[o][c] < 0) ? 1'b0 : vin[m[o][c]];
            checks++;
            if (hout[o] !== e || hdriven[o] !== (m[o][c] >= 0)) begin
              failures++;
              $display("FAIL r=%0d ctx=%0d out=%0d got=%b exp=%b", r, c, o, hout[o], e);
            end
          end
          checks++;
          if (conflict !== 1'b0) begin failures++; $display("FAIL spurious conflict"); end
        end
      end
    end
    // Deliberate conflict: output 0 always from input 0, plus input 1 in
    // contexts whose bit 1 is set.
    m = empty_map();
    for (int c = 0; c < NCTX; c++) m[0][c] = 0;
    compile_rcm(m, cfg, st);
    cfg.xp[0][1].se   = '{d1: 1'b1, d0: 1'b0};
    cfg.xp[0][1].usel = USEL_W'(1);
    for (int c = 0; c < NCTX; c++) begin
      ctx = ctx_t'(c);
      vin = '0;
      vin[1] = 1'b1;
      @(posedge clk);
      checks += 2;
      if (conflict !== c[1]) begin failures++; $display("FAIL conflict ctx=%0d", c); end
      if (hout[0] !== c[1])  begin failures++; $display("FAIL wired-or ctx=%0d", c); end
    end
    checks++;
    if (tot_const == 0 || tot_single == 0 || tot_cplx == 0) begin
      failures++;
      $display("FAIL pattern classes not all used");
    end
    $display("patterns: constant-on=%0d single-bit=%0d complex=%0d", tot_const, tot_single,
             tot_cplx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
