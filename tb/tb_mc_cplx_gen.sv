// tb_mc_cplx_gen: the complex-pattern generator must reproduce any pattern
// over the contexts. Every pattern is derived here from a truth table
// (leaf l holds the entries of contexts 2l and 2l+1; inner SEs follow their
// context bit) and the output is compared with the table in every context.
// All 0..255 tables are tried, plus one check that an inner SE forced to 0
// blocks its branch.
module tb_mc_cplx_gen;
  import mc_pkg::*;
  import tb_mc_util_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  ctx_t      ctx;
  cplx_cfg_t cfg;
  logic      g;
  int checks = 0, failures = 0;

  mc_cplx_gen dut (.ctx(ctx), .cfg(cfg), .g(g));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < (1 << NCTX); p++) begin
      logic [NCTX-1:0] pat;
      pat = NCTX'(p);
      cfg = cplx_from_pattern(pat);
      for (int c = 0; c < NCTX; c++) begin
        ctx = ctx_t'(c);
        @(posedge clk);
        checks++;
        if (g !== pat[c]) begin
          failures++;
          $display("FAIL pattern %b ctx %0d g=%b", pat, c, g);
        end
      end
    end
    // Root "1" branch forced off: contexts with the top bit set read 0.
    cfg = cplx_from_pattern('1);
    cfg.node[0].sel_t = '{d1: 1'b0, d0: 1'b0};
    for (int c = 0; c < NCTX; c++) begin
      ctx = ctx_t'(c);
      @(posedge clk);
      checks++;
      if (g !== !c[CTX_BITS-1]) begin failures++; $display("FAIL forced ctx %0d", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
