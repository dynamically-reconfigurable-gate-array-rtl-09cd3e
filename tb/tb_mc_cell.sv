// tb_mc_cell: one cell, logic block and RCM together. Random per-context
// routings (compiled to switch elements) bring side tracks to the LUT
// inputs and send side tracks or the LUT output out on the four sides; LUT
// tables differ per context. For every context and random track values the
// side outputs and the LUT output are compared with a model computed here
// from the intended routing and tables, in combinational and registered LB
// modes.
module tb_mc_cell;
  import mc_pkg::*;
  import tb_mc_util_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  ctx_t ctx;
  cell_cfg_t cfg;
  logic [N_SIDES-1:0][W_S-1:0] s_in, s_out;
  logic [N_SIDES-1:0][W_D-1:0] d_in, d_out;
  logic lb_out, conflict;
  int checks = 0, failures = 0;
  int n_lb_routed = 0;

  mc_cell dut (.clk(clk), .rst_n(rst_n), .ctx(ctx), .cfg(cfg), .s_in(s_in), .d_in(d_in),
               .s_out(s_out), .d_out(d_out), .lb_out(lb_out), .conflict(conflict));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Vertical-track value as the cell sees it, LB output supplied separately.
  function automatic logic vval(int i, logic lb);
    if (i < 0) return 1'b0;
    if (i == int'(IN_LB)) return lb;
    if (i < int'(IN_D_BASE)) return s_in[i / W_S][i % W_S];
    return d_in[(i - IN_D_BASE) / W_D][(i - IN_D_BASE) % W_D];
  endfunction

  initial begin
    src_map_t m;
    rcm_stats_t st;
    rst_n = 1'b0;
    ctx = '0; s_in = '0; d_in = '0;
    cfg = '0;
    @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 20; r++) begin
      bit regd;
      logic lb_prev;
      regd = (r % 2 == 1);
      m = empty_map();
      for (int o = 0; o < RCM_NOUT; o++) begin
        int a, b, bs;
        a = $urandom_range(0, IN_LB - 1);     // LB inputs never from the LB itself
        if (o >= int'(LB_K) && $urandom_range(0, 2) == 0) a = IN_LB;
        b = $urandom_range(0, IN_LB - 1);
        bs = $urandom_range(0, CTX_BITS - 1);
        for (int c = 0; c < NCTX; c++) m[o][c] = (b != a && c[bs]) ? b : a;
      end
      compile_rcm(m, cfg.rcm, st);
      for (int c = 0; c < NCTX; c++) cfg.lb.lut[c] = (1 << LB_K)'({$urandom, $urandom});
      cfg.lb.ff_sel = regd;
      lb_prev = 1'b0;
      for (int n = 0; n < 40; n++) begin
        logic [LB_K-1:0] li;
        logic lb_now, lb_vis;
        ctx  = ctx_t'($urandom);
        s_in = (N_SIDES * W_S)'($urandom);
        d_in = (N_SIDES * W_D)'($urandom);
        #1;
        for (int k = 0; k < int'(LB_K); k++) li[k] = vval(m[OUT_LB_BASE + k][ctx], 1'b0);
        lb_now = cfg.lb.lut[ctx][li];
        lb_vis = regd ? lb_prev : lb_now;
        if (n > 0 || !regd) begin
          checks++;
          if (lb_out !== lb_vis) begin failures++; $display("FAIL lb r=%0d n=%0d", r, n); end
          for (int s = 0; s < int'(N_SIDES); s++) begin
            for (int t = 0; t < int'(W_S); t++) begin
              int o;
              o = OUT_S_BASE + s * W_S + t;
              if (m[o][ctx] == int'(IN_LB)) n_lb_routed++;
              checks++;
              if (s_out[s][t] !== vval(m[o][ctx], lb_vis)) begin
                failures++; $display("FAIL s_out r=%0d side=%0d t=%0d", r, s, t);
              end
            end
            for (int t = 0; t < int'(W_D); t++) begin
              int o;
              o = OUT_D_BASE + s * W_D + t;
              checks++;
              if (d_out[s][t] !== vval(m[o][ctx], lb_vis)) begin
                failures++; $display("FAIL d_out r=%0d side=%0d", r, s);
              end
            end
          end
          checks++;
          if (conflict !== 1'b0) begin failures++; $display("FAIL conflict"); end
        end
        @(posedge clk);
        #1;
        lb_prev = lb_now;
      end
    end
    checks++;
    if (n_lb_routed == 0) begin failures++; $display("FAIL LB output never routed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
