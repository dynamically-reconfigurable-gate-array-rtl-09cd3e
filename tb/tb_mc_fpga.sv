// tb_mc_fpga: end-to-end test of the 3x3 multi-context array at its default
// size. A multi-context application is mapped by hand onto the array:
//   cell (0,0): LUT computes a two-input function of external inputs a, b
//               that is different in each of the 8 contexts;
//   cell (1,0): passes that result east in contexts with S0=1 and its own
//               inverted copy with S0=0 (single-context-bit crosspoints);
//   cell (2,0): forwards it on track 0 in odd-parity contexts and the
//               direct copy on track 1 in even-parity ones (complex patterns,
//               served by the complex-pattern generators);
//   cell (0,1): registered LUT, identity in even contexts and inverter in
//               odd ones, sent east on a double-length line that lands in
//               cell (2,1), which turns it onto a single track;
//   cell (2,2): a second driver on one track in contexts with S2=1, which
//               must raise conflict.
// The whole image is loaded through the scan chain, then the context ID
// changes at random every clock while the outputs are compared with values
// worked out here from the intended mapping. Each mechanism (context
// switch, constant/single-bit/complex crosspoint patterns, double-length
// transfer, registered LB, conflict) is counted and must have occurred.
module tb_mc_fpga;
  import mc_pkg::*;
  import tb_mc_util_pkg::*;

  localparam int unsigned NX = 3, NY = 3, NCELL = NX * NY;
  localparam int SN = 0, SE = 1, SS = 2, SW = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, cfg_shift, cfg_si, cfg_so, conflict;
  ctx_t ctx_id, ctx_cur;
  logic [NX-1:0][NY-1:0][N_SIDES-1:0][W_S-1:0] s_ext_in, s_out_all;
  logic [NX-1:0][NY-1:0][N_SIDES-1:0][W_D-1:0] d_ext_in, d_out_all;
  logic [NX-1:0][NY-1:0] lb_out;

  int checks = 0, failures = 0;
  int n_ctx_switch = 0, n_const = 0, n_single = 0, n_cplx = 0, n_double = 0, n_reg = 0;
  int n_conflict = 0, n_lut_ctx = 0;

  mc_fpga dut (
    .clk(clk), .rst_n(rst_n), .ctx_id(ctx_id), .ctx_cur(ctx_cur), .cfg_shift(cfg_shift),
    .cfg_si(cfg_si), .cfg_so(cfg_so), .s_ext_in(s_ext_in), .d_ext_in(d_ext_in),
    .s_out_all(s_out_all), .d_out_all(d_out_all), .lb_out(lb_out), .conflict(conflict)
  );

  initial begin
    repeat (NCELL * CELL_CFG_W + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int in_s(int side, int t);   return int'(IN_S_BASE) + side * W_S + t; endfunction
  function automatic int in_d(int side, int t);   return int'(IN_D_BASE) + side * W_D + t; endfunction
  function automatic int out_s(int side, int t);  return int'(OUT_S_BASE) + side * W_S + t; endfunction
  function automatic int out_d(int side, int t);  return int'(OUT_D_BASE) + side * W_D + t; endfunction
  function automatic int cidx(int x, int y);      return y * NX + x; endfunction
  function automatic logic parity(int c);         return ^c[CTX_BITS-1:0]; endfunction

  cell_cfg_t [0:NCELL-1] img;   // element 0 is the most significant
  logic [NCELL*CELL_CFG_W-1:0] flat;
  logic [NCTX-1:0][3:0] f_tab;   // function of (b,a) in each context

  task automatic add_stats(rcm_stats_t st);
    n_const  += st.n_const_on;
    n_single += st.n_single;
    n_cplx   += st.n_cplx;
    checks++;
    if (!st.ok) begin failures++; $display("FAIL routing did not compile"); end
  endtask

  initial begin
    src_map_t m;
    rcm_stats_t st;
    int prev_ctx;
    logic prev_reg;
    logic prev_obs;

    // ---------------- build the configuration image ----------------------
    for (int i = 0; i < int'(NCELL); i++) begin
      m = empty_map();
      compile_rcm(m, img[i].rcm, st);
      img[i].lb = '0;
    end
    // cell (0,0): LUT inputs from west tracks 0/1, output east track 0.
    m = empty_map();
    for (int c = 0; c < NCTX; c++) begin
      m[OUT_LB_BASE + 0][c] = in_s(SW, 0);
      m[OUT_LB_BASE + 1][c] = in_s(SW, 1);
      m[out_s(SE, 0)][c]    = IN_LB;
    end
    compile_rcm(m, img[cidx(0, 0)].rcm, st); add_stats(st);
    for (int c = 0; c < NCTX; c++) begin
      f_tab[c] = 4'(c * 5 + 3) ^ 4'(c >> 1);  // a different table per context
      img[cidx(0, 0)].lb.lut[c] = {12'h000, f_tab[c]};
    end
    // cell (1,0): inverter LUT; east 0 = S0 ? west0 : LB, east 1 = west0.
    m = empty_map();
    for (int c = 0; c < NCTX; c++) begin
      m[OUT_LB_BASE + 0][c] = in_s(SW, 0);
      m[out_s(SE, 0)][c]    = c[0] ? in_s(SW, 0) : IN_LB;
      m[out_s(SE, 1)][c]    = in_s(SW, 0);
    end
    compile_rcm(m, img[cidx(1, 0)].rcm, st); add_stats(st);
    for (int c = 0; c < NCTX; c++) img[cidx(1, 0)].lb.lut[c] = 16'h5555;  // ~in0
    // cell (2,0): parity-dependent forwarding.
    m = empty_map();
    for (int c = 0; c < NCTX; c++) begin
      m[out_s(SE, 0)][c] = parity(c) ? in_s(SW, 0) : -1;
      m[out_s(SE, 1)][c] = parity(c) ? -1 : in_s(SW, 1);
    end
    compile_rcm(m, img[cidx(2, 0)].rcm, st); add_stats(st);
    // cell (0,1): registered LUT, onto the east double-length line.
    m = empty_map();
    for (int c = 0; c < NCTX; c++) begin
      m[OUT_LB_BASE + 0][c] = in_s(SW, 0);
      m[out_d(SE, 0)][c]    = IN_LB;
    end
    compile_rcm(m, img[cidx(0, 1)].rcm, st); add_stats(st);
    for (int c = 0; c < NCTX; c++) img[cidx(0, 1)].lb.lut[c] = c[0] ? 16'h5555 : 16'hAAAA;
    img[cidx(0, 1)].lb.ff_sel = 1'b1;
    // cell (2,1): double-length line from the west onto east single track 0.
    m = empty_map();
    for (int c = 0; c < NCTX; c++) m[out_s(SE, 0)][c] = in_d(SW, 0);
    compile_rcm(m, img[cidx(2, 1)].rcm, st); add_stats(st);
    // cell (2,2): north 0 from west 0, plus west 1 when S2=1 (conflict).
    m = empty_map();
    for (int c = 0; c < NCTX; c++) m[out_s(SN, 0)][c] = in_s(SW, 0);
    compile_rcm(m, img[cidx(2, 2)].rcm, st); add_stats(st);
    img[cidx(2, 2)].rcm.xp[out_s(SN, 0)][in_s(SW, 1)].se   = '{d1: 1'b1, d0: 1'b0};
    img[cidx(2, 2)].rcm.xp[out_s(SN, 0)][in_s(SW, 1)].usel = USEL_W'(2);

    // ---------------- reset and load ---------------------------------------
    rst_n = 1'b0; ctx_id = '0; cfg_shift = 1'b0; cfg_si = 1'b0;
    s_ext_in = '0; d_ext_in = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    cfg_shift = 1'b1;
    flat = img;
    for (int b = $bits(img) - 1; b >= 0; b--) begin
      cfg_si = flat[b];
      @(posedge clk);
      #1;
    end
    cfg_shift = 1'b0;
    checks++;
    if (cfg_so !== img[0][CELL_CFG_W-1]) begin failures++; $display("FAIL scan out"); end

    // ---------------- run with the context changing every clock ------------
    prev_ctx = 0; prev_reg = 1'b0; prev_obs = 1'b0;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      int k, a, b, cin;
      logic f, g1, e0, e1, regv, cell21;
      k   = $urandom_range(0, NCTX - 1);
      a   = $urandom_range(0, 1);
      b   = $urandom_range(0, 1);
      cin = $urandom_range(0, 1);
      ctx_id = ctx_t'(k);
      s_ext_in[0][0][SW][0] = a[0];
      s_ext_in[0][0][SW][1] = b[0];
      s_ext_in[0][1][SW][0] = cin[0];
      @(posedge clk);
      #1;
      checks++;
      if (ctx_cur !== ctx_t'(k)) begin failures++; $display("FAIL context latency"); end
      if (n > 0 && k != prev_ctx) n_ctx_switch++;
      // expected values
      f  = f_tab[k][{b[0], a[0]}];
      g1 = k[0] ? f : !f;
      e0 = parity(k) ? g1 : 1'b0;
      e1 = parity(k) ? 1'b0 : f;
      // The flip-flop captured, at this edge, the LUT of the context that was
      // current before the edge applied to the input already present.
      regv = prev_ctx[0] ? !cin[0] : cin[0];
      checks += 6;
      if (lb_out[0][0] !== f)              begin failures++; $display("FAIL lb00 ctx=%0d", k); end
      if (s_out_all[1][0][SE][0] !== g1)   begin failures++; $display("FAIL e10 ctx=%0d", k); end
      if (s_out_all[2][0][SE][0] !== e0)   begin failures++; $display("FAIL e20_0 ctx=%0d", k); end
      if (s_out_all[2][0][SE][1] !== e1)   begin failures++; $display("FAIL e20_1 ctx=%0d", k); end
      cell21 = s_out_all[2][1][SE][0];
      if ((d_out_all[0][1][SE][0] !== regv || cell21 !== regv)) begin
        failures++; $display("FAIL double/registered n=%0d", n);
      end
      if (conflict !== k[2]) begin failures++; $display("FAIL conflict ctx=%0d", k); end
      if (f != f_tab[prev_ctx][{b[0], a[0]}]) n_lut_ctx++;
      if (k[0] == 1'b0) n_single++;
      if (parity(k)) n_cplx++;
      if (n > 0 && cell21 != prev_obs) n_double++;
      if (n > 0 && regv != prev_reg) n_reg++;
      if (conflict) n_conflict++;
      prev_obs = cell21; prev_reg = regv;
      prev_ctx = k;
      @(negedge clk);
    end

    $display("mechanisms: ctx_switch=%0d lut_ctx_change=%0d const_xp=%0d single_bit=%0d complex=%0d double_line=%0d registered=%0d conflict=%0d",
             n_ctx_switch, n_lut_ctx, n_const, n_single, n_cplx, n_double, n_reg, n_conflict);
    checks++;
    if (n_ctx_switch == 0 || n_lut_ctx == 0 || n_const == 0 || n_single == 0 || n_cplx == 0 ||
        n_double == 0 || n_reg == 0 || n_conflict == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
