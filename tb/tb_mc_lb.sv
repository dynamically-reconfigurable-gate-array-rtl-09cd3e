// tb_mc_lb: multi-context logic block. Random truth tables per context; in
// combinational mode the output must equal the table entry of the current
// context and inputs at once, in registered mode the entry seen at the
// previous clock edge (one cycle latency), and 0 right after reset.
module tb_mc_lb;
  import mc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  ctx_t ctx;
  lb_cfg_t cfg;
  logic [LB_K-1:0] din;
  logic dout;
  int checks = 0, failures = 0;

  mc_lb dut (.clk(clk), .rst_n(rst_n), .ctx(ctx), .cfg(cfg), .din(din), .dout(dout));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    for (int c = 0; c < NCTX; c++) cfg.lut[c] = (1 << LB_K)'({$urandom, $urandom});
    cfg.ff_sel = 1'b0;
    rst_n = 1'b0; ctx = '0; din = '0;
    @(posedge clk); #1;
    // Combinational mode.
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      ctx = ctx_t'($urandom);
      din = LB_K'($urandom);
      #1;
      checks++;
      if (dout !== cfg.lut[ctx][din]) begin failures++; $display("FAIL comb"); end
      @(posedge clk); #1;
    end
    // Registered mode, starting from reset.
    cfg.ff_sel = 1'b1;
    rst_n = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (dout !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      ctx = ctx_t'($urandom);
      din = LB_K'($urandom);
      prev = cfg.lut[ctx][din];
      @(posedge clk); #1;
      ctx = ctx_t'($urandom);
      din = LB_K'($urandom);
      #1;
      checks++;
      if (dout !== prev) begin failures++; $display("FAIL reg"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
