// tb_mc_cfg_chain: the configuration shift register. A random image is
// shifted in MSB first; after exactly W clocks q must equal the image, it
// must hold while shifting is off, and shifting a second image out must
// return the first one bit by bit on so.
module tb_mc_cfg_chain;
  import mc_pkg::*;
  localparam int unsigned W = CELL_CFG_W;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic shift_en, si, so;
  logic [W-1:0] q, img1, img2;
  int checks = 0, failures = 0;

  mc_cfg_chain #(.W(W)) dut (.clk(clk), .shift_en(shift_en), .si(si), .so(so), .q(q));

  initial begin
    repeat (4 * W + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin img1[i] = 1'($urandom); img2[i] = 1'($urandom); end
    shift_en = 1'b1;
    for (int i = W - 1; i >= 0; i--) begin
      si = img1[i];
      @(posedge clk); #1;
    end
    checks++;
    if (q !== img1) begin failures++; $display("FAIL load"); end
    shift_en = 1'b0;
    si = 1'b1;
    repeat (10) @(posedge clk);
    #1;
    checks++;
    if (q !== img1) begin failures++; $display("FAIL hold"); end
    shift_en = 1'b1;
    for (int i = W - 1; i >= 0; i--) begin
      checks++;
      if (so !== img1[i]) failures++;
      si = img2[i];
      @(posedge clk); #1;
    end
    checks++;
    if (q !== img2) begin failures++; $display("FAIL reload"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
