// tb_mc_se: exhaustive check of the switch element.
// All 16 combinations of D1, D0, U and the passgate input are applied; G must
// be D0 when D1=0 and U when D1=1, and the passgate must pass its input only
// when G is 1. Also reproduces the single-SE patterns of the architecture:
// constant 0/1 over four contexts, and S0 / S1 patterns with D1=1.
module tb_mc_se;
  import mc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  se_bits_t cfg;
  logic u, pass_in, g, pass_out;
  int checks = 0, failures = 0;

  mc_se dut (.cfg(cfg), .u(u), .pass_in(pass_in), .g(g), .pass_out(pass_out));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g;
      {cfg.d1, cfg.d0, u, pass_in} = 4'(v);
      @(posedge clk);
      exp_g = (v[3]) ? v[1] : v[2];
      checks++;
      if (g !== exp_g) begin failures++; $display("FAIL g v=%0d g=%b", v, g); end
      checks++;
      if (pass_out !== (exp_g & v[0])) begin failures++; $display("FAIL pass v=%0d", v); end
    end
    // Four-context patterns: G over contexts 0..3 with U = S0 or S1.
    for (int p = 0; p < 4; p++) begin
      logic [3:0] got, want;
      for (int c = 0; c < 4; c++) begin
        case (p)
          0: begin cfg = '{d1: 1'b0, d0: 1'b0}; u = 1'b0; end
          1: begin cfg = '{d1: 1'b0, d0: 1'b1}; u = 1'b0; end
          2: begin cfg = '{d1: 1'b1, d0: 1'b0}; u = c[0]; end
          default: begin cfg = '{d1: 1'b1, d0: 1'b1}; u = c[1]; end
        endcase
        pass_in = 1'b1;
        @(posedge clk);
        got[c] = g;
      end
      want = (p == 0) ? 4'b0000 : (p == 1) ? 4'b1111 : (p == 2) ? 4'b1010 : 4'b1100;
      checks++;
      if (got !== want) begin failures++; $display("FAIL pattern %0d got %b", p, got); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
