// tb_mc_input_ctrl: the input controller must pass or invert each bit as its
// configuration bit says. Random vectors on a 4-bit instance.
module tb_mc_input_ctrl;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] inv, din, dout;
  int checks = 0, failures = 0;

  mc_input_ctrl #(.WIDTH(4)) dut (.inv(inv), .din(din), .dout(dout));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      {inv, din} = 8'(n);
      @(posedge clk);
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (dout[b] !== (inv[b] ? !din[b] : din[b])) begin
          failures++;
          $display("FAIL inv=%b din=%b dout=%b", inv, din, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
