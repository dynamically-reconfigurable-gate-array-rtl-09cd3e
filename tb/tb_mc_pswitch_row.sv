// tb_mc_pswitch_row: a row of programmable switches onto one horizontal
// track. With random vertical-track values and switch states (none, one, exactly
// two, or a random set of switches closed) the track must carry the OR of the
// connected tracks, and driven / conflict must report zero and several
// closed switches.
module tb_mc_pswitch_row;
  localparam int unsigned NIN = 13;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NIN-1:0] vert, ctrl;
  logic h, driven, conflict;
  int checks = 0, failures = 0;
  int n_conf = 0, n_single = 0, n_none = 0;

  mc_pswitch_row #(.NIN(NIN)) dut (.vert(vert), .ctrl(ctrl), .h(h), .driven(driven),
                                   .conflict(conflict));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int k, on;
      logic eh;
      vert = NIN'($urandom);
      k = $urandom_range(0, 3);
      ctrl = '0;
      if (k == 1) ctrl[$urandom_range(0, NIN-1)] = 1'b1;
      else if (k == 2) begin
        int i0, i1;
        i0 = $urandom_range(0, NIN-1);
        i1 = (i0 + 1 + $urandom_range(0, NIN-2)) % NIN;
        ctrl[i0] = 1'b1;
        ctrl[i1] = 1'b1;
      end else if (k == 3) ctrl = NIN'($urandom);
      @(posedge clk);
      on = 0; eh = 1'b0;
      for (int i = 0; i < NIN; i++) if (ctrl[i]) begin on++; eh = eh | vert[i]; end
      if (on == 0) n_none++; else if (on == 1) n_single++; else n_conf++;
      checks += 3;
      if (h !== eh)              begin failures++; $display("FAIL h"); end
      if (driven !== (on > 0))   begin failures++; $display("FAIL driven"); end
      if (conflict !== (on > 1)) begin failures++; $display("FAIL conflict on=%0d", on); end
    end
    checks++;
    if (n_none == 0 || n_single == 0 || n_conf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
