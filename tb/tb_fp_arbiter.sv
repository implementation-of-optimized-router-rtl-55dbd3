// tb_fp_arbiter: exhaustive test of the fixed-priority arbiter, N = 5 (one
// per router input) and N = 4 (one per VC). The expected grant is the lowest
// set bit, computed as req & -req.
module tb_fp_arbiter;
  logic [4:0] req5, gnt5;
  logic [2:0] idx5;
  logic       v5;
  logic [3:0] req4, gnt4;
  logic [1:0] idx4;
  logic       v4;
  int checks = 0, failures = 0;

  fp_arbiter #(.N(5)) dut5 (.req(req5), .gnt(gnt5), .gnt_idx(idx5), .gnt_valid(v5));
  fp_arbiter #(.N(4)) dut4 (.req(req4), .gnt(gnt4), .gnt_idx(idx4), .gnt_valid(v4));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int r = 0; r < 32; r++) begin
      logic [4:0] exp;
      req5 = 5'(r);
      exp = req5 & (~req5 + 5'd1);
      #1;
      check(gnt5 == exp, $sformatf("gnt5 req=%b gnt=%b", req5, gnt5));
      check(v5 == (r != 0), "valid5");
      if (r != 0) check(exp[idx5], $sformatf("idx5 req=%b idx=%0d", req5, idx5));
    end
    for (int r = 0; r < 16; r++) begin
      logic [3:0] exp;
      req4 = 4'(r);
      exp = req4 & (~req4 + 4'd1);
      #1;
      check(gnt4 == exp, $sformatf("gnt4 req=%b gnt=%b", req4, gnt4));
      check(v4 == (r != 0), "valid4");
      if (r != 0) check(exp[idx4], "idx4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
