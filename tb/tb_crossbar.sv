// tb_crossbar: random test of the 5x5 crossbar. Each output must carry the
// input its select names; an unused select code must give zero.
module tb_crossbar;
  logic [4:0][15:0] in, out;
  logic [4:0][2:0]  sel;
  int checks = 0, failures = 0;

  crossbar #(.DATA_W(16)) dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < 5; k++) begin
        in[k]  = 16'($urandom);
        sel[k] = (t % 10 == 9) ? 3'($urandom_range(0, 7)) : 3'($urandom_range(0, 4));
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        logic [15:0] exp;
        exp = (sel[o] <= 3'd4) ? in[sel[o]] : 16'h0;
        checks++;
        if (out[o] !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL out%0d sel=%0d got %h exp %h", o, sel[o], out[o], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
