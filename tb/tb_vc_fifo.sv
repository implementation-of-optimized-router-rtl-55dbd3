// tb_vc_fifo: self-checking test of the VC flit queue.
// Random writes and reads, never writing a full or reading an empty queue,
// against a queue model; checks the front word, empty and full every cycle,
// and that a word written at one edge is at the front (of an empty queue) at
// the next.
module tb_vc_fifo;
  localparam int unsigned W = 16, D = 4;
  logic clk = 0, rst = 1;
  logic wr = 0, rd = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  vc_fifo #(.DATA_W(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: model=%0d empty=%0b full=%0b dout=%h", what, model.size(), empty, full, dout);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      if (model.size() > 0) check(dout == model[0], "front word");
      wr = !full && ($urandom_range(0, 99) < (((c / 500) % 2) != 0 ? 70 : 40));
      rd = !empty && ($urandom_range(0, 99) < (((c / 500) % 2) != 0 ? 40 : 70));
      din = W'($urandom);
      @(posedge clk);
      #1;
      if (rd) void'(model.pop_front());
      if (wr) model.push_back(din);
    end
    @(negedge clk); wr = 0; rd = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
