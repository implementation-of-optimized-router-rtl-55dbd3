// tb_output_port: self-checking random test of one output's arbitration,
// credit counters and VC ownership.
// Random requests (with random VC, head and tail bits) are offered each
// cycle, but only those a real input would make: a request needs a credit
// on its VC, and a head needs a free VC. A model keeps credits and owners;
// the test checks the fixed-priority grant, the credit_ok/locked/owner
// outputs and that a VC's credits run out after four flits without a
// returned credit. A credit pulse counts as available in its own cycle.
module tb_output_port;
  import noc_pkg::*;
  logic clk = 0, rst = 1;
  logic [NPORTS-1:0] req = '0, req_head = '0, req_tail = '0, gnt;
  logic [NPORTS-1:0][VC_W-1:0] req_vc = '0;
  logic [PORT_W-1:0] gnt_idx;
  logic gnt_valid;
  logic [NVC-1:0] credit_in = '0, credit_ok, locked;
  logic [NVC-1:0][PORT_W-1:0] owner;
  int checks = 0, failures = 0;
  int m_cred[NVC];
  bit m_lock[NVC];
  int m_own[NVC];
  int contended = 0, exhausted = 0;

  output_port dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t %s", $time, what); end
  endtask

  initial begin
    for (int v = 0; v < NVC; v++) begin m_cred[v] = VC_DEPTH; m_lock[v] = 0; m_own[v] = 0; end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 5000; c++) begin
      automatic int win = -1;
      @(negedge clk);
      // outputs against the model
      for (int v = 0; v < NVC; v++) begin
        check(locked[v] == m_lock[v], $sformatf("locked[%0d]", v));
        if (m_lock[v]) check(owner[v] == PORT_W'(m_own[v]), $sformatf("owner[%0d]", v));
        if (m_cred[v] == 0) exhausted++;
      end
      credit_in = '0;
      for (int v = 0; v < NVC; v++)
        if (m_cred[v] < VC_DEPTH && $urandom_range(0, 2) == 0) credit_in[v] = 1;
      // legal random requests (a credit arriving now may be spent now)
      req = '0;
      for (int i = 0; i < NPORTS; i++) begin
        automatic int v = $urandom_range(0, NVC - 1);
        req_vc[i] = VC_W'(v);
        if (m_lock[v] && m_own[v] == i) begin
          req_head[i] = 0;
          req_tail[i] = $urandom_range(0, 2) == 0;
          req[i] = (m_cred[v] > 0 || credit_in[v]) && $urandom_range(0, 1) == 0;
        end else if (!m_lock[v]) begin
          req_head[i] = 1;
          req_tail[i] = $urandom_range(0, 3) == 0;
          req[i] = (m_cred[v] > 0 || credit_in[v]) && $urandom_range(0, 2) == 0;
        end
      end
      #1;
      for (int v = 0; v < NVC; v++)
        check(credit_ok[v] == (m_cred[v] > 0 || credit_in[v]), $sformatf("credit_ok[%0d]", v));
      for (int i = NPORTS - 1; i >= 0; i--) if (req[i]) win = i;
      if ($countones(req) > 1) contended++;
      check(gnt_valid == (win >= 0), "gnt_valid");
      check(gnt == (win >= 0 ? NPORTS'(1) << win : '0), $sformatf("gnt=%b req=%b", gnt, req));
      if (win >= 0) check(gnt_idx == PORT_W'(win), "gnt_idx");
      @(posedge clk);
      for (int v = 0; v < NVC; v++) if (credit_in[v]) m_cred[v]++;
      if (win >= 0) begin
        automatic int v = int'(req_vc[win]);
        m_cred[v]--;
        if (req_head[win] && !req_tail[win]) begin m_lock[v] = 1; m_own[v] = win; end
        else if (req_tail[win]) m_lock[v] = 0;
      end
    end
    checks++;
    if (contended < 100 || exhausted < 10) begin
      failures++;
      $display("FAIL coverage: contended=%0d exhausted=%0d", contended, exhausted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
