// tb_input_port: self-checking random test of one router input (port 2,
// the east input, of the router at (1,1)).
// Random packets arrive on random VCs, limited by credits the test keeps
// per VC and refills from the port's credit pulses. The output-VC state
// (credit available, owned, owner) is randomised every cycle, and the
// switch grant is random. A reference model of the four VC queues and their
// idle/active state checks every cycle: which VC requests (the lowest
// eligible one), its output port (XY route of the packet's head), the flit
// offered (queue order), and that a credit pulse follows each grant by
// one cycle.
module tb_input_port;
  import noc_pkg::*;
  localparam int unsigned ID = 2;
  logic clk = 0, rst = 1;
  logic [COORD_W-1:0] cur_x = 3'd1, cur_y = 3'd1;
  link_t in_link = '0;
  logic [NVC-1:0] out_credit;
  logic [NPORTS-1:0][NVC-1:0] ovc_credit_ok = '1, ovc_locked = '0;
  logic [NPORTS-1:0][NVC-1:0][PORT_W-1:0] ovc_owner = '0;
  logic req;
  port_e req_port;
  logic [VC_W-1:0] req_vc;
  flit_t req_flit;
  logic gnt = 0;
  int checks = 0, failures = 0;
  int grants = 0, blocked = 0;

  input_port #(.PORT_ID(ID)) dut (.*);

  always #5 clk = ~clk;

  // reference model
  flit_t q[NVC][$];
  bit    active[NVC];
  port_e mroute[NVC];
  int    up_cred[NVC];
  // packets being generated per VC: flits still to send
  flit_t pend[NVC][$];
  logic [NVC-1:0] exp_credit;

  function automatic port_e xy(int dx, int dy);
    if (dx != 1) return dx > 1 ? PORT_EAST : PORT_WEST;
    if (dy != 1) return dy > 1 ? PORT_NORTH : PORT_SOUTH;
    return PORT_LOCAL;
  endfunction

  function automatic bit elig(int v);
    flit_t f;
    if (!active[v] || q[v].size() == 0) return 0;
    f = q[v][0];
    if (!ovc_credit_ok[mroute[v]][v]) return 0;
    if (f.ftype == FLIT_HEAD || f.ftype == FLIT_SINGLE) return !ovc_locked[mroute[v]][v];
    return ovc_locked[mroute[v]][v] && ovc_owner[mroute[v]][v] == PORT_W'(ID);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t %s", $time, what); end
  endtask

  task automatic new_packet(int v);
    int n = $urandom_range(1, 5);
    int dx = $urandom_range(0, 3), dy = $urandom_range(0, 3);
    for (int k = 0; k < n; k++) begin
      flit_t f;
      f.ftype = (n == 1) ? FLIT_SINGLE : (k == 0) ? FLIT_HEAD : (k == n - 1) ? FLIT_TAIL : FLIT_BODY;
      f.dst_x = (k == 0) ? 3'(dx) : 3'($urandom);
      f.dst_y = (k == 0) ? 3'(dy) : 3'($urandom);
      f.payload = 8'($urandom);
      pend[v].push_back(f);
    end
  endtask

  initial begin
    for (int v = 0; v < NVC; v++) begin active[v] = 0; up_cred[v] = VC_DEPTH; end
    exp_credit = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 4000; c++) begin
      automatic int first;
      @(negedge clk);
      // output-VC state: mostly permissive, sometimes blocking
      for (int o = 0; o < NPORTS; o++)
        for (int v = 0; v < NVC; v++) begin
          ovc_credit_ok[o][v] = $urandom_range(0, 9) != 0;
          ovc_locked[o][v]    = $urandom_range(0, 3) == 0;
          ovc_owner[o][v]     = $urandom_range(0, 5) == 0 ? PORT_W'($urandom_range(0, 4)) : PORT_W'(ID);
        end
      // a body flit in progress normally finds its output VC held by this port
      for (int v = 0; v < NVC; v++)
        if (active[v] && q[v].size() > 0 && !(q[v][0].ftype inside {FLIT_HEAD, FLIT_SINGLE}) &&
            $urandom_range(0, 4) != 0) begin
          ovc_locked[mroute[v]][v] = 1;
          ovc_owner[mroute[v]][v]  = PORT_W'(ID);
        end
      // injection
      in_link = '0;
      begin
        int v = $urandom_range(0, NVC - 1);
        if (pend[v].size() == 0 && $urandom_range(0, 3) == 0) new_packet(v);
        if (pend[v].size() > 0 && up_cred[v] > 0 && $urandom_range(0, 1) == 0) begin
          in_link.valid = 1;
          in_link.vc = VC_W'(v);
          in_link.flit = pend[v].pop_front();
          up_cred[v]--;
        end
      end
      gnt = 0;
      #1;
      // checks against the model
      first = -1;
      for (int v = NVC - 1; v >= 0; v--) if (elig(v)) first = v;
      check(req == (first >= 0), $sformatf("req=%0b expected %0b", req, first >= 0));
      if (!req && active[0] + active[1] + active[2] + active[3] > 0) blocked++;
      if (req && first >= 0) begin
        check(req_vc == VC_W'(first), $sformatf("req_vc=%0d expected %0d", req_vc, first));
        check(req_port == mroute[first], "req_port");
        check(req_flit == q[first][0], "req_flit");
      end
      check(out_credit == exp_credit, $sformatf("credit %b expected %b", out_credit, exp_credit));
      if (req) gnt = $urandom_range(0, 2) != 0;
      // model update at the coming edge
      @(posedge clk);
      exp_credit = '0;
      for (int v = 0; v < NVC; v++) begin
        if (out_credit[v]) up_cred[v]++;
        if (!active[v] && q[v].size() > 0) begin
          check(q[v][0].ftype inside {FLIT_HEAD, FLIT_SINGLE}, "model: head first");
          active[v] = 1;
          mroute[v] = xy(int'(q[v][0].dst_x), int'(q[v][0].dst_y));
        end else if (gnt && first == v) begin
          if (q[v][0].ftype inside {FLIT_TAIL, FLIT_SINGLE}) active[v] = 0;
        end
      end
      if (gnt && first >= 0) begin
        void'(q[first].pop_front());
        exp_credit[first] = 1;
        grants++;
      end
      if (in_link.valid) q[in_link.vc].push_back(in_link.flit);
    end
    checks++;
    if (grants < 100 || blocked < 10) begin
      failures++;
      $display("FAIL too little traffic: grants=%0d blocked=%0d", grants, blocked);
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
