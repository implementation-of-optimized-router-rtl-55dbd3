// tb_router: self-checking test of one five-port router at (1,1).
//
// Phase 1 (latency and rate): a lone eight-flit packet from each input to
// each output. Its head must leave 4 cycles after it entered, and each
// following flit one cycle after the one before, which needs the four
// credits of a VC to come back in time.
// Phase 2 (random load): every input sends multi-flit and one-flit packets on
// random VCs to random destinations within one hop, limited by credits the
// sources keep per VC. Every output sink holds flits for random times and
// returns a credit per flit it frees; holding more than four flits on a VC
// is a failure. Every flit is checked against the packets each input sent:
// right output (XY), right VC, order within the packet, no mixing of packets
// on a VC. The test counts switch contention, credit stalls and output-VC
// ownership waits, and fails if one never happened.
module tb_router;
  import noc_pkg::*;
  logic clk = 0, rst = 1;
  link_t [NPORTS-1:0] in_link = '0, out_link;
  logic [NPORTS-1:0][NVC-1:0] up_credit, dn_credit = '0;
  int checks = 0, failures = 0;

  router #(.MY_X(1), .MY_Y(1)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t %s", $time, what); end
  endtask

  function automatic int xy(int dx, int dy);
    if (dx != 1) return dx > 1 ? int'(PORT_EAST) : int'(PORT_WEST);
    if (dy != 1) return dy > 1 ? int'(PORT_NORTH) : int'(PORT_SOUTH);
    return int'(PORT_LOCAL);
  endfunction

  typedef flit_t pkt_t[$];

  // expected packets per (input, output, vc), in send order
  pkt_t  expq[NPORTS][NPORTS][NVC][$];
  // packet in progress at each (output, vc)
  pkt_t  cur[NPORTS][NVC];
  bit    cur_on[NPORTS][NVC];
  // source state
  flit_t pend[NPORTS][$];
  int    pend_vc[NPORTS][$];   // VC of each pending flit
  int    src_cred[NPORTS][NVC];
  int    seq[NPORTS];
  // sink state
  int    held[NPORTS][NVC];
  int    sink_rate;
  int    received = 0, sent_pkts = 0;
  bit    random_phase = 0;
  int    n_contend = 0, n_credit_stall = 0, n_lock_wait = 0;
  longint cycle = 0;
  longint t_in[$];
  longint last_t[NPORTS][NVC];

  // internal signals of the input ports, for counting stalls
  logic [NPORTS-1:0][NVC-1:0] p_req, p_elig;
  port_e p_route[NPORTS][NVC];
  for (genvar gi = 0; gi < NPORTS; gi++) begin : g_probe
    assign p_req[gi]  = dut.g_in[gi].u_in.vc_req;
    assign p_elig[gi] = dut.g_in[gi].u_in.eligible;
    for (genvar gv = 0; gv < NVC; gv++) begin : g_vc
      assign p_route[gi][gv] = dut.g_in[gi].u_in.route[gv];
    end
  end

  function automatic pkt_t make_packet(int src, int n, int dx, int dy);
    pkt_t p;
    for (int k = 0; k < n; k++) begin
      flit_t f;
      f.ftype = (n == 1) ? FLIT_SINGLE : (k == 0) ? FLIT_HEAD : (k == n - 1) ? FLIT_TAIL : FLIT_BODY;
      f.dst_x = (k == 0) ? 3'(dx) : 3'(k);
      f.dst_y = (k == 0) ? 3'(dy) : 3'(src);
      f.payload = (k == 0) ? {5'(seq[src]), 3'(src)} : 8'($urandom);
      p.push_back(f);
    end
    seq[src]++;
    return p;
  endfunction

  task automatic queue_packet(int src, int vc, int n, int dx, int dy);
    pkt_t p = make_packet(src, n, dx, dy);
    expq[src][xy(dx, dy)][vc].push_back(p);
    foreach (p[k]) begin pend[src].push_back(p[k]); pend_vc[src].push_back(vc); end
    sent_pkts++;
  endtask

  // sources: one flit per input per cycle when the VC has a credit
  always @(negedge clk) begin
    for (int i = 0; i < NPORTS; i++) begin
      in_link[i] = '0;
      if (!rst && pend[i].size() > 0 && src_cred[i][pend_vc[i][0]] > 0 &&
          (!random_phase || $urandom_range(0, 3) != 0)) begin
        in_link[i].valid = 1;
        in_link[i].vc = VC_W'(pend_vc[i][0]);
        in_link[i].flit = pend[i].pop_front();
        src_cred[i][pend_vc[i][0]]--; void'(pend_vc[i].pop_front());
      end
    end
  end

  // sinks, credits and checking at each rising edge
  always @(posedge clk) begin
    if (!rst) begin
      cycle++;
      for (int i = 0; i < NPORTS; i++)
        for (int v = 0; v < NVC; v++) if (up_credit[i][v]) src_cred[i][v]++;
      // coverage of the mechanisms
      for (int o = 0; o < NPORTS; o++) if ($countones(dut.o_req[o]) > 1) n_contend++;
      for (int i = 0; i < NPORTS; i++)
        for (int v = 0; v < NVC; v++)
          if (p_req[i][v] && !p_elig[i][v]) begin
            if (!dut.ovc_credit_ok[p_route[i][v]][v]) n_credit_stall++;
            else n_lock_wait++;
          end
      // sinks free flits and return credits
      for (int o = 0; o < NPORTS; o++)
        for (int v = 0; v < NVC; v++) begin
          dn_credit[o][v] <= 1'b0;
          if (held[o][v] > 0 && $urandom_range(0, 99) < sink_rate) begin
            held[o][v]--;
            dn_credit[o][v] <= 1'b1;
          end
        end
      // arrivals
      for (int o = 0; o < NPORTS; o++) if (out_link[o].valid) begin
        automatic int v = int'(out_link[o].vc);
        automatic flit_t f = out_link[o].flit;
        held[o][v]++;
        check(held[o][v] <= VC_DEPTH, $sformatf("sink overflow out%0d vc%0d", o, v));
        if (!cur_on[o][v]) begin
          automatic int src = int'(f.payload[2:0]);
          check(f.ftype inside {FLIT_HEAD, FLIT_SINGLE}, $sformatf("packet starts with a head (out%0d vc%0d)", o, v));
          check(src < NPORTS && expq[src][o][v].size() > 0,
                $sformatf("head from input %0d expected at out%0d vc%0d", src, o, v));
          if (src < NPORTS && expq[src][o][v].size() > 0) begin
            cur[o][v] = expq[src][o][v].pop_front();
            cur_on[o][v] = 1;
            check(xy(int'(f.dst_x), int'(f.dst_y)) == o, "XY output port");
          end
          if (!random_phase && t_in.size() > 0) begin
            checks++;
            if (cycle - t_in[0] != 4) begin
              failures++;
              $display("FAIL head latency %0d cycles, expected 4", cycle - t_in[0]);
            end
          end
        end
        if (!random_phase && !(f.ftype inside {FLIT_HEAD, FLIT_SINGLE})) begin
          checks++;
          if (cycle != last_t[o][v] + 1) begin
            failures++;
            $display("FAIL flit gap of %0d cycles in a lone packet", cycle - last_t[o][v]);
          end
        end
        last_t[o][v] = cycle;
        if (cur_on[o][v]) begin
          automatic flit_t e = cur[o][v].pop_front();
          check(f == e, $sformatf("flit out%0d vc%0d got %h expected %h", o, v, f, e));
          if (cur[o][v].size() == 0) begin cur_on[o][v] = 0; received++; end
        end
      end
      for (int i = 0; i < NPORTS; i++) if (in_link[i].valid && !random_phase) begin
        if (in_link[i].flit.ftype inside {FLIT_HEAD, FLIT_SINGLE}) t_in.push_back(cycle);
      end
    end
  end

  initial begin
    for (int i = 0; i < NPORTS; i++) begin
      seq[i] = 0;
      for (int v = 0; v < NVC; v++) src_cred[i][v] = VC_DEPTH;
    end
    sink_rate = 100;
    repeat (3) @(posedge clk);
    rst <= 0;
    // phase 1: one lone packet at a time, each input to each output
    for (int i = 0; i < NPORTS; i++)
      for (int o = 0; o < NPORTS; o++) begin
        automatic int dx = (o == int'(PORT_EAST)) ? 2 : (o == int'(PORT_WEST)) ? 0 : 1;
        automatic int dy = (o == int'(PORT_NORTH)) ? 2 : (o == int'(PORT_SOUTH)) ? 0 : 1;
        @(negedge clk);
        t_in.delete();
        queue_packet(i, (i + o) % NVC, 8, dx, dy);
        repeat (20) @(posedge clk);
        check(received == i * NPORTS + o + 1, "lone packet delivered");
      end
    // phase 2: random load
    random_phase = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      sink_rate = ((c / 400) % 2 != 0) ? 20 : 90;
      for (int i = 0; i < NPORTS; i++)
        if (pend[i].size() == 0 && $urandom_range(0, 2) == 0)
          queue_packet(i, $urandom_range(0, NVC - 1), $urandom_range(1, 6),
                       $urandom_range(0, 2), $urandom_range(0, 2));
    end
    sink_rate = 100;
    repeat (400) @(posedge clk);
    check(received == sent_pkts, $sformatf("all packets delivered: %0d of %0d", received, sent_pkts));
    $display("router: %0d packets, contention %0d, credit stalls %0d, ownership waits %0d",
             received, n_contend, n_credit_stall, n_lock_wait);
    checks += 3;
    if (n_contend == 0) begin failures++; $display("FAIL no switch contention seen"); end
    if (n_credit_stall == 0) begin failures++; $display("FAIL no credit stall seen"); end
    if (n_lock_wait == 0) begin failures++; $display("FAIL no ownership wait seen"); end
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
