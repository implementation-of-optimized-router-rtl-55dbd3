// tb_noc_mesh: end-to-end test of the 3x3 mesh at its default size.
//
// Each of the nine processing elements is modelled by a source and a sink on
// its router's local port. Sources keep a credit count per VC and send one
// flit per cycle when they hold a credit; sinks hold flits for random times
// and return a credit per flit they free.
//
// Phase 1 (latency and rate): one lone eight-flit packet from every node to
// every node. Its head must arrive 4 cycles per router on the path after it
// was injected, 4 * (|dx| + |dy| + 1), and the other flits on the cycles
// right after it.
// Phase 2 (random load): all nodes send one-flit and multi-flit packets on
// random VCs to random nodes while the sinks alternate between fast and slow.
// Every flit is checked against what its source sent, in order, per source,
// destination and VC; every packet must be delivered. The test counts, and
// fails on any it never saw: traffic leaving routers north, east, south and
// west, local delivery, switch contention, credit stalls, output-VC
// ownership waits, flits of different VCs interleaved on one link, one-flit
// and multi-flit packets.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int unsigned COLS = 3, ROWS = 3, N = COLS * ROWS;
  logic clk = 0, rst = 1;
  link_t [N-1:0] pe_in = '0, pe_out;
  logic  [N-1:0][NVC-1:0] pe_up_credit, pe_dn_credit = '0;
  int checks = 0, failures = 0;

  noc_mesh dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t %s", $time, what); end
  endtask

  typedef flit_t pkt_t[$];

  pkt_t   expq[N][N][NVC][$];      // per (src, dst, vc), in send order
  longint exp_t[N][N][NVC][$];     // injection cycle of each expected packet
  pkt_t   cur[N][NVC];
  bit     cur_on[N][NVC];
  flit_t  pend[N][$];
  int     pend_vc[N][$];    // VC of each pending flit
  int     src_cred[N][NVC];
  int     seq[N];
  int     held[N][NVC];
  int     sink_rate;
  int     received = 0, sent_pkts = 0;
  bit     random_phase = 0;
  longint cycle = 0;
  longint last_t[N][NVC];
  // mechanism counters
  int n_dir[NPORTS];
  int n_contend = 0, n_credit_stall = 0, n_lock_wait = 0, n_interleave = 0;
  int n_single = 0, n_multi = 0;

  // link activity and input-port state of every router, for the counters
  logic  [N-1:0][NPORTS-1:0]          p_valid;
  logic  [N-1:0][NPORTS-1:0][VC_W-1:0] p_vc;
  logic  [N-1:0][NPORTS-1:0]          p_last_tail;
  logic  [N-1:0][NPORTS-1:0][NPORTS-1:0] p_oreq;
  logic  [N-1:0][NPORTS-1:0][NVC-1:0] p_req, p_elig, p_cok;
  for (genvar gy = 0; gy < ROWS; gy++) begin : g_py
    for (genvar gx = 0; gx < COLS; gx++) begin : g_px
      localparam int K = gy * COLS + gx;
      for (genvar gp = 0; gp < NPORTS; gp++) begin : g_pp
        assign p_valid[K][gp] = dut.g_row[gy].g_col[gx].u_router.out_link[gp].valid;
        assign p_vc[K][gp]    = dut.g_row[gy].g_col[gx].u_router.out_link[gp].vc;
        assign p_oreq[K][gp]  = dut.g_row[gy].g_col[gx].u_router.o_req[gp];
        assign p_req[K][gp]   = dut.g_row[gy].g_col[gx].u_router.g_in[gp].u_in.vc_req;
        assign p_elig[K][gp]  = dut.g_row[gy].g_col[gx].u_router.g_in[gp].u_in.eligible;
        for (genvar gv = 0; gv < NVC; gv++) begin : g_pv
          assign p_cok[K][gp][gv] = dut.g_row[gy].g_col[gx].u_router.ovc_credit_ok[
              dut.g_row[gy].g_col[gx].u_router.g_in[gp].u_in.route[gv]][gv];
        end
      end
    end
  end

  function automatic int hops(int s, int d);
    int sx = s % COLS, sy = s / COLS, dx = d % COLS, dy = d / COLS;
    return (sx > dx ? sx - dx : dx - sx) + (sy > dy ? sy - dy : dy - sy);
  endfunction

  task automatic queue_packet(int src, int dst, int vc, int n);
    pkt_t p;
    for (int k = 0; k < n; k++) begin
      flit_t f;
      f.ftype = (n == 1) ? FLIT_SINGLE : (k == 0) ? FLIT_HEAD : (k == n - 1) ? FLIT_TAIL : FLIT_BODY;
      f.dst_x = (k == 0) ? 3'(dst % COLS) : 3'($urandom);
      f.dst_y = (k == 0) ? 3'(dst / COLS) : 3'($urandom);
      f.payload = (k == 0) ? {4'(seq[src]), 4'(src)} : 8'($urandom);
      p.push_back(f);
    end
    seq[src]++;
    expq[src][dst][vc].push_back(p);
    foreach (p[k]) begin pend[src].push_back(p[k]); pend_vc[src].push_back(vc); end
    sent_pkts++;
    if (n == 1) n_single++; else n_multi++;
  endtask

  // sources
  always @(negedge clk) begin
    for (int s = 0; s < N; s++) begin
      pe_in[s] = '0;
      if (!rst && pend[s].size() > 0 && src_cred[s][pend_vc[s][0]] > 0 &&
          (!random_phase || $urandom_range(0, 4) != 0)) begin
        pe_in[s].valid = 1;
        pe_in[s].vc = VC_W'(pend_vc[s][0]);
        pe_in[s].flit = pend[s].pop_front();
        src_cred[s][pend_vc[s][0]]--; void'(pend_vc[s].pop_front());
        if (pe_in[s].flit.ftype inside {FLIT_HEAD, FLIT_SINGLE})
          exp_t[s][int'(pe_in[s].flit.dst_y) * COLS + int'(pe_in[s].flit.dst_x)][pe_in[s].vc].push_back(cycle + 1);
      end
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      cycle++;
      for (int s = 0; s < N; s++)
        for (int v = 0; v < NVC; v++) if (pe_up_credit[s][v]) src_cred[s][v]++;
      // mechanism counters
      for (int k = 0; k < N; k++)
        for (int p = 0; p < NPORTS; p++) begin
          if (p_valid[k][p]) n_dir[p]++;
          if ($countones(p_oreq[k][p]) > 1) n_contend++;
          for (int v = 0; v < NVC; v++)
            if (p_req[k][p][v] && !p_elig[k][p][v]) begin
              if (!p_cok[k][p][v]) n_credit_stall++; else n_lock_wait++;
            end
        end
      // sinks
      for (int d = 0; d < N; d++)
        for (int v = 0; v < NVC; v++) begin
          pe_dn_credit[d][v] <= 1'b0;
          if (held[d][v] > 0 && $urandom_range(0, 99) < sink_rate) begin
            held[d][v]--;
            pe_dn_credit[d][v] <= 1'b1;
          end
        end
      for (int d = 0; d < N; d++) if (pe_out[d].valid) begin
        automatic int v = int'(pe_out[d].vc);
        automatic flit_t f = pe_out[d].flit;
        held[d][v]++;
        check(held[d][v] <= VC_DEPTH, $sformatf("sink overflow node %0d vc %0d", d, v));
        if (!cur_on[d][v]) begin
          automatic int s = int'(f.payload[3:0]);
          check(f.ftype inside {FLIT_HEAD, FLIT_SINGLE}, "packet starts with a head");
          check(int'(f.dst_y) * COLS + int'(f.dst_x) == d, "delivered to its destination");
          check(s < N && expq[s][d][v].size() > 0, $sformatf("expected a packet %0d->%0d vc%0d", s, d, v));
          if (s < N && expq[s][d][v].size() > 0) begin
            automatic longint t0 = exp_t[s][d][v].pop_front();
            cur[d][v] = expq[s][d][v].pop_front();
            cur_on[d][v] = 1;
            if (!random_phase) begin
              checks++;
              if (cycle - t0 != longint'(4 * hops(s, d) + 4)) begin
                failures++;
                $display("FAIL latency %0d->%0d: %0d cycles, expected %0d", s, d, cycle - t0, 4 * (hops(s, d) + 1));
              end
            end
          end
        end
        if (!random_phase && !(f.ftype inside {FLIT_HEAD, FLIT_SINGLE})) begin
          checks++;
          if (cycle != last_t[d][v] + 1) begin
            failures++;
            $display("FAIL flit gap of %0d cycles in a lone packet", cycle - last_t[d][v]);
          end
        end
        last_t[d][v] = cycle;
        if (cur_on[d][v]) begin
          automatic flit_t e = cur[d][v].pop_front();
          check(f == e, $sformatf("flit at node %0d vc %0d: got %h expected %h", d, v, f, e));
          if (cur[d][v].size() == 0) begin cur_on[d][v] = 0; received++; end
        end
      end
    end
  end

  // interleaving: a link carrying flits of two VCs on consecutive cycles
  logic [N-1:0][NPORTS-1:0]           prev_valid;
  logic [N-1:0][NPORTS-1:0][VC_W-1:0] prev_vc;
  always @(posedge clk) begin
    if (!rst)
      for (int k = 0; k < N; k++)
        for (int p = 1; p < NPORTS; p++)
          if (p_valid[k][p] && prev_valid[k][p] && p_vc[k][p] != prev_vc[k][p]) n_interleave++;
    prev_valid <= p_valid;
    prev_vc    <= p_vc;
  end

  initial begin
    for (int s = 0; s < N; s++) begin
      seq[s] = 0;
      for (int v = 0; v < NVC; v++) begin src_cred[s][v] = VC_DEPTH; held[s][v] = 0; cur_on[s][v] = 0; end
    end
    for (int p = 0; p < NPORTS; p++) n_dir[p] = 0;
    sink_rate = 100;
    repeat (3) @(posedge clk);
    rst <= 0;
    // phase 1: lone packets, every source to every destination
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++) begin
        @(negedge clk);
        queue_packet(s, d, (s + d) % NVC, 8);
        repeat (40) @(posedge clk);
        check(received == s * N + d + 1, $sformatf("lone packet %0d->%0d delivered", s, d));
      end
    // phase 2: random load
    random_phase = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      sink_rate = ((c / 500) % 2 != 0) ? 25 : 95;
      for (int s = 0; s < N; s++)
        if (pend[s].size() == 0 && $urandom_range(0, 1) == 0)
          queue_packet(s, $urandom_range(0, N - 1), $urandom_range(0, NVC - 1), $urandom_range(1, 6));
    end
    sink_rate = 100;
    repeat (1000) @(posedge clk);
    check(received == sent_pkts, $sformatf("all packets delivered: %0d of %0d", received, sent_pkts));
    $display("mesh: %0d packets (%0d one-flit, %0d multi-flit)", received, n_single, n_multi);
    $display("flits out of local/north/east/south/west ports: %0d %0d %0d %0d %0d",
             n_dir[0], n_dir[1], n_dir[2], n_dir[3], n_dir[4]);
    $display("contention %0d, credit stalls %0d, ownership waits %0d, VC interleavings %0d",
             n_contend, n_credit_stall, n_lock_wait, n_interleave);
    for (int p = 0; p < NPORTS; p++) begin
      checks++;
      if (n_dir[p] == 0) begin failures++; $display("FAIL no traffic out of port %0d", p); end
    end
    checks += 6;
    if (n_contend == 0)      begin failures++; $display("FAIL no switch contention seen"); end
    if (n_credit_stall == 0) begin failures++; $display("FAIL no credit stall seen"); end
    if (n_lock_wait == 0)    begin failures++; $display("FAIL no ownership wait seen"); end
    if (n_interleave == 0)   begin failures++; $display("FAIL no VC interleaving seen"); end
    if (n_single == 0)       begin failures++; $display("FAIL no one-flit packet"); end
    if (n_multi == 0)        begin failures++; $display("FAIL no multi-flit packet"); end
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
