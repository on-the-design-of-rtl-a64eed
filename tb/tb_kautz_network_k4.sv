// End-to-end test of the 24-node Kautz network K(2,4), the Kautz column
// d = k = 4 of the node-count comparison: the same test as the 12-node one
// (tb_kautz_network) with K = 4 and without the K(2,3) worked example.
//
// The testbench plays every node's processor and local memory and joins
// the switches' clock handshakes into one rendezvous (all cl inputs high,
// wait for every clock low, all cl inputs low, wait for every clock high).
// Its own route model (the shortest route, then the shortest path of up to
// K+2 hops that avoids the first route's intermediate nodes) gives the
// length of each route, and every delivery is checked against it: End Of
// Data at the destination Router 1 + 3h + bytes edges after the start word
// left the source Router, for h route bytes. Also checked: a node sending
// to itself while a long worm is being delivered to its Router is refused
// and reported as failed; a clean send arrives and is reported on the
// predicted cycles; and in random traffic from all nodes every message
// reported delivered arrives intact exactly once and none reported failed
// arrives. Multi-hop worms, worms ended by a NACK, failure reports and
// deliveries on the second route are counted and must all happen.
module tb_kautz_network_k4;
  import ns_pkg::*;

  localparam int K      = 4;               // Table 1: 24 nodes
  localparam int NODES  = 2 ** K + 2 ** (K - 1);
  localparam int P10    = 10 ** (K - 1);
  localparam int AW     = 8;
  localparam int LW     = 8;
  localparam int MR     = K + 3;           // route bytes: K+2 hops and the final 0
  localparam int NW     = 4 * MR + 4;      // the network's NACK guard time
  localparam int MAXMSG = 250;
  localparam int MAXB   = 40;
  localparam int N_RAND = 192 / NODES;     // messages per node in the random phase

  logic                                  rst_n;
  logic [NODES-1:0]                      tx_start;
  logic [NODES-1:0][AW-1:0]              tx_addr;
  logic [NODES-1:0][LW-1:0]              tx_len;
  logic [NODES-1:0][K-1:0][1:0]          tx_dst;
  logic [NODES-1:0]                      tx_busy, tx_done, tx_ok;
  logic [NODES-1:0][AW-1:0]              rx_base;
  logic [NODES-1:0]                      rx_done;
  logic [NODES-1:0][LW-1:0]              rx_len;
  logic [NODES-1:0]                      mem_rd_en;
  logic [NODES-1:0][AW-1:0]              mem_rd_addr;
  logic [NODES-1:0][7:0]                 mem_rd_data;
  logic [NODES-1:0]                      mem_wr_en;
  logic [NODES-1:0][AW-1:0]              mem_wr_addr;
  logic [NODES-1:0][7:0]                 mem_wr_data;
  logic [NODES-1:0][5:0]                 sw_cl;
  logic [NODES-1:0]                      sw_clk;

  kautz_network #(.K(K)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // ---------------- node words and routes ----------------
  int word [NODES];                     // letters as decimal digits, letter 1 on top
  int n_words = 0;

  function automatic int node_by_word(int w);
    for (int n = 0; n < NODES; n++) if (word[n] == w) return n;
    return -1;
  endfunction

  function automatic int lt(int w, int j);  // letter j (1..K) of a word
    return (w / (10 ** (K - j))) % 10;
  endfunction

  function automatic void make_route(int w, int ys[K], int n, ref int r[$]);
    r.delete();
    for (int k = 0; k < n; k++) begin
      int last, other;
      last  = lt(w, K);
      other = 3 - last - ys[k];         // the other allowed letter
      r.push_back(ys[k] < other ? 1 : 2);
      w = (w % P10) * 10 + ys[k];
    end
    r.push_back(0);
  endfunction

  // largest j with the last j letters of s equal to the first j of t
  function automatic int overlap(int s, int t);
    for (int j = K; j >= 1; j--) begin
      bit eq;
      eq = 1;
      for (int i = 1; i <= j; i++) if (lt(s, K - j + i) != lt(t, i)) eq = 0;
      if (eq) return j;
    end
    return 0;
  endfunction

  function automatic void shortest_route(int s, int t, ref int r[$]);
    int m;
    int ys[K];
    m = overlap(s, t);
    for (int k = 0; k < K - m; k++) ys[k] = lt(t, m + 1 + k);
    make_route(s, ys, K - m, r);
  endfunction

  // word reached from w through link p
  function automatic int follow(int w, int p);
    int last, rank, y;
    last = lt(w, K); rank = 0; y = -1;
    for (int c = 0; c < 3; c++)
      if (c != last) begin
        rank++;
        if (rank == p) y = c;
      end
    return (w % P10) * 10 + y;
  endfunction

  // second route: among link sequences of 1 to 5 hops, shortest first and
  // then in link order, the first that reaches t without passing s, t or
  // an intermediate node of route r0, and that is not r0 itself
  function automatic bit second_route(int s, int t, int r0[$], ref int r[$]);
    int mids [$];
    int w;
    w = s;
    for (int i = 0; i + 2 < r0.size(); i++) begin w = follow(w, r0[i]); mids.push_back(w); end
    for (int L = 1; L <= K + 2; L++)
      for (int c = 0; c < (1 << L); c++) begin
        bit ok;
        int cand [$];
        ok = 1; w = s; cand = {};
        for (int i = 0; i < L; i++) begin
          cand.push_back(((c >> (L - 1 - i)) & 1) + 1);
          w = follow(w, cand[i]);
          if (i < L - 1) begin
            if (w == s || w == t) ok = 0;
            foreach (mids[j]) if (mids[j] == w) ok = 0;
          end
        end
        cand.push_back(0);
        if (ok && w == t && cand != r0) begin r = cand; return 1'b1; end
      end
    return 1'b0;
  endfunction

  // ---------------- messages ----------------
  int         n_msg = 0;
  int         m_src [MAXMSG], m_dst [MAXMSG], m_start [MAXMSG], m_nd [MAXMSG];
  int         m_r0 [MAXMSG][$], m_r1 [MAXMSG][$];
  int         m_nr [MAXMSG];
  logic [7:0] m_data [MAXMSG][MAXB];
  int         m_expect [MAXMSG];        // 1 delivered, 0 failed, -1 either
  int         m_edge [MAXMSG];          // edge at which tx_start was taken
  int         m_deliv [MAXMSG], m_rx_cyc [MAXMSG], m_done_cyc [MAXMSG];
  int         m_result [MAXMSG];        // -1 pending, 1 ok, 0 failed
  int         m_tries [MAXMSG];         // worms sent for it so far
  int         last_start [NODES];       // edge of a Router's latest start word
  bit         in_worm [NODES];

  int cp_q [NODES][$];
  int cp_cur [NODES];
  int cp_free [NODES];

  // the routes expected from the Route Generator: the shortest, then the
  // shortest one that shares no node with it
  function automatic int add_msg(int s, int t, int nd, int start, int exp_d);
    int id;
    int r[$];
    id = n_msg;
    n_msg++;
    m_src[id] = s; m_dst[id] = t; m_start[id] = start; m_nd[id] = nd;
    m_expect[id] = exp_d; m_edge[id] = -1; m_deliv[id] = 0; m_rx_cyc[id] = -1;
    m_done_cyc[id] = -1; m_result[id] = -1;
    m_nr[id] = 0;
    shortest_route(word[s], word[t], r);
    m_r0[id] = r;
    m_nr[id] = 1;
    if (s != t && second_route(word[s], word[t], m_r0[id], r)) begin
      m_r1[id] = r;
      m_nr[id] = 2;
    end
    m_tries[id] = 0;
    m_data[id][0] = 8'(id);
    for (int k = 1; k < nd; k++) m_data[id][k] = 8'(id * 5 + k * 29 + 3);
    cp_q[s].push_back(id);
    return id;
  endfunction

  // ---------------- memories ----------------
  logic [7:0] mem [NODES][256];
  logic [AW-1:0] rd_a [NODES];
  bit            wr_e [NODES];
  logic [AW-1:0] wr_a [NODES];
  logic [7:0]    wr_d [NODES];

  // ---------------- mechanism counters ----------------
  int n_delivered = 0, n_multi_hop = 0, n_failed = 0, n_second_route = 0;
  int n_nack_abort = 0, n_example = 0, n_timed = 0;

  // after a rising edge: memory, then the reports
  task automatic sample();
    for (int n = 0; n < NODES; n++) begin
      mem_rd_data[n] = mem[n][rd_a[n]];
      if (wr_e[n]) mem[n][wr_a[n]] = wr_d[n];
      // worms leaving the Router: a marked word on an idle link starts one
      if (rt_word[n].typ) begin
        if (!in_worm[n]) begin
          last_start[n] = cycle;
          if (cp_cur[n] >= 0) m_tries[cp_cur[n]]++;
        end
        in_worm[n] = !in_worm[n];
      end
    end
    for (int n = 0; n < NODES; n++) begin
      if (rx_done[n]) begin
        int id;
        bit ok;
        id = mem[n][8'h80];
        ok = (id < n_msg) && (m_dst[id] == n) && (rx_len[n] == LW'(m_nd[id]));
        if (ok) for (int k = 0; k < m_nd[id]; k++) if (mem[n][8'h80 + k] != m_data[id][k]) ok = 0;
        check(ok, $sformatf("node %0d received a message that matches none sent to it", n));
        if (ok) begin
          int h;
          m_deliv[id]++;
          m_rx_cyc[id] = cycle;
          n_delivered++;
          // the route used is the one of the latest worm from the source;
          // its End Of Data reaches the Router 1 + 3h + bytes edges after
          // the start word left the source Router
          h = (m_tries[id] == 2) ? m_r1[id].size() : m_r0[id].size();
          check(m_tries[id] == 1 || m_tries[id] == 2,
                $sformatf("msg %0d arrived after %0d worms", id, m_tries[id]));
          check(cycle == last_start[m_src[id]] + 1 + 3 * h + m_nd[id],
                $sformatf("msg %0d arrived at %0d, its worm started at %0d over %0d switches",
                          id, cycle, last_start[m_src[id]], h));
          n_timed++;
          if (h > 2) n_multi_hop++;
          if (m_tries[id] == 2) n_second_route++;
        end
      end
      if (tx_done[n]) begin
        int id;
        id = cp_cur[n];
        check(id >= 0, $sformatf("report from node %0d with no message", n));
        if (id >= 0) begin
          m_result[id]   = tx_ok[n] ? 1 : 0;
          m_done_cyc[id] = cycle;
          if (!tx_ok[n]) n_failed++;
          cp_cur[n]  = -1;
          cp_free[n] = cycle + 1;
        end
      end
    end
  endtask

  // before a rising edge: processor requests, memory ports
  task automatic drive();
    for (int n = 0; n < NODES; n++) begin
      rd_a[n] = mem_rd_addr[n];
      wr_e[n] = mem_wr_en[n];
      wr_a[n] = mem_wr_addr[n];
      wr_d[n] = mem_wr_data[n];
      tx_start[n] = 1'b0;
      if (cp_cur[n] < 0 && cp_q[n].size() > 0 && m_start[cp_q[n][0]] <= cycle &&
          cp_free[n] <= cycle && !tx_busy[n]) begin
        int id;
        id = cp_q[n].pop_front();
        cp_cur[n] = id;
        for (int k = 0; k < m_nd[id]; k++) mem[n][k] = m_data[id][k];
        tx_addr[n] = '0;
        tx_len[n]  = LW'(m_nd[id]);
        for (int j = 1; j <= K; j++) tx_dst[n][K - j] = 2'(lt(word[m_dst[id]], j));
        tx_start[n]   = 1'b1;
        m_edge[id]    = cycle + 1;
      end
    end
  endtask

  // the Router links, watched: a NACK reaching a Router while it is still
  // sending (the worm is ended early), and the words a Router sends
  logic [NODES-1:0] abort_seen;
  flit_t            rt_word [NODES];
  for (genvar g = 0; g < NODES; g++) begin : g_watch
    assign abort_seen[g] = dut.g_node[g].rt_in_nack && tx_busy[g] && mem_rd_en[g];
    assign rt_word[g]    = dut.g_node[g].rt_in_flit;
  end

  task automatic do_round();
    sw_cl = '1;
    #2;
    check(sw_clk == '0, "a switch clock did not fall");
    drive();
    #2;
    sw_cl = '0;
    #2;
    check(sw_clk == '1, "a switch clock did not rise");
    cycle++;
    sample();
    for (int n = 0; n < NODES; n++) if (abort_seen[n]) n_nack_abort++;
    #2;
  endtask

  initial begin
    int ex, ex2, a, b, blk;
    // node words in ascending order
    for (int x = 0; x < 3 ** K; x++) begin
      int v, w, prev;
      bit ok;
      v = x; w = 0; prev = -1; ok = 1;
      for (int j = 0; j < K; j++) begin
        int d;
        d = (v / (3 ** (K - 1 - j))) % 3;
        if (d == prev) ok = 0;
        prev = d;
        w = w * 10 + d;
      end
      if (ok) begin word[n_words] = w; n_words++; end
    end
    check(n_words == NODES, "node count");
    rst_n = 1;
    #1 rst_n = 0;
    tx_start = '0; tx_addr = '0; tx_len = '0; tx_dst = '0; mem_rd_data = '0; sw_cl = '0;
    for (int n = 0; n < NODES; n++) begin
      rx_base[n] = 8'h80; cp_cur[n] = -1; cp_free[n] = 0; last_start[n] = -1; in_worm[n] = 0;
      rd_a[n] = '0; wr_e[n] = 0; wr_a[n] = '0; wr_d[n] = '0;
      for (int a2 = 0; a2 < 256; a2++) mem[n][a2] = '0;
    end
    #5 rst_n = 1;
    #5;

    ex = -1; ex2 = -1;
    if (K == 3) begin
      // the worked example, 120 -> 201, while a worm from 212 to 201 holds
      // the arc 120 -> 201: the shortest route (1 0) is refused at the
      // source's own switch and the Router retries on the second route
      // 120 -> 202 -> 020 -> 201 (2 1 1 0)
      blk = add_msg(node_by_word(212), node_by_word(201), 16, 2, 1);
      ex  = add_msg(node_by_word(120), node_by_word(201), 10, 10, 1);
      check(m_nr[ex] == 2 && m_r0[ex].size() == 2 && m_r0[ex][0] == 1 && m_r0[ex][1] == 0,
            "shortest route 120 -> 201 is links 1 0");
      check(m_r1[ex].size() == 4 && m_r1[ex][0] == 2 && m_r1[ex][1] == 1 && m_r1[ex][2] == 1
            && m_r1[ex][3] == 0, "second route 120 -> 201 is links 2 1 1 0");
      // the same message again on a quiet network: the shortest route
      ex2 = add_msg(node_by_word(120), node_by_word(201), 10, 90, 1);
    end
    // a long worm from the first node being delivered to the last node's
    // Router while that node sends a message to itself: that message has
    // only one route (through its own switch back to its Router), is
    // refused and its failure reported
    a = add_msg(0, NODES - 1, 30, 140, 1);
    b = add_msg(NODES - 1, NODES - 1, 8, 140 + 3 * m_r0[a].size() + 4, 0);
    check(m_nr[b] == 1 && m_r0[b].size() == 1, "one route, a single 0, from a node to itself");

    // random traffic: every node sends N_RAND messages, each long enough
    // for the longest route (the rule for late NACKs, see ns_router)
    for (int k = 0; k < N_RAND; k++)
      for (int s = 0; s < NODES; s++) begin
        int t;
        t = $urandom_range(0, NODES - 1);
        void'(add_msg(s, t, $urandom_range(3 * MR - 5, 30), 220, -1));
      end

    begin
      bit busy;
      busy = 1;
      while (busy || cycle < 220) begin
        do_round();
        busy = 0;
        for (int n = 0; n < NODES; n++)
          if (cp_q[n].size() > 0 || cp_cur[n] >= 0) busy = 1;
      end
    end
    repeat (40) do_round();

    for (int k = 0; k < n_msg; k++) begin
      check(m_result[k] >= 0, $sformatf("msg %0d never reported", k));
      if (m_result[k] == 1)
        check(m_deliv[k] == 1, $sformatf("msg %0d reported delivered, arrived %0d times", k, m_deliv[k]));
      if (m_result[k] == 0)
        check(m_deliv[k] == 0, $sformatf("msg %0d reported failed but arrived", k));
      if (m_expect[k] >= 0)
        check(m_result[k] == m_expect[k], $sformatf("msg %0d result %0d, expected %0d",
                                                    k, m_result[k], m_expect[k]));
    end
    // clean sends, against the edge e at which tx_start was taken: End Of
    // Data at the destination at e + 2 + 3h + bytes, the report at
    // e + h + bytes + NACK guard + 2
    for (int j = (K == 3) ? 0 : 1; j < 2; j++) begin
      int id, h;
      id = (j == 0) ? ex2 : a;
      h  = m_r0[id].size();
      check(m_rx_cyc[id] == m_edge[id] + 2 + 3 * h + m_nd[id],
            $sformatf("msg %0d arrived at %0d, taken at %0d over %0d switches",
                      id, m_rx_cyc[id], m_edge[id], h));
      // the sender reports after its End Of Data and the NACK guard time
      check(m_done_cyc[id] == m_edge[id] + h + m_nd[id] + NW + 2,
            $sformatf("msg %0d reported at %0d", id, m_done_cyc[id]));
      n_timed++;
    end
    if (K == 3) begin
      check(m_tries[ex] == 2, $sformatf("example sent %0d times, expected a retry", m_tries[ex]));
      n_example = (m_result[ex] == 1 && m_deliv[ex] == 1 && m_tries[ex] == 2 && m_deliv[ex2] == 1) ? 1 : 0;
    end

    $display("mechanisms: delivered=%0d multi_hop=%0d nack_abort=%0d failed=%0d second_route=%0d example=%0d timed=%0d",
             n_delivered, n_multi_hop, n_nack_abort, n_failed, n_second_route, n_example, n_timed);
    if (K == 3) check(n_example > 0, "worked example not delivered");
    check(n_multi_hop > 0,    "no worm over several switches");
    check(n_nack_abort > 0,   "no worm ended early by a NACK");
    check(n_failed > 0,       "no failure reported to a processor");
    check(n_second_route > 0, "no message delivered on its second route");
    check(n_timed > 0,        "no arrival time checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
