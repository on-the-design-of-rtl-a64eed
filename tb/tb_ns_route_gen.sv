// Exhaustive test of the Route Generator for K(2,3) and K(2,4): every
// source and destination pair.
//
// The reference is worked out from the graph, not from letters overlapping:
// the testbench builds the list of node words, takes the arcs of the Kautz
// digraph (word x to every word whose first K-1 letters are the last K-1
// of x) and finds distances by breadth-first search. Each route the
// generator gives is walked link by link (link p of word w appends the
// p-th smallest letter that differs from the last letter of w) and must end
// with 0 exactly at the destination. Checked: route 0 is as long as the
// distance; a second route is given for every pair of different nodes; it
// shares no intermediate node with route 0 and visits neither end on the
// way; and it is as short as the shortest such path, found by a second
// search that leaves out route 0's intermediate nodes (and, when route 0
// is a single arc, that arc). The worked example 120 -> 201 is checked
// byte by byte. Purely combinational: inputs change every #1.
module tb_ns_route_gen;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [2:0][1:0]               s3, t3;
  logic [1:0][5:0][7:0]          r3;
  logic [1:0][2:0]               l3;
  logic [1:0]                    n3;
  logic [3:0][1:0]               s4, t4;
  logic [1:0][6:0][7:0]          r4;
  logic [1:0][2:0]               l4;
  logic [1:0]                    n4;

  ns_route_gen #(.K(3)) dut3 (.src_word(s3), .dst_word(t3), .routes(r3), .route_len(l3), .nroutes(n3));
  ns_route_gen #(.K(4)) dut4 (.src_word(s4), .dst_word(t4), .routes(r4), .route_len(l4), .nroutes(n4));

  int n_two = 0, n_pairs = 0, n_longer = 0;

  typedef int word_t [$];

  function automatic bit same(word_t a, word_t b);
    foreach (a[i]) if (a[i] != b[i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic word_t step(word_t w, int p);
    word_t v;
    int rank, y;
    rank = 0; y = -1;
    for (int c = 0; c < 3; c++)
      if (c != w[w.size() - 1]) begin
        rank++;
        if (rank == p) y = c;
      end
    v = w[1:$];
    v.push_back(y);
    return v;
  endfunction

  word_t words [$];
  int    nn;

  function automatic bit arc(int u, int b);
    return same(words[u][1:$], words[b][0:words[b].size()-2]);
  endfunction

  // shortest path length from a to b avoiding the nodes marked in 'gone';
  // no_direct leaves out the arc a -> b; -1 if none
  function automatic int bfs(int a, int b, bit gone [], bit no_direct);
    int d [];
    int q [$];
    d = new[nn];
    foreach (d[i]) d[i] = -1;
    d[a] = 0;
    q.push_back(a);
    while (q.size() > 0) begin
      int u;
      u = q.pop_front();
      for (int v = 0; v < nn; v++)
        if (d[v] < 0 && !gone[v] && arc(u, v) && !(no_direct && u == a && v == b)) begin
          d[v] = d[u] + 1;
          q.push_back(v);
        end
    end
    return d[b];
  endfunction

  function automatic int node_of(word_t w);
    foreach (words[c]) if (same(words[c], w)) return c;
    return -1;
  endfunction

  task automatic run(input int K);
    words = {};
    for (int x = 0; x < 3 ** K; x++) begin
      word_t w;
      int v, ok;
      v = x;
      w = {};
      for (int j = 0; j < K; j++) begin w.push_front(v % 3); v = v / 3; end
      ok = 1;
      for (int j = 0; j + 1 < K; j++) if (w[j] == w[j + 1]) ok = 0;
      if (ok) words.push_back(w);
    end
    nn = words.size();
    check(nn == 2 ** K + 2 ** (K - 1), $sformatf("K=%0d: %0d nodes", K, nn));
    for (int a = 0; a < nn; a++)
      for (int b = 0; b < nn; b++) begin
        int nr, len [2], d0, d1;
        int rt [2][$];
        int mids [2][$];
        bit gone [];
        for (int j = 0; j < K; j++) begin
          if (K == 3) begin s3[K-1-j] = 2'(words[a][j]); t3[K-1-j] = 2'(words[b][j]); end
          else        begin s4[K-1-j] = 2'(words[a][j]); t4[K-1-j] = 2'(words[b][j]); end
        end
        #1;
        nr = (K == 3) ? n3 : n4;
        for (int r = 0; r < 2; r++) begin
          len[r] = (K == 3) ? l3[r] : l4[r];
          rt[r] = {};
          for (int i = 0; i < len[r]; i++) rt[r].push_back((K == 3) ? r3[r][i] : r4[r][i]);
        end
        gone = new[nn];
        foreach (gone[i]) gone[i] = 0;
        d0 = bfs(a, b, gone, 0);
        check(nr == ((a != b) ? 2 : 1), $sformatf("K=%0d %0d->%0d: %0d routes", K, a, b, nr));
        check(len[0] == d0 + 1, $sformatf("K=%0d %0d->%0d: shortest has %0d bytes, distance %0d",
                                          K, a, b, len[0], d0));
        for (int r = 0; r < nr; r++) begin
          bit ok;
          word_t w;
          ok = (len[r] >= 1) && (rt[r][len[r] - 1] == 0);
          w = words[a];
          mids[r] = {};
          for (int i = 0; i + 1 < len[r]; i++) begin
            if (rt[r][i] != 1 && rt[r][i] != 2) ok = 0;
            else begin
              w = step(w, rt[r][i]);
              if (i + 2 < len[r]) mids[r].push_back(node_of(w));
            end
          end
          check(ok && same(w, words[b]), $sformatf("K=%0d %0d->%0d: route %0d does not reach it", K, a, b, r));
        end
        if (nr == 2) begin
          bit disjoint;
          disjoint = 1;
          foreach (mids[1][i]) begin
            if (mids[1][i] == a || mids[1][i] == b) disjoint = 0;
            foreach (mids[0][j]) if (mids[1][i] == mids[0][j]) disjoint = 0;
          end
          check(disjoint, $sformatf("K=%0d %0d->%0d: routes share a node", K, a, b));
          foreach (mids[0][j]) gone[mids[0][j]] = 1;
          d1 = bfs(a, b, gone, len[0] == 2);
          check(len[1] == d1 + 1, $sformatf("K=%0d %0d->%0d: second route %0d bytes, shortest such %0d hops",
                                            K, a, b, len[1], d1));
          check(len[1] <= K + 3, $sformatf("K=%0d %0d->%0d: second route too long", K, a, b));
          if (len[1] > K + 1) n_longer++;
          n_two++;
        end
        n_pairs++;
      end
  endtask

  initial begin
    s3 = '0; t3 = '0; s4 = '0; t4 = '0;
    run(3);
    // the worked example: 120 -> 201, shortest 1 0, then 2 1 1 0
    s3 = {2'd1, 2'd2, 2'd0};
    t3 = {2'd2, 2'd0, 2'd1};
    #1;
    check(n3 == 2 && l3[0] == 2 && r3[0][0] == 1 && r3[0][1] == 0, "120 -> 201 shortest route 1 0");
    check(l3[1] == 4 && r3[1][0] == 2 && r3[1][1] == 1 && r3[1][2] == 1 && r3[1][3] == 0,
          "120 -> 201 second route 2 1 1 0");
    run(4);
    $display("pairs=%0d with_two_routes=%0d second_longer_than_K=%0d", n_pairs, n_two, n_longer);
    check(n_two > 0, "never two routes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
