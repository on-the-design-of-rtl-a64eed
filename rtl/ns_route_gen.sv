// Route Generator of one node of a Kautz network K(2,K): from this node's
// word and a destination word it produces two node-disjoint routes, the
// shortest first, each a list of link numbers for the switches on the way
// ending with 0 (the Router link of the destination switch).
//
// A node word has K letters from 0..2 with no two equal neighbours, and a
// hop appends one letter to the word and drops its first: output link 1
// appends the smaller of the two letters that differ from the last letter,
// link 2 the larger. Route 0 is the shortest route: with m the largest
// overlap (the last m letters of the source equal the first m of the
// destination) it appends the destination's letters m+1..K, K-m hops.
// Route 1 is the shortest path of at most K+2 hops whose intermediate
// nodes avoid the source, the destination and every intermediate node of
// route 0, and which is not route 0 itself; among equally short ones the
// first in link order (1 before 2) is taken. It is searched among all 2^L
// link sequences of each length L, shortest length first. Being shortest,
// it visits no node twice. Source equal to destination gives only route 0
// (the single byte 0); so would a pair with no such second path, which the
// exhaustive testbench shows does not occur for K = 3 and K = 4.
//
// Purely combinational. Letter 1 of a word is element K-1 of the packed
// array. Route bytes use the low two bits; the rest are zero, since a route
// byte on a link is a full data byte.
//
// From the description of the network: routes from the concatenation of
// words (the generic route) or shorter, d node-disjoint routes with
// increasing length, as short as possible and free of loops. The search by
// length and the link order among equal lengths are this design's own: the
// document takes its generator from elsewhere.
module ns_route_gen #(
  parameter  int K         = 3,                      // word length (diameter)
  localparam int MAX_HOPS  = K + 2,                  // longest second route
  localparam int MAX_ROUTE = MAX_HOPS + 1,           // route bytes, final 0 included
  localparam int RL_W      = $clog2(MAX_ROUTE + 1)
) (
  input  logic [K-1:0][1:0]                  src_word,   // this node
  input  logic [K-1:0][1:0]                  dst_word,   // destination
  output logic [1:0][MAX_ROUTE-1:0][7:0]     routes,
  output logic [1:0][RL_W-1:0]               route_len,
  output logic [1:0]                         nroutes
);

  typedef logic [K-1:0][1:0] word_t;

  // letter appended by link p (1 or 2) after last letter c
  function automatic logic [1:0] letter_of(input logic [1:0] c, input int p);
    if (p == 1) return (c == 2'd0) ? 2'd1 : 2'd0;
    else        return (c == 2'd2) ? 2'd1 : 2'd2;
  endfunction

  // link number for appending letter y after last letter c
  function automatic logic [7:0] link_of(input logic [1:0] c, input logic [1:0] y);
    return (letter_of(c, 1) == y) ? 8'd1 : 8'd2;
  endfunction

  function automatic word_t hop(input word_t w, input int p);
    word_t v;
    v[K-1:1] = w[K-2:0];
    v[0]     = letter_of(w[0], p);
    return v;
  endfunction

  int          m;            // overlap
  int          hops0;        // hops of route 0
  word_t       w;
  word_t       mid0 [K];     // intermediate nodes of route 0 (hops0-1 of them)
  logic        found, ok, same;
  int          p;

  always_comb begin
    // largest overlap of the end of src with the start of dst
    m = 0;
    for (int j = 1; j <= K; j++) begin
      logic eq;
      eq = 1'b1;
      for (int i = 0; i < j; i++)
        if (src_word[j - 1 - i] != dst_word[K - 1 - i]) eq = 1'b0;
      if (eq) m = j;
    end
    hops0 = K - m;

    routes    = '0;
    route_len = '0;

    // route 0: append dst letters m+1 .. K
    w = src_word;
    for (int i = 0; i < K; i++) begin
      mid0[i] = '0;
      if (i < hops0) begin
        routes[0][i] = link_of(w[0], dst_word[K - 1 - m - i]);
        w            = hop(w, int'(routes[0][i]));
        mid0[i]      = w;
      end
    end
    route_len[0] = RL_W'(hops0 + 1);

    // route 1: shortest other path avoiding route 0's intermediate nodes
    found = (hops0 == 0);     // to itself: one route only
    ok    = 1'b0;
    same  = 1'b0;
    p     = 0;
    for (int L = 1; L <= MAX_HOPS; L++)
      for (int c = 0; c < (1 << L); c++) begin
        ok   = 1'b1;
        same = (L == hops0);
        w    = src_word;
        for (int i = 0; i < L; i++) begin
          p = ((c >> (L - 1 - i)) & 1) + 1;     // first hop in the top bit
          if (routes[0][i] != 8'(p)) same = 1'b0;
          w = hop(w, p);
          if (i < L - 1) begin
            if (w == src_word || w == dst_word) ok = 1'b0;
            for (int j = 0; j < K; j++)
              if (j < hops0 - 1 && w == mid0[j]) ok = 1'b0;
          end
        end
        if (!found && ok && !same && w == dst_word) begin
          found = 1'b1;
          for (int i = 0; i < MAX_HOPS; i++)
            if (i < L) routes[1][i] = 8'(((c >> (L - 1 - i)) & 1) + 1);
          route_len[1] = RL_W'(L + 1);
        end
      end
    nroutes = (route_len[1] != '0) ? 2'd2 : 2'd1;
  end

endmodule
