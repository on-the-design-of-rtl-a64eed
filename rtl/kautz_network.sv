// A Kautz network K(2,K) of nodes, each a network switch, its Router and
// the Router's Route Generator: the two network links of each switch are
// wired along the arcs of the Kautz digraph, and the third link of each
// switch (link 0) goes to the node's Router. Each node's processor side
// (message to send and its destination word, receive buffer, completion
// reports) and its local memory ports are brought out, one set per node.
//
// The nodes of K(d,k) are the words of length k over the letters 0..d
// with no two equal neighbouring letters; there is an arc from word x to
// word y when the last k-1 letters of x are the first k-1 letters of y.
// With d = 2 every node has two arcs out and two in, which is what one
// switch with a Router link and two network links can serve. Node n is the
// n-th such word in ascending order (for k = 3: 010, 012, 020, 021, 101,
// ...). Output link p (1 or 2) of node x goes to the node x2..xk,y where y
// is the smaller (p = 1) or larger (p = 2) of the two letters that differ
// from xk; it arrives at input link 1 of that node if x1 is the smaller of
// the two letters that may precede its first letter, else at input link 2.
// A route through the network is therefore a list of link numbers, one per
// switch, ending with 0 at the destination.
//
// Sending: the processor pulses tx_start with the message's address and
// length in local memory and the destination word in tx_dst (letter 1 in
// element K-1). The node's Route Generator turns its own word and tx_dst
// into two node-disjoint routes, the shortest first; the Router sends on
// the first, retries on the second after a NACK, and reports with
// tx_done / tx_ok. Timing is that of the Router: the start
// word leaves one clock after tx_start, and the head then takes three
// clocks per switch, each later word one.
//
// The data and NACK wires of each arc are connected here. The
// synchronisation wires are not: each switch's six cl inputs and its clock
// (sent as cla on all its links) are ports, so that the surrounding logic
// decides how the switches' clock handshakes are joined. A node's Router
// runs on its switch's internal clock, and so does its local memory.
//
// From the description of the network: the Kautz topology, its node
// labels and arcs, in- and out-degree 2 per switch plus one Router link,
// and a Router with a Route Generator in every node. This design's choices:
// the numbering of nodes and links, the Router sharing its switch's clock,
// the NACK guard time, how the routes are searched (see ns_route_gen), and
// leaving the synchronisation wires to the ports.
module kautz_network
  import ns_pkg::*;
#(
  parameter  int K         = 3,                 // diameter: word length
  parameter  int ADDR_W    = 8,                 // local memory address bits
  parameter  int LEN_W     = 8,                 // message length bits
  localparam int D         = 2,                 // in- and out-degree
  localparam int NODES     = D ** K + D ** (K - 1),   // nodes in the network
  localparam int MAX_ROUTE = K + 3              // route bytes: up to K+2 hops and the final 0
) (
  input  logic                                        rst_n,
  // processor side of every node's Router
  input  logic [NODES-1:0]                            tx_start,
  input  logic [NODES-1:0][ADDR_W-1:0]                tx_addr,
  input  logic [NODES-1:0][LEN_W-1:0]                 tx_len,
  input  logic [NODES-1:0][K-1:0][1:0]                tx_dst,      // destination word
  output logic [NODES-1:0]                            tx_busy,
  output logic [NODES-1:0]                            tx_done,
  output logic [NODES-1:0]                            tx_ok,
  input  logic [NODES-1:0][ADDR_W-1:0]                rx_base,
  output logic [NODES-1:0]                            rx_done,
  output logic [NODES-1:0][LEN_W-1:0]                 rx_len,
  // local memory of every node
  output logic [NODES-1:0]                            mem_rd_en,
  output logic [NODES-1:0][ADDR_W-1:0]                mem_rd_addr,
  input  logic [NODES-1:0][7:0]                       mem_rd_data,
  output logic [NODES-1:0]                            mem_wr_en,
  output logic [NODES-1:0][ADDR_W-1:0]                mem_wr_addr,
  output logic [NODES-1:0][7:0]                       mem_wr_data,
  // synchronisation: cl inputs of every switch ({out_cl, in_cl}) and clocks
  input  logic [NODES-1:0][5:0]                       sw_cl,
  output logic [NODES-1:0]                            sw_clk
);

  localparam int A = D + 1;                     // letters in the alphabet
  // longer than the slowest NACK round trip: refused at the last of
  // MAX_ROUTE switches
  localparam int NACK_WAIT = 4 * MAX_ROUTE + 4;
  // letter j (1 = first) of word w, a base-A number with letter 1 on top
  function automatic int letter(input int w, input int j);
    int v = w;
    for (int t = 0; t < K - j; t++) v = v / A;
    return v % A;
  endfunction

  function automatic bit is_kautz(input int w);
    for (int j = 1; j < K; j++)
      if (letter(w, j) == letter(w, j + 1)) return 1'b0;
    return 1'b1;
  endfunction

  // word of node n
  function automatic int word_of(input int n);
    int cnt = 0;
    for (int w = 0; w < A ** K; w++)
      if (is_kautz(w)) begin
        if (cnt == n) return w;
        cnt++;
      end
    return 0;
  endfunction

  // node of word w
  function automatic int node_of(input int w);
    int cnt = 0;
    for (int v = 0; v < w; v++)
      if (is_kautz(v)) cnt++;
    return cnt;
  endfunction

  // node reached from node n through output link p (1 .. D)
  function automatic int succ(input int n, input int p);
    int w = word_of(n);
    int last = letter(w, K);
    int y = -1, rank = 0;
    for (int c = 0; c < A; c++)
      if (c != last) begin
        rank++;
        if (rank == p) y = c;
      end
    return node_of((w % (A ** (K - 1))) * A + y);
  endfunction

  // input link of succ(n, p) that the arc from node n arrives at
  function automatic int in_link(input int n, input int p);
    int s = word_of(succ(n, p));
    int first = letter(s, 1);
    int z = letter(word_of(n), 1);
    int rank = 0;
    for (int c = 0; c < A; c++)
      if (c != first) begin
        rank++;
        if (c == z) return rank;
      end
    return 0;
  endfunction

  flit_t [NODES-1:0][2:0] in_flit, out_flit;
  logic  [NODES-1:0][2:0] in_nack, out_nack, in_cla;

  localparam int RL_W = $clog2(MAX_ROUTE + 1);

  // word of node n as letters, letter 1 in element K-1
  function automatic logic [K-1:0][1:0] letters_of(input int n);
    logic [K-1:0][1:0] v;
    for (int j = 1; j <= K; j++) v[K - j] = 2'(letter(word_of(n), j));
    return v;
  endfunction

  for (genvar n = 0; n < NODES; n++) begin : g_node
    flit_t                              rt_in_flit, rt_out_flit;
    logic                               rt_in_nack, rt_out_nack;
    logic [D-1:0][MAX_ROUTE-1:0][7:0]   routes;
    logic [D-1:0][RL_W-1:0]             route_len;
    logic [1:0]                         nroutes;

    ns_route_gen #(.K(K)) u_rg (
      .src_word  (letters_of(n)),
      .dst_word  (tx_dst[n]),
      .routes    (routes),
      .route_len (route_len),
      .nroutes   (nroutes)
    );

    ns_router #(
      .N_ROUTES  (D),
      .MAX_ROUTE (MAX_ROUTE),
      .ADDR_W    (ADDR_W),
      .LEN_W     (LEN_W),
      .NACK_WAIT (NACK_WAIT)
    ) u_rt (
      .clk          (sw_clk[n]),
      .rst_n        (rst_n),
      .tx_start     (tx_start[n]),
      .tx_addr      (tx_addr[n]),
      .tx_len       (tx_len[n]),
      .tx_routes    (routes),
      .tx_route_len (route_len),
      .tx_nroutes   (nroutes),
      .tx_busy      (tx_busy[n]),
      .tx_done      (tx_done[n]),
      .tx_ok        (tx_ok[n]),
      .rx_base      (rx_base[n]),
      .rx_done      (rx_done[n]),
      .rx_len       (rx_len[n]),
      .mem_rd_en    (mem_rd_en[n]),
      .mem_rd_addr  (mem_rd_addr[n]),
      .mem_rd_data  (mem_rd_data[n]),
      .mem_wr_en    (mem_wr_en[n]),
      .mem_wr_addr  (mem_wr_addr[n]),
      .mem_wr_data  (mem_wr_data[n]),
      .link_out     (rt_in_flit),
      .link_nack    (rt_in_nack),
      .link_in      (rt_out_flit),
      .rt_nack_out  (rt_out_nack)
    );

    network_switch #(.N_PORTS(3)) u_sw (
      .rst_n    (rst_n),
      .in_flit  (in_flit[n]),
      .in_nack  (in_nack[n]),
      .in_cl    (sw_cl[n][2:0]),
      .in_cla   (in_cla[n]),
      .out_flit (out_flit[n]),
      .out_nack (out_nack[n]),
      .out_cl   (sw_cl[n][5:3]),
      .out_cla  ()
    );

    // Router link
    assign in_flit[n][0]  = rt_in_flit;
    assign rt_in_nack     = in_nack[n][0];
    assign rt_out_flit    = out_flit[n][0];
    assign out_nack[n][0] = rt_out_nack;
    assign sw_clk[n]      = in_cla[n][0];

    // network links: data downstream, NACK upstream
    for (genvar p = 1; p <= D; p++) begin : g_arc
      localparam int S = succ(n, p);
      localparam int Q = in_link(n, p);
      assign in_flit[S][Q]  = out_flit[n][p];
      assign out_nack[n][p] = in_nack[S][Q];
    end
  end

endmodule
