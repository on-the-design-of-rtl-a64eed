// Network switch for a multi-computer built as a Kautz network: three input
// links and three output links (one of each is meant for the node's own
// Router, the other two for the network), worm-hole routing, and NACK
// instead of buffering when a worm cannot go on.
//
// A message is a start word holding the route byte for this switch, further
// route bytes, the data bytes, and an End Of Data word. The switch reads
// the route byte, connects the input link to the output link it names,
// drops that byte, and streams the rest of the worm through, one word per
// cycle on every link at once; the End Of Data word breaks the connection.
// The last route byte of a message names the Router link of the destination
// switch. If the output link is taken the switch returns a NACK on the
// input link and throws the worm away; a NACK coming back from further
// down the path is passed up towards the source. The source then ends the
// worm with an End Of Data word and tries another route.
//
// Structure: three ns_input_port (input register, route decoding, NACK),
// three ns_output_port (multiplexer, allocation, output register), and a
// muller_c that makes the internal clock. There is no global clock: the
// C element lowers the internal clock when every link's cl input is high
// and raises it when every cl input is low; the internal clock is sent back
// on every link as cla. All registers use the rising edge of the internal
// clock. A neighbour is expected to take this switch's outputs after a
// rising edge and to set its words for this switch before it lowers its cl
// input.
//
// Latency: a start word taken by the input register at edge t leaves the
// output register as the new start word at edge t+2; after that one word
// per edge. NACK for a refused worm is on in_nack from edge t+1 to t+2.
//
// From the switch description: three links in and out, 8 data bits plus a
// type bit plus a NACK plus two synchronisation wires per link, input
// registers / multiplexers / output registers, route byte consumption,
// NACK on a busy output, the C-element clock. This design's choices: the
// word encoding (see ns_pkg), the route byte as an output number, the
// round-robin arbitration, the NACK return path and the reset.
module network_switch
  import ns_pkg::*;
#(
  parameter int N_PORTS = 3
) (
  input  logic                  rst_n,
  // input links
  input  flit_t [N_PORTS-1:0]   in_flit,
  output logic  [N_PORTS-1:0]   in_nack,
  input  logic  [N_PORTS-1:0]   in_cl,
  output logic  [N_PORTS-1:0]   in_cla,
  // output links
  output flit_t [N_PORTS-1:0]   out_flit,
  input  logic  [N_PORTS-1:0]   out_nack,
  input  logic  [N_PORTS-1:0]   out_cl,
  output logic  [N_PORTS-1:0]   out_cla
);

  logic clk_int;

  logic  [N_PORTS-1:0]             req_valid;
  logic  [N_PORTS-1:0][PORT_W-1:0] req_port;
  logic  [N_PORTS-1:0]             grant;
  logic  [N_PORTS-1:0]             fwd_valid;
  flit_t [N_PORTS-1:0]             fwd_flit;
  logic  [N_PORTS-1:0]             fwd_eod;
  // per output: grant and NACK return, indexed [output][input]
  logic  [N_PORTS-1:0][N_PORTS-1:0] grant_o;
  logic  [N_PORTS-1:0][N_PORTS-1:0] nack_back_o;
  logic  [N_PORTS-1:0]             nack_back;

  muller_c #(.N_IN(2 * N_PORTS)) u_clkgen (
    .rst_n (rst_n),
    .cl    ({out_cl, in_cl}),
    .clk   (clk_int)
  );

  assign in_cla  = {N_PORTS{clk_int}};
  assign out_cla = {N_PORTS{clk_int}};

  always_comb begin
    grant     = '0;
    nack_back = '0;
    for (int o = 0; o < N_PORTS; o++) begin
      grant     |= grant_o[o];
      nack_back |= nack_back_o[o];
    end
  end

  for (genvar i = 0; i < N_PORTS; i++) begin : g_in
    ns_input_port #(.N_PORTS(N_PORTS)) u_in (
      .clk       (clk_int),
      .rst_n     (rst_n),
      .link_in   (in_flit[i]),
      .nack_out  (in_nack[i]),
      .req_valid (req_valid[i]),
      .req_port  (req_port[i]),
      .grant     (grant[i]),
      .fwd_valid (fwd_valid[i]),
      .fwd_flit  (fwd_flit[i]),
      .fwd_eod   (fwd_eod[i]),
      .nack_back (nack_back[i])
    );
  end

  for (genvar o = 0; o < N_PORTS; o++) begin : g_out
    ns_output_port #(.N_PORTS(N_PORTS), .MY_PORT(o)) u_out (
      .clk       (clk_int),
      .rst_n     (rst_n),
      .req_valid (req_valid),
      .req_port  (req_port),
      .grant     (grant_o[o]),
      .fwd_valid (fwd_valid),
      .fwd_flit  (fwd_flit),
      .fwd_eod   (fwd_eod),
      .link_out  (out_flit[o]),
      .link_nack (out_nack[o]),
      .nack_back (nack_back_o[o])
    );
  end

endmodule
