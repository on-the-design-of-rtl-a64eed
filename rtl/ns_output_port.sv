// One output link of the network switch: the multiplexer that picks which
// input link drives it, the allocation of the link to one worm at a time,
// and the output register.
//
// An input whose start word names this output asks for it (req_valid and
// req_port from every input). While the output is free it grants one of the
// askers in the same cycle; the choice rotates (round robin, the input after
// the last winner first) so that no input starves. The others, and any
// input that asks while the output is held, get no grant and send a NACK.
// While held, the multiplexer passes the holder's words to the output
// register; the End Of Data word frees the output in the cycle it passes.
// When nothing is passed the output register sends idle words.
//
// A NACK arriving from downstream (link_nack) is handed back to the input
// that last held this output (nack_back), combinationally, so that the
// input can register it and pass it upstream. The last holder is kept after
// the worm is gone because a NACK from downstream arrives some cycles after
// the start word was sent.
//
// Timing: grant in the cycle the start word sits in the input register;
// output register written at every rising edge of the internal clock.
//
// The multiplexer and output register follow the switch's data-path
// structure; the round-robin choice, the idle word and the NACK return path
// are this design's choices.
module ns_output_port
  import ns_pkg::*;
#(
  parameter int          N_PORTS = 3,
  parameter int unsigned MY_PORT = 0
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // requests from the input links
  input  logic [N_PORTS-1:0]             req_valid,
  input  logic [N_PORTS-1:0][PORT_W-1:0] req_port,
  output logic [N_PORTS-1:0]             grant,
  // words from the input links
  input  logic [N_PORTS-1:0]             fwd_valid,
  input  flit_t [N_PORTS-1:0]            fwd_flit,
  input  logic [N_PORTS-1:0]             fwd_eod,
  // link towards downstream
  output flit_t                          link_out,
  input  logic                           link_nack,
  // NACK back to the input that held this output
  output logic [N_PORTS-1:0]             nack_back
);

  localparam int IDX_W = $clog2(N_PORTS);

  logic [N_PORTS-1:0] req;
  logic               busy;
  logic [IDX_W-1:0]   owner;        // holder, kept after release
  logic               owned_once;   // owner is meaningful
  logic [IDX_W-1:0]   rr;           // input with the highest priority
  logic               win_valid;
  logic [IDX_W-1:0]   win;

  always_comb begin
    for (int i = 0; i < N_PORTS; i++)
      req[i] = req_valid[i] && (req_port[i] == PORT_W'(MY_PORT));
  end

  // round-robin choice among the askers, starting at rr
  always_comb begin
    logic [IDX_W-1:0] idx;
    win_valid = 1'b0;
    win       = '0;
    for (int k = N_PORTS - 1; k >= 0; k--) begin
      idx = IDX_W'((int'(rr) + k) % N_PORTS);
      if (req[idx]) begin
        win_valid = 1'b1;
        win       = idx;
      end
    end
  end

  always_comb begin
    grant = '0;
    if (!busy && win_valid) grant[win] = 1'b1;
  end

  always_comb begin
    nack_back = '0;
    if (link_nack && owned_once) nack_back[owner] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      owner      <= '0;
      owned_once <= 1'b0;
      rr         <= '0;
      link_out   <= IDLE_FLIT;
    end else begin
      if (!busy) begin
        link_out <= IDLE_FLIT;
        if (win_valid) begin
          busy       <= 1'b1;
          owner      <= win;
          owned_once <= 1'b1;
          rr         <= (int'(win) == N_PORTS - 1) ? '0 : win + 1'b1;
        end
      end else begin
        link_out <= fwd_valid[owner] ? fwd_flit[owner] : IDLE_FLIT;
        if (fwd_eod[owner]) busy <= 1'b0;
      end
    end
  end

  // At most one input is connected to an output at a time.
  a_one_grant : assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0(grant));

endmodule
