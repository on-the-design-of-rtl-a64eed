// One input link of the network switch: the input register and the part of
// the decentralised control that belongs to the link.
//
// Every rising edge of the internal clock the input register takes the word
// on the link. When the link is idle and the register holds a start word,
// its data byte is this switch's route byte: the port asks the output named
// by it (req_valid / req_port). If the output grants it in that same cycle
// the route byte is consumed (it is not passed on) and the port connects the
// worm to that output: each following word is offered to the output
// (fwd_valid / fwd_flit), the first one with its type bit set, so that the
// next route byte becomes the start word for the next switch. The End Of
// Data word is passed on too and frees the connection (fwd_eod). If the
// output is taken, lost the arbitration, or the route byte names no output,
// the port sends a NACK back up its link for one cycle and discards the
// rest of the worm up to its End Of Data.
//
// A NACK that comes back from downstream on the output that this link holds
// (nack_back) is passed on up the link in the next cycle, so it reaches the
// source of the worm.
//
// Timing: start word in the input register in cycle t, request and grant in
// cycle t; the next word reaches the output register in cycle t+1. NACK
// (nack_out) is registered and is high in the cycle after the refusal.
//
// The route byte being consumed, the start marker being moved to the next
// word, and NACK on a busy output follow the switch description. The word
// encoding, the one-cycle NACK pulse, refusing unknown route bytes, and
// silently closing a worm that has no data at all are this design's choices.
module ns_input_port
  import ns_pkg::*;
#(
  parameter int N_PORTS = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // link from upstream
  input  flit_t             link_in,
  output logic              nack_out,
  // request to the outputs
  output logic              req_valid,
  output logic [PORT_W-1:0] req_port,
  input  logic              grant,
  // connected worm towards the granted output
  output logic              fwd_valid,
  output flit_t             fwd_flit,
  output logic              fwd_eod,
  // NACK returned by the output this link holds
  input  logic              nack_back
);

  flit_t     in_q;
  in_state_e state;
  logic      first;          // next forwarded word is the new start word
  logic      header;         // start word waiting in the input register

  assign header    = (state == IN_IDLE) && in_q.typ;
  assign req_valid = header && (in_q.data < DATA_W'(N_PORTS));
  assign req_port  = in_q.data[PORT_W-1:0];

  // A worm whose first word after the route byte is already End Of Data has
  // nothing to pass on: it only releases the output.
  assign fwd_eod        = (state == IN_FWD) && in_q.typ;
  assign fwd_valid      = (state == IN_FWD) && !(first && in_q.typ);
  assign fwd_flit.typ   = in_q.typ || first;
  assign fwd_flit.data  = in_q.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q     <= IDLE_FLIT;
      state    <= IN_IDLE;
      first    <= 1'b0;
      nack_out <= 1'b0;
    end else begin
      in_q     <= link_in;
      nack_out <= (header && !grant) || nack_back;
      unique case (state)
        IN_IDLE: begin
          if (header) begin
            state <= grant ? IN_FWD : IN_DROP;
            first <= grant;
          end
        end
        IN_FWD: begin
          first <= 1'b0;
          if (in_q.typ) state <= IN_IDLE;
        end
        IN_DROP: begin
          if (in_q.typ) state <= IN_IDLE;
        end
        default: state <= IN_IDLE;
      endcase
    end
  end

  // A grant is only given to a port that asked for one.
  a_grant_needs_req : assert property (@(posedge clk) disable iff (!rst_n)
                                       grant |-> req_valid);

endmodule
