// Shared types and constants of the network switch.
//
// A link carries one word per clock round: eight data bits and one type bit
// (plus, outside this type, a NACK wire in the reverse direction and two
// synchronisation wires). The eight data bits and the type bit follow the
// link description of the switch; how the type bit is read is this design's
// choice: on an idle link a word with the type bit set is the start of a
// message and its data byte is the route byte for this switch; inside a
// message, a word with the type bit set is the End Of Data mark. Words with
// the type bit clear are idle filler between messages and data inside one.
//
// A route byte holds the number of the output link to take (0 .. N_PORTS-1);
// any other value cannot be routed and is answered with a NACK.
package ns_pkg;

  localparam int DATA_W = 8;            // data bits per link word
  localparam int PORT_W = 2;            // bits for a link number (3 links)

  typedef struct packed {
    logic              typ;             // start of message / End Of Data
    logic [DATA_W-1:0] data;            // route byte or payload byte
  } flit_t;

  localparam flit_t IDLE_FLIT = '{typ: 1'b0, data: '0};

  // State of one input link
  typedef enum logic [1:0] {
    IN_IDLE = 2'd0,                     // waiting for a start word
    IN_FWD  = 2'd1,                     // worm connected to an output
    IN_DROP = 2'd2                      // worm refused: discard up to EOD
  } in_state_e;

endpackage
