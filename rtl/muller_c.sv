// Muller-C element ("rendezvous module") that makes the switch's internal
// clock.
//
// The switch has no global clock. Each of its links carries a
// synchronisation input cl_i; the C element lowers the internal clock when
// every cl_i is high and raises it again when every cl_i is low, and holds
// it otherwise. The internal clock also goes back out on every link as the
// acknowledge cla_i. Those two transitions are the state diagram of the
// element; the number of inputs (six: three input links and three output
// links) is the switch's own.
//
// Interface: cl[N_IN-1:0] in, clk out (the internal clock, which is also
// every cla_i). rst_n, an asynchronous active-low reset, forces the clock
// high; the reset input and its value are this design's choice.
//
// The element is a level-sensitive latch by nature: it is written as one
// always_latch whose enable is "all inputs equal", so the latch that the
// tools report is the intended storage of the C element.
module muller_c #(
  parameter int N_IN = 6
) (
  input  logic            rst_n,
  input  logic [N_IN-1:0] cl,
  output logic            clk
);

  logic all_hi, all_lo;

  assign all_hi = &cl;
  assign all_lo = ~|cl;

  always_latch begin
    if (!rst_n)
      clk = 1'b1;
    else if (all_hi || all_lo)
      clk = all_lo;
  end

endmodule
