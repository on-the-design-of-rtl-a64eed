// Test of one output link of the switch (built as output 1): which input
// asks for it, round-robin choice among inputs asking at once, refusal
// while held, the multiplexer, End Of Data freeing the output, idle words,
// and the NACK return to the last holder. Expected values are worked out
// by hand from the round-robin rule: after a grant to input g, input g+1
// has the highest priority.
module tb_ns_output_port;
  import ns_pkg::*;

  localparam int NP = 3;

  logic                      clk = 1'b0;
  logic                      rst_n;
  logic [NP-1:0]             req_valid;
  logic [NP-1:0][PORT_W-1:0] req_port;
  logic [NP-1:0]             grant;
  logic [NP-1:0]             fwd_valid;
  flit_t [NP-1:0]            fwd_flit;
  logic [NP-1:0]             fwd_eod;
  flit_t                     link_out;
  logic                      link_nack;
  logic [NP-1:0]             nack_back;

  ns_output_port #(.N_PORTS(NP), .MY_PORT(1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %0h expected %0h", cyc, what, got, exp);
    end
  endtask

  task automatic step();
    @(posedge clk);
    #1;
    cyc++;
  endtask

  task automatic ask(input logic [NP-1:0] v, input logic [1:0] p0, input logic [1:0] p1,
                     input logic [1:0] p2);
    req_valid = v;
    req_port  = {p2, p1, p0};
    #1;
  endtask

  // every input offers a distinct word
  task automatic offer(input logic [NP-1:0] v, input logic [NP-1:0] eod);
    fwd_valid = v;
    fwd_eod   = eod;
    for (int i = 0; i < NP; i++)
      fwd_flit[i] = '{typ: eod[i], data: 8'(8'h10 * (i + 1) + cyc)};
  endtask

  initial begin
    // a falling edge on rst_n, whatever its start value
    rst_n = 1;
    #1 rst_n = 0; req_valid = '0; req_port = '0; fwd_valid = '0; fwd_eod = '0;
    fwd_flit = '0; link_nack = 0;
    #12 rst_n = 1;
    step();
    expect_eq(link_out, IDLE_FLIT, "idle word after reset");
    expect_eq(nack_back, 3'b000, "no NACK return before any worm");

    // input 1 asks for output 0 (not this one): no grant
    ask(3'b010, 0, 0, 0);
    expect_eq(grant, 3'b000, "grant for another output");
    // inputs 0 and 2 ask at once, priority starts at input 0
    ask(3'b101, 1, 0, 1);
    expect_eq(grant, 3'b001, "round robin from input 0");
    offer(3'b000, 3'b000);
    step();
    ask(3'b100, 0, 0, 1);             // input 2 asks again while held
    expect_eq(grant, 3'b000, "grant while held");
    offer(3'b111, 3'b000);
    step();
    ask(3'b000, 0, 0, 0);
    expect_eq(link_out.data, 8'h10 + 8'(cyc - 1), "holder's word passed");
    expect_eq(link_out.typ, 1'b0, "holder's type bit passed");
    offer(3'b110, 3'b000);            // holder has nothing this cycle
    step();
    expect_eq(link_out, IDLE_FLIT, "idle word while holder offers none");
    // NACK from downstream goes to the holder, input 0
    link_nack = 1; #1;
    expect_eq(nack_back, 3'b001, "NACK return to holder");
    link_nack = 0;
    offer(3'b001, 3'b001);            // holder's End Of Data
    step();
    expect_eq(link_out.typ, 1'b1, "End Of Data passed");
    // free again; NACK still goes to the last holder
    link_nack = 1; #1;
    expect_eq(nack_back, 3'b001, "NACK return to last holder");
    link_nack = 0;
    // all three ask: input 1 has priority now
    ask(3'b111, 1, 1, 1);
    expect_eq(grant, 3'b010, "round robin from input 1");
    offer(3'b000, 3'b000);
    step();
    ask(3'b000, 0, 0, 0);
    offer(3'b010, 3'b010);            // input 1 ends at once
    step();
    expect_eq(link_out.typ, 1'b1, "EOD of input 1");
    // inputs 0 and 2 ask: input 2 has priority
    ask(3'b101, 1, 0, 1);
    expect_eq(grant, 3'b100, "round robin from input 2");
    offer(3'b000, 3'b000);
    step();
    ask(3'b000, 0, 0, 0);
    link_nack = 1; #1;
    expect_eq(nack_back, 3'b100, "NACK return to input 2");
    link_nack = 0;
    offer(3'b100, 3'b000);
    step();
    expect_eq(link_out.data, 8'h30 + 8'(cyc - 1), "input 2 word passed");
    offer(3'b100, 3'b100);
    step();
    // now input 0 has priority again
    ask(3'b111, 1, 1, 1);
    expect_eq(grant, 3'b001, "round robin wraps to input 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
