// Test of one input link of the switch: route byte decoding, consumption of
// the route byte, moving the start mark, End Of Data, refusal with NACK,
// discarding a refused worm, unknown route bytes, a NACK returned from
// downstream, and a worm with no data. The grant is driven by the
// testbench; every expected value below is worked out by hand from the
// word format.
module tb_ns_input_port;
  import ns_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n;
  flit_t             link_in;
  logic              nack_out;
  logic              req_valid;
  logic [PORT_W-1:0] req_port;
  logic              grant;
  logic              fwd_valid;
  flit_t             fwd_flit;
  logic              fwd_eod;
  logic              nack_back;

  ns_input_port #(.N_PORTS(3)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %0h expected %0h", cyc, what, got, exp);
    end
  endtask

  // drive the next word, then one rising edge
  task automatic step(input logic typ, input logic [7:0] data);
    link_in = '{typ: typ, data: data};
    @(posedge clk);
    #1;
    cyc++;
  endtask

  task automatic outs(input logic rv, input logic [1:0] rp, input logic fv, input logic ft,
                      input logic [7:0] fd, input logic fe, input logic nk);
    expect_eq(req_valid, rv, "req_valid");
    if (rv) expect_eq(req_port, rp, "req_port");
    expect_eq(fwd_valid, fv, "fwd_valid");
    if (fv) begin
      expect_eq(fwd_flit.typ, ft, "fwd type");
      expect_eq(fwd_flit.data, fd, "fwd data");
    end
    expect_eq(fwd_eod, fe, "fwd_eod");
    expect_eq(nack_out, nk, "nack_out");
  endtask

  initial begin
    // a falling edge on rst_n, whatever its start value
    rst_n = 1;
    #1 rst_n = 0; grant = 0; nack_back = 0; link_in = IDLE_FLIT;
    #12 rst_n = 1;
    @(posedge clk); #1;
    outs(0, 0, 0, 0, 0, 0, 0);

    // 1. worm to output 2: route byte 2, then 0x01 (next route byte), 0xA5, EOD
    step(1, 8'd2);              outs(1, 2, 0, 0, 0, 0, 0);
    grant = 1;
    step(0, 8'h01); grant = 0;  outs(0, 0, 1, 1, 8'h01, 0, 0);   // start mark moved
    step(0, 8'hA5);             outs(0, 0, 1, 0, 8'hA5, 0, 0);
    step(1, 8'h00);             outs(0, 0, 1, 1, 8'h00, 1, 0);   // End Of Data
    step(0, 8'h00);             outs(0, 0, 0, 0, 0, 0, 0);       // idle again

    // 2. refused worm: no grant -> NACK next cycle, rest discarded
    step(1, 8'd1);              outs(1, 1, 0, 0, 0, 0, 0);
    step(0, 8'h33);             outs(0, 0, 0, 0, 0, 0, 1);
    step(0, 8'h44);             outs(0, 0, 0, 0, 0, 0, 0);
    step(1, 8'h00);             outs(0, 0, 0, 0, 0, 0, 0);       // its EOD, dropped
    step(0, 8'h00);             outs(0, 0, 0, 0, 0, 0, 0);

    // 3. unknown route byte: no request, NACK
    step(1, 8'd9);              outs(0, 0, 0, 0, 0, 0, 0);
    step(1, 8'h00);             outs(0, 0, 0, 0, 0, 0, 1);
    step(0, 8'h00);             outs(0, 0, 0, 0, 0, 0, 0);

    // 4. NACK from downstream while connected is passed up one cycle later
    step(1, 8'd0);              outs(1, 0, 0, 0, 0, 0, 0);
    grant = 1;
    step(0, 8'h10); grant = 0;  outs(0, 0, 1, 1, 8'h10, 0, 0);
    nack_back = 1;
    step(0, 8'h11); nack_back = 0; outs(0, 0, 1, 0, 8'h11, 0, 1);
    step(1, 8'h00);             outs(0, 0, 1, 1, 8'h00, 1, 0);
    step(0, 8'h00);             outs(0, 0, 0, 0, 0, 0, 0);

    // 5. worm without data: EOD right after the route byte frees the output
    //    and passes nothing on
    step(1, 8'd1);              outs(1, 1, 0, 0, 0, 0, 0);
    grant = 1;
    step(1, 8'h00); grant = 0;  outs(0, 0, 0, 0, 0, 1, 0);
    step(0, 8'h00);             outs(0, 0, 0, 0, 0, 0, 0);

    // 6. header arriving right after a dropped worm's EOD is served
    step(1, 8'd2);              outs(1, 2, 0, 0, 0, 0, 0);
    step(1, 8'h00);             outs(0, 0, 0, 0, 0, 0, 1);       // refused, its EOD next
    step(1, 8'd0);              outs(1, 0, 0, 0, 0, 0, 0);       // new header served
    grant = 1;
    step(0, 8'h77); grant = 0;  outs(0, 0, 1, 1, 8'h77, 0, 0);

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
