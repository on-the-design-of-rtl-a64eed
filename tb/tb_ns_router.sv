// Test of the Router's link side. The testbench is the processor, the
// local memory (synchronous read) and the switch. It checks the words sent
// for a message (route bytes, data from memory, End Of Data) and their
// cycles, the report after the NACK guard time, ending a worm early on a
// NACK and retrying on the second route, a late NACK during the guard time,
// failure when every route is refused, and receiving worms into memory.
module tb_ns_router;
  import ns_pkg::*;

  localparam int NR = 2, MR = 4, AW = 8, LW = 8, NW = 20;

  logic clk = 1'b0;
  logic rst_n;
  logic tx_start;
  logic [AW-1:0] tx_addr;
  logic [LW-1:0] tx_len;
  logic [NR-1:0][MR-1:0][7:0] tx_routes;
  logic [NR-1:0][2:0] tx_route_len;
  logic [1:0] tx_nroutes;
  logic tx_busy, tx_done, tx_ok;
  logic [AW-1:0] rx_base;
  logic rx_done;
  logic [LW-1:0] rx_len;
  logic mem_rd_en;
  logic [AW-1:0] mem_rd_addr;
  logic [7:0] mem_rd_data;
  logic mem_wr_en;
  logic [AW-1:0] mem_wr_addr;
  logic [7:0] mem_wr_data;
  flit_t link_out, link_in;
  logic link_nack, rt_nack_out;

  ns_router #(.N_ROUTES(NR), .MAX_ROUTE(MR), .ADDR_W(AW), .LEN_W(LW), .NACK_WAIT(NW)) dut (.*);

  always #5 clk = ~clk;

  logic [7:0] mem [256];
  always_ff @(posedge clk) begin
    if (mem_rd_en) mem_rd_data <= mem[mem_rd_addr];
    if (mem_wr_en) mem[mem_wr_addr] <= mem_wr_data;
  end

  int checks = 0, failures = 0, cyc = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  // the word on the link after every edge
  flit_t wlog [4096];
  int    done_c = -1;
  bit    done_ok;
  always @(posedge clk) begin
    #1;
    cyc++;
    wlog[cyc] = link_out;
    if (tx_done) begin done_c = cyc; done_ok = tx_ok; end
  end

  task automatic tick(int n = 1);
    repeat (n) begin @(posedge clk); #2; end
  endtask

  task automatic start_msg(input int addr, input int len);
    tx_addr = AW'(addr); tx_len = LW'(len); tx_start = 1;
    done_c = -1;
    tick();
    tx_start = 0;
  endtask

  // the words expected for route r: route bytes, data, End Of Data
  // words expected from edge e0 on for route r: route bytes, data, End Of Data
  task automatic expect_worm(input int r, input int addr, input int len,
                             input int e0, input string what);
    int n = tx_route_len[r];
    check(wlog[e0 - 1] == IDLE_FLIT, $sformatf("%s: idle before the start word", what));
    for (int k = 0; k < n + len; k++) begin
      flit_t exp;
      if (k < n) exp = '{typ: (k == 0), data: tx_routes[r][k]};
      else       exp = '{typ: 1'b0, data: mem[addr + k - n]};
      check(wlog[e0 + k] == exp, $sformatf("%s: word %0d at edge %0d", what, k, e0 + k));
    end
    check(wlog[e0 + n + len].typ, $sformatf("%s: End Of Data", what));
    check(wlog[e0 + n + len + 1] == IDLE_FLIT, $sformatf("%s: idle after End Of Data", what));
  endtask

  initial begin
    int e0, e1;
    rst_n = 1; #1 rst_n = 0;
    tx_start = 0; tx_addr = 0; tx_len = 0; link_nack = 0; link_in = IDLE_FLIT;
    rx_base = 8'h80;
    for (int a = 0; a < 256; a++) mem[a] = 8'(a * 3 + 7);
    tx_routes[0] = {8'd0, 8'd0, 8'd1, 8'd2};       // route 2 1 0
    tx_routes[1] = {8'd0, 8'd0, 8'd0, 8'd1};       // route 1 0
    tx_route_len[0] = 3; tx_route_len[1] = 2; tx_nroutes = 2;
    #12 rst_n = 1;
    tick(2);

    // 1. clean send: 5 bytes from 0x10
    e0 = cyc + 1;                 // tx_start taken at this edge
    start_msg('h10, 5);
    tick(3 + 5 + NW + 4);
    expect_worm(0, 'h10, 5, e0 + 1, "clean");
    check(done_c == e0 + 8 + 2 + NW && done_ok, $sformatf("clean: done at %0d ok=%0d", done_c, done_ok));

    // 2. NACK while sending: End Of Data next edge, second route after the guard
    e0 = cyc + 1;
    start_msg('h20, 6);
    tick(3);                      // three words out
    link_nack = 1; tick(); link_nack = 0;
    e1 = e0 + 1 + 3 + 1 + NW + 1;   // edge of the retry's start word
    tick(NW + 2 + 2 + 6 + NW + 4);
    check(wlog[e0 + 4].typ && wlog[e0 + 4].data == 8'h00 && wlog[e0 + 3] == IDLE_FLIT,
          "NACK: worm ended on the next edge");
    expect_worm(1, 'h20, 6, e1, "retry");
    check(done_c > 0 && done_ok, "retry: delivered");

    // 3. late NACK during the guard time, then second route also refused
    e0 = cyc + 1;
    start_msg('h30, 2);
    tick(3 + 2 + 5);
    link_nack = 1; tick(); link_nack = 0;
    tick(NW + 4);
    // five words at edges e0+1 .. e0+5, End Of Data at e0+6, guard counted
    // down by e0+6+NW, route switched at the next edge, start word after it
    check(wlog[e0 + 6 + NW + 2].typ && wlog[e0 + 6 + NW + 2].data == 8'd1,
          "late NACK: retry started on the second route");
    link_nack = 1; tick(); link_nack = 0;
    tick(NW + 8);
    check(done_c > 0 && !done_ok, "both routes refused: failure reported");
    check(!tx_busy, "idle after failure");

    // 4. receive two worms
    begin
      logic [7:0] bytes[7] = '{8'hA1, 8'hB2, 8'hC3, 8'hD4, 8'hE5, 8'hF6, 8'h07};
      for (int k = 0; k < 7; k++) begin
        link_in = '{typ: (k == 0), data: bytes[k]}; tick();
      end
      link_in = '{typ: 1'b1, data: 8'h00}; tick();
      link_in = IDLE_FLIT; tick();
      check(rx_len == 7, $sformatf("receive: length %0d", rx_len));
      for (int k = 0; k < 7; k++) check(mem[8'h80 + k] == bytes[k], $sformatf("receive: byte %0d", k));
      rx_base = 8'hC0;
      link_in = '{typ: 1'b1, data: 8'h55}; tick();
      link_in = '{typ: 1'b1, data: 8'h00}; tick();
      link_in = IDLE_FLIT; tick(2);
      check(rx_len == 1 && mem[8'hC0] == 8'h55, "receive: one-byte worm");
    end
    check(rt_nack_out == 1'b0, "Router never refuses");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
