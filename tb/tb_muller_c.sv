// Test of the Muller-C element that makes the switch's internal clock.
//
// Drives the six cl inputs through random patterns and through full
// handshake rounds and compares the clock with a reference: low once every
// input is high, high once every input is low, unchanged for any mixed
// pattern, high during reset.
module tb_muller_c;

  localparam int N = 6;

  logic         rst_n;
  logic [N-1:0] cl;
  logic         clk;

  muller_c #(.N_IN(N)) dut (.rst_n(rst_n), .cl(cl), .clk(clk));

  int checks = 0, failures = 0;
  logic ref_clk;
  int n_fall = 0, n_rise = 0, n_hold = 0;

  task automatic apply(input logic [N-1:0] v);
    logic was_high;
    was_high = ref_clk;
    cl = v;
    if (&v)       ref_clk = 1'b0;
    else if (~|v) ref_clk = 1'b1;
    #1;
    checks++;
    if (clk !== ref_clk) begin
      failures++;
      $display("FAIL cl=%b clk=%b expected %b", v, clk, ref_clk);
    end
    if (was_high && !ref_clk) n_fall++;
    if (!was_high && ref_clk) n_rise++;
    if (!(&v) && (|v)) n_hold++;
  endtask

  initial begin
    rst_n = 0;
    cl = '1;          // would lower the clock, but reset holds it high
    #1;
    checks++;
    if (clk !== 1'b1) begin failures++; $display("FAIL clock not high in reset"); end
    ref_clk = 1'b1;
    cl = '0;
    #1 rst_n = 1;
    #1;
    // handshake rounds: raise the inputs one at a time, then lower them
    repeat (20) begin
      logic [N-1:0] v;
      int order[N];
      v = '0;
      for (int k = 0; k < N; k++) order[k] = k;
      order.shuffle();
      for (int k = 0; k < N; k++) begin v[order[k]] = 1'b1; apply(v); end
      order.shuffle();
      for (int k = 0; k < N; k++) begin v[order[k]] = 1'b0; apply(v); end
    end
    // random patterns
    repeat (500) apply(N'($urandom));
    // reset in the low phase brings the clock back high
    apply('1);
    rst_n = 0; #1;
    checks++;
    if (clk !== 1'b1) begin failures++; $display("FAIL reset did not raise the clock"); end
    cl = '0; #1;
    rst_n = 1; ref_clk = 1'b1; #1;
    apply(6'b101010);
    checks++;
    if (n_fall < 20 || n_rise < 20 || n_hold < 100) begin
      failures++;
      $display("FAIL too few transitions: fall=%0d rise=%0d hold=%0d", n_fall, n_rise, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
