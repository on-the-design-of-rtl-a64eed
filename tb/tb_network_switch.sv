// End-to-end test of the network switch at its default size.
//
// The testbench plays the six neighbours of the switch. It runs the clock
// handshake itself: after each rising edge of the internal clock it reads
// the output links, raises the six cl inputs one by one in a random order
// (the clock must stay high until the last one), sets the words of the
// input links, and lowers the cl inputs one by one (the clock must stay low
// until the last one). Each input link has a source that sends messages
// (start word with the route byte, further route bytes, data, End Of Data)
// and ends a message early with End Of Data when it sees a NACK; each
// output link has a sink that reassembles messages and can play a blocked
// switch further down by sending a NACK back.
//
// Directed phases make each mechanism happen at a known cycle: three worms
// crossing the switch at once, three headers fighting for one output
// (round-robin winner), a header for an output that is held, a route byte
// that names no output, a NACK from downstream passed back to the source,
// a worm from the Router link back to the Router link. Latency (start word
// out two cycles after the header is taken) and rate (one byte per cycle)
// are checked against the cycle count. A random phase follows; every
// message must then either arrive intact or be NACKed at its source.
module tb_network_switch;
  import ns_pkg::*;

  localparam int NP      = 3;
  localparam int MAXMSG  = 250;
  localparam int MAXB    = 40;
  localparam int N_RAND  = 180;
  localparam int WATCHDOG_CYCLES = 6000;

  logic               rst_n;
  flit_t [NP-1:0]     in_flit;
  logic  [NP-1:0]     in_nack;
  logic  [NP-1:0]     in_cl;
  logic  [NP-1:0]     in_cla;
  flit_t [NP-1:0]     out_flit;
  logic  [NP-1:0]     out_nack;
  logic  [NP-1:0]     out_cl;
  logic  [NP-1:0]     out_cla;

  network_switch dut (.*);

  logic clk_int;
  assign clk_int = in_cla[0];

  int checks = 0, failures = 0;
  int cycle  = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // ---------------- message table ----------------
  int          n_msg = 0;
  int          m_src      [MAXMSG];
  int          m_out      [MAXMSG];   // route byte for this switch
  int          m_start    [MAXMSG];   // earliest drive cycle of the header
  int          m_nb       [MAXMSG];   // bytes after the route byte
  logic [7:0]  m_body     [MAXMSG][MAXB];
  int          m_expect   [MAXMSG];   // 1 delivered, 0 NACKed, -1 either
  int          m_exp_nack_cycle [MAXMSG]; // -1: not predicted
  bit          m_nacked   [MAXMSG];
  int          m_nack_cyc [MAXMSG];
  int          m_hdr_cyc  [MAXMSG];   // drive cycle of the header
  int          m_deliv    [MAXMSG];   // times delivered intact
  bit          m_ds_nack  [MAXMSG];   // downstream NACK injected

  int src_q [NP][$];

  function automatic int add_msg(int src, int outp, int nroute, int ndata,
                                 int start, int expect_deliv);
    int id = n_msg;
    n_msg++;
    m_src[id] = src; m_out[id] = outp; m_start[id] = start;
    m_expect[id] = expect_deliv; m_exp_nack_cycle[id] = -1;
    m_nacked[id] = 0; m_nack_cyc[id] = -1; m_hdr_cyc[id] = -1;
    m_deliv[id] = 0; m_ds_nack[id] = 0;
    m_nb[id] = nroute - 1 + ndata;
    for (int k = 0; k < nroute - 1; k++) m_body[id][k] = 8'($urandom_range(0, 2));
    // first data byte is the message number, the rest a simple pattern
    m_body[id][nroute-1] = 8'(id);
    for (int k = 1; k < ndata; k++) m_body[id][nroute-1+k] = 8'(id * 7 + k * 13 + 1);
    src_q[src].push_back(id);
    return id;
  endfunction

  // ---------------- sources ----------------
  typedef enum {SRC_IDLE, SRC_SEND, SRC_ABORT} src_st_e;
  src_st_e src_st  [NP];
  int      src_cur [NP];
  int      src_pos [NP];
  int      src_last[NP];
  int      src_free[NP];                // first cycle a new header may go

  // ---------------- sinks ----------------
  bit         snk_in_msg [NP];
  logic [7:0] snk_buf    [NP][$];
  int         snk_start_cyc [NP];
  bit         snk_cut    [NP];      // this worm gets a NACK from downstream
  int         ds_nack_mode [NP];      // 1: play a blocked downstream switch
  int         ds_nack_at   [NP];      // drive cycle of the injected NACK
  int         ds_nack_id   [NP];

  // ---------------- mechanism counters ----------------
  int n_rounds = 0, n_delivered = 0, n_concurrent = 0, n_contention = 0;
  int n_busy_nack = 0, n_bad_route = 0, n_ds_nack = 0, n_loopback = 0;
  int n_rr_checked = 0, n_timing = 0;

  // Find which message a received byte string belongs to.
  function automatic int match_msg(int o, bit allow_prefix);
    for (int id = 0; id < n_msg; id++) begin
      bit ok;
      if (m_out[id] != o) continue;
      if (allow_prefix ? (snk_buf[o].size() > m_nb[id]) : (snk_buf[o].size() != m_nb[id])) continue;
      ok = 1;
      for (int k = 0; k < snk_buf[o].size(); k++)
        if (snk_buf[o][k] != m_body[id][k]) ok = 0;
      if (ok) return id;
    end
    return -1;
  endfunction

  // Read the output links after a rising edge (cycle = number of that edge).
  task automatic sample();
    int busy_outs = 0;
    for (int o = 0; o < NP; o++) begin
      flit_t f = out_flit[o];
      if (!snk_in_msg[o]) begin
        if (f.typ) begin
          snk_in_msg[o] = 1;
          snk_buf[o].delete();
          snk_buf[o].push_back(f.data);
          snk_start_cyc[o] = cycle;
          busy_outs++;
          snk_cut[o] = (ds_nack_mode[o] != 0);
          if (snk_cut[o]) ds_nack_at[o] = cycle + 2;
        end
      end else begin
        busy_outs++;
        if (!f.typ) snk_buf[o].push_back(f.data);
        else begin
          // End Of Data: look the message up
          int id = match_msg(o, 0);
          snk_in_msg[o] = 0;
          if (snk_cut[o] && id < 0) begin
            int pid = match_msg(o, 1);
            check(pid >= 0, $sformatf("output %0d: cut-off worm is not a prefix of a message", o));
          end else begin
            check(id >= 0, $sformatf("output %0d: received message matches nothing sent", o));
            if (id >= 0) begin
              m_deliv[id]++;
              n_delivered++;
              if (m_src[id] == 0 && o == 0) n_loopback++;
              // latency: start word two edges after the header edge,
              // then one byte per edge
              if (m_hdr_cyc[id] >= 0) begin
                check(snk_start_cyc[o] == m_hdr_cyc[id] + 3,
                      $sformatf("msg %0d: start word at %0d, header driven at %0d",
                                id, snk_start_cyc[o], m_hdr_cyc[id]));
                check(cycle == m_hdr_cyc[id] + 3 + m_nb[id],
                      $sformatf("msg %0d: End Of Data at %0d, expected %0d",
                                id, cycle, m_hdr_cyc[id] + 3 + m_nb[id]));
                n_timing++;
              end
            end
          end
        end
      end
    end
    if (busy_outs == NP) n_concurrent++;
    // NACKs seen by the sources
    for (int i = 0; i < NP; i++) begin
      if (in_nack[i]) begin
        int id = (src_st[i] == SRC_SEND) ? src_cur[i] : src_last[i];
        check(id >= 0, $sformatf("NACK on input %0d with no message", i));
        if (id >= 0) begin
          check(!m_nacked[id], $sformatf("msg %0d NACKed twice", id));
          m_nacked[id]   = 1;
          m_nack_cyc[id] = cycle;
          if (src_st[i] == SRC_SEND) src_st[i] = SRC_ABORT;
        end
      end
    end
  endtask

  // Set the input words and downstream NACKs for the next rising edge.
  task automatic drive();
    for (int i = 0; i < NP; i++) begin
      flit_t f = IDLE_FLIT;
      case (src_st[i])
        SRC_IDLE: begin
          if (src_q[i].size() > 0 && m_start[src_q[i][0]] <= cycle &&
              src_free[i] <= cycle) begin
            int id = src_q[i].pop_front();
            src_cur[i] = id;
            src_pos[i] = 0;
            src_st[i]  = SRC_SEND;
            m_hdr_cyc[id] = cycle;
            f = '{typ: 1'b1, data: 8'(m_out[id])};
          end
        end
        SRC_SEND: begin
          int id = src_cur[i];
          if (src_pos[i] < m_nb[id]) begin
            f = '{typ: 1'b0, data: m_body[id][src_pos[i]]};
            src_pos[i]++;
          end else begin
            f = '{typ: 1'b1, data: 8'h00};
            src_st[i] = SRC_IDLE;
            src_last[i] = id;
            src_free[i] = cycle + 8;
          end
        end
        SRC_ABORT: begin
          f = '{typ: 1'b1, data: 8'h00};
          src_st[i] = SRC_IDLE;
          src_last[i] = src_cur[i];
          src_free[i] = cycle + 8;
        end
        default: ;
      endcase
      in_flit[i] = f;
    end
    for (int o = 0; o < NP; o++) begin
      out_nack[o] = (ds_nack_at[o] == cycle);
      if (out_nack[o]) n_ds_nack++;
    end
  endtask

  // One clock round: cl inputs up one by one, data, cl inputs down.
  task automatic do_round();
    int order[6];
    logic [5:0] cl;
    for (int k = 0; k < 6; k++) order[k] = k;
    order.shuffle();
    cl = '0;
    for (int k = 0; k < 6; k++) begin
      check(clk_int == 1'b1, "internal clock fell before every cl input was high");
      cl[order[k]] = 1'b1;
      {out_cl, in_cl} = cl;
      #($urandom_range(1, 3));
    end
    check(clk_int == 1'b0, "internal clock did not fall when every cl input was high");
    drive();
    order.shuffle();
    for (int k = 0; k < 6; k++) begin
      check(clk_int == 1'b0, "internal clock rose before every cl input was low");
      cl[order[k]] = 1'b0;
      {out_cl, in_cl} = cl;
      #($urandom_range(1, 3));
    end
    check(clk_int == 1'b1, "internal clock did not rise when every cl input was low");
    cycle++;
    n_rounds++;
    sample();
  endtask

  initial begin
    int id;
    // a falling edge on rst_n, whatever its start value
    rst_n = 1;
    #1 rst_n = 0;
    in_flit = '0; out_nack = '0; in_cl = '0; out_cl = '0;
    for (int i = 0; i < NP; i++) begin
      src_st[i] = SRC_IDLE; src_cur[i] = -1; src_last[i] = -1; src_free[i] = 0;
      snk_cut[i] = 0;
      snk_in_msg[i] = 0; ds_nack_mode[i] = 0; ds_nack_at[i] = -1;
    end
    #5;
    check(clk_int == 1'b1, "internal clock not high in reset");
    rst_n = 1;
    #5;

    // Phase 1: three disjoint worms at once (Router link is link 0)
    void'(add_msg(0, 1, 3, 12, 2, 1));
    void'(add_msg(1, 2, 2, 12, 2, 1));
    void'(add_msg(2, 0, 1, 12, 2, 1));
    // Phase 2: three headers for output 1 in the same cycle. Output 1 was
    // last granted to input 0, so input 1 has priority and wins.
    void'(add_msg(0, 1, 1, 6, 40, 0));
    void'(add_msg(1, 1, 1, 6, 40, 1));
    void'(add_msg(2, 1, 1, 6, 40, 0));
    // Phase 3: output 2 held by a long worm from input 0; input 2 asks later
    void'(add_msg(0, 2, 1, 25, 70, 1));
    id = add_msg(2, 2, 1, 6, 75, 0);
    m_exp_nack_cycle[id] = 77;
    // Phase 4: a route byte that names no output
    id = add_msg(1, 7, 2, 4, 110, 0);
    m_exp_nack_cycle[id] = 112;
    // Phase 5: downstream of output 1 blocked, see ds_nack_mode below
    id = add_msg(2, 1, 2, 20, 130, 0);
    ds_nack_id[1] = id;
    // Phase 6: Router link back to the Router link
    void'(add_msg(0, 0, 1, 8, 170, 1));
    // Phase 7: random traffic from cycle 200
    for (int k = 0; k < N_RAND; k++) begin
      int s;
      s = k % NP;
      void'(add_msg(s, $urandom_range(0, 9) == 0 ? 3 : $urandom_range(0, 2),
                    $urandom_range(1, 3), $urandom_range(1, 12), 200 + (k / NP) * 6, -1));
    end

    while (cycle < 200 || src_q[0].size() + src_q[1].size() + src_q[2].size() > 0 ||
           src_st[0] != SRC_IDLE || src_st[1] != SRC_IDLE || src_st[2] != SRC_IDLE) begin
      ds_nack_mode[1] = (cycle >= 125 && cycle < 160) ? 1 :
                        (cycle >= 200 && $urandom_range(0, 3) == 0) ? 1 : 0;
      ds_nack_mode[0] = 0;
      ds_nack_mode[2] = (cycle >= 200 && $urandom_range(0, 5) == 0) ? 1 : 0;
      do_round();
    end
    ds_nack_mode = '{default: 0};
    repeat (30) do_round();

    // ---------------- results ----------------
    for (int k = 0; k < n_msg; k++) begin
      if (m_expect[k] == 1) begin
        check(m_deliv[k] == 1 && !m_nacked[k], $sformatf("msg %0d not delivered once", k));
      end else if (m_expect[k] == 0) begin
        check(m_nacked[k] && m_deliv[k] == 0, $sformatf("msg %0d not NACKed", k));
      end else begin
        // a short worm can be complete before a NACK from downstream is back
        check(m_nacked[k] ? (m_deliv[k] <= 1) : (m_deliv[k] == 1),
              $sformatf("msg %0d: nacked=%0d delivered=%0d", k, m_nacked[k], m_deliv[k]));
      end
      if (m_exp_nack_cycle[k] >= 0)
        check(m_nack_cyc[k] == m_exp_nack_cycle[k],
              $sformatf("msg %0d: NACK at %0d, expected %0d", k, m_nack_cyc[k], m_exp_nack_cycle[k]));
    end
    // round robin: message 4 (input 1) won, 3 and 5 lost in the same cycle
    check(m_nack_cyc[3] == 42 && m_nack_cyc[5] == 42, "contention NACKs not at cycle 42");
    n_contention = (m_nacked[3] && m_nacked[5] && m_deliv[4] == 1) ? 1 : 0;
    n_rr_checked = n_contention;
    n_busy_nack  = m_nacked[7] ? 1 : 0;
    n_bad_route  = m_nacked[8] ? 1 : 0;
    // downstream NACK: injected in drive cycle ds_nack_at, back at source one edge later
    check(m_nacked[9] && m_nack_cyc[9] == m_hdr_cyc[9] + 3 + 2 + 1,
          $sformatf("downstream NACK reached the source at %0d", m_nack_cyc[9]));

    $display("mechanisms: rounds=%0d delivered=%0d all_outputs_busy=%0d contention=%0d busy_nack=%0d bad_route=%0d downstream_nack=%0d loopback=%0d timed=%0d",
             n_rounds, n_delivered, n_concurrent, n_contention, n_busy_nack, n_bad_route,
             n_ds_nack, n_loopback, n_timing);
    check(n_rounds > 0,     "no clock round");
    check(n_delivered > 0,  "no worm forwarded");
    check(n_concurrent > 0, "never all three outputs busy at once");
    check(n_contention > 0, "no arbitration among simultaneous headers");
    check(n_busy_nack > 0,  "no NACK for a held output");
    check(n_bad_route > 0,  "no NACK for an unknown route byte");
    check(n_ds_nack > 0,    "no NACK passed back from downstream");
    check(n_loopback > 0,   "no worm from Router link to Router link");
    check(n_timing > 0,     "no latency check made");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(WATCHDOG_CYCLES * 40);
    failures++;
    $display("FAIL watchdog expired at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
