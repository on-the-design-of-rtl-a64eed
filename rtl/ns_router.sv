// Router of one node, link side: sends messages from local memory into the
// node's switch and writes incoming messages into local memory.
//
// Sending. The processor gives a message (tx_addr, tx_len data bytes in
// local memory) and up to N_ROUTES routes to the destination, each a list
// of link numbers ending with 0 (tx_routes, tx_route_len), and pulses
// tx_start. The Router sends a worm on the first route: a start word with
// the first route byte, the other route bytes, the data bytes read from
// local memory, and an End Of Data word, one word per clock. If the switch
// returns a NACK while the worm is being sent, the Router ends the worm at
// once with End Of Data. After each worm it waits NACK_WAIT clocks for a
// NACK that may still be on its way back. A NACK makes it try the next
// route; when no route is left it reports failure (tx_done with tx_ok low).
// A worm that stays free of NACK for NACK_WAIT clocks counts as delivered
// (tx_done with tx_ok high): the network has no positive acknowledge.
// A NACK finds its way back only while every switch on the path still
// remembers the worm: a worm over h switches needs at least 4(h-1) words
// (route bytes, data bytes and End Of Data), that is 3h-5 data bytes;
// shorter ones can have a late NACK delivered to another source. The
// processor must keep to this.
//
// Receiving. The first data byte of an incoming worm (marked with the type
// bit) is written at rx_base, the following ones at consecutive addresses;
// End Of Data pulses rx_done with the byte count in rx_len. The Router
// never refuses a worm (rt_nack_out stays low).
//
// Memory: one synchronous read port (data one clock after the address)
// and one write port. Timing: tx_start at edge e, start word on link_out
// from edge e+1, one word per edge after that.
//
// From the description of the Router: assembling messages from local
// memory without the processor, sending them to the switch, handling
// incoming messages, a new message on another node-disjoint route after a
// NACK, and informing the processor when every route failed. The memory
// and processor interfaces, taking all routes at once with tx_start (in
// the network they come from the node's Route Generator, ns_route_gen),
// the NACK_WAIT guard and the receive buffer are this design's choices.
module ns_router
  import ns_pkg::*;
#(
  parameter int N_ROUTES  = 2,      // node-disjoint routes tried (d)
  parameter int MAX_ROUTE = 4,      // route bytes per route, final 0 included
  parameter int ADDR_W    = 8,      // local memory address bits
  parameter int LEN_W     = 8,      // message length bits
  parameter int NACK_WAIT = 20      // clocks to wait for a late NACK
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // processor: transmit
  input  logic                                   tx_start,
  input  logic [ADDR_W-1:0]                      tx_addr,
  input  logic [LEN_W-1:0]                       tx_len,      // >= 1
  input  logic [N_ROUTES-1:0][MAX_ROUTE-1:0][7:0] tx_routes,
  input  logic [N_ROUTES-1:0][$clog2(MAX_ROUTE+1)-1:0] tx_route_len,
  input  logic [$clog2(N_ROUTES+1)-1:0]          tx_nroutes,  // >= 1
  output logic                                   tx_busy,
  output logic                                   tx_done,
  output logic                                   tx_ok,
  // processor: receive
  input  logic [ADDR_W-1:0]                      rx_base,
  output logic                                   rx_done,
  output logic [LEN_W-1:0]                       rx_len,
  // local memory
  output logic                                   mem_rd_en,
  output logic [ADDR_W-1:0]                      mem_rd_addr,
  input  logic [7:0]                             mem_rd_data,
  output logic                                   mem_wr_en,
  output logic [ADDR_W-1:0]                      mem_wr_addr,
  output logic [7:0]                             mem_wr_data,
  // link to the switch (its link 0)
  output flit_t                                  link_out,
  input  logic                                   link_nack,   // switch -> Router
  input  flit_t                                  link_in,
  output logic                                   rt_nack_out  // Router -> switch
);

  localparam int RL_W = $clog2(MAX_ROUTE + 1);
  localparam int RI_W = $clog2(N_ROUTES + 1);
  localparam int W_W  = $clog2(NACK_WAIT + 1);
  localparam int P_W  = LEN_W + 2;

  typedef enum logic [1:0] {TX_IDLE, TX_SEND, TX_WAIT} tx_state_e;

  tx_state_e                          tx_state;
  logic [ADDR_W-1:0]                  addr_q;
  logic [LEN_W-1:0]                   len_q;
  logic [N_ROUTES-1:0][MAX_ROUTE-1:0][7:0] routes_q;
  logic [N_ROUTES-1:0][RL_W-1:0]      rlen_q;
  logic [RI_W-1:0]                    nroutes_q;
  logic [RI_W-1:0]                    ridx;     // route being tried
  logic [P_W-1:0]                     pos;      // word to send at the next edge
  logic [W_W-1:0]                     wait_cnt;
  logic                               nacked;   // current worm got a NACK

  logic [P_W-1:0] rlen_cur, total;            // route bytes, route + data
  logic [7:0]     route_byte;
  assign rlen_cur = P_W'(rlen_q[ridx[$clog2(N_ROUTES > 1 ? N_ROUTES : 2)-1:0]]);
  assign total    = rlen_cur + P_W'(len_q);
  assign route_byte = routes_q[ridx[$clog2(N_ROUTES > 1 ? N_ROUTES : 2)-1:0]]
                              [pos[$clog2(MAX_ROUTE > 1 ? MAX_ROUTE : 2)-1:0]];

  // read one word ahead: the address of the data byte sent after this one
  assign mem_rd_en   = (tx_state == TX_SEND);
  assign mem_rd_addr = addr_q + ADDR_W'(pos + 1'b1 - rlen_cur);
  assign tx_busy     = (tx_state != TX_IDLE);
  assign rt_nack_out = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_state  <= TX_IDLE;
      addr_q    <= '0;
      len_q     <= '0;
      routes_q  <= '0;
      rlen_q    <= '0;
      nroutes_q <= '0;
      ridx      <= '0;
      pos       <= '0;
      wait_cnt  <= '0;
      nacked    <= 1'b0;
      tx_done   <= 1'b0;
      tx_ok     <= 1'b0;
      link_out  <= IDLE_FLIT;
    end else begin
      tx_done  <= 1'b0;
      link_out <= IDLE_FLIT;
      unique case (tx_state)
        TX_IDLE: begin
          if (tx_start) begin
            addr_q    <= tx_addr;
            len_q     <= tx_len;
            routes_q  <= tx_routes;
            rlen_q    <= tx_route_len;
            nroutes_q <= tx_nroutes;
            ridx      <= '0;
            pos       <= '0;
            nacked    <= 1'b0;
            tx_state  <= TX_SEND;
          end
        end
        TX_SEND: begin
          if (link_nack && pos != 0) begin
            // refused ahead: end the worm now
            link_out <= '{typ: 1'b1, data: 8'h00};
            nacked   <= 1'b1;
            wait_cnt <= W_W'(NACK_WAIT);
            tx_state <= TX_WAIT;
          end else if (pos == total) begin
            link_out <= '{typ: 1'b1, data: 8'h00};
            wait_cnt <= W_W'(NACK_WAIT);
            tx_state <= TX_WAIT;
          end else begin
            if (pos < rlen_cur) link_out <= '{typ: (pos == 0), data: route_byte};
            else                link_out <= '{typ: 1'b0, data: mem_rd_data};
            pos <= pos + 1'b1;
          end
        end
        TX_WAIT: begin
          if (link_nack) nacked <= 1'b1;
          if (wait_cnt != 0) wait_cnt <= wait_cnt - 1'b1;
          else if ((nacked || link_nack) && (ridx + 1'b1 < nroutes_q)) begin
            ridx     <= ridx + 1'b1;   // next route
            pos      <= '0;
            nacked   <= 1'b0;
            tx_state <= TX_SEND;
          end else begin
            tx_done  <= 1'b1;
            tx_ok    <= !(nacked || link_nack);
            tx_state <= TX_IDLE;
          end
        end
        default: tx_state <= TX_IDLE;
      endcase
    end
  end

  // receive side
  logic           rx_in_msg;
  logic [LEN_W-1:0] rx_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_in_msg   <= 1'b0;
      rx_cnt      <= '0;
      rx_done     <= 1'b0;
      rx_len      <= '0;
      mem_wr_en   <= 1'b0;
      mem_wr_addr <= '0;
      mem_wr_data <= '0;
    end else begin
      rx_done   <= 1'b0;
      mem_wr_en <= 1'b0;
      if (!rx_in_msg) begin
        if (link_in.typ) begin
          rx_in_msg   <= 1'b1;
          mem_wr_en   <= 1'b1;
          mem_wr_addr <= rx_base;
          mem_wr_data <= link_in.data;
          rx_cnt      <= LEN_W'(1);
        end
      end else if (!link_in.typ) begin
        mem_wr_en   <= 1'b1;
        mem_wr_addr <= rx_base + ADDR_W'(rx_cnt);
        mem_wr_data <= link_in.data;
        rx_cnt      <= rx_cnt + 1'b1;
      end else begin
        rx_in_msg <= 1'b0;
        rx_done   <= 1'b1;
        rx_len    <= rx_cnt;
      end
    end
  end

endmodule
