// noc_traffic: traffic generator and checker around one fdt_noc instance,
// used by the workload testbenches to run several mesh sizes and routing
// algorithms side by side.
//
// Phase 1 (all-to-all): every node sends one packet to every node, one at a
// time, with gaps long enough that packets never meet. Every packet must
// arrive, intact, at its destination PE exactly 2*(H+1) cycles after its
// head was injected (H = Manhattan distance: the routing is minimal).
// Phase 2 (random): NPKT packets of 1..4 payload phits, uniformly random
// destinations other than the source; each idle source starts a packet in a
// cycle with probability RATE_PERMIL/1000. The mesh has no flow control, so
// packets that lose arbitration are dropped; every packet that does arrive
// must be complete, at the right PE, with the exact 2*(H+1) latency, and no
// phit may arrive that was not sent. Drops are counted and reported.
//
// The first payload of each packet carries {source, sequence} so the
// receiver can find the packet it belongs to.
module noc_traffic
  import fdt_pkg::*;
#(
  parameter int unsigned COLS        = 4,
  parameter int unsigned ROWS        = 4,
  parameter routing_e    ROUTING     = RA_XY,
  parameter int unsigned NPKT        = 1000,
  parameter int unsigned RATE_PERMIL = 20
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned NN = COLS * ROWS, W = 18;
  localparam int unsigned XW = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int unsigned YW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned TAGW = W - 2 - XW - YW;

  logic [W-1:0] pe_in  [NN];
  logic [W-1:0] pe_out [NN];

  fdt_noc #(.COLS(COLS), .ROWS(ROWS), .W(W), .ROUTING(ROUTING)) u_noc (
    .clk(clk), .rst_n(rst_n), .pe_in(pe_in), .pe_out(pe_out)
  );

  typedef struct {
    int           dst;
    int           t_inj;
    logic [W-1:0] ph [$];
  } pkt_t;

  pkt_t         sent [int];          // key = source * 512 + sequence
  logic [W-1:0] tx   [NN][$];        // phits still to inject per source
  logic [W-1:0] rx   [NN][$];        // phits of the packet arriving per PE
  int           rx_t [NN];
  int           seq  [NN];
  int           now, phase, injected, delivered, dropped, next_slot, a2a_i;

  function automatic int hops(int s, int d);
    int dx, dy;
    dx = (s % int'(COLS)) - (d % int'(COLS));
    dy = (s / int'(COLS)) - (d / int'(COLS));
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  task automatic new_packet(int s, int d);
    pkt_t p;
    int key, len;
    key = s * 512 + (seq[s] % 512);
    seq[s]++;
    if (sent.exists(key)) begin   // older packet with this key never arrived
      dropped++;
      sent.delete(key);
    end
    len = 1 + int'($urandom % 4);
    p.dst = d;
    p.t_inj = now;
    p.ph.push_back({2'b10, XW'(d % int'(COLS)), YW'(d / int'(COLS)), TAGW'($urandom)});
    p.ph.push_back({2'b11, 7'(s), 9'(key % 512)});
    for (int k = 1; k < len; k++) p.ph.push_back({2'b11, 16'($urandom)});
    sent[key] = p;
    tx[s] = p.ph;
    injected++;
  endtask

  task automatic finish_rx(int n);
    int key, s, lat;
    bit bad;
    checks++;
    bad = 0;
    if (rx[n].size() < 2) begin
      bad = 1;
      $display("[%0dx%0d ra%0d] PE %0d: head without payload", COLS, ROWS, ROUTING, n);
    end else begin
      s = int'(rx[n][1][15:9]);
      key = s * 512 + int'(rx[n][1][8:0]);
      if (!sent.exists(key)) begin
        bad = 1;
        $display("[%0dx%0d ra%0d] PE %0d: unknown packet %0d", COLS, ROWS, ROUTING, n, key);
      end else begin
        lat = rx_t[n] - sent[key].t_inj;
        if (sent[key].dst != n || lat != 2 * (hops(s, n) + 1) || rx[n] != sent[key].ph) begin
          bad = 1;
          $display("[%0dx%0d ra%0d] PE %0d: packet %0d from %0d to %0d, latency %0d, %0d of %0d phits",
                   COLS, ROWS, ROUTING, n, key, s, sent[key].dst, lat, rx[n].size(),
                   sent[key].ph.size());
        end
        sent.delete(key);
        delivered++;
      end
    end
    if (bad) failures++;
    rx[n].delete();
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    now = 0; phase = 1; injected = 0; delivered = 0; dropped = 0;
    next_slot = 4; a2a_i = 0;
    for (int n = 0; n < int'(NN); n++) begin
      pe_in[n] = '0;
      seq[n] = 0;
      rx_t[n] = 0;
    end
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      now++;
      // receive
      for (int n = 0; n < int'(NN); n++) begin
        logic [1:0] pt;
        pt = pe_out[n][W-1 -: 2];
        if (pt == 2'b10) begin
          if (rx[n].size() > 0) finish_rx(n);
          rx[n].push_back(pe_out[n]);
          rx_t[n] = now;
        end else if (pt == 2'b11) begin
          if (rx[n].size() > 0) rx[n].push_back(pe_out[n]);
          else begin
            checks++; failures++;
            $display("[%0dx%0d ra%0d] PE %0d: payload without head", COLS, ROWS, ROUTING, n);
          end
        end else if (rx[n].size() > 0) begin
          finish_rx(n);
        end
      end
      // inject
      if (phase == 1) begin
        if (now == next_slot && a2a_i < int'(NN * NN)) begin
          int s, d;
          s = a2a_i / int'(NN);
          d = a2a_i % int'(NN);
          new_packet(s, d);
          a2a_i++;
          next_slot = now + 2 * (hops(s, d) + 1) + 8;
        end
        if (a2a_i == int'(NN * NN) && now == next_slot) begin
          checks++;
          if (delivered != int'(NN * NN) || sent.size() != 0) begin
            failures++;
            $display("[%0dx%0d ra%0d] all-to-all: %0d of %0d delivered", COLS, ROWS, ROUTING,
                     delivered, NN * NN);
          end
          $display("[%0dx%0d ra%0d] all-to-all: %0d packets delivered", COLS, ROWS, ROUTING,
                   delivered);
          phase = 2; injected = 0; delivered = 0; sent.delete();
        end
      end else if (phase == 2) begin
        for (int s = 0; s < int'(NN); s++)
          if (tx[s].size() == 0 && injected < int'(NPKT) &&
              ($urandom % 1000) < RATE_PERMIL) begin
            int d;
            d = int'($urandom % (NN - 1));
            if (d >= s) d++;
            new_packet(s, d);
          end
        if (injected == int'(NPKT)) begin
          next_slot = now + 2 * (int'(COLS + ROWS) + 2) + 8;
          phase = 3;
        end
      end else if (now == next_slot) begin
        dropped += sent.size();
        $display("[%0dx%0d ra%0d] random, rate %0d/1000: %0d sent, %0d delivered, %0d dropped",
                 COLS, ROWS, ROUTING, RATE_PERMIL, injected, delivered, dropped);
        checks++;
        if (delivered == 0) failures++;
        done = 1;
        break;
      end
      for (int s = 0; s < int'(NN); s++)
        pe_in[s] = (tx[s].size() > 0) ? tx[s].pop_front() : '0;
    end
  end
endmodule
