// nova_tb_env: traffic driver and scoreboard for one nova_top, shared by the
// end-to-end testbenches. The testbench instantiates the network and connects
// its ports here; NUM_CLUSTERS must match the network's.
//
// The driver makes the clock and reset and then:
//  1. sends isolated packets and checks the delivery latency of each kind of
//     path: to the tile itself (1 clock), to a ring neighbour (2), to a
//     two-hop ring neighbour (3), through the tile switch (5) and, with more
//     than one cluster, to another cluster through the cluster switch (5);
//  2. runs a burst phase in which every tile sends to tiles of its own
//     cluster on every clock while eject ports refuse half the clocks, which
//     fills ring links and forces diversions to the switch;
//  3. runs three phases of random traffic in which 10 %, 50 % and 90 % of the
//     packets go to another cluster. Each tile offers a packet with
//     probability RATE_PCT percent per clock until it has sent PKTS packets;
//     eject ports refuse one clock in ten.
// A scoreboard keyed by the payload (source tile and sequence number) checks
// that every packet is ejected once, at the tile its header names, with its
// payload intact. The average end-to-end delay of each phase is printed.
// Every mechanism of the network is counted and must occur at least once:
// ring one-hop and two-hop forwarding, tile switch traffic, cluster switch
// traffic, diversion of a packet from a busy ring link to the switch, uplink
// contention, Banyan back-pressure, and inject/eject stalls.
module nova_tb_env
  import nova_pkg::*;
#(
  parameter int unsigned NUM_CLUSTERS = 8,
  parameter int unsigned PKTS         = 200,
  parameter int unsigned RATE_PCT     = 20
,
  localparam int unsigned NT   = NUM_CLUSTERS * 8
) (
  output logic          clk,
  output logic          rst_n,
  output logic          inj_valid [NT],
  input  logic          inj_ready [NT],
  output nova_pkt_t     inj_pkt   [NT],
  input  logic          ej_valid  [NT],
  output logic          ej_ready  [NT],
  input  nova_pkt_t     ej_pkt    [NT],
  input  logic [NT-1:0] fallback,
  input  logic          start,
  output logic          done,
  output int            checks,
  output int            failures
);
  // independent copy of the ring order: clockwise tile numbers
  localparam int RING [8] = '{0, 3, 5, 6, 7, 4, 2, 1};

  initial begin
    clk   = 1'b0;
    rst_n = 1'b0;
    forever #5 clk = ~clk;
  end


  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  function automatic int ring_index(input int t);
    for (int p = 0; p < 8; p++) if (RING[p] == t) return p;
    return 0;
  endfunction

  // ring distance between two tiles of a cluster, 0..4
  function automatic int ring_dist(input int a, input int b);
    int d;
    d = (ring_index(b) - ring_index(a) + 8) % 8;
    return (d > 4) ? 8 - d : d;
  endfunction

  // ---------------- scoreboard ----------------
  int     exp_dst  [int];   // payload -> global destination tile
  longint t_offer  [int];   // payload -> time the packet was first offered
  int     seq      [NT];
  int     sent     [NT];
  bit     accepted [NT];
  int     n_deliv = 0;
  longint lat_sum = 0;
  int     lat_n = 0;
  int     last_lat = 0;

  // mechanism counters
  int m_self = 0, m_hop1 = 0, m_hop2 = 0, m_sw_intra = 0, m_inter = 0;
  int m_fallback = 0, m_inj_stall = 0, m_ej_stall = 0;

  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < NT; g++) begin
      accepted[g] = inj_valid[g] && inj_ready[g];
      if (inj_valid[g] && !inj_ready[g]) m_inj_stall++;
      if (ej_valid[g] && !ej_ready[g]) m_ej_stall++;
      if (fallback[g]) m_fallback++;
      if (ej_valid[g] && ej_ready[g]) begin
        int key, d, s;
        key = int'(ej_pkt[g].payload);
        check(exp_dst.exists(key), $sformatf("tile %0d ejected unknown or repeated packet %06h", g, key));
        if (exp_dst.exists(key)) begin
          d = exp_dst[key];
          s = key >> 18;
          check(d == g, $sformatf("packet %06h for tile %0d ejected at tile %0d", key, d, g));
          check(int'({ej_pkt[g].hdr.cluster, ej_pkt[g].hdr.tile}) == g, "header matches eject tile");
          // offered half a clock before the accepting edge
          last_lat = int'(($time - t_offer[key] - 5) / 10);
          lat_sum += longint'(last_lat);
          lat_n++;
          if (s == g)                    m_self++;
          else if (s / 8 != g / 8)       m_inter++;
          else case (ring_dist(s % 8, g % 8))
            1: m_hop1++;
            2: m_hop2++;
            default: m_sw_intra++;
          endcase
          exp_dst.delete(key);
          t_offer.delete(key);
        end
        n_deliv++;
      end
    end
  end

  // Probes that the testbench binds inside the network (ring forwarding,
  // uplink contention, cluster switch back-pressure) count into nova_tb_pkg;
  // networks driven by different drivers must therefore run one after the
  // other, each driver started by `start`.

  // ---------------- stimulus ----------------
  int  phase_inter_pct = 0;
  int  phase_rate = 0;
  int  phase_ej_refuse = 10;
  bit  phase_on = 1'b0;

  function automatic int pick_dst(input int g);
    int c, t;
    c = g / 8;
    if (NUM_CLUSTERS > 1 && int'($urandom % 100) < phase_inter_pct) begin
      c = (c + 1 + int'($urandom % (NUM_CLUSTERS - 1))) % NUM_CLUSTERS;
      t = int'($urandom % 8);
    end else begin
      t = ((g % 8) + 1 + int'($urandom % 7)) % 8;
    end
    return c * 8 + t;
  endfunction

  task automatic offer(input int g, input int d);
    int key;
    key = (g << 18) | (seq[g] & 32'h3FFFF);
    seq[g]++;
    inj_pkt[g].hdr.cluster = 3'(d / 8);
    inj_pkt[g].hdr.tile    = 3'(d % 8);
    inj_pkt[g].hdr.aux     = 2'($urandom);
    inj_pkt[g].payload     = 24'(key);
    inj_valid[g] = 1'b1;
    exp_dst[key] = d;
    t_offer[key] = $time;
  endtask

  // retire accepted offers and make new ones, between clock edges
  always @(negedge clk) if (rst_n && phase_on) begin
    for (int g = 0; g < NT; g++) begin
      if (inj_valid[g] && accepted[g]) begin
        inj_valid[g] = 1'b0;
        accepted[g] = 1'b0;
        sent[g]++;
      end
      if (!inj_valid[g] && sent[g] < int'(PKTS) && int'($urandom % 100) < phase_rate)
        offer(g, pick_dst(g));
      ej_ready[g] = int'($urandom % 100) >= phase_ej_refuse;
    end
  end

  // one isolated packet from s to d; returns its latency
  task automatic single(input int s, input int d, input int want, input string what);
    int n0;
    n0 = n_deliv;
    @(negedge clk) offer(s, d);
    @(posedge clk);
    @(negedge clk) inj_valid[s] = 1'b0;
    repeat (8) @(negedge clk);
    check(n_deliv == n0 + 1, $sformatf("%s: %0d -> %0d delivered", what, s, d));
    check(last_lat == want, $sformatf("%s: %0d -> %0d latency %0d, want %0d", what, s, d, last_lat, want));
  endtask


  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    for (int g = 0; g < NT; g++) begin
      inj_valid[g] = 1'b0; inj_pkt[g] = '0; ej_ready[g] = 1'b1;
      seq[g] = 0; sent[g] = 0; accepted[g] = 1'b0;
    end
    @(posedge clk);
    wait (start);
    nova_tb_pkg::clear();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 1. isolated packets, one of each path kind from every tile
    for (int g = 0; g < NT; g++) begin
      int c, t, p;
      c = g / 8; t = g % 8; p = ring_index(t);
      single(g, g,                             1, "self");
      single(g, c * 8 + RING[(p + 1) % 8],     2, "cw neighbour");
      single(g, c * 8 + RING[(p + 7) % 8],     2, "ccw neighbour");
      single(g, c * 8 + RING[(p + 2) % 8],     3, "cw two-hop");
      single(g, c * 8 + RING[(p + 6) % 8],     3, "ccw two-hop");
      single(g, c * 8 + RING[(p + 4) % 8],     5, "through tile switch");
      if (NUM_CLUSTERS > 1)
        single(g, ((c + 1) % NUM_CLUSTERS) * 8 + RING[(p + 3) % 8], 5, "to next cluster");
    end

    // 2. intra-cluster burst; 3. random traffic at three inter-cluster intensities
    for (int ph = 0; ph < 4; ph++) begin
      int deadline;
      phase_inter_pct = (ph == 0) ? 0 : (ph == 1) ? 10 : (ph == 2) ? 50 : 90;
      phase_rate      = (ph == 0) ? 100 : int'(RATE_PCT);
      phase_ej_refuse = (ph == 0) ? 50 : 10;
      for (int g = 0; g < NT; g++) sent[g] = 0;
      lat_sum = 0; lat_n = 0;
      phase_on = 1'b1;
      deadline = 0;
      while (deadline < 200000) begin
        int busy;
        @(posedge clk);
        busy = 0;
        for (int g = 0; g < NT; g++) if (sent[g] < int'(PKTS) || inj_valid[g]) busy = 1;
        if (!busy) break;
        deadline++;
      end
      phase_on = 1'b0;
      @(negedge clk) for (int g = 0; g < NT; g++) ej_ready[g] = 1'b1;
      repeat (100) @(posedge clk);
      check(exp_dst.size() == 0, $sformatf("phase %0d%%: %0d packets not delivered", phase_inter_pct, exp_dst.size()));
      check(lat_n == int'(PKTS * NT), $sformatf("phase %0d%%: %0d of %0d packets delivered", phase_inter_pct, lat_n, PKTS * NT));
      $display("%0d tiles, %s, %0d%% inter-cluster: %0d packets, average end-to-end delay %0d.%02d clocks",
               NT, (ph == 0) ? "burst" : "random", (NUM_CLUSTERS > 1) ? phase_inter_pct : 0, lat_n, lat_sum / (lat_n > 0 ? lat_n : 1),
               ((lat_sum * 100) / (lat_n > 0 ? lat_n : 1)) % 100);
    end

    // every mechanism must have happened
    $display("self=%0d hop1=%0d hop2=%0d tile_switch=%0d inter_cluster=%0d fallback=%0d",
             m_self, m_hop1, m_hop2, m_sw_intra, m_inter, m_fallback);
    $display("ring_forward=%0d uplink_conflict=%0d cluster_switch_block=%0d inject_stall=%0d eject_stall=%0d",
             nova_tb_pkg::ring_fwd, nova_tb_pkg::up_conflict, nova_tb_pkg::cs_block, m_inj_stall, m_ej_stall);
    check(m_self > 0,     "delivery to the sending tile itself");
    check(m_hop1 > 0,     "delivery to a ring neighbour");
    check(m_hop2 > 0,     "delivery to a two-hop neighbour");
    check(m_sw_intra > 0, "delivery through the tile switch");
    check(m_fallback > 0, "diversion from a busy ring link to the switch");
    check(nova_tb_pkg::ring_fwd > 0, "forwarding by a neighbour tile");
    check(m_inj_stall > 0, "inject back-pressure");
    check(m_ej_stall > 0,  "eject back-pressure");
    if (NUM_CLUSTERS > 1) begin
      check(m_inter > 0,    "delivery to another cluster");
      check(nova_tb_pkg::up_conflict > 0, "several tiles competing for the uplink");
      check(nova_tb_pkg::cs_block > 0,    "cluster switch back-pressure");
    end
    done = 1'b1;
  end

endmodule
