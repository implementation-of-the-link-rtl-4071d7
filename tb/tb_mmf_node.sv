// tb_mmf_node: end-to-end test of a node at its default size (16 ports,
// 8 DMA channels, 20 us period at 156.25 MHz = 3125 cycles).
//
// The testbench plays the switching fabric and the rest of the network.
// Packets the node hands to the fabric go to the outgoing port equal to
// their flow id. What leaves an outgoing link on behalf of the node's own
// flows comes straight back on the ingoing link addressed to this node, so
// one FRP makes the whole round trip: reaction point -> contention point
// (rates clamped) -> destination point (turned into a reply) -> contention
// point (untouched) -> reaction point (rate feedback). Cross traffic from
// other nodes is injected directly on some ports and is sunk at the links.
//
//   port 0: own flow 0 (desires 150) against cross flows A (150) and
//           B (20): max-min fair share (190 - 20) / 2 = 85.
//   port 1: own flow 1 (desires 250) alone: it gets vC = 190 (the M = 0
//           correction keeps it there), later it stops (flow-stop).
//   port 2: a burst of twelve new cross flows of rate 20: B = 240 > vC,
//           FSR falls back to C / K = 200 / 12 = 16; one period later
//           all twelve count as bottlenecked here: 190 / 12 = 15.
//   port 3: payload packets, which must pass unchanged.
//   DMA payload of flow 0, always waiting, must leave at the rate the
//           node grants flow 0, within the pacer's burst allowance.
//   port 4: four cross flows at 200 hold the share at 190 / 4 = 47; own
//           flow 4 then starts asking for 200, far above the share, and
//           must be throttled by a short-circuit notification well within
//           one period, then settle at 190 / 5 = 38.
// Each mechanism is counted and must occur at least once.
module tb_mmf_node;
  import frp_pkg::*;
  localparam int unsigned NP = 16;
  localparam int unsigned NF = 8;
  localparam int unsigned PERIOD = 3125;

  logic clk = 1'b0, rst = 1'b1;
  always #3.2 clk = ~clk;   // 156.25 MHz

  logic [NP-1:0] rrp_notify_in = '0;
  logic          rrp, rrp_first_half;
  logic          in_valid = 1'b0, in_ready, in_to_me = 1'b0;
  frp_t          in_pkt = '0;
  logic [2:0]    in_flow = '0;
  logic          fab_in_valid, fab_in_ready = 1'b1, fab_in_reply, stop_consumed;
  frp_t          fab_in_pkt;
  logic [2:0]    fab_in_flow;
  logic [NP-1:0] fab_out_valid = '0, fab_out_ready;
  frp_t          fab_out_pkt [NP];
  logic [NP-1:0] link_valid, link_ready = '1;
  frp_t          link_pkt [NP];
  logic [NF-1:0] flow_active = '0;
  rate_t         flow_desired [NF];
  rate_t         flow_rate [NF];
  logic          fb_valid;
  logic [2:0]    fb_flow;
  rate_t         fb_rate;
  rate_t         port_fsr [NP];
  logic [NP-1:0] port_calc, port_corner_m0, port_corner_over;
  logic [NP-1:0] sc_valid;
  frp_t          sc_pkt [NP];
  logic [NF-1:0] dma_valid = 8'b0000_0001, dma_ready;
  logic [7:0]    dma_len [NF];
  logic          inj_valid, inj_ready = 1'b1;
  logic [2:0]    inj_flow;
  logic [7:0]    inj_len;

  mmf_node dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (14 * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- network model ----------------
  typedef struct { frp_t p; bit own; } item_t;
  item_t fq [NP][$];               // fabric -> port queues
  bit    tagq [NP][$];             // own/cross tag of packets inside each CP
  frp_t  sentq [NP][$];            // what entered each CP, for comparison
  typedef struct { frp_t p; int f; } ing_t;
  ing_t  iq [$];                   // ingoing link queue

  int n_rrp = 0, n_init = 0, n_clamp = 0, n_reply = 0, n_fb = 0, n_stop = 0;
  int n_sc = 0, fb4 = 0;
  int n_m0 = 0, n_over = 0, n_stall = 0, n_payload = 0, n_bwd = 0;
  int last_rrp = -1, cyc = 0;
  longint paced_words = 0, granted = 0;   // flow 0 payload, in words and rate units
  int n_held = 0;

  initial for (int i = 0; i < NF; i++) dma_len[i] = 8'd4;
  // flow 0 always has payload waiting; the pacer must hold it to its rate
  always @(posedge clk) if (!rst) begin
    granted += flow_rate[0];
    if (inj_valid && inj_ready) begin
      check(inj_flow == 3'd0 && inj_len == 8'd4, "paced descriptor is flow 0's");
      paced_words += inj_len;
    end
    if (dma_valid[0] && !dma_ready[0]) n_held++;
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (rrp) begin
      if (last_rrp >= 0) check(cyc - last_rrp == PERIOD, $sformatf("RRP interval %0d", cyc - last_rrp));
      last_rrp = cyc;
      n_rrp++;
    end
    n_m0   += $countones(port_corner_m0);
    n_over += $countones(port_corner_over);
    if (fb_valid) n_fb++;
    if (fb_valid && fb_flow == 3'd4 && fb4 == 0) fb4 = cyc;
    if (stop_consumed) n_stop++;
    n_stall += $countones(fab_out_valid & ~fab_out_ready);
    // node -> fabric
    if (fab_in_valid && fab_in_ready) begin
      if (fab_in_reply) n_reply++;
      if (fab_in_pkt.frp && fab_in_pkt.init && fab_in_pkt.fw) n_init++;
      fq[fab_in_flow].push_back('{fab_in_pkt, 1'b1});
    end
    for (int p = 0; p < NP; p++) begin
      // fabric -> contention point
      if (fab_out_valid[p] && fab_out_ready[p]) begin
        item_t it;
        it = fq[p].pop_front();
        tagq[p].push_back(it.own);
        sentq[p].push_back(it.p);
      end
      // contention point -> link
      if (link_valid[p] && link_ready[p]) begin
        bit   own;
        frp_t orig;
        own  = tagq[p].pop_front();
        orig = sentq[p].pop_front();
        check(link_pkt[p][3:0] == orig[3:0], "flags unchanged by the monitor");
        if (orig.frp && orig.fw) begin
          check(link_pkt[p].cr <= orig.cr && link_pkt[p].dr <= orig.dr, "rates only lowered");
          check(link_pkt[p].cr == ((orig.cr < port_fsr[p]) ? orig.cr : port_fsr[p]) || orig.init,
                $sformatf("port %0d CR %0d -> %0d with FSR %0d", p, orig.cr, link_pkt[p].cr, port_fsr[p]));
          if (link_pkt[p].cr < orig.cr) n_clamp++;
        end else begin
          check(link_pkt[p] == orig, "payload and replies pass unchanged");
          if (!orig.frp) n_payload++;
          else n_bwd++;
        end
        if (sc_valid[p]) begin
          n_sc++;
          check(!sc_pkt[p].fw && sc_pkt[p].cr == link_pkt[p].cr, "notification carries the clamped rate");
          if (own) iq.push_back('{sc_pkt[p], p});
        end
        if (own) iq.push_back('{link_pkt[p], p});
      end else if (sc_valid[p]) check(0, "notification without a forwarded FRP");
    end
    // ingoing link
    if (in_valid && in_ready) void'(iq.pop_front());
  end

  always @(negedge clk) begin
    for (int p = 0; p < NP; p++) begin
      fab_out_valid[p] = (fq[p].size() != 0);
      fab_out_pkt[p]   = (fq[p].size() != 0) ? fq[p][0].p : '0;
    end
    in_valid = (iq.size() != 0);
    in_pkt   = (iq.size() != 0) ? iq[0].p : '0;
    in_flow  = (iq.size() != 0) ? 3'(iq[0].f) : '0;
    in_to_me = 1'b1;
  end

  function automatic frp_t frp(bit init, bit stop, int cr, int dr);
    frp_t p;
    p = '0; p.frp = 1; p.fw = 1; p.init = init; p.stop = stop;
    p.cr = rate_t'(cr); p.dr = rate_t'(dr);
    return p;
  endfunction

  task automatic inject_cross(int port, frp_t p);
    fq[port].push_back('{p, 1'b0});
  endtask

  int period = 0;
  int t_start4 = 0;
  initial begin
    for (int i = 0; i < NF; i++) flow_desired[i] = '0;
    flow_desired[0] = 150;
    flow_desired[1] = 250;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // cross flows announce themselves, own flows start
    inject_cross(0, frp(1, 0, 150, 150));
    inject_cross(0, frp(1, 0, 20, 20));
    flow_active[1:0] = 2'b11;

    while (period < 11) begin
      @(posedge clk);
      if (rrp) begin
        period++;
        @(negedge clk);
        inject_cross(0, frp(0, 0, 150, 150));
        inject_cross(0, frp(0, 0, 20, 20));
        inject_cross(3, '{dr: 8'h5A, cr: 8'hA5, fw: 1'b1, frp: 1'b0, init: 1'b0, stop: 1'b0});
        for (int j = 0; j < 4; j++) inject_cross(4, frp(period == 1, 0, 200, 200));
        if (period == 3) begin
          flow_desired[4] = 200;
          flow_active[4]  = 1'b1;
          t_start4 = cyc;
        end
        if (period == 3)
          for (int j = 0; j < 12; j++) inject_cross(2, frp(1, 0, 20, 20));
        if (period >= 4 && period <= 5)
          for (int j = 0; j < 12; j++) inject_cross(2, frp(0, 0, 20, 20));
        // (the FSR read here is the one of the period that just ended)
        if (period == 5)
          check(port_fsr[2] == 200 / 12, $sformatf("burst on port 2: FSR %0d = C/K", port_fsr[2]));
        if (period == 6)
          check(port_fsr[2] == 190 / 12, $sformatf("burst flows now bottlenecked here: FSR %0d", port_fsr[2]));
        if (period == 8) begin
          check(flow_rate[1] == 190, $sformatf("lone flow 1 gets vC: %0d", flow_rate[1]));
          check(port_fsr[1] == 190, $sformatf("port 1 FSR %0d", port_fsr[1]));
          flow_active[1] = 1'b0;
        end
      end
    end
    repeat (200) @(negedge clk);
    check(flow_rate[0] == 85, $sformatf("flow 0 converged to its fair share: %0d", flow_rate[0]));
    check(port_fsr[0] == 85, $sformatf("port 0 FSR %0d", port_fsr[0]));
    check(iq.size() == 0, "ingoing link drained");

    $display("short-circuit notifications=%0d, flow 4 feedback after %0d cycles", n_sc, fb4 - t_start4);
    $display("mechanisms: rrp=%0d init=%0d clamp=%0d reply=%0d backward=%0d feedback=%0d stop=%0d m0=%0d over=%0d stall=%0d payload=%0d",
             n_rrp, n_init, n_clamp, n_reply, n_bwd, n_fb, n_stop, n_m0, n_over, n_stall, n_payload);
    check(n_rrp > 0,     "RRP events occurred");
    check(n_init > 0,    "flow-init FRPs occurred");
    check(n_clamp > 0,   "rates were clamped");
    check(n_reply > 0,   "replies were made at the destination");
    check(n_bwd > 0,     "replies crossed a monitor untouched");
    check(n_fb > 0,      "rate feedback reached the DMA");
    check(n_stop > 0,    "a flow-stop was consumed");
    check(n_m0 > 0,      "M = 0 correction used");
    check(n_over > 0,    "B > vC fallback used");
    check(n_stall > 0,   "a monitor held its input during an FSR computation");
    check(n_payload > 0, "payload passed");
    check(n_sc > 0,      "short-circuit notification issued");
    check(n_held > 0,    "payload held back by the pacer");
    $display("flow 0 payload: %0d words paced, %0d granted", paced_words, granted / 200);
    check(paced_words > 0 && paced_words * 200 <= granted + 200 * 16 &&
          paced_words * 200 + 200 * 20 >= granted,
          $sformatf("flow 0 payload paced at its granted rate: %0d words, %0d granted", paced_words, granted / 200));
    check(fb4 > 0 && fb4 - t_start4 < 200,
          $sformatf("flow 4 throttled by a short-circuit notification %0d cycles after it started", fb4 - t_start4));
    check(flow_rate[4] == 190 / 5, $sformatf("flow 4 shares port 4 with four cross flows: %0d", flow_rate[4]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
