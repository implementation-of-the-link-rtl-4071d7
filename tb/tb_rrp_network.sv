// tb_rrp_network: distribution of the common RRP event across several
// nodes, with the generator at its default size (3125-cycle period,
// 64-cycle hold-off) and every link delaying a notification by DLY cycles.
//
// Central-node transmission: node 0 (central) starts a chain of three
// followers, 0 -> 1 -> 2 -> 3. Every node sends its event to both
// neighbours, so each follower also hears the echo of the node after it.
// Ad-hoc chain transmission: four ad-hoc nodes in a ring, every node
// running its own timer, taken out of reset at different times so that
// their timers start out of phase.
// Checks, once the first period is over: every node fires exactly once per
// period; the central node fires every 3125 cycles; in each network all
// nodes fire within (hops) * (DLY + 1) cycles of the first one (an echo
// inside the hold-off never fires a node twice); in the ring, the period
// seen by each node stays 3125 cycles once the ring has locked.
module tb_rrp_network;
  localparam int PERIOD = 3125;
  localparam int DLY    = 5;
  localparam int NN     = 4;
  localparam int PERIODS = 8;

  logic clk = 1'b0;
  always #3.2 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat ((PERIODS + 4) * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- the two networks ----------------
  // index 0..3: chain (central + followers), 4..7: ad-hoc ring
  logic       rst [2*NN];
  logic       rrp [2*NN], fh [2*NN];
  logic [1:0] notify [2*NN];
  logic [DLY-1:0] line [2*NN];   // delay line of each node's notification

  always_ff @(posedge clk)
    for (int i = 0; i < 2*NN; i++) line[i] <= {line[i][DLY-2:0], rrp[i]};

  function automatic logic heard(int i);
    return line[i][DLY-1];
  endfunction

  always_comb begin
    for (int i = 0; i < NN; i++) begin
      // chain: neighbours i-1 and i+1 (none beyond the ends)
      notify[i][0] = (i > 0)      ? heard(i - 1) : 1'b0;
      notify[i][1] = (i < NN - 1) ? heard(i + 1) : 1'b0;
      // ring: neighbours on both sides
      notify[NN + i][0] = heard(NN + (i + NN - 1) % NN);
      notify[NN + i][1] = heard(NN + (i + 1) % NN);
    end
  end

  for (genvar g = 0; g < 2*NN; g++) begin : g_node
    rrp_sync #(.N_LINKS(2), .ROLE((g == 0) ? 2'd0 : (g < NN) ? 2'd1 : 2'd2)) u_rrp (
      .clk(clk), .rst(rst[g]), .notify_in(notify[g]), .rrp(rrp[g]), .first_half(fh[g]));
  end

  // ---------------- observation ----------------
  int cyc = 0;
  int fires [2*NN][$];
  always @(posedge clk) begin
    cyc++;
    for (int i = 0; i < 2*NN; i++) if (rrp[i]) fires[i].push_back(cyc);
  end

  initial begin
    for (int i = 0; i < 2*NN; i++) begin rst[i] = 1'b1; line[i] = '0; end
    repeat (3) @(posedge clk);
    // chain: all out of reset together; ring: staggered by 0, 300, 700, 1100
    @(negedge clk);
    for (int i = 0; i < NN; i++) rst[i] = 1'b0;
    rst[NN] = 1'b0;
    repeat (300) @(negedge clk); rst[NN + 1] = 1'b0;
    repeat (400) @(negedge clk); rst[NN + 2] = 1'b0;
    repeat (400) @(negedge clk); rst[NN + 3] = 1'b0;
    repeat (PERIODS * PERIOD) @(negedge clk);

    for (int net = 0; net < 2; net++) begin
      int b, n_ev;
      b = net * NN;
      n_ev = fires[b].size();
      check(n_ev >= PERIODS - 1, $sformatf("network %0d: node 0 fired %0d times", net, n_ev));
      for (int i = 1; i < NN; i++)
        check(fires[b + i].size() == n_ev,
              $sformatf("network %0d: node %0d fired %0d times, node 0 %0d", net, i, fires[b + i].size(), n_ev));
      // skip the first two events, while the ring is still locking
      for (int e = 2; e < n_ev; e++) begin
        int first, last;
        first = fires[b][e]; last = fires[b][e];
        for (int i = 1; i < NN; i++) if (e < fires[b + i].size()) begin
          if (fires[b + i][e] < first) first = fires[b + i][e];
          if (fires[b + i][e] > last)  last  = fires[b + i][e];
        end
        check(last - first <= (NN - 1) * (DLY + 1),
              $sformatf("network %0d event %0d: skew %0d cycles", net, e, last - first));
        for (int i = 0; i < NN; i++) if (e < fires[b + i].size())
          check(fires[b + i][e] - fires[b + i][e - 1] == PERIOD,
                $sformatf("network %0d node %0d: period %0d", net, i, fires[b + i][e] - fires[b + i][e - 1]));
      end
      $display("network %0d: %0d events, last event at cycles %0d %0d %0d %0d", net, n_ev,
               fires[b][n_ev - 1], fires[b + 1][$], fires[b + 2][$], fires[b + 3][$]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
