// tb_experiments: the three rate-allocation experiments of the scheme, run
// on real link monitors at their default parameters (C = 200 units per
// 10 Gb/s link, alpha = 5 %, so 190 units = 9.5 Gb/s usable; RRP 20 us =
// 3125 cycles). The experiments use disjoint links, so they run side by
// side in one simulation.
//
// Experiment 1 (convergence), links A, X and interlink 1:
//   f1: link A -> link X        f2, f3: interlink 1
//   f4: link A -> interlink 1   (f1 and f4 leave the same host)
//   f1, f2 from the start; f3 from 170 us; f4 from 370 us to 570 us.
// Experiment 2 (a bulk flow and a flow of varying load), interlink 2:
//   f5 wants 5 Gb/s (100 units); f6 wants 30, 90, 150, 200 units in the
//   four phases.
// Experiment 3 (local and remote flows), interlink 3 and host link H:
//   f7, f8 remote: interlink 3 -> host link H; f9 local: host link H.
//   All three start together at full link speed.
// Expected max-min-fair rates (units) at the end of each phase:
//   phase      f1  f2  f3  f4    f5  f6    f7  f8  f9
//   0-170 us  190 190   -   -   100  30    63  63  63
//   170-370   190  95  95   -   100  90    63  63  63
//   370-570   127  63  63  63    95  95    63  63  63
//   570-800   190  95  95   -    95  95    63  63  63
// Rates are integers, so a tolerance of 2 units (1 %) is allowed; 4 units
// for network 0 below, whose FSR keeps wandering a few units around the
// fair share when several flows sit exactly at it (they all count as
// bottlenecked elsewhere, and the M = 0 correction then overshoots).
//
// The whole network is built twice, driven by the same RRP: network 0
// with the default (strict, CR > FSR) bottlenecked-here test and network 1
// with HERE_GE = 1 (CR >= FSR), the two readings the scheme's text allows.
// Both must reach the rates above in every phase. The number of periods
// each change needs before the rates stay correct is measured and printed;
// for network 1 the start of f3 and the start of f4 must each settle
// within two periods, the convergence time the scheme reports.
// Sources and destinations are modelled here: every active flow sends one
// FRP per period (CR = current rate, DR = desired rate) through the
// monitors of its path; the destination returns it at once and the source
// takes the returned DR as its new rate. A new flow sends flow-init, a
// finishing flow sends flow-stop.
module tb_experiments;
  import frp_pkg::*;
  localparam int unsigned PERIOD = 3125;
  localparam real         CYC_NS = 6.4;
  localparam int          NL = 6;   // links per network
  localparam int          NF = 9;   // flows

  logic clk = 1'b0, rst = 1'b1;
  always #3.2 clk = ~clk;

  logic rrp, first_half;
  rrp_sync u_rrp (.clk(clk), .rst(rst), .notify_in(1'b0), .rrp(rrp), .first_half(first_half));

  // monitors: index NL*n + l, network n; links 0 = A, 1 = X,
  // 2 = interlink 1, 3 = interlink 2, 4 = interlink 3, 5 = host link H
  logic  in_valid [2*NL], in_ready [2*NL], out_valid [2*NL], out_ready [2*NL];
  frp_t  in_pkt [2*NL], out_pkt [2*NL];
  for (genvar i = 0; i < 2*NL; i++) begin : g_link
    rate_t       fsr;
    logic [7:0]  m_c, k_c;
    logic [15:0] b_c;
    logic        c0, c1, c2, scv;
    frp_t        scp;
    contention_point #(.HERE_GE(i >= NL)) u_cp (
      .clk(clk), .rst(rst), .rrp(rrp),
      .in_valid(in_valid[i]), .in_ready(in_ready[i]), .in_pkt(in_pkt[i]),
      .out_valid(out_valid[i]), .out_ready(out_ready[i]), .out_pkt(out_pkt[i]),
      .fsr(fsr), .m_count(m_c), .k_count(k_c), .b_sum(b_c),
      .calc_start(c0), .corner_m0(c1), .corner_over(c2), .sc_valid(scv), .sc_pkt(scp));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (50 * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- flows ----------------
  int unsigned rate [2][NF];   // [network][flow]
  bit          active [2][NF];
  int unsigned desired [NF];
  int          path [NF][$];
  semaphore    net [2];

  // carry one FRP through the monitors of a path, return what arrives
  task automatic traverse(int n, int f, frp_t p, output frp_t q);
    net[n].get(1);
    foreach (path[f][h]) begin
      int l;
      l = NL * n + path[f][h];
      @(negedge clk);
      in_pkt[l] = p; in_valid[l] = 1'b1;
      do @(posedge clk); while (!in_ready[l]);
      #1 in_valid[l] = 1'b0;
      while (!out_valid[l]) @(posedge clk);
      #1 p = out_pkt[l];
    end
    net[n].put(1);
    q = p;
  endtask

  function automatic frp_t mk(bit init, bit stop, int unsigned cr, int unsigned dr);
    frp_t p;
    p = '0; p.frp = 1; p.fw = 1; p.init = init; p.stop = stop;
    p.cr = rate_t'(cr); p.dr = rate_t'(dr);
    return p;
  endfunction

  task automatic start_flow(int f);
    for (int n = 0; n < 2; n++) begin
      frp_t q;
      traverse(n, f, mk(1, 0, desired[f], desired[f]), q);
      rate[n][f] = q.dr;
      active[n][f] = 1'b1;
    end
  endtask

  task automatic stop_flow(int f);
    for (int n = 0; n < 2; n++) begin
      frp_t q;
      active[n][f] = 1'b0;
      traverse(n, f, mk(0, 1, rate[n][f], desired[f]), q);
    end
  endtask

  // every period, every active flow of both networks reports its rate
  always @(posedge clk) if (!rst && rrp) begin
    for (int n = 0; n < 2; n++) begin
      fork
        automatic int nn = n;
        begin
          for (int f = 0; f < NF; f++) if (active[nn][f]) begin
            frp_t q;
            traverse(nn, f, mk(0, 0, rate[nn][f], desired[f]), q);
            rate[nn][f] = q.dr;
          end
        end
      join_none
    end
  end

  // ---------------- phase checks ----------------
  int n_rrp = 0;
  always @(posedge clk) if (rrp) n_rrp++;

  function automatic bit near(int unsigned a, int unsigned b, int unsigned tol);
    return (a + tol >= b) && (a <= b + tol);
  endfunction

  // flows whose rates are checked together: Experiment 1, 2 and 3
  function automatic bit settled(int n, int x, int unsigned e[NF]);
    bit ok = 1'b1;
    int lo, hi;
    lo = (x == 1) ? 0 : (x == 2) ? 4 : 6;
    hi = (x == 1) ? 3 : (x == 2) ? 5 : 8;
    for (int f = lo; f <= hi; f++) if (active[n][f] && !near(rate[n][f], e[f], n ? 2 : 4)) ok = 1'b0;
    return ok;
  endfunction

  int last_settle [2][3];

  // count the periods after a change until the expected rates hold
  task automatic phase(string name, int unsigned len_us, int unsigned e[NF]);
    int r0, settle [2][3];
    r0 = n_rrp;
    settle = '{'{-1, -1, -1}, '{-1, -1, -1}};
    for (int c = 0; c < int'(len_us * 1000.0 / CYC_NS); c++) begin
      @(posedge clk);
      for (int n = 0; n < 2; n++) for (int x = 0; x < 3; x++) begin
        if (settle[n][x] < 0 && settled(n, x + 1, e)) settle[n][x] = n_rrp - r0;
        if (settle[n][x] >= 0 && !settled(n, x + 1, e)) settle[n][x] = -1;
      end
    end
    for (int n = 0; n < 2; n++) begin
      string s;
      s = $sformatf("%s net %0d (%s):", name, n, n ? "CR >= FSR" : "CR > FSR ");
      for (int f = 0; f < NF; f++)
        s = {s, $sformatf(" f%0d=%0d/%0d", f + 1, active[n][f] ? rate[n][f] : 0, active[n][f] ? e[f] : 0)};
      $display("%s  settled after %0d, %0d, %0d RRPs", s, settle[n][0], settle[n][1], settle[n][2]);
      for (int x = 0; x < 3; x++) begin
        check(settled(n, x + 1, e),
              $sformatf("%s network %0d experiment %0d: max-min-fair rates reached", name, n, x + 1));
        check(settle[n][x] >= 0,
              $sformatf("%s network %0d experiment %0d: rates stable to the end of the phase", name, n, x + 1));
      end
    end
    last_settle = settle;
  endtask

  initial begin
    net[0] = new(1);
    net[1] = new(1);
    for (int l = 0; l < 2*NL; l++) begin in_valid[l] = 0; in_pkt[l] = '0; out_ready[l] = 1'b1; end
    for (int n = 0; n < 2; n++) for (int f = 0; f < NF; f++) begin rate[n][f] = 0; active[n][f] = 0; end
    path[0] = '{0, 1};   // f1: link A, link X
    path[1] = '{2};      // f2: interlink 1
    path[2] = '{2};      // f3: interlink 1
    path[3] = '{0, 2};   // f4: link A, interlink 1
    path[4] = '{3};      // f5: interlink 2
    path[5] = '{3};      // f6: interlink 2
    path[6] = '{4, 5};   // f7: interlink 3, host link H
    path[7] = '{4, 5};   // f8: interlink 3, host link H
    path[8] = '{5};      // f9: host link H
    desired = '{200, 200, 200, 200, 100, 30, 200, 200, 200};
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    for (int f = 0; f < NF; f++) if (f != 2 && f != 3) start_flow(f);
    phase("0-170 us  ", 170, '{190, 190, 0, 0, 100, 30, 63, 63, 63});
    start_flow(2);
    desired[5] = 90;
    phase("170-370 us", 200, '{190, 95, 95, 0, 100, 90, 63, 63, 63});
    check(last_settle[1][0] >= 0 && last_settle[1][0] <= 2, "CR >= FSR network: start of f3 settles within two periods");
    start_flow(3);
    desired[5] = 150;
    phase("370-570 us", 200, '{127, 63, 63, 63, 95, 95, 63, 63, 63});
    check(last_settle[1][0] >= 0 && last_settle[1][0] <= 2, "CR >= FSR network: start of f4 settles within two periods");
    stop_flow(3);
    desired[5] = 200;
    phase("570-800 us", 230, '{190, 95, 95, 0, 95, 95, 63, 63, 63});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
