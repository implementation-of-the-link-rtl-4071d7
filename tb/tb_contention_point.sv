// tb_contention_point: self-checking test of the link monitor.
//
// Two instances are tested. Instance 0 uses the default parameters
// (C = 200, alpha = 5 %, so vC = 190) and runs a long random mix of normal,
// flow-init, flow-stop, backward and payload packets, RRP events (some of
// them arriving while an FSR division is in progress) and output
// back-pressure. Instance 2 is instance 0 with HERE_GE = 1 (a CR equal to
// the FSR counts as bottlenecked here) and runs the same kind of random
// mix against the model with that rule. Instance 1 uses C = 100 and alpha = 0 and replays the
// single-link timeline of the scheme's example scaled by ten: FSR 30,
// FRPs with CR 20, 40, 40, 30 leave with 20, 30, 30, 30; the next period's
// FSR is (100 - 50) / 2 = 25 and a CR of 30 then leaves as 25.
// A reference model written from the algorithm (counters, old registers,
// corner cases) predicts every output packet and the FSR and counters
// after each step, and every short-circuit notification (a forward FRP
// whose CR exceeds twice the FSR it meets). Latencies are checked: one cycle for a packet that
// needs no division, RATE_W+CNT_W+4 cycles for a flow-init FRP.
module tb_contention_point;
  import frp_pkg::*;

  localparam int unsigned CNT_W = 8;
  localparam int unsigned SUM_W = RATE_W + CNT_W;
  localparam int unsigned INIT_LAT = SUM_W + 4;

  int unsigned CAP [3] = '{200, 100, 200};
  int unsigned VCP [3] = '{190, 100, 190};

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic             rrp       [3];
  logic             in_valid  [3];
  logic             in_ready  [3];
  frp_t             in_pkt    [3];
  logic             out_valid [3];
  logic             out_ready [3];
  frp_t             out_pkt   [3];
  rate_t            fsr       [3];
  logic [CNT_W-1:0] m_count   [3];
  logic [CNT_W-1:0] k_count   [3];
  logic [SUM_W-1:0] b_sum     [3];
  logic             calc_start[3], corner_m0[3], corner_over[3];
  logic             sc_valid  [3];
  frp_t             sc_pkt    [3];

  contention_point dut0 (
    .clk(clk), .rst(rst), .rrp(rrp[0]), .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .in_pkt(in_pkt[0]), .out_valid(out_valid[0]), .out_ready(out_ready[0]),
    .out_pkt(out_pkt[0]), .fsr(fsr[0]), .m_count(m_count[0]), .k_count(k_count[0]),
    .b_sum(b_sum[0]), .calc_start(calc_start[0]), .corner_m0(corner_m0[0]),
    .corner_over(corner_over[0]), .sc_valid(sc_valid[0]), .sc_pkt(sc_pkt[0]));

  contention_point #(.CAPACITY(100), .ALPHA_PCT(0)) dut1 (
    .clk(clk), .rst(rst), .rrp(rrp[1]), .in_valid(in_valid[1]), .in_ready(in_ready[1]),
    .in_pkt(in_pkt[1]), .out_valid(out_valid[1]), .out_ready(out_ready[1]),
    .out_pkt(out_pkt[1]), .fsr(fsr[1]), .m_count(m_count[1]), .k_count(k_count[1]),
    .b_sum(b_sum[1]), .calc_start(calc_start[1]), .corner_m0(corner_m0[1]),
    .corner_over(corner_over[1]), .sc_valid(sc_valid[1]), .sc_pkt(sc_pkt[1]));

  contention_point #(.HERE_GE(1'b1)) dut2 (
    .clk(clk), .rst(rst), .rrp(rrp[2]), .in_valid(in_valid[2]), .in_ready(in_ready[2]),
    .in_pkt(in_pkt[2]), .out_valid(out_valid[2]), .out_ready(out_ready[2]),
    .out_pkt(out_pkt[2]), .fsr(fsr[2]), .m_count(m_count[2]), .k_count(k_count[2]),
    .b_sum(b_sum[2]), .calc_start(calc_start[2]), .corner_m0(corner_m0[2]),
    .corner_over(corner_over[2]), .sc_valid(sc_valid[2]), .sc_pkt(sc_pkt[2]));

  int checks = 0, failures = 0;
  int n_sc = 0;
  frp_t sc_q [3][$];
  int n_m0 = 0, n_over = 0, n_pend = 0, n_clamp_cr = 0, n_clamp_dr = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int unsigned r_fsr[3], r_ofsr[3], r_m[3], r_om[3], r_k[3], r_b[3], r_ob[3], r_bmax[3], r_obmax[3];
  localparam int unsigned CMAX = (1 << CNT_W) - 1;
  localparam int unsigned SMAX = (1 << SUM_W) - 1;

  function automatic int unsigned inc_c(int unsigned x); return (x == CMAX) ? x : x + 1; endfunction
  function automatic int unsigned dec_c(int unsigned x); return (x == 0) ? 0 : x - 1; endfunction
  function automatic int unsigned add_s(int unsigned x, int unsigned y); return (x + y > SMAX) ? SMAX : x + y; endfunction
  function automatic int unsigned sub_s(int unsigned x, int unsigned y); return (x > y) ? x - y : 0; endfunction
  function automatic int unsigned umax(int unsigned x, int unsigned y); return (x > y) ? x : y; endfunction
  function automatic int unsigned umin(int unsigned x, int unsigned y); return (x < y) ? x : y; endfunction

  function automatic int unsigned model_fsr(int i, int unsigned m, int unsigned b,
                                            int unsigned bmax, int unsigned k);
    if (m == 0) begin
      if (b != 0) b = sub_s(b, bmax);
      m = 1;
    end
    if (b > VCP[i]) return CAP[i] / ((k == 0) ? 1 : k);
    return (VCP[i] - b) / m;
  endfunction

  function automatic void model_rrp(int i);
    int unsigned nf;
    nf = model_fsr(i, r_m[i], r_b[i], r_bmax[i], r_k[i]) & 8'hFF;
    r_om[i] = r_m[i]; r_ob[i] = r_b[i]; r_obmax[i] = r_bmax[i]; r_ofsr[i] = r_fsr[i];
    r_m[i] = 0; r_b[i] = 0; r_bmax[i] = 0;
    r_fsr[i] = nf;
  endfunction

  // a short-circuit notification: the clamped packet, turned into a reply
  function automatic frp_t notice_of(frp_t o);
    frp_t n;
    n = o; n.fw = 0; n.init = 0; n.stop = 0; n.frp = 1;
    return n;
  endfunction

  // returns the expected output packet; drop never happens in a CP
  // bottlenecked-here test: instance 2 counts CR == FSR as bottlenecked here
  function automatic bit here(int i, int unsigned cr, int unsigned f);
    return (i == 2) ? (cr >= f) : (cr > f);
  endfunction

  function automatic frp_t model_pkt(int i, frp_t p);
    frp_t o;
    o = p;
    if (p.frp && p.stop) begin
      r_k[i] = dec_c(r_k[i]);
      if (here(i, p.cr, r_fsr[i])) begin
        r_m[i] = dec_c(r_m[i]); r_om[i] = dec_c(r_om[i]);
      end else begin
        r_b[i] = sub_s(r_b[i], p.cr); r_ob[i] = sub_s(r_ob[i], p.cr);
      end
    end else if (p.frp && p.fw && p.init) begin
      r_k[i] = inc_c(r_k[i]);
      if (here(i, p.cr, r_ofsr[i])) begin
        r_m[i] = inc_c(r_m[i]); r_om[i] = inc_c(r_om[i]);
      end else begin
        r_b[i] = add_s(r_b[i], p.cr); r_ob[i] = add_s(r_ob[i], p.cr);
        r_bmax[i] = umax(r_bmax[i], p.cr); r_obmax[i] = umax(r_obmax[i], p.cr);
      end
      r_fsr[i] = model_fsr(i, r_om[i], r_ob[i], r_obmax[i], r_k[i]) & 8'hFF;
      o.cr = rate_t'(umin(p.cr, r_fsr[i]));
      o.dr = rate_t'(umin(p.dr, r_fsr[i]));
      if (p.cr > 2 * r_fsr[i]) sc_q[i].push_back(notice_of(o));
    end else if (p.frp && p.fw) begin
      if (here(i, p.cr, r_fsr[i])) r_m[i] = inc_c(r_m[i]);
      else begin
        r_b[i] = add_s(r_b[i], p.cr);
        r_bmax[i] = umax(r_bmax[i], p.cr);
      end
      o.cr = rate_t'(umin(p.cr, r_fsr[i]));
      o.dr = rate_t'(umin(p.dr, r_fsr[i]));
      if (p.cr > 2 * r_fsr[i]) sc_q[i].push_back(notice_of(o));
      if (o.cr != p.cr) n_clamp_cr++;
      if (o.dr != p.dr) n_clamp_dr++;
    end
    return o;
  endfunction

  // ---------------- scoreboard ----------------
  frp_t exp_q [3][$];
  int   accept_t [3][$];
  int   exp_lat  [3][$];
  int   cyc = 0;
  int   rand_units [2] = '{0, 2};
  bit   bp_on [3] = '{1'b0, 1'b0, 1'b0};

  always @(posedge clk) cyc <= cyc + 1;

  for (genvar g = 0; g < 3; g++) begin : g_mon
    always @(posedge clk) begin
      if (!rst) begin
        if (corner_m0[g])   n_m0++;
        if (corner_over[g]) n_over++;
        if (sc_valid[g]) begin
          n_sc++;
          if (sc_q[g].size() == 0) check(0, $sformatf("dut%0d: unexpected notification", g));
          else begin
            frp_t e;
            e = sc_q[g].pop_front();
            check(sc_pkt[g] == e, $sformatf("dut%0d: notification %h expected %h", g, sc_pkt[g], e));
          end
        end
        if (out_valid[g] && out_ready[g]) begin
          if (exp_q[g].size() == 0) check(0, $sformatf("dut%0d: unexpected output", g));
          else begin
            frp_t e;
            int   t0, lat;
            e = exp_q[g].pop_front();
            t0 = accept_t[g].pop_front();
            lat = exp_lat[g].pop_front();
            check(out_pkt[g] == e, $sformatf("dut%0d: out %h expected %h", g, out_pkt[g], e));
            // latency measured only when the output was not held back
            if (!bp_on[g]) check(cyc - t0 == lat, $sformatf("dut%0d: latency %0d expected %0d", g, cyc - t0, lat));
          end
        end
      end
    end
    always @(negedge clk) out_ready[g] <= bp_on[g] ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  task automatic send(int i, frp_t p);
    frp_t e;
    @(negedge clk);
    in_pkt[i] = p; in_valid[i] = 1'b1;
    do @(posedge clk); while (!in_ready[i]);
    e = model_pkt(i, p);
    exp_q[i].push_back(e);
    accept_t[i].push_back(cyc);
    exp_lat[i].push_back((p.frp && p.fw && p.init && !p.stop) ? INIT_LAT : 1);
    #1 in_valid[i] = 1'b0;
  endtask

  task automatic drain_and_check(int i);
    int n;
    n = 0;
    while ((exp_q[i].size() != 0 || !in_ready[i]) && n < 1000) begin @(negedge clk); n++; end
    check(exp_q[i].size() == 0, $sformatf("dut%0d: outputs missing", i));
    check(sc_q[i].size() == 0, $sformatf("dut%0d: notifications missing", i));
    check(fsr[i] == rate_t'(r_fsr[i]), $sformatf("dut%0d: fsr %0d expected %0d", i, fsr[i], r_fsr[i]));
    check(m_count[i] == r_m[i], $sformatf("dut%0d: M %0d expected %0d", i, m_count[i], r_m[i]));
    check(b_sum[i] == r_b[i], $sformatf("dut%0d: B %0d expected %0d", i, b_sum[i], r_b[i]));
    check(k_count[i] == r_k[i], $sformatf("dut%0d: K %0d expected %0d", i, k_count[i], r_k[i]));
  endtask

  // real RRPs are thousands of cycles apart: wait for the previous FSR
  // computation to finish (the monitor holds at most one pending RRP)
  task automatic pulse_rrp(int i);
    int n;
    n = 0;
    @(negedge clk);
    while (!in_ready[i] && n < 1000) begin @(negedge clk); n++; end
    rrp[i] = 1'b1;
    @(negedge clk);
    rrp[i] = 1'b0;
    model_rrp(i);
  endtask

  function automatic frp_t mk(bit stop, bit init, bit frp, bit fw, int unsigned cr, int unsigned dr);
    frp_t p;
    p.stop = stop; p.init = init; p.frp = frp; p.fw = fw;
    p.cr = rate_t'(cr); p.dr = rate_t'(dr);
    return p;
  endfunction

  // ---------------- stimulus ----------------
  initial begin
    for (int i = 0; i < 3; i++) begin
      rrp[i] = 0; in_valid[i] = 0; in_pkt[i] = '0;
      r_fsr[i] = VCP[i]; r_ofsr[i] = VCP[i];
      r_m[i] = 0; r_om[i] = 0; r_k[i] = 0; r_b[i] = 0; r_ob[i] = 0; r_bmax[i] = 0; r_obmax[i] = 0;
    end
    repeat (4) @(posedge clk);
    rst = 1'b0;

    // ---- instance 1: the single-link timeline example, scaled by ten ----
    // Period 0: three flows above the link's share and one small flow give
    // FSR = (100 - 10) / 3 = 30.
    send(1, mk(0, 0, 1, 1, 150, 150));
    send(1, mk(0, 0, 1, 1, 150, 150));
    send(1, mk(0, 0, 1, 1, 150, 150));
    send(1, mk(0, 0, 1, 1, 10, 10));
    drain_and_check(1);
    pulse_rrp(1);
    drain_and_check(1);
    check(fsr[1] == 30, "example: FSR is 30");
    send(1, mk(0, 0, 1, 1, 20, 20));
    send(1, mk(0, 0, 1, 1, 40, 40));
    send(1, mk(0, 0, 1, 1, 40, 40));
    send(1, mk(0, 0, 1, 1, 30, 30));
    drain_and_check(1);
    pulse_rrp(1);
    drain_and_check(1);
    check(fsr[1] == 25, "example: new FSR is 25");
    send(1, mk(0, 0, 1, 1, 30, 30));
    drain_and_check(1);

    // ---- instance 0: corner cases, directed ----
    // an empty period: M = 0, B = 0, FSR = vC
    pulse_rrp(0); drain_and_check(0);
    // only flows bottlenecked elsewhere: M = 0 with B != 0 -> M = 1, B - bmax
    send(0, mk(0, 0, 1, 1, 100, 100));
    send(0, mk(0, 0, 1, 1, 50, 60));
    pulse_rrp(0); drain_and_check(0);
    check(fsr[0] == 190 - 50, "corner M=0: FSR = vC - (B - bmax)");
    // B above vC: FSR = C / K (K from three init messages)
    send(0, mk(0, 1, 1, 1, 20, 20));
    send(0, mk(0, 1, 1, 1, 20, 20));
    send(0, mk(0, 1, 1, 1, 20, 20));
    drain_and_check(0);
    pulse_rrp(0); drain_and_check(0);
    for (int j = 0; j < 5; j++) send(0, mk(0, 0, 1, 1, 50, 50));
    send(0, mk(0, 0, 1, 1, 100, 100));
    drain_and_check(0);
    pulse_rrp(0); drain_and_check(0);
    check(fsr[0] == 200 / 3, "corner B>vC: FSR = C / K");
    // RRP while an init division is running
    send(0, mk(0, 1, 1, 1, 90, 90));
    repeat (3) @(negedge clk);
    rrp[0] = 1'b1; @(negedge clk); rrp[0] = 1'b0;
    n_pend++;
    model_rrp(0);
    drain_and_check(0);

    // ---- instances 0 and 2: random mix with back-pressure ----
    foreach (rand_units[ri]) begin
      int u;
      u = rand_units[ri];
      bp_on[u] = 1'b1;
      for (int n = 0; n < 3000; n++) begin
        int r;
        frp_t p;
        r = $urandom_range(0, 99);
        p = mk(0, 0, 1, 1, $urandom_range(0, 255), $urandom_range(0, 255));
        if (r < 4)       begin pulse_rrp(u); continue; end
        else if (r < 10) p.init = 1'b1;
        else if (r < 15) p.stop = 1'b1;
        else if (r < 20) p.fw = 1'b0;
        else if (r < 25) p.frp = 1'b0;
        else if (r < 30) p.cr = rate_t'($urandom_range(0, 30));
        send(u, p);
        if (n % 50 == 0) begin
          bp_on[u] = 1'b0;
          drain_and_check(u);
          bp_on[u] = 1'b1;
        end
      end
      bp_on[u] = 1'b0;
      drain_and_check(u);
    end

    check(n_sc > 0, "short-circuit notifications issued");
    $display("mechanisms: short_circuit=%0d corner_m0=%0d corner_over=%0d rrp_during_div=%0d cr_clamped=%0d dr_clamped=%0d",
             n_sc, n_m0, n_over, n_pend, n_clamp_cr, n_clamp_dr);
    check(n_m0 > 0 && n_over > 0 && n_clamp_cr > 0 && n_clamp_dr > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
