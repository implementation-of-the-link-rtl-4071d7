// tb_reaction_point: self-checking test of the source-side reaction point
// with its default eight flows.
// Directed steps check: a flow-init FRP as soon as a channel starts
// (CR = DR = desired rate, lowest flow first when several start), one
// normal FRP per active flow at each RRP (CR = current rate, DR = desired),
// consumption of a reply to an own FRP with the returned DR reported to the
// DMA one cycle later and used as the next CR, pass-through of other
// traffic (held back while generated FRPs wait), and a flow-stop that
// waits for the flow's normal FRP of the period.
// A random phase then runs 300 short periods with channels starting and
// stopping, random replies, foreign packets and output back-pressure, and
// checks the rules as invariants against a small model of the flows:
// flow-init only for a channel that became active (CR = DR = desired),
// flow-stop only for one that went idle and never before the flow's normal
// FRP of the period, exactly one normal FRP per announced flow per period
// (CR = last fed-back rate, DR = desired), feedback equal to the returned
// DR, and all other packets passed unchanged and in order.
module tb_reaction_point;
  import frp_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned FID_W = 3;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic             rrp = 1'b0;
  logic [N-1:0]     flow_active = '0;
  rate_t            flow_desired [N];
  rate_t            flow_rate    [N];
  logic             fb_valid;
  logic [FID_W-1:0] fb_flow;
  rate_t            fb_rate;
  logic             in_valid = 1'b0, in_ready, in_own = 1'b0;
  frp_t             in_pkt = '0;
  logic [FID_W-1:0] in_flow = '0;
  logic             out_valid, out_ready = 1'b1, out_gen;
  frp_t             out_pkt;
  logic [FID_W-1:0] out_flow;

  reaction_point dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { frp_t p; int f; bit g; } obs_t;
  obs_t got [$];
  int   fb_seen = 0;
  bit random_phase = 1'b0;
  always @(posedge clk) if (!rst && !random_phase) begin
    if (out_valid && out_ready) got.push_back('{out_pkt, int'(out_flow), out_gen});
    if (fb_valid) fb_seen++;
  end

  function automatic frp_t gen(bit init, bit stop, int cr, int dr);
    frp_t p;
    p = '0; p.frp = 1; p.fw = 1; p.init = init; p.stop = stop;
    p.cr = rate_t'(cr); p.dr = rate_t'(dr);
    return p;
  endfunction

  task automatic expect_out(frp_t p, int f, bit g, string what);
    int n;
    n = 0;
    while (got.size() == 0 && n < 50) begin @(negedge clk); n++; end
    if (got.size() == 0) check(0, {what, ": nothing sent"});
    else begin
      obs_t o;
      o = got.pop_front();
      check(o.p == p && o.f == f && o.g == g,
            $sformatf("%s: got %h flow %0d gen %0d, expected %h flow %0d gen %0d",
                      what, o.p, o.f, o.g, p, f, g));
    end
  endtask

  task automatic pulse_rrp();
    @(negedge clk); rrp = 1'b1; @(negedge clk); rrp = 1'b0;
  endtask

  // ---------------- random phase ----------------
  bit    announced [N];   // init seen, stop not yet
  bit    owed [N];        // announced at the last RRP, normal FRP not yet seen
  int    normals [N];     // normal FRPs of the flow in this period
  int    model_rate [N];
  frp_t  passq [$];
  bit    in_took = 1'b0;
  typedef struct { int f; int r; } fb_t;
  fb_t   fbq [$];             // expected feedback: flow, returned DR  // the ingress handshake of the last clock edge
  int    n_rand_init = 0, n_rand_stop = 0, n_rand_norm = 0, n_rand_fb = 0, n_rand_pass = 0;

  always @(posedge clk) if (random_phase) begin
    if (fb_valid) begin
      n_rand_fb++;
      check(fbq.size() != 0, "feedback follows a consumed reply");
      if (fbq.size() != 0) begin
        fb_t e;
        e = fbq.pop_front();
        check(int'(fb_flow) == e.f && int'(fb_rate) == e.r,
              $sformatf("feedback flow %0d rate %0d, expected flow %0d rate %0d (the returned DR)", fb_flow, fb_rate, e.f, e.r));
        model_rate[e.f] = e.r;
      end
    end else check(fbq.size() == 0, "feedback one cycle after the reply");
    if (rrp) for (int f = 0; f < N; f++) begin
      if (announced[f]) check(!owed[f], $sformatf("flow %0d missed its normal FRP of a period", f));
      owed[f] = announced[f];
      normals[f] = 0;
    end
    in_took = in_valid && in_ready;
    if (in_took && in_own && in_pkt.frp && !in_pkt.fw && !in_pkt.stop && announced[in_flow])
      fbq.push_back('{f: int'(in_flow), r: int'(in_pkt.dr)});
    // pass-through is combinational: record the input before the output
    // replies to own FRPs are consumed (a stop flag marks no reply)
    if (in_valid && in_ready && !(in_own && in_pkt.frp && !in_pkt.fw && !in_pkt.stop)) passq.push_back(in_pkt);
    if (out_valid && out_ready) begin
      int f;
      f = int'(out_flow);
      if (!out_gen) begin
        check(passq.size() != 0 && out_pkt == passq[0], $sformatf("passed packet unchanged and in order: %h flow %0d, expected %h (queue %0d)", out_pkt, out_flow, passq.size() ? passq[0] : frp_t'(0), passq.size()));
        if (passq.size() != 0) void'(passq.pop_front());
        n_rand_pass++;
      end else if (out_pkt.init) begin
        check(!announced[f] && flow_active[f], $sformatf("init of flow %0d only when it starts", f));
        check(out_pkt.cr == flow_desired[f] && out_pkt.dr == flow_desired[f] && out_pkt.fw && out_pkt.frp,
              "init carries CR = DR = desired");
        announced[f] = 1'b1;
        owed[f] = 1'b0;
        model_rate[f] = flow_desired[f];
        n_rand_init++;
      end else if (out_pkt.stop) begin
        check(announced[f] && !flow_active[f], $sformatf("stop of flow %0d only when it went idle", f));
        check(!owed[f], $sformatf("stop of flow %0d after its normal FRP of the period", f));
        check(out_pkt.cr == rate_t'(model_rate[f]), "stop carries the current rate");
        announced[f] = 1'b0;
        n_rand_stop++;
      end else begin
        check(announced[f], $sformatf("normal FRP only for announced flow %0d", f));
        check(normals[f] == 0, $sformatf("one normal FRP per period for flow %0d", f));
        check(out_pkt.cr == rate_t'(model_rate[f]) && out_pkt.dr == flow_desired[f] && out_pkt.fw,
              $sformatf("normal FRP of flow %0d: CR %0d (model %0d), DR %0d", f, out_pkt.cr, model_rate[f], out_pkt.dr));
        normals[f]++;
        owed[f] = 1'b0;
        n_rand_norm++;
      end
    end
  end

  task automatic run_random();
    @(negedge clk);
    flow_active = '0;
    repeat (60) @(negedge clk);
    random_phase = 1'b1;
    for (int f = 0; f < N; f++) begin
      announced[f] = 0; owed[f] = 0; normals[f] = 0; model_rate[f] = 0;
      flow_desired[f] = rate_t'(1 + $urandom % 250);
    end
    for (int per = 0; per < 300; per++) begin
      for (int c = 0; c < 80; c++) begin
        @(negedge clk);
        rrp = (c == 0);
        // one channel may start or stop per period, mid-period, once settled
        if (c == 20) begin
          int f;
          f = $urandom % N;
          if (announced[f] == flow_active[f]) flow_active[f] = ~flow_active[f];
        end
        out_ready = ($urandom % 4) != 0;
        if (!in_valid || in_took) begin
          in_valid = ($urandom % 3) == 0;
          in_pkt   = frp_t'($urandom);
          in_flow  = 3'($urandom % N);
          in_own   = $urandom % 2;
          // replies to own flows only for announced flows
          if (in_own && in_pkt.frp && !in_pkt.fw && !announced[in_flow]) in_own = 1'b0;
        end
      end
    end
    @(negedge clk);
    rrp = 1'b0; in_valid = 1'b0; out_ready = 1'b1;
    repeat (100) @(negedge clk);
    for (int f = 0; f < N; f++)
      check(announced[f] == flow_active[f], $sformatf("flow %0d announced state matches the channel", f));
    check(passq.size() == 0, "every passed packet came out");
    $display("random phase: init=%0d stop=%0d normal=%0d feedback=%0d passed=%0d",
             n_rand_init, n_rand_stop, n_rand_norm, n_rand_fb, n_rand_pass);
    check(n_rand_init > 20 && n_rand_stop > 20 && n_rand_fb > 100 && n_rand_pass > 100,
          "random phase exercised every kind of packet");
  endtask

  initial begin
    for (int i = 0; i < N; i++) flow_desired[i] = rate_t'(10 * (i + 1));
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // a channel starts: flow-init at once
    flow_desired[2] = 120;
    flow_active[2] = 1'b1;
    expect_out(gen(1, 0, 120, 120), 2, 1, "init flow 2");
    check(flow_rate[2] == 120, "flow 2 starts at its desired rate");

    // two channels start together, pass-through waits for both inits
    out_ready = 1'b0;
    @(negedge clk);
    flow_active[0] = 1'b1; flow_active[5] = 1'b1;
    in_valid = 1'b1; in_pkt = '0; in_pkt.cr = 8'h33; in_flow = 3'd6; in_own = 1'b0;
    @(negedge clk); @(negedge clk);
    check(!in_ready, "ingress held while generated FRPs wait");
    out_ready = 1'b1;
    expect_out(gen(1, 0, 10, 10), 0, 1, "init flow 0");
    expect_out(gen(1, 0, 60, 60), 5, 1, "init flow 5");
    expect_out(in_pkt, 6, 0, "payload passes after the inits");
    @(negedge clk); in_valid = 1'b0;
    repeat (2) @(negedge clk);
    got.delete();

    // RRP: one normal FRP per active flow
    pulse_rrp();
    expect_out(gen(0, 0, 10, 10), 0, 1, "rrp flow 0");
    expect_out(gen(0, 0, 120, 120), 2, 1, "rrp flow 2");
    expect_out(gen(0, 0, 60, 60), 5, 1, "rrp flow 5");

    // reply to an own FRP: consumed, fed back, used as the next CR
    @(negedge clk);
    in_valid = 1'b1; in_own = 1'b1; in_flow = 3'd2;
    in_pkt = '0; in_pkt.frp = 1; in_pkt.fw = 0; in_pkt.cr = 50; in_pkt.dr = 70;
    #1 check(in_ready && !out_valid, "own reply consumed, not forwarded");
    @(negedge clk); in_valid = 1'b0; in_own = 1'b0;
    check(fb_valid && fb_flow == 2 && fb_rate == 70, "rate feedback to the DMA");
    check(flow_rate[2] == 70, "flow 2 current rate updated");
    // a reply for another node passes through
    @(negedge clk);
    in_valid = 1'b1; in_own = 1'b0; in_flow = 3'd1;
    in_pkt = '0; in_pkt.frp = 1; in_pkt.fw = 0; in_pkt.cr = 9; in_pkt.dr = 9;
    expect_out(in_pkt, 1, 0, "foreign reply passes");
    @(negedge clk); in_valid = 1'b0;
    repeat (2) @(negedge clk);
    got.delete();

    // flow 5 stops after its FRP of this period: stop at once
    flow_active[5] = 1'b0;
    expect_out(gen(0, 1, 60, 60), 5, 1, "stop flow 5");
    // flow 0 stops before its FRP of the next period has gone out
    out_ready = 1'b0;
    pulse_rrp();
    flow_active[0] = 1'b0;
    @(negedge clk);
    out_ready = 1'b1;
    expect_out(gen(0, 0, 10, 10), 0, 1, "normal FRP of flow 0 before its stop");
    expect_out(gen(0, 1, 10, 10), 0, 1, "stop flow 0 right after its normal FRP");
    expect_out(gen(0, 0, 70, 120), 2, 1, "flow 2 sends CR=fed-back rate, DR=desired");
    repeat (5) @(negedge clk);
    check(got.size() == 0, "nothing else sent");

    // next period: only flow 2 remains
    pulse_rrp();
    expect_out(gen(0, 0, 70, 120), 2, 1, "only flow 2 left");
    repeat (5) @(negedge clk);
    check(got.size() == 0 && fb_seen == 1, "no extra packets or feedback");

    run_random();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
