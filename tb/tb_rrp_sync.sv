// tb_rrp_sync: self-checking test of the RRP event generator in its three
// roles, at a short period (50 cycles, hold-off 8).
//   central : pulses exactly every PERIOD cycles, the first PERIOD cycles
//             after reset, and ignores notifications;
//   follower: pulses one cycle after a notification on any link and
//             ignores repeats inside the hold-off window;
//   ad-hoc  : pulses on its own timer and also on an early notification,
//             which restarts its timer.
// first_half is checked against the cycle count since the last pulse.
// A random phase then resets all three and sends random notifications on
// both links for 20000 cycles, comparing every cycle's rrp and first_half
// with a model of the three roles (period timer, hold-off window).
module tb_rrp_sync;
  localparam int unsigned PERIOD = 50;
  localparam int unsigned HOLD   = 8;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [1:0] notify [3];
  logic       rrp [3], first_half [3];
  int checks = 0, failures = 0;
  int cyc = 0;
  int last [3];
  int count [3];

  for (genvar g = 0; g < 3; g++) begin : g_dut
    rrp_sync #(.PERIOD_CYCLES(PERIOD), .HOLDOFF_CYCLES(HOLD), .N_LINKS(2),
               .ROLE(2'(g))) dut (
      .clk(clk), .rst(rst), .notify_in(notify[g]), .rrp(rrp[g]), .first_half(first_half[g]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cyc=%0d %s", cyc, what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle counter from the first cycle out of reset
  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  // record pulses
  always @(negedge clk) begin
    for (int g = 0; g < 3; g++) if (rrp[g]) begin last[g] = cyc; count[g]++; end
  end

  task automatic notify_pulse(int g, logic [1:0] v);
    @(negedge clk); notify[g] = v; @(negedge clk); notify[g] = '0;
  endtask

  int t;
  initial begin
    for (int g = 0; g < 3; g++) begin notify[g] = '0; last[g] = 0; count[g] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // central: five periods, with notifications that must be ignored
    fork
      begin
        repeat (20) @(negedge clk);
        notify_pulse(0, 2'b01);
      end
    join_none
    for (int n = 1; n <= 5; n++) begin
      @(posedge rrp[0]); #1;
      check(cyc == n * PERIOD, $sformatf("central pulse %0d at %0d", n, cyc));
      @(negedge clk);
      check(first_half[0], "central: first half after pulse");
      repeat (PERIOD / 2 + 1) @(negedge clk);
      check(!first_half[0], "central: second half");
    end
    check(count[0] == 5, "central: exactly five pulses");

    // follower: never pulses on its own
    check(count[1] == 0, "follower: no pulse without notification");
    notify_pulse(1, 2'b10);
    @(negedge clk);
    check(count[1] == 1 && last[1] == cyc - 1, "follower: pulse one cycle after notification");
    // a repeat on the other link inside the hold-off window is ignored
    notify_pulse(1, 2'b01);
    repeat (3) @(negedge clk);
    check(count[1] == 1, "follower: repeat inside hold-off ignored");
    repeat (HOLD) @(negedge clk);
    notify_pulse(1, 2'b01);
    @(negedge clk);
    check(count[1] == 2, "follower: notification after hold-off accepted");

    // ad-hoc: an early notification restarts the timer
    t = count[2];
    @(posedge rrp[2]); #1;
    t = cyc;
    repeat (20) @(negedge clk);
    notify_pulse(2, 2'b10);
    @(negedge clk);
    check(last[2] == t + 21 || last[2] == t + 22, $sformatf("ad-hoc: early notification %0d after %0d", last[2], t));
    t = last[2];
    @(posedge rrp[2]); #1;
    check(cyc - t == PERIOD, $sformatf("ad-hoc: timer restarted, next pulse after %0d", cyc - t));

    // random phase
    @(negedge clk) rst = 1'b1;
    @(negedge clk);
    @(negedge clk) begin rst = 1'b0; model_on = 1'b1; end
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      for (int g = 0; g < 3; g++) begin
        notify[g][0] = ($urandom % 40) == 0;
        notify[g][1] = ($urandom % 60) == 0;
      end
    end
    @(negedge clk) model_on = 1'b0;
    for (int g = 0; g < 3; g++) notify[g] = '0;
    $display("random phase: pulses %0d %0d %0d", m_pulses[0], m_pulses[1], m_pulses[2]);
    check(m_pulses[0] > 0 && m_pulses[1] > 0 && m_pulses[2] > 0, "random phase produced pulses in every role");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model of the three roles, sampled before each clock edge
  bit model_on = 1'b0;
  int m_t [3], m_pulses [3];
  bit m_rrp [3];
  always @(posedge clk) begin
    if (!model_on) begin
      for (int g = 0; g < 3; g++) begin m_t[g] = 0; m_rrp[g] = 0; m_pulses[g] = 0; end
    end else for (int g = 0; g < 3; g++) begin
      bit fire;
      check(rrp[g] == m_rrp[g], $sformatf("role %0d: rrp %0b, model %0b", g, rrp[g], m_rrp[g]));
      check(first_half[g] == (m_t[g] < int'(PERIOD / 2)), $sformatf("role %0d: first_half", g));
      fire = (g != 1 && m_t[g] == PERIOD - 1) || (g != 0 && notify[g] != 0 && m_t[g] >= HOLD);
      m_rrp[g] = fire;
      if (fire) begin m_t[g] = 0; m_pulses[g]++; end
      else if (m_t[g] != PERIOD - 1) m_t[g]++;
    end
  end
endmodule
