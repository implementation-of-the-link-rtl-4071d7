// rrp_sync: source of the Rate Re-evaluation Period (RRP) event that
// closes one measurement period in every contention point and makes every
// reaction point send its flows' FRPs.
//
// The event must be common to the whole network. Three roles are offered,
// matching the two distribution methods of the scheme:
//   RRP_CENTRAL  the central node of "specific node transmission": a local
//                timer raises the event every PERIOD_CYCLES; incoming
//                notifications are ignored.
//   RRP_FOLLOWER any other node of that method: the event is raised by an
//                incoming notification (from any link) and passed on.
//   RRP_ADHOC    "ad-hoc chain transmission": every node runs the timer and
//                also accepts notifications; whichever comes first raises
//                the event and restarts the timer.
// In every role a notification that arrives within HOLDOFF_CYCLES after an
// event is ignored, so a notification echoed back along a chain or received
// on several links raises one event only.
//
// Interface: notify_in[i] is a one-cycle notification received on link i.
// rrp is a one-cycle pulse: the event for the local blocks, and also the
// notification to transmit on all links. first_half is high during the first
// half of each period, the window in which sources send their FRPs.
// Timing: in RRP_CENTRAL and RRP_ADHOC the first event comes PERIOD_CYCLES
// cycles after reset; a notification raises rrp in the following cycle.
// Notifications in the first HOLDOFF_CYCLES after reset are ignored too.
// The period (20 us at a 156.25 MHz clock) is the scheme's; the roles'
// encoding and the hold-off window are this implementation's choices.
module rrp_sync #(
  parameter int unsigned PERIOD_CYCLES  = 3125,  // 20 us at 156.25 MHz
  parameter int unsigned HOLDOFF_CYCLES = 64,
  parameter int unsigned N_LINKS        = 1,
  parameter logic [1:0]  ROLE           = 2'd0   // 0 central, 1 follower, 2 ad-hoc
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [N_LINKS-1:0] notify_in,
  output logic               rrp,
  output logic               first_half
);

  localparam logic [1:0] RRP_CENTRAL  = 2'd0;
  localparam logic [1:0] RRP_FOLLOWER = 2'd1;
  localparam logic [1:0] RRP_ADHOC    = 2'd2;

  localparam int unsigned TW = $clog2(PERIOD_CYCLES + 1);

  logic [TW-1:0] timer;        // cycles since the last event
  logic          timer_event;
  logic          notify_event;
  logic          fire;

  always_comb begin
    timer_event  = (ROLE != RRP_FOLLOWER) && (timer == TW'(PERIOD_CYCLES - 1));
    notify_event = (ROLE != RRP_CENTRAL) && (|notify_in) &&
                   (timer >= TW'(HOLDOFF_CYCLES));
    fire         = timer_event || notify_event;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      timer <= '0;
      rrp   <= 1'b0;
    end else begin
      rrp <= fire;
      if (fire)                                timer <= '0;
      else if (timer != TW'(PERIOD_CYCLES-1)) timer <= timer + 1'b1;
    end
  end

  assign first_half = (timer < TW'(PERIOD_CYCLES / 2));

endmodule
