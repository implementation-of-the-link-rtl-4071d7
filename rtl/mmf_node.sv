// mmf_node: one network node of the max-min-fair rate regulation scheme,
// with the switching fabric and the DMA engine left outside.
//
// Every outgoing link has its own contention_point (link monitor); all of
// them, and the reaction point, share the period event of one rrp_sync.
// Packets of the ingoing link first meet the reaction_point, which consumes
// replies to this node's own FRPs (rate feedback for the DMA) and merges the
// FRPs it generates for the node's flows; then the destination_point, which
// turns forward FRPs that have arrived at this node into replies and drops
// flow-stop FRPs. The resulting stream is handed to the fabric. The fabric
// returns one stream per outgoing link, which passes through that link's
// contention point.
//
// Interface: ingress valid/ready stream with two sideband signals from the
// header logic (flow id, and "addressed to this node"); the stream to the
// fabric; N_PORTS streams from the fabric and N_PORTS outgoing link
// streams; DMA channel requests and rate feedback; RRP notifications in and
// out; per-port FSR and FSR-computation status; per-port short-circuit
// notifications, which the header logic addresses back to the source.
// Timing: ingress to fabric is combinational; each contention point adds
// one cycle, or its division time for a flow-init FRP.
// A rate_limiter paces the DMA channels' payload descriptors at the rates
// the reaction point grants, for DMA engines that cannot pace themselves;
// its output stream goes to the fabric like any injected traffic (one
// cycle of the stream is one descriptor, its pacing counts the words).
// HERE_GE selects the link monitors' test at equality (see contention_point).
// Sixteen ports and eight DMA channels follow the scheme's target platform;
// a single ingoing link and the sideband signals are this implementation's
// simplification.
module mmf_node
  import frp_pkg::*;
#(
  parameter int unsigned N_PORTS        = 16,
  parameter int unsigned N_FLOWS        = 8,
  parameter int unsigned CAPACITY       = 200,
  parameter int unsigned ALPHA_PCT      = 5,
  parameter int unsigned CNT_W          = 8,
  parameter int unsigned PERIOD_CYCLES  = 3125,
  parameter int unsigned HOLDOFF_CYCLES = 64,
  parameter logic [1:0]  RRP_ROLE       = 2'd0,
  parameter bit          HERE_GE        = 1'b0,  // CR >= FSR counts as bottlenecked here
  parameter int unsigned LEN_W          = 8,     // DMA packet length field, words
  parameter int unsigned FID_W          = (N_FLOWS > 1) ? $clog2(N_FLOWS) : 1
) (
  input  logic               clk,
  input  logic               rst,
  // RRP distribution
  input  logic [N_PORTS-1:0] rrp_notify_in,
  output logic               rrp,            // also the notification to send
  output logic               rrp_first_half,
  // ingoing link
  input  logic               in_valid,
  output logic               in_ready,
  input  frp_t               in_pkt,
  input  logic [FID_W-1:0]   in_flow,
  input  logic               in_to_me,
  // towards the switching fabric
  output logic               fab_in_valid,
  input  logic               fab_in_ready,
  output frp_t               fab_in_pkt,
  output logic [FID_W-1:0]   fab_in_flow,
  output logic               fab_in_reply,   // a reply made at this node
  output logic               stop_consumed,  // a flow-stop ended here
  // from the switching fabric, one stream per outgoing link
  input  logic [N_PORTS-1:0] fab_out_valid,
  output logic [N_PORTS-1:0] fab_out_ready,
  input  frp_t               fab_out_pkt [N_PORTS],
  // outgoing links
  output logic [N_PORTS-1:0] link_valid,
  input  logic [N_PORTS-1:0] link_ready,
  output frp_t               link_pkt [N_PORTS],
  // DMA channels
  input  logic [N_FLOWS-1:0] flow_active,
  input  rate_t              flow_desired [N_FLOWS],
  output rate_t              flow_rate    [N_FLOWS],
  output logic               fb_valid,
  output logic [FID_W-1:0]   fb_flow,
  output rate_t              fb_rate,
  // DMA payload descriptors, paced at flow_rate, and the paced stream
  // handed to the fabric's injection port
  input  logic [N_FLOWS-1:0] dma_valid,
  output logic [N_FLOWS-1:0] dma_ready,
  input  logic [LEN_W-1:0]   dma_len      [N_FLOWS],
  output logic               inj_valid,
  input  logic               inj_ready,
  output logic [FID_W-1:0]   inj_flow,
  output logic [LEN_W-1:0]   inj_len,
  // monitor status
  output rate_t              port_fsr [N_PORTS],
  output logic [N_PORTS-1:0] port_calc,
  output logic [N_PORTS-1:0] port_corner_m0,
  output logic [N_PORTS-1:0] port_corner_over,
  // short-circuit notifications, one strobe per port, for the header
  // logic to send back to the flow's source
  output logic [N_PORTS-1:0] sc_valid,
  output frp_t               sc_pkt [N_PORTS]
);

  rrp_sync #(
    .PERIOD_CYCLES (PERIOD_CYCLES),
    .HOLDOFF_CYCLES(HOLDOFF_CYCLES),
    .N_LINKS       (N_PORTS),
    .ROLE          (RRP_ROLE)
  ) u_rrp (
    .clk       (clk),
    .rst       (rst),
    .notify_in (rrp_notify_in),
    .rrp       (rrp),
    .first_half(rrp_first_half)
  );

  // ---------------- DMA payload pacing at the granted rates ----------------
  rate_limiter #(
    .N_FLOWS (N_FLOWS),
    .CAPACITY(CAPACITY),
    .LEN_W   (LEN_W),
    .FID_W   (FID_W)
  ) u_pace (
    .clk      (clk),
    .rst      (rst),
    .rate     (flow_rate),
    .in_valid (dma_valid),
    .in_ready (dma_ready),
    .in_len   (dma_len),
    .out_valid(inj_valid),
    .out_ready(inj_ready),
    .out_flow (inj_flow),
    .out_len  (inj_len)
  );

  // ---------------- ingress: reaction point, then destination point ----------------
  logic             rp_valid, rp_ready, rp_gen;
  frp_t             rp_pkt;
  logic [FID_W-1:0] rp_flow;

  reaction_point #(.N_FLOWS(N_FLOWS), .FID_W(FID_W)) u_rp (
    .clk         (clk),
    .rst         (rst),
    .rrp         (rrp),
    .flow_active (flow_active),
    .flow_desired(flow_desired),
    .flow_rate   (flow_rate),
    .fb_valid    (fb_valid),
    .fb_flow     (fb_flow),
    .fb_rate     (fb_rate),
    .in_valid    (in_valid),
    .in_ready    (in_ready),
    .in_pkt      (in_pkt),
    .in_flow     (in_flow),
    .in_own      (in_to_me),
    .out_valid   (rp_valid),
    .out_ready   (rp_ready),
    .out_pkt     (rp_pkt),
    .out_flow    (rp_flow),
    .out_gen     (rp_gen)
  );

  destination_point u_dp (
    .in_valid (rp_valid),
    .in_ready (rp_ready),
    .in_pkt   (rp_pkt),
    .at_dest  (in_to_me && !rp_gen),
    .out_valid(fab_in_valid),
    .out_ready(fab_in_ready),
    .out_pkt  (fab_in_pkt),
    .reply    (fab_in_reply),
    .dropped  (stop_consumed)
  );

  assign fab_in_flow = rp_flow;

  // ---------------- one link monitor per outgoing link ----------------
  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    logic [CNT_W-1:0]          m_unused, k_unused;
    logic [RATE_W+CNT_W-1:0]   b_unused;
    contention_point #(
      .CAPACITY (CAPACITY),
      .ALPHA_PCT(ALPHA_PCT),
      .CNT_W    (CNT_W),
      .HERE_GE  (HERE_GE)
    ) u_cp (
      .clk        (clk),
      .rst        (rst),
      .rrp        (rrp),
      .in_valid   (fab_out_valid[p]),
      .in_ready   (fab_out_ready[p]),
      .in_pkt     (fab_out_pkt[p]),
      .out_valid  (link_valid[p]),
      .out_ready  (link_ready[p]),
      .out_pkt    (link_pkt[p]),
      .fsr        (port_fsr[p]),
      .m_count    (m_unused),
      .k_count    (k_unused),
      .b_sum      (b_unused),
      .calc_start (port_calc[p]),
      .corner_m0  (port_corner_m0[p]),
      .corner_over(port_corner_over[p]),
      .sc_valid   (sc_valid[p]),
      .sc_pkt     (sc_pkt[p])
    );
  end

endmodule
