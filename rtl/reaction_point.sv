// reaction_point: the source side of the scheme, between a node's DMA
// channels, its ingoing link and its switching fabric.
//
// It keeps, for each of N_FLOWS DMA channels, whether the flow is active
// and the rate it may currently send at. It generates the FRPs of its
// flows:
//   - a flow-init FRP (CR = DR = desired rate) as soon as a channel becomes
//     active, so the contention points learn of it at once;
//   - one normal FRP per RRP for every active flow, with CR = current rate
//     and DR = desired rate (the desired rate is restored at every send);
//   - a flow-stop FRP when a channel goes idle, sent only after the flow's
//     normal FRP of the current period, so the monitors' counters hold what
//     the stop subtracts.
// Packets from the ingoing link that are replies to this node's own FRPs
// (frp = 1, fw = 0, in_own high) are consumed: the returned DR, the rate
// the path allows a flow asking for its desired rate, becomes the flow's
// new current rate and is reported to the DMA. All other incoming packets
// pass to the fabric. Generated FRPs go first, since FRPs are meant to
// travel with priority.
//
// Interface: valid/ready streams with a flow-id sideband; rrp pulse;
// per-channel active levels and desired rates from the DMA; a one-cycle
// rate-feedback pulse and the per-flow current rates to the DMA.
// Timing: ingress to fabric is combinational; feedback is registered (one
// cycle). The FRP contents follow the scheme; the table, the flow-id
// sideband, the lowest-index-first order, and taking DR rather than CR as
// the new rate are this implementation's choices.
module reaction_point
  import frp_pkg::*;
#(
  parameter int unsigned N_FLOWS = 8,
  parameter int unsigned FID_W   = (N_FLOWS > 1) ? $clog2(N_FLOWS) : 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               rrp,
  // DMA side
  input  logic [N_FLOWS-1:0] flow_active,
  input  rate_t              flow_desired [N_FLOWS],
  output rate_t              flow_rate    [N_FLOWS],
  output logic               fb_valid,
  output logic [FID_W-1:0]   fb_flow,
  output rate_t              fb_rate,
  // ingoing link
  input  logic               in_valid,
  output logic               in_ready,
  input  frp_t               in_pkt,
  input  logic [FID_W-1:0]   in_flow,
  input  logic               in_own,     // packet is addressed to this node
  // towards the switching fabric
  output logic               out_valid,
  input  logic               out_ready,
  output frp_t               out_pkt,
  output logic [FID_W-1:0]   out_flow,
  output logic               out_gen     // out_pkt was generated here
);

  logic [N_FLOWS-1:0] on;        // flow announced and not yet stopped
  logic [N_FLOWS-1:0] p_init, p_norm, p_stop, sent;
  rate_t              cur [N_FLOWS];

  // ---------------- generator selection ----------------
  logic             gen_valid;
  logic [FID_W-1:0] gen_idx;
  frp_t             gen_pkt;
  logic [1:0]       gen_type;    // 0 init, 1 normal, 2 stop

  always_comb begin
    gen_valid = 1'b0;
    gen_idx   = '0;
    gen_type  = 2'd0;
    for (int i = N_FLOWS - 1; i >= 0; i--) begin
      if (p_init[i] || p_norm[i] || (p_stop[i] && sent[i])) begin
        gen_valid = 1'b1;
        gen_idx   = FID_W'(i);
        gen_type  = p_init[i] ? 2'd0 : (p_norm[i] ? 2'd1 : 2'd2);
      end
    end
    gen_pkt      = '0;
    gen_pkt.frp  = 1'b1;
    gen_pkt.fw   = 1'b1;
    gen_pkt.init = (gen_type == 2'd0);
    gen_pkt.stop = (gen_type == 2'd2);
    gen_pkt.cr   = (gen_type == 2'd0) ? flow_desired[gen_idx] : cur[gen_idx];
    gen_pkt.dr   = flow_desired[gen_idx];
  end

  // ---------------- ingress: own replies vs pass-through ----------------
  logic own_reply;
  assign own_reply = in_own && in_pkt.frp && !in_pkt.fw && !in_pkt.stop;

  always_comb begin
    if (gen_valid) begin
      out_valid = 1'b1;
      out_pkt   = gen_pkt;
      out_flow  = gen_idx;
      out_gen   = 1'b1;
    end else begin
      out_valid = in_valid && !own_reply;
      out_pkt   = in_pkt;
      out_flow  = in_flow;
      out_gen   = 1'b0;
    end
    in_ready = own_reply ? 1'b1 : (!gen_valid && out_ready);
  end

  logic gen_fire;
  assign gen_fire = gen_valid && out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      on       <= '0;
      p_init   <= '0;
      p_norm   <= '0;
      p_stop   <= '0;
      sent     <= '0;
      fb_valid <= 1'b0;
      fb_flow  <= '0;
      fb_rate  <= '0;
      for (int i = 0; i < N_FLOWS; i++) cur[i] <= '0;
    end else begin
      fb_valid <= 1'b0;
      for (int i = 0; i < N_FLOWS; i++) begin
        // a channel that starts announces itself with flow-init
        if (flow_active[i] && !on[i] && !p_init[i]) begin
          p_init[i] <= 1'b1;
          cur[i]    <= flow_desired[i];
        end
        // a channel that stops will send flow-stop after its normal FRP
        if (!flow_active[i] && on[i]) p_stop[i] <= 1'b1;
        if (rrp) begin
          sent[i] <= 1'b0;
          if (on[i]) p_norm[i] <= 1'b1;
        end
      end
      if (gen_fire) begin
        unique case (gen_type)
          2'd0: begin
            p_init[gen_idx] <= 1'b0;
            on[gen_idx]     <= 1'b1;
            sent[gen_idx]   <= 1'b1;
          end
          2'd1: begin
            p_norm[gen_idx] <= 1'b0;
            if (!rrp) sent[gen_idx] <= 1'b1;
          end
          default: begin
            p_stop[gen_idx] <= 1'b0;
            on[gen_idx]     <= 1'b0;
            p_norm[gen_idx] <= 1'b0;
          end
        endcase
      end
      if (in_valid && own_reply && on[in_flow]) begin
        cur[in_flow] <= in_pkt.dr;
        fb_valid     <= 1'b1;
        fb_flow      <= in_flow;
        fb_rate      <= in_pkt.dr;
      end
    end
  end

  always_comb
    for (int i = 0; i < N_FLOWS; i++) flow_rate[i] = cur[i];

endmodule
