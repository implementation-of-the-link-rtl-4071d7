// destination_point: turns a forward FRP that has reached its destination
// into the reply that travels back to the source.
//
// At the destination a forward FRP leaves with its forward flag cleared, so
// the contention points on the way back pass it untouched and the reaction
// point at the source recognises it as feedback; its CR and DR carry the
// bottleneck rates found on the way. A flow-stop FRP is consumed here and
// not returned. Every other packet, and any packet for which at_dest is
// low, passes unchanged. Swapping the source and destination addresses is
// left to the packet header logic around this block, because the FRP fields
// carry no addresses.
//
// Interface: valid/ready streams; at_dest is sideband that qualifies
// in_pkt (the header logic has found this node to be the destination).
// Combinational, zero latency; dropped packets are consumed with in_ready
// high and produce no out_valid.
module destination_point
  import frp_pkg::*;
(
  input  logic in_valid,
  output logic in_ready,
  input  frp_t in_pkt,
  input  logic at_dest,
  output logic out_valid,
  input  logic out_ready,
  output frp_t out_pkt,
  output logic reply,     // out_pkt is a reply generated here
  output logic dropped    // in_pkt is a flow-stop consumed here
);

  logic is_fwd_frp;

  always_comb begin
    is_fwd_frp = at_dest && in_pkt.frp && (in_pkt.fw || in_pkt.stop);
    dropped    = in_valid && is_fwd_frp && in_pkt.stop;
    reply      = in_valid && is_fwd_frp && !in_pkt.stop;
    out_pkt    = in_pkt;
    if (is_fwd_frp) out_pkt.fw = 1'b0;
    out_valid  = in_valid && !(is_fwd_frp && in_pkt.stop);
    in_ready   = (is_fwd_frp && in_pkt.stop) ? 1'b1 : out_ready;
  end

endmodule
