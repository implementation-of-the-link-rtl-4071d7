// rate_limiter: leaky-bucket pacing of the DMA channels at the rates the
// reaction point hands out, for sources whose DMA engine cannot limit its
// own sending rate.
//
// Each channel has a credit counter. Every cycle it gains the channel's
// rate (in the same units as the FRP rate fields, where CAPACITY units are
// the full link), up to a burst limit of BURST_WORDS link words. A packet
// of L words costs L * CAPACITY credits, so a channel at rate r may send on
// average r / CAPACITY of the link's words. A channel may start a packet
// while its credit is not negative and its rate is not zero; the credit may
// then go negative, and the channel waits until it has paid the debt back.
// Among the channels that may send, the lowest index wins.
//
// Interface: one descriptor stream per channel (valid/ready, packet length
// in words), and one merged output stream carrying the channel number and
// the length. The output is combinational from the inputs and the credits;
// credits change on the clock edge of a transfer.
//
// The leaky-bucket idea follows the scheme, which names it as one way for a
// reaction point to enforce the rates. Descriptors instead of whole packets,
// the burst limit, the credit arithmetic and the fixed-priority choice
// are this design's own.
module rate_limiter
  import frp_pkg::*;
#(
  parameter int unsigned N_FLOWS     = 8,
  parameter int unsigned CAPACITY    = 200,  // rate units of a full link
  parameter int unsigned LEN_W       = 8,    // packet length field, in words
  parameter int unsigned BURST_WORDS = 16,   // credit cap, in link words
  parameter int unsigned FID_W       = (N_FLOWS > 1) ? $clog2(N_FLOWS) : 1
) (
  input  logic               clk,
  input  logic               rst,
  input  rate_t              rate      [N_FLOWS],  // allowed rate per channel
  input  logic [N_FLOWS-1:0] in_valid,
  output logic [N_FLOWS-1:0] in_ready,
  input  logic [LEN_W-1:0]   in_len    [N_FLOWS],
  output logic               out_valid,
  input  logic               out_ready,
  output logic [FID_W-1:0]   out_flow,
  output logic [LEN_W-1:0]   out_len
);
  localparam int unsigned BURST = CAPACITY * BURST_WORDS;
  localparam int unsigned MAX_COST = CAPACITY * ((1 << LEN_W) - 1);
  localparam int unsigned CR_W = $clog2(((BURST > MAX_COST) ? BURST : MAX_COST) + 1) + 2;

  typedef logic signed [CR_W-1:0] credit_t;
  credit_t credit [N_FLOWS];

  logic [N_FLOWS-1:0] may_send;
  logic               any;
  logic [FID_W-1:0]   pick;

  always_comb begin
    for (int i = 0; i < N_FLOWS; i++)
      may_send[i] = in_valid[i] && (rate[i] != '0) && !credit[i][CR_W-1];
    any  = |may_send;
    pick = '0;
    for (int i = N_FLOWS - 1; i >= 0; i--)
      if (may_send[i]) pick = FID_W'(i);
    out_valid = any;
    out_flow  = pick;
    out_len   = in_len[pick];
    in_ready  = '0;
    if (any && out_ready) in_ready[pick] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_FLOWS; i++) credit[i] <= '0;
    end else begin
      for (int i = 0; i < N_FLOWS; i++) begin
        credit_t next;
        next = credit[i] + credit_t'(rate[i]);
        if (next > credit_t'(BURST)) next = credit_t'(BURST);
        if (in_ready[i])
          next = next - credit_t'(in_len[i]) * credit_t'(CAPACITY);
        credit[i] <= next;
      end
    end
  end
endmodule
