// contention_point: the link monitor that sits on every outgoing link and
// regulates flows to max-min-fair rates without keeping per-flow state.
//
// Every active flow sends one Flow Rate Packet (FRP) per Rate Re-evaluation
// Period (RRP). During a period the monitor compares each forward FRP's
// Current Rate CR with its Fair Share Rate FSR: a flow with CR > FSR is
// "bottlenecked here" and increments M; any other flow is "bottlenecked
// elsewhere" and adds CR to B (and to b_max if it is the largest such rate).
// CR and DR of the packet leave clamped to min(field, FSR). At each RRP
// event the monitor computes
//     FSR = (vC - B) / M,      vC = C * (1 - alpha),
// moves M, B, FSR into the "old" registers and clears M, B and b_max.
// Corner cases, as in the scheme: with M = 0 and B != 0 it uses M = 1 and
// B - b_max; with B > vC (more traffic bottlenecked elsewhere than
// the link can carry) it uses FSR = C / K, K being the number of flows that
// announced themselves with flow-init and have not sent flow-stop.
// A flow-init FRP is classified against the old FSR, counted in both the
// current and the old counters, and triggers an immediate FSR recomputation
// from the updated old counters; the packet leaves clamped to that new FSR.
// A flow-stop FRP decrements K and takes the flow back out of M or B (both
// current and old) and leaves unchanged. Payload and backward FRPs pass
// untouched.
// The scheme gives the bottlenecked-here test both ways: its worked example
// and its listing use CR > FSR, its prose says "more or equal rate to FSR".
// The default follows the strict test; HERE_GE = 1 selects CR >= FSR. With
// the strict test a flow that sits exactly at the FSR is counted in B, so a
// flow-init that arrives while every flow on the link is at the FSR sees
// B = vC and drives the FSR to 0 for one period; HERE_GE = 1 avoids that.
// Short-circuit notification: when a forward FRP (normal or init) asks for a
// CR more than 2^SC_SHIFT times the FSR it is clamped to, the monitor also
// emits at once a reply-shaped FRP (fw = 0, CR and DR clamped) on the sc_*
// output, for the header logic to send straight back to the source, so
// that an abrupt flow is throttled before its FRP completes the round
// trip. SC_ENABLE = 0 removes it.
//
// Interface: valid/ready FRP stream in and out, a one-cycle rrp pulse, and
// the current FSR and counters as status outputs. The output is a register:
// a packet leaves one cycle after it is accepted, except a flow-init FRP,
// which leaves RATE_W+CNT_W+4 cycles after it is accepted (the division
// itself takes RATE_W+CNT_W+1 of them). The input
// stalls while an FSR computation runs; an rrp pulse that arrives meanwhile
// is held and served next (one is held: RRP events are expected thousands
// of cycles apart, far more than a division). Counters saturate instead of
// wrapping.
//
// This implementation's own choices: the capacity value, the counter
// widths, the handshake, the separate old b_max register used by the M = 0
// correction of an init recomputation, comparing B with vC (the point
// where vC - B turns negative), the divider being a sub-module, and the
// short-circuit threshold (the scheme only says "much bigger"). The
// notification is a one-cycle strobe without back-pressure, issued in the
// same cycle as the forwarded packet becomes valid; it is a hint, and a
// notification nobody takes is lost.
module contention_point
  import frp_pkg::*;
#(
  parameter int unsigned CAPACITY  = 200,  // C, link capacity in rate units
  parameter int unsigned ALPHA_PCT = 5,    // headroom alpha, in percent
  parameter int unsigned CNT_W     = 8,    // width of M, old M and K
  parameter bit          SC_ENABLE = 1'b1, // short-circuit notifications
  parameter int unsigned SC_SHIFT  = 1,    // notify when CR > FSR * 2^SC_SHIFT
  parameter bit          HERE_GE   = 1'b0  // 1: CR >= FSR counts as bottlenecked here
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             rrp,         // RRP event, one-cycle pulse
  input  logic             in_valid,
  output logic             in_ready,
  input  frp_t             in_pkt,
  output logic             out_valid,
  input  logic             out_ready,
  output frp_t             out_pkt,
  output rate_t            fsr,
  output logic [CNT_W-1:0] m_count,
  output logic [CNT_W-1:0] k_count,
  output logic [RATE_W+CNT_W-1:0] b_sum,
  output logic             calc_start,  // pulse: an FSR computation starts
  output logic             corner_m0,   // ... with the M = 0, B != 0 fix
  output logic             corner_over, // ... with the B > vC fallback
  output logic             sc_valid,    // short-circuit notification strobe
  output frp_t             sc_pkt
);

  localparam int unsigned SUM_W = RATE_W + CNT_W;
  localparam int unsigned VC    = CAPACITY * (100 - ALPHA_PCT) / 100;

  typedef logic [CNT_W-1:0] cnt_t;
  typedef logic [SUM_W-1:0] sum_t;

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_INIT_OUT} state_e;

  state_e state;
  logic   rrp_pend;
  logic   calc_init;
  frp_t   held;

  rate_t old_fsr, bmax, old_bmax;
  cnt_t  m, old_m, k;
  sum_t  b, old_b;

  // ---------------- saturating arithmetic ----------------
  function automatic cnt_t cnt_inc(cnt_t x);
    return (x == '1) ? x : x + 1'b1;
  endfunction
  function automatic cnt_t cnt_dec(cnt_t x);
    return (x == '0) ? x : x - 1'b1;
  endfunction
  function automatic sum_t sum_add(sum_t x, rate_t r);
    logic [SUM_W:0] s;
    s = {1'b0, x} + (SUM_W+1)'(r);
    return s[SUM_W] ? '1 : s[SUM_W-1:0];
  endfunction
  function automatic sum_t sum_sub(sum_t x, sum_t y);
    return (x > y) ? x - y : '0;
  endfunction
  function automatic rate_t rate_max(rate_t a, rate_t b_);
    return (a > b_) ? a : b_;
  endfunction

  // ---------------- FSR operand selection ----------------
  typedef struct packed {
    sum_t num;
    cnt_t den;
    logic m0;
    logic over;
  } calc_t;

  function automatic calc_t fsr_operands(cnt_t m_i, sum_t b_i, rate_t bmax_i, cnt_t k_i);
    calc_t c;
    cnt_t  m_e;
    sum_t  b_e;
    c.m0   = (m_i == '0) && (b_i != '0);
    m_e    = (m_i == '0) ? cnt_t'(1) : m_i;
    b_e    = c.m0 ? sum_sub(b_i, sum_t'(bmax_i)) : b_i;
    c.over = (b_e > sum_t'(VC));
    if (c.over) begin
      c.num = sum_t'(CAPACITY);
      c.den = (k_i == '0) ? cnt_t'(1) : k_i;
    end else begin
      c.num = sum_t'(VC) - b_e;
      c.den = m_e;
    end
    return c;
  endfunction

  // ---------------- packet decode and next counter values ----------------
  msg_kind_e kind;
  logic      here_now;   // bottlenecked here against the FSR
  logic      here_old;   // the same against the old FSR (init)
  cnt_t      old_m_ini;
  sum_t      old_b_ini;
  rate_t     old_bmax_ini;
  cnt_t      k_ini;
  calc_t     calc_rrp, calc_ini, calc_sel;
  logic      accept;
  logic      out_free;
  logic      start_rrp;

  // Divider interface
  logic  div_in_ready, div_out_valid, div_start;
  sum_t  div_q;
  cnt_t  div_r;

  always_comb begin
    kind         = classify(in_pkt);
    here_now     = HERE_GE ? (in_pkt.cr >= fsr)     : (in_pkt.cr > fsr);
    here_old     = HERE_GE ? (in_pkt.cr >= old_fsr) : (in_pkt.cr > old_fsr);
    k_ini        = cnt_inc(k);
    old_m_ini    = here_old ? cnt_inc(old_m) : old_m;
    old_b_ini    = here_old ? old_b : sum_add(old_b, in_pkt.cr);
    old_bmax_ini = here_old ? old_bmax : rate_max(old_bmax, in_pkt.cr);
    calc_rrp     = fsr_operands(m, b, bmax, k);
    calc_ini     = fsr_operands(old_m_ini, old_b_ini, old_bmax_ini, k_ini);
    out_free     = !out_valid || out_ready;
    start_rrp    = (state == S_IDLE) && (rrp || rrp_pend);
    in_ready     = (state == S_IDLE) && !rrp && !rrp_pend && out_free;
    accept       = in_valid && in_ready;
    div_start    = start_rrp || (accept && kind == MSG_INIT);
    calc_sel     = start_rrp ? calc_rrp : calc_ini;
  end

  assign calc_start  = div_start;
  assign corner_m0   = div_start && calc_sel.m0;
  assign corner_over = div_start && calc_sel.over;

  cp_divider #(.N_W(SUM_W), .D_W(CNT_W)) u_div (
    .clk      (clk),
    .rst      (rst),
    .in_valid (div_start),
    .in_ready (div_in_ready),
    .dividend (calc_sel.num),
    .divisor  (calc_sel.den),
    .out_valid(div_out_valid),
    .quotient (div_q),
    .remainder(div_r)
  );

  function automatic frp_t clamp(frp_t p, rate_t f);
    frp_t o;
    o    = p;
    o.cr = rate_min(p.cr, f);
    o.dr = rate_min(p.dr, f);
    return o;
  endfunction

  // Excessive request: CR above FSR * 2^SC_SHIFT.
  function automatic logic excessive(frp_t p, rate_t f);
    logic [RATE_W+SC_SHIFT:0] lim;
    lim = (RATE_W+SC_SHIFT+1)'(f) << SC_SHIFT;
    return SC_ENABLE && ((RATE_W+SC_SHIFT+1)'(p.cr) > lim);
  endfunction

  function automatic frp_t notice(frp_t p, rate_t f);
    frp_t o;
    o      = clamp(p, f);
    o.fw   = 1'b0;
    o.init = 1'b0;
    o.stop = 1'b0;
    o.frp  = 1'b1;
    return o;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      rrp_pend  <= 1'b0;
      calc_init <= 1'b0;
      held      <= '0;
      fsr       <= rate_t'(VC);
      old_fsr   <= rate_t'(VC);
      m         <= '0;
      old_m     <= '0;
      k         <= '0;
      b         <= '0;
      old_b     <= '0;
      bmax      <= '0;
      old_bmax  <= '0;
      out_valid <= 1'b0;
      out_pkt   <= '0;
      sc_valid  <= 1'b0;
      sc_pkt    <= '0;
    end else begin
      sc_valid <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (rrp && state != S_IDLE) rrp_pend <= 1'b1;

      unique case (state)
        S_IDLE: begin
          if (start_rrp) begin
            // End of period: snapshot into the old registers, clear current.
            rrp_pend  <= 1'b0;
            calc_init <= 1'b0;
            old_m     <= m;
            old_b     <= b;
            old_bmax  <= bmax;
            old_fsr   <= fsr;
            m         <= '0;
            b         <= '0;
            bmax      <= '0;
            state     <= S_DIV;
          end else if (accept) begin
            unique case (kind)
              MSG_STOP: begin
                k <= cnt_dec(k);
                if (here_now) begin
                  m     <= cnt_dec(m);
                  old_m <= cnt_dec(old_m);
                end else begin
                  b     <= sum_sub(b, sum_t'(in_pkt.cr));
                  old_b <= sum_sub(old_b, sum_t'(in_pkt.cr));
                end
                out_pkt   <= in_pkt;
                out_valid <= 1'b1;
              end
              MSG_INIT: begin
                k        <= k_ini;
                old_m    <= old_m_ini;
                old_b    <= old_b_ini;
                old_bmax <= old_bmax_ini;
                if (here_old) m <= cnt_inc(m);
                else begin
                  b    <= sum_add(b, in_pkt.cr);
                  bmax <= rate_max(bmax, in_pkt.cr);
                end
                held      <= in_pkt;
                calc_init <= 1'b1;
                state     <= S_DIV;
              end
              MSG_NORMAL: begin
                if (here_now) m <= cnt_inc(m);
                else begin
                  b    <= sum_add(b, in_pkt.cr);
                  bmax <= rate_max(bmax, in_pkt.cr);
                end
                out_pkt   <= clamp(in_pkt, fsr);
                out_valid <= 1'b1;
                sc_valid  <= excessive(in_pkt, fsr);
                sc_pkt    <= notice(in_pkt, fsr);
              end
              default: begin
                out_pkt   <= in_pkt;
                out_valid <= 1'b1;
              end
            endcase
          end
        end
        S_DIV: begin
          if (div_out_valid) begin
            fsr   <= rate_t'(div_q);
            state <= calc_init ? S_INIT_OUT : S_IDLE;
          end
        end
        S_INIT_OUT: begin
          if (out_free) begin
            out_pkt   <= clamp(held, fsr);
            out_valid <= 1'b1;
            sc_valid  <= excessive(held, fsr);
            sc_pkt    <= notice(held, fsr);
            calc_init <= 1'b0;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign m_count = m;
  assign k_count = k;
  assign b_sum   = b;

  // The divider is idle whenever a computation is started.
  a_div_idle: assert property (@(posedge clk) disable iff (rst) div_start |-> div_in_ready);
  // Nothing is accepted while the output register is full and stalled.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
                                 (out_valid && !out_ready) |-> !in_ready);

endmodule
