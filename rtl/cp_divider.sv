// cp_divider: unsigned sequential divider that computes the fair share rate
// of a contention point.
//
// The contention point hands the divider a numerator (vC - B, or C in the
// overflow case) and a denominator (M, or K) and waits for the quotient;
// the link monitor itself holds no divider, so any divider with this
// valid-in / valid-out behaviour can take this one's place. This one is a
// plain restoring divider that retires one quotient bit per clock.
//
// Interface: in_valid with dividend/divisor starts a division when in_ready
// is high. out_valid pulses for one cycle with quotient and remainder.
// Timing: the result appears N_W+1 cycles after the accepting edge
// (N_W iterations plus the output register). A zero divisor gives an
// all-ones quotient; the contention point never asks for one.
module cp_divider #(
  parameter int unsigned N_W = 16,   // dividend width
  parameter int unsigned D_W = 8     // divisor width
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [N_W-1:0] dividend,
  input  logic [D_W-1:0] divisor,
  output logic           out_valid,
  output logic [N_W-1:0] quotient,
  output logic [D_W-1:0] remainder
);

  localparam int unsigned CNT_W = $clog2(N_W + 1);

  logic             busy;
  logic [CNT_W-1:0] count;
  logic [N_W-1:0]   q_shift;   // dividend bits still to shift in, then quotient
  logic [D_W:0]     rem;       // partial remainder, one bit wider than divisor
  logic [D_W-1:0]   dvs;

  logic [D_W:0] rem_sh;
  logic [D_W:0] rem_sub;
  logic         fits;

  always_comb begin
    rem_sh  = {rem[D_W-1:0], q_shift[N_W-1]};
    rem_sub = rem_sh - {1'b0, dvs};
    fits    = (rem_sh >= {1'b0, dvs});
  end

  assign in_ready = !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      count     <= '0;
      q_shift   <= '0;
      rem       <= '0;
      dvs       <= '0;
      out_valid <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          busy    <= 1'b1;
          count   <= CNT_W'(N_W);
          q_shift <= dividend;
          rem     <= '0;
          dvs     <= divisor;
        end
      end else if (count != 0) begin
        count   <= count - 1'b1;
        q_shift <= {q_shift[N_W-2:0], fits};
        rem     <= fits ? rem_sub : rem_sh;
      end else begin
        busy      <= 1'b0;
        out_valid <= 1'b1;
        quotient  <= q_shift;
        remainder <= rem[D_W-1:0];
      end
    end
  end

endmodule
