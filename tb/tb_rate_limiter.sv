// tb_rate_limiter: checks the leaky-bucket pacer at its default size
// (8 channels, C = 200, burst 16 words).
// A model in plain integers keeps each channel's credit and predicts, every
// cycle, whether a packet leaves and from which channel; the outputs are
// compared with it for random lengths, rates, request patterns and output
// back-pressure. Then long runs check the long-term share: a channel at
// rate r sending packets of L words must send r / 200 of the words
// (within one packet), a channel at rate 0 nothing, and after an idle time
// a channel may burst at most 16 words ahead of its rate.
module tb_rate_limiter;
  import frp_pkg::*;
  localparam int N = 8, C = 200, BURST = 16 * C;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  rate_t            rate [N];
  logic [N-1:0]     in_valid, in_ready;
  logic [7:0]       in_len [N];
  logic             out_valid, out_ready;
  logic [2:0]       out_flow;
  logic [7:0]       out_len;

  rate_limiter dut (.clk(clk), .rst(rst), .rate(rate), .in_valid(in_valid), .in_ready(in_ready),
                    .in_len(in_len), .out_valid(out_valid), .out_ready(out_ready),
                    .out_flow(out_flow), .out_len(out_len));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  int credit [N];
  int words [N];
  bit model_on = 1'b0;
  always @(posedge clk) if (model_on) begin
    int pick;
    pick = -1;
    for (int i = N - 1; i >= 0; i--)
      if (in_valid[i] && rate[i] != 0 && credit[i] >= 0) pick = i;
    check(out_valid == (pick >= 0), $sformatf("out_valid %0b, model %0d", out_valid, pick));
    if (pick >= 0) begin
      check(out_flow == 3'(pick), $sformatf("out_flow %0d, model %0d", out_flow, pick));
      check(out_len == in_len[pick], "out_len");
    end
    for (int i = 0; i < N; i++) begin
      check(in_ready[i] == (pick == i && out_ready), $sformatf("in_ready[%0d]", i));
      credit[i] = credit[i] + rate[i];
      if (credit[i] > BURST) credit[i] = BURST;
      if (pick == i && out_ready) begin
        credit[i] -= in_len[i] * C;
        words[i] += in_len[i];
      end
    end
  end

  task automatic clear_counts();
    for (int i = 0; i < N; i++) words[i] = 0;
  endtask

  initial begin
    in_valid = '0; out_ready = 1'b1;
    for (int i = 0; i < N; i++) begin rate[i] = '0; in_len[i] = 8'd1; credit[i] = 0; words[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    model_on = 1'b1;

    // random phase: random rates, lengths, requests and back-pressure
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      if (c % 500 == 0) for (int i = 0; i < N; i++) rate[i] = ($urandom % 4 == 0) ? 8'd0 : rate_t'($urandom % 201);
      for (int i = 0; i < N; i++) begin
        in_valid[i] = ($urandom % 4) != 0;
        in_len[i]   = 8'(1 + $urandom % 64);
      end
      out_ready = ($urandom % 8) != 0;
    end

    // long-term shares: four channels always ready, packets of 4 words
    @(negedge clk);
    in_valid = '0; out_ready = 1'b1;
    rate = '{8'd20, 8'd50, 8'd100, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0};
    for (int i = 0; i < N; i++) in_len[i] = 8'd4;
    repeat (100) @(negedge clk);   // let debts from the random phase clear
    in_valid = 8'b0000_1111;
    clear_counts();
    begin
      repeat (40000) @(negedge clk);
      for (int i = 0; i < 3; i++) begin
        int slack;
        slack = words[i] - int'(rate[i]) * 40000 / C;
        check(slack <= 16 + 4 && slack >= -4,
              $sformatf("channel %0d sent %0d words at rate %0d, share says %0d", i, words[i], rate[i], int'(rate[i]) * 40000 / C));
      end
      check(words[3] == 0, "rate-0 channel sent nothing");
      $display("shares: %0d %0d %0d %0d words in 40000 cycles (rates 20 50 100 0)", words[0], words[1], words[2], words[3]);
    end

    // burst after idle: at most BURST_WORDS ahead of the rate
    @(negedge clk);
    in_valid = '0;
    rate = '{8'd10, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0};
    repeat (2000) @(negedge clk);  // credit fills to the cap
    check(credit[0] == BURST, "credit capped at the burst limit");
    clear_counts();
    in_valid = 8'b0000_0001;
    repeat (20) @(negedge clk);
    check(words[0] >= 16 && words[0] <= 20, $sformatf("burst after idle sent %0d words", words[0]));
    in_valid = '0;
    repeat (5) @(negedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
