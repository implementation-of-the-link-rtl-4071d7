// tb_cp_divider: self-checking test of the sequential divider.
// Drives random and edge-case operands, compares quotient and remainder
// with the arithmetic operators, and checks that every result arrives
// exactly N_W+1 cycles after the operands were accepted.
module tb_cp_divider;
  localparam int unsigned N_W = 16;
  localparam int unsigned D_W = 8;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, in_ready, out_valid;
  logic [N_W-1:0] dividend = '0, quotient;
  logic [D_W-1:0] divisor = '0, remainder;
  int checks = 0, failures = 0;

  cp_divider #(.N_W(N_W), .D_W(D_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input logic [N_W-1:0] n, input logic [D_W-1:0] d);
    int lat;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    dividend = n; divisor = d; in_valid = 1'b1;
    @(posedge clk);
    #1 in_valid = 1'b0;
    lat = 0;
    do begin @(posedge clk); lat++; #1; end while (!out_valid && lat < 100);
    checks += 3;
    if (quotient !== n / d) begin
      failures++; $display("FAIL %0d/%0d: q=%0d", n, d, quotient);
    end
    if (remainder !== D_W'(n % d)) begin
      failures++; $display("FAIL %0d%%%0d: r=%0d", n, d, remainder);
    end
    if (lat != N_W + 1) begin
      failures++; $display("FAIL latency %0d", lat);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    divide(190, 1);
    divide(190, 2);
    divide(5, 2);
    divide(0, 7);
    divide(16'hFFFF, 1);
    divide(16'hFFFF, 8'hFF);
    divide(200, 255);
    for (int i = 0; i < 300; i++) begin
      logic [D_W-1:0] d;
      d = D_W'($urandom);
      if (d == 0) d = 1;
      divide(N_W'($urandom), d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
