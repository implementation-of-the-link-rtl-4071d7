// tb_destination_point: self-checking test of the destination point.
// Every combination of the four flags, random rates, the at_dest sideband
// and out_ready is applied; the expected behaviour is worked out here:
// at the destination a forward FRP leaves with fw cleared and its rates
// untouched, a flow-stop FRP is consumed, everything else passes as is.
module tb_destination_point;
  import frp_pkg::*;

  logic in_valid, in_ready, at_dest, out_valid, out_ready, reply, dropped;
  frp_t in_pkt, out_pkt;
  int checks = 0, failures = 0;
  int n_reply = 0, n_drop = 0, n_pass = 0;

  destination_point dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 512; n++) begin
      frp_t e;
      bit   exp_drop, exp_reply;
      in_pkt    = frp_t'({RATE_W'($urandom), RATE_W'($urandom), 4'(n)});
      at_dest   = n[4];
      out_ready = n[5];
      in_valid  = n[6] | n[7];
      #1;
      exp_drop  = at_dest && in_pkt.frp && in_pkt.stop;
      exp_reply = at_dest && in_pkt.frp && in_pkt.fw && !in_pkt.stop;
      e = in_pkt;
      if (exp_reply) e.fw = 1'b0;
      check(out_valid == (in_valid && !exp_drop), $sformatf("out_valid flags=%b dest=%b", in_pkt[3:0], at_dest));
      check(dropped == (in_valid && exp_drop), "dropped");
      check(reply == (in_valid && exp_reply), "reply");
      check(in_ready == (exp_drop ? 1'b1 : out_ready), "in_ready");
      if (out_valid) check(out_pkt == e, $sformatf("out_pkt %h expected %h", out_pkt, e));
      if (in_valid && exp_drop) n_drop++;
      else if (in_valid && exp_reply) n_reply++;
      else if (in_valid) n_pass++;
      #9;
    end
    check(n_drop > 0 && n_reply > 0 && n_pass > 0, "all three outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
