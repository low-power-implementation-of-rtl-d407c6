// tb_cipher_round: checks one middle round and one final round against the
// reference model on the FIPS-197 Appendix B round-1 values and on random
// states and round keys. The round is combinational, so each check is made a
// short delay after the inputs change.
module tb_cipher_round;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [127:0] state, rk, res_mid, res_last;

  cipher_round #(.LAST(1'b0)) dut_mid  (.state(state), .round_key(rk), .result(res_mid));
  cipher_round #(.LAST(1'b1)) dut_last (.state(state), .round_key(rk), .result(res_last));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    // FIPS-197 Appendix B: state at the start of round 1, round key 1, and
    // the state at the start of round 2.
    state = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    rk    = 128'ha0fafe1788542cb123a339392a6c7605;
    #1 check("fips round 1", res_mid, 128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int n = 0; n < 500; n++) begin
      state = rand_blk();
      rk    = rand_blk();
      #1;
      check("random mid", res_mid, round(state, rk, 1'b0));
      check("random last", res_last, round(state, rk, 1'b1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
