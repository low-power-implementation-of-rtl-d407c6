// tb_aes_core: runs two cores side by side, one with per-stage clock gating
// (LOCAL_CG = 1) and one with plain load enables (LOCAL_CG = 0), on the same
// stimulus: the FIPS-197 Appendix C.1 and Appendix B vectors, a back-to-back
// stream, a stream with random bubbles and a change of key after the pipeline
// has drained. Every output block is compared with the reference model, in
// order, and must appear exactly 10 cycles after it entered; during the
// back-to-back stream one block must leave every cycle.
module tb_aes_core;
  import aes_ref_pkg::*;
  import aes_pkg::round_keys_t;

  localparam int LATENCY = 10;

  logic clk = 0, rst_n = 1;   // pulled low at 1 ns so the asynchronous reset sees an edge
  logic in_valid = 0;
  logic [127:0] in_data = '0;
  round_keys_t round_keys;
  logic out_valid_cg, out_valid_en;
  logic [127:0] out_data_cg, out_data_en;

  int checks = 0, failures = 0;
  int cyc = 0;
  int busy_run = 0, max_busy_run = 0;
  int bubbles = 0;

  typedef struct { logic [127:0] ct; int issued; } exp_t;
  exp_t q_cg [$], q_en [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  aes_core #(.LOCAL_CG(1'b1)) dut_cg (.clk, .rst_n, .in_valid, .in_data, .round_keys,
                                      .out_valid(out_valid_cg), .out_data(out_data_cg));
  aes_core #(.LOCAL_CG(1'b0)) dut_en (.clk, .rst_n, .in_valid, .in_data, .round_keys,
                                      .out_valid(out_valid_en), .out_data(out_data_en));

  blk rk [11];

  task automatic set_key(logic [127:0] k);
    expand(k, rk);
    for (int i = 0; i <= 10; i++) round_keys[i] = rk[i];
  endtask

  // drive one block (or a bubble) for one cycle
  task automatic drive(bit valid, logic [127:0] pt);
    @(negedge clk);
    in_valid = valid;
    in_data  = valid ? pt : rand_blk();
    if (valid) begin
      q_cg.push_back('{encrypt(pt, rk), cyc});
      q_en.push_back('{encrypt(pt, rk), cyc});
    end else bubbles++;
  endtask

  task automatic idle(int n);
    repeat (n) drive(1'b0, '0);
  endtask

  task automatic compare(string name, logic v, logic [127:0] d, ref exp_t q [$]);
    if (v) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL %s: unexpected output %h", name, d);
      end else begin
        exp_t e = q.pop_front();
        if (d !== e.ct || cyc - e.issued != LATENCY) begin
          failures++;
          $display("FAIL %s: got %h after %0d cycles, expected %h after %0d",
                   name, d, cyc - e.issued, e.ct, LATENCY);
        end
      end
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    compare("gated", out_valid_cg, out_data_cg, q_cg);
    compare("enable", out_valid_en, out_data_en, q_en);
    checks++;
    if (out_valid_cg !== out_valid_en) begin
      failures++;
      $display("FAIL cores disagree on out_valid");
    end
    busy_run = out_valid_cg ? busy_run + 1 : 0;
    if (busy_run > max_busy_run) max_busy_run = busy_run;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    #1 rst_n = 0;
    set_key(128'h000102030405060708090a0b0c0d0e0f);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // FIPS-197 Appendix C.1
    drive(1'b1, 128'h00112233445566778899aabbccddeeff);
    idle(LATENCY);
    checks++;
    if (out_data_cg !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++;
      $display("FAIL FIPS-197 C.1 ciphertext %h", out_data_cg);
    end
    // FIPS-197 Appendix B with a new key, pipeline empty
    set_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    drive(1'b1, 128'h3243f6a8885a308d313198a2e0370734);
    idle(LATENCY);
    checks++;
    if (out_data_cg !== 128'h3925841d02dc09fbdc118597196a0b32) begin
      failures++;
      $display("FAIL FIPS-197 B ciphertext %h", out_data_cg);
    end
    // back-to-back stream: one block per cycle
    for (int n = 0; n < 200; n++) drive(1'b1, rand_blk());
    idle(LATENCY + 2);
    checks++;
    if (max_busy_run < 200) begin
      failures++;
      $display("FAIL longest run of outputs %0d, expected 200", max_busy_run);
    end
    // random bubbles
    for (int n = 0; n < 400; n++) drive(1'($urandom % 3 != 0), rand_blk());
    idle(LATENCY + 2);
    // change of key once drained
    set_key(rand_blk());
    for (int n = 0; n < 100; n++) drive(1'($urandom % 2), rand_blk());
    idle(LATENCY + 2);
    checks++;
    if (q_cg.size() != 0 || q_en.size() != 0) begin
      failures++;
      $display("FAIL %0d/%0d blocks never came out", q_cg.size(), q_en.size());
    end
    $display("bubbles %0d, longest output run %0d", bubbles, max_busy_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
