// tb_key_expansion: loads the FIPS-197 Appendix A.1 key and 30 random keys,
// checks all eleven round keys against the reference schedule and checks the
// timing: key_ready falls with key_load and rises exactly 10 cycles after it.
// A second instance with LOCAL_CG = 0 must give the same keys.
module tb_key_expansion;
  import aes_ref_pkg::*;
  import aes_pkg::round_keys_t;

  localparam int EXPAND_CYCLES = 10;

  logic clk = 0, rst_n = 1, key_load = 0, key_ready;   // rst_n pulled low at 1 ns
  logic [127:0] key = '0;
  round_keys_t round_keys;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  key_expansion dut (.clk, .rst_n, .key_load, .key, .round_keys, .key_ready);

  // the same schedule with plain load enables instead of gated clocks
  round_keys_t round_keys_en;
  logic key_ready_en;
  key_expansion #(.LOCAL_CG(1'b0)) dut_en (.clk, .rst_n, .key_load, .key,
                                           .round_keys(round_keys_en), .key_ready(key_ready_en));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_and_check(logic [127:0] k);
    blk rk [11];
    int cycles = 0;
    @(negedge clk);
    key = k;
    key_load = 1;
    @(negedge clk);
    key_load = 0;
    key = rand_blk();           // the key input is only sampled with key_load
    cycles = 0;             // cycles after the edge that sampled key_load
    while (!key_ready) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != EXPAND_CYCLES) begin
      failures++;
      $display("FAIL expansion took %0d cycles, expected %0d", cycles, EXPAND_CYCLES);
    end
    expand(k, rk);
    for (int i = 0; i <= 10; i++) begin
      check($sformatf("round key %0d", i), round_keys[i], rk[i]);
      check($sformatf("round key %0d, enable version", i), round_keys_en[i], rk[i]);
    end
    checks++;
    if (key_ready_en !== key_ready) begin failures++; $display("FAIL key_ready differs"); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    #1 rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (key_ready) begin failures++; $display("FAIL key_ready high after reset"); end
    load_and_check(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check("FIPS-197 A.1 round key 10", round_keys[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    // round keys must hold while nothing is loaded
    repeat (5) @(negedge clk);
    check("held round key 10", round_keys[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    for (int n = 0; n < 30; n++) load_and_check(rand_blk());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
