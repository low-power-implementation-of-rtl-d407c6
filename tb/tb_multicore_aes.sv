// tb_multicore_aes: end-to-end test of the multi-core AES chip at its full
// size (10 cores, no parameter overridden).
//
// Sequence: reset; load the FIPS-197 key and check that the shared key
// schedule is ready after 10 cycles; run all ten lanes at full rate and check
// that 10 x 128 bits leave every cycle; sweep the number of active cores from 0
// to 10 (the eleven operating points of the power study), checking that k
// active cores deliver k blocks per cycle and that a disabled core's clock
// never toggles; toggle the EN pins at random while blocks are in flight, with
// random bubbles on the lanes, so that cores are frozen and resumed with data
// inside; drain, load a second key and repeat. Every output block is checked
// against the reference model, lane by lane and in order, with a latency of 10
// cycles in which that core was enabled. Each mechanism is counted and a
// mechanism that never happened counts as a failure.
module tb_multicore_aes;
  import aes_ref_pkg::*;

  localparam int N = 10;
  localparam int LATENCY = 10;
  localparam int EXPAND_CYCLES = 10;

  logic clk = 0, rst_n = 1;   // pulled low at 1 ns so the asynchronous reset sees an edge
  logic key_load = 0, key_ready;
  logic [127:0] key = '0;
  logic [N-1:0] core_en = '0, in_valid = '0, out_valid;
  logic [N-1:0][127:0] in_data = '0, out_data;

  int checks = 0, failures = 0;
  int ecyc [N];                 // enabled cycles seen by each core
  int core_clk_edges [N];
  typedef struct { logic [127:0] ct; int issued; } exp_t;
  exp_t q [N][$];
  blk rk [11];

  // mechanism counters
  int n_key_loads = 0, n_full_rate_cycles = 0, n_gated_core_cycles = 0;
  int n_frozen_with_data = 0, n_bubbles = 0, n_en_switches = 0, n_blocks = 0;

  multicore_aes dut (.clk, .rst_n, .key_load, .key, .key_ready, .core_en,
                     .in_valid, .in_data, .out_valid, .out_data);

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_mon
    always @(posedge dut.g_core[i].core_clk) core_clk_edges[i]++;
  end

  always @(posedge clk) begin
    for (int i = 0; i < N; i++) if (core_en[i]) ecyc[i]++;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s at %0t", msg, $time);
  endtask

  // outputs are checked at the falling edge, half a cycle after they change
  always @(negedge clk) if (rst_n) begin
    automatic int nv = 0;
    for (int i = 0; i < N; i++) begin
      if (out_valid[i]) begin
        nv++;
        checks++;
        if (q[i].size() == 0) fail($sformatf("lane %0d: unexpected output", i));
        else begin
          automatic exp_t e = q[i].pop_front();
          if (out_data[i] !== e.ct || ecyc[i] - e.issued != LATENCY)
            fail($sformatf("lane %0d: got %h after %0d cycles, expected %h",
                           i, out_data[i], ecyc[i] - e.issued, e.ct));
        end
      end
      if (!core_en[i]) begin
        n_gated_core_cycles++;
        if (q[i].size() != 0) n_frozen_with_data++;
      end
    end
    if (nv == N) n_full_rate_cycles++;
  end

  // one cycle of stimulus: new EN pins and per-lane valid probability (%)
  task automatic step(logic [N-1:0] en, int pct);
    @(negedge clk);
    if (en != core_en) n_en_switches++;
    core_en = en;
    for (int i = 0; i < N; i++) begin
      logic v = en[i] && (($urandom % 100) < pct);
      logic [127:0] pt = rand_blk();
      in_valid[i] = v;
      in_data[i]  = pt;
      if (v) begin
        q[i].push_back('{encrypt(pt, rk), ecyc[i]});
        n_blocks++;
      end else if (en[i] && pct > 0) n_bubbles++;
    end
  endtask

  task automatic drain();
    repeat (LATENCY + 2) step('1, 0);
    for (int i = 0; i < N; i++)
      if (q[i].size() != 0) fail($sformatf("lane %0d: %0d blocks never came out", i, q[i].size()));
  endtask

  task automatic load_key(logic [127:0] k);
    int cycles = 0;
    @(negedge clk);
    in_valid = '0;
    key = k;
    key_load = 1;
    @(negedge clk);
    key_load = 0;
    while (!key_ready) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != EXPAND_CYCLES) fail($sformatf("key schedule took %0d cycles", cycles));
    expand(k, rk);
    n_key_loads++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    #1 rst_n = 0;
    for (int i = 0; i < N; i++) begin ecyc[i] = 0; core_clk_edges[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_key(128'h000102030405060708090a0b0c0d0e0f);

    // FIPS-197 C.1 on every lane at once
    @(negedge clk);
    core_en = '1;
    in_valid = '1;
    for (int i = 0; i < N; i++) begin
      in_data[i] = 128'h00112233445566778899aabbccddeeff;
      q[i].push_back('{128'h69c4e0d86a7b0430d8cdb78070b4c55a, ecyc[i]});
    end
    drain();

    // all cores at full rate: 1280 bits per cycle
    begin
      automatic int full0 = n_full_rate_cycles;
      repeat (100) step('1, 100);
      drain();
      checks++;
      if (n_full_rate_cycles - full0 != 100)
        fail($sformatf("%0d cycles at 10 blocks/cycle, expected 100", n_full_rate_cycles - full0));
    end

    // operating points: k active cores, full rate on each
    for (int k = 0; k <= N; k++) begin
      automatic logic [N-1:0] en = (N'(1) << k) - N'(1);
      automatic int edges0 [N];
      automatic int blocks_out = 0;
      step(en, 0);              // apply the EN pins before counting edges
      for (int i = 0; i < N; i++) edges0[i] = core_clk_edges[i];
      fork
        repeat (50) step(en, 100);
        begin
          repeat (LATENCY + 1) @(negedge clk);
          repeat (30) begin
            @(posedge clk);
            #1 blocks_out += $countones(out_valid);
          end
        end
      join
      repeat (LATENCY + 2) step(en, 0);
      checks++;
      if (blocks_out != 30 * k)
        fail($sformatf("%0d cores: %0d blocks in 30 cycles, expected %0d", k, blocks_out, 30 * k));
      for (int i = k; i < N; i++) begin
        checks++;
        if (core_clk_edges[i] != edges0[i])
          fail($sformatf("disabled core %0d received %0d clock edges", i, core_clk_edges[i] - edges0[i]));
      end
      $display("active cores %0d: %0d bits per cycle", k, 128 * blocks_out / 30);
    end
    drain();

    // random EN switching with blocks in flight and random bubbles
    for (int n = 0; n < 600; n++) step(N'($urandom), 70);
    drain();

    // second key
    load_key(rand_blk());
    for (int n = 0; n < 300; n++) step(N'($urandom) | N'($urandom), 80);
    drain();

    checks += 6;
    if (n_key_loads < 2)         fail("key was never reloaded");
    if (n_full_rate_cycles == 0) fail("never ran all cores at full rate");
    if (n_gated_core_cycles == 0) fail("no core was ever clock gated");
    if (n_frozen_with_data == 0) fail("no core was ever frozen with blocks in flight");
    if (n_bubbles == 0)          fail("no bubble on any lane");
    if (n_en_switches == 0)      fail("EN pins never changed");
    $display("blocks %0d, key loads %0d, full-rate cycles %0d, gated core-cycles %0d, frozen with data %0d, bubbles %0d, EN switches %0d",
             n_blocks, n_key_loads, n_full_rate_cycles, n_gated_core_cycles,
             n_frozen_with_data, n_bubbles, n_en_switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
