// aes_core: fully unrolled, round-pipelined AES-128 encryption core.
//
// The core applies the initial AddRoundKey and then the ten rounds of AES-128
// (cipher_round), with a 128-bit pipeline register behind every round: the
// outer-round pipeline of the design. A block entering with in_valid leaves
// LATENCY = 10 clock cycles later with out_valid, and a new block can enter
// every cycle, so a full pipeline encrypts one 128-bit block per clock.
// The initial AddRoundKey shares the first stage with round 1.
//
// Each stage carries a valid bit. The valid bits reset and are clocked every
// cycle; a stage's 128-bit data register loads only when valid data arrives.
// With LOCAL_CG = 1 that load enable is turned into a gated clock per stage
// (local clock gating with clock_gate), so data registers of empty stages see
// no clock edges; with LOCAL_CG = 0 the same registers use a plain load enable
// and leave clock gating to the synthesis tool. The round keys come from the
// shared key_expansion and must stay constant while blocks are in flight.
//
// Ports: clk (the core clock, already gated by the core's global clock gate
// in the multi-core top), rst_n (asynchronous, active low), in_valid/in_data,
// round_keys[0..10], out_valid/out_data (ciphertext).
module aes_core
  import aes_pkg::*;
#(
  parameter bit LOCAL_CG = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  block_t      in_data,
  input  round_keys_t round_keys,
  output logic        out_valid,
  output block_t      out_data
);

  logic   [NR:0] v;        // v[i]: stage i holds a valid block (v[0] = input)
  block_t        s [NR+1]; // s[i]: state after round i (s[0] = after key 0)
  block_t        r [NR+1]; // r[i]: combinational output of round i

  assign v[0] = in_valid;
  assign s[0] = in_data ^ round_keys[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v[NR:1] <= '0;
    else        v[NR:1] <= v[NR-1:0];
  end

  for (genvar i = 1; i <= NR; i++) begin : g_round
    cipher_round #(.LAST(i == NR)) u_round (
      .state    (s[i-1]),
      .round_key(round_keys[i]),
      .result   (r[i])
    );

    block_t q;   // pipeline register behind round i
    if (LOCAL_CG) begin : g_cg
      logic gclk;
      clock_gate u_cg (.clk(clk), .en(v[i-1]), .gclk(gclk));
      always_ff @(posedge gclk) q <= r[i];
    end else begin : g_en
      always_ff @(posedge clk) if (v[i-1]) q <= r[i];
    end
    assign s[i] = q;
  end

  assign out_valid = v[NR];
  assign out_data  = s[NR];

endmodule
