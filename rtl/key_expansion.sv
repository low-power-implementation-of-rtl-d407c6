// key_expansion: AES-128 key schedule shared by all cores of the chip.
//
// A pulse on key_load captures the 128-bit cipher key as round key 0. The
// other ten round keys are then produced one per clock with the FIPS-197
// recurrence (RotWord, SubWord, Rcon), so key_ready rises 10 cycles after the
// key_load cycle and stays high until the next key_load. The eleven round keys
// are held in registers and fanned out unchanged to every core: one schedule
// serves all cores instead of one per core. Computing the keys iteratively
// with a single SubWord unit (4 S-boxes) is this design's choice. Each round
// key register loads in exactly one cycle per key; with LOCAL_CG = 1 it sits
// behind its own clock_gate (local clock gating), otherwise it has a plain load
// enable that a synthesis tool can turn into a gated clock.
//
// Ports: key_load (1-cycle pulse), key (cipher key, sampled with key_load),
// round_keys[0..10], key_ready (all round keys valid). Loading a new key while
// a core still holds blocks in flight changes the keys those blocks see.
module key_expansion
  import aes_pkg::*;
#(
  parameter bit LOCAL_CG = 1'b1   // 1: clock-gate each round key register
) (
  input  logic        clk,
  input  logic        rst_n,      // asynchronous, active low
  input  logic        key_load,
  input  block_t      key,
  output round_keys_t round_keys,
  output logic        key_ready
);

  logic [3:0] step;      // index of the next round key to compute, 1..NR
  logic       busy;
  byte_t      rcon;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      key_ready <= 1'b0;
      step      <= '0;
      rcon      <= 8'h01;
    end else if (key_load) begin
      busy      <= 1'b1;
      key_ready <= 1'b0;
      step      <= 4'd1;
      rcon      <= 8'h01;
    end else if (busy) begin
      rcon <= xtime(rcon);
      step <= step + 4'd1;
      if (step == 4'(NR)) begin
        busy      <= 1'b0;
        key_ready <= 1'b1;
      end
    end
  end

  // Round key registers, no reset (qualified by key_ready). Register i loads
  // only in the cycle that produces round key i; with LOCAL_CG = 1 that load
  // enable gates the register's clock.
  block_t next_key;
  assign next_key = next_round_key(round_keys[step-4'd1], rcon);

  for (genvar i = 0; i <= NR; i++) begin : g_key
    logic   load;
    block_t d, q;
    if (i == 0) begin : g_first
      assign load = key_load;
      assign d    = key;
    end else begin : g_next
      assign load = !key_load && busy && step == 4'(i);
      assign d    = next_key;
    end
    if (LOCAL_CG) begin : g_cg
      logic gclk;
      clock_gate u_cg (.clk(clk), .en(load), .gclk(gclk));
      always_ff @(posedge gclk) q <= d;
    end else begin : g_en
      always_ff @(posedge clk) if (load) q <= d;
    end
    assign round_keys[i] = q;
  end

endmodule
