// multicore_aes: N parallel AES-128 encryption cores with one shared key
// schedule and one global clock gate per core.
//
// The data bus is N_CORES x 128 bits wide; lane i feeds core i only, so with
// all cores active the chip encrypts 128 x N_CORES bits per clock (10 cores at
// 667 MHz: 853.8 Gbit/s). A single key_expansion produces the eleven round keys
// once and drives them to every core. Each core is clocked through its own
// clock_gate whose enable is the core's EN pin (core_en[i]): a core whose EN is
// 0 receives no clock at all, so it neither accepts nor moves data and its
// registers hold their contents. The number of enabled cores is chosen by the
// system from the input data rate (one core per 85.4 Gbit/s at 667 MHz).
//
// Interface (per lane i): core_en[i], in_valid[i]/in_data[i] and
// out_valid[i]/out_data[i]; shared: key_load/key/key_ready. Timing: a block
// accepted on an enabled lane appears on the same lane 10 enabled cycles
// later. Rules, checked by assertions: data is offered only on enabled lanes
// and only while key_ready is high. out_valid of a disabled lane reads 0.
module multicore_aes
  import aes_pkg::*;
#(
  parameter int unsigned N_CORES  = 10,
  parameter bit          LOCAL_CG = 1'b1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // shared key schedule
  input  logic                      key_load,
  input  block_t                    key,
  output logic                      key_ready,
  // per-core EN pins (global clock gating)
  input  logic [N_CORES-1:0]        core_en,
  // N x 128-bit data bus
  input  logic [N_CORES-1:0]        in_valid,
  input  block_t [N_CORES-1:0]      in_data,
  output logic [N_CORES-1:0]        out_valid,
  output block_t [N_CORES-1:0]      out_data
);

  round_keys_t round_keys;

  key_expansion #(.LOCAL_CG(LOCAL_CG)) u_key_expansion (
    .clk       (clk),
    .rst_n     (rst_n),
    .key_load  (key_load),
    .key       (key),
    .round_keys(round_keys),
    .key_ready (key_ready)
  );

  logic [N_CORES-1:0] core_out_valid;

  for (genvar i = 0; i < N_CORES; i++) begin : g_core
    logic core_clk;

    clock_gate u_global_cg (
      .clk (clk),
      .en  (core_en[i]),
      .gclk(core_clk)
    );

    aes_core #(.LOCAL_CG(LOCAL_CG)) u_core (
      .clk       (core_clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid[i]),
      .in_data   (in_data[i]),
      .round_keys(round_keys),
      .out_valid (core_out_valid[i]),
      .out_data  (out_data[i])
    );
  end

  assign out_valid = core_out_valid & core_en;

  // Handshake rules of the data bus.
  a_lane_enabled: assert property (@(posedge clk)
    (in_valid & ~core_en) == '0)
    else $error("data offered on a disabled core lane");
  a_key_ready: assert property (@(posedge clk)
    (|in_valid) |-> key_ready)
    else $error("data offered before the round keys are ready");

endmodule
