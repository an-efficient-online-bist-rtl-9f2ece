// bist_noc_top: online scan-BIST of the logic cores of a NoC-based SoC.
//
// One Embedded Test Core (etc) is the test source; every logic core has a
// core_test_wrapper with its state flip-flops turned into scan cells and its
// own signature analyzer. The ETC multicasts test packets to groups of cores
// chosen under a test power budget; each core shifts a vector in while it
// runs, loses one clock cycle to apply it and capture the response, and
// compacts the responses into its signature.
//
// The NoC that carries the packets from the ETC to the cores is not part of
// this RTL: etc_flit_out leaves the top, and each core's received flit stream
// enters at core_flit_in[i]. The network must deliver every packet, unchanged
// and in order, to at least the cores in its header's destination mask
// (delivering it to other cores too is harmless: they skip it). Likewise the
// cores' combinational logic is outside: core i reads core_cell_q[i] and
// returns its next state on core_func_d[i]; it must also treat
// core_stall[i] as a stall of any state it keeps outside the wrapper.
//
// The partition (one test source multicasting over the NoC, scan cells and a
// response analyzer in every core, one stall cycle per vector, power-limited
// grouping, static flow control) follows the architecture; the single clock
// domain, the core count and sizes, and leaving the network and the core
// logic outside are this design's choices.
//
// Timing: single clock, active-low asynchronous reset, everything on the
// rising edge. Packet spacing is set by the ETC (static flow control), so the
// network needs no back-pressure towards the ETC for test traffic as long as
// it can carry one flit per cycle.
module bist_noc_top
  import bist_pkg::*;
#(
  parameter int unsigned N_CORES   = 4,
  parameter int unsigned CHAIN_LEN = 64,
  parameter int unsigned SIG_W     = 16,
  parameter int unsigned PW_W      = 8,
  parameter int unsigned BUD_W     = 10
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // ETC configuration and status
  input  logic                                start,
  input  logic [N_CORES-1:0]                  cfg_cores,
  input  logic [15:0]                         cfg_num_vectors,
  input  logic [15:0]                         cfg_gap,
  input  logic [31:0]                         cfg_seed,
  input  logic [N_CORES-1:0][PW_W-1:0]        cfg_core_power,
  input  logic [BUD_W-1:0]                    cfg_budget,
  output logic                                etc_busy,
  output logic                                etc_done,
  output logic [N_CORES-1:0]                  etc_group_mask,
  output logic [BUD_W-1:0]                    etc_group_power,
  output logic                                etc_over_budget,
  output logic [7:0]                          etc_group_count,
  // network side
  output flit_t                               etc_flit_out,
  input  flit_t [N_CORES-1:0]                 core_flit_in,
  // core logic side
  input  logic [N_CORES-1:0][CHAIN_LEN-1:0]   core_func_d,
  input  logic [N_CORES-1:0]                  core_func_en,
  output logic [N_CORES-1:0][CHAIN_LEN-1:0]   core_cell_q,
  output logic [N_CORES-1:0]                  core_stall,
  // per-core test results
  output logic [N_CORES-1:0][SIG_W-1:0]       core_signature,
  output logic [N_CORES-1:0]                  core_sig_valid,
  output logic [N_CORES-1:0][15:0]            core_vec_count,
  output logic [N_CORES-1:0]                  core_test_active
);

  etc #(
    .N_CORES   (N_CORES),
    .CHAIN_LEN (CHAIN_LEN),
    .PW_W      (PW_W),
    .BUD_W     (BUD_W)
  ) u_etc (
    .clk             (clk),
    .rst_n           (rst_n),
    .start           (start),
    .cfg_cores       (cfg_cores),
    .cfg_num_vectors (cfg_num_vectors),
    .cfg_gap         (cfg_gap),
    .cfg_seed        (cfg_seed),
    .cfg_core_power  (cfg_core_power),
    .cfg_budget      (cfg_budget),
    .flit_out        (etc_flit_out),
    .busy            (etc_busy),
    .done            (etc_done),
    .group_mask      (etc_group_mask),
    .group_power     (etc_group_power),
    .over_budget     (etc_over_budget),
    .group_count     (etc_group_count)
  );

  for (genvar i = 0; i < N_CORES; i++) begin : g_core
    core_test_wrapper #(
      .CORE_ID   (i),
      .N_CORES   (N_CORES),
      .CHAIN_LEN (CHAIN_LEN),
      .SIG_W     (SIG_W)
    ) u_wrap (
      .clk         (clk),
      .rst_n       (rst_n),
      .flit_in     (core_flit_in[i]),
      .func_d      (core_func_d[i]),
      .func_en     (core_func_en[i]),
      .cell_q      (core_cell_q[i]),
      .core_stall  (core_stall[i]),
      .signature   (core_signature[i]),
      .sig_valid   (core_sig_valid[i]),
      .vec_count   (core_vec_count[i]),
      .test_active (core_test_active[i])
    );
  end

endmodule
