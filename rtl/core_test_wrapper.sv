// core_test_wrapper: test architecture inside one logic core.
//
// Holds the core's CHAIN_LEN state flip-flops as bist_scan_cells, organised
// as FLIT_W parallel scan chains of DEPTH = CHAIN_LEN / FLIT_W cells, the
// packet receiver (network interface side) and the core's response analyzer
// (ora_misr). The core's combinational logic stays outside: it reads cell_q
// and returns func_d.
//
// Operation, driven only by incoming test packets:
//   * A header whose destination mask does not include CORE_ID is skipped
//     with the rest of its packet.
//   * PKT_START clears the shadow chains and the signature, and the count of
//     applied vectors.
//   * PKT_TEST: each of its DEPTH payload flits shifts the chains by one
//     position, flit bit c entering chain c, while the core keeps running. The
//     bits pushed out of the chain ends (the previous response) enter the
//     MISR in the same cycle. The cycle after the tail flit is the stall
//     cycle: core_stall = 1, the core logic sees the test vector and the
//     shadow cells capture its response; the functional state holds.
//   * PKT_FLUSH shifts its payload in the same way, only to push the last
//     response into the MISR, applies nothing and raises sig_valid.
// Cell index i = p*FLIT_W + c sits at position p of chain c; payload flit k
// (k = 0 first) ends at position DEPTH-1-k, so the first flit carries the
// most significant slice of the vector.
//
// Flow control is static: the receiver takes one flit per cycle and never
// pushes back. The sender must leave at least one idle cycle after the tail
// of a PKT_TEST (the stall cycle); an assertion checks this.
//
// Timing: the stall cycle is the cycle right after the tail flit is seen;
// sig_valid rises the cycle after a PKT_FLUSH tail. The receiver, the
// packet formats and the chain organisation are this design's own choices;
// the single stall cycle per vector and the per-core response analyzer
// follow the architecture. (Lint notes rst_n as used both asynchronously
// and synchronously: the synchronous use is only the assertions' disable.)
module core_test_wrapper
  import bist_pkg::*;
#(
  parameter int unsigned CORE_ID   = 0,
  parameter int unsigned N_CORES   = 4,
  parameter int unsigned CHAIN_LEN = 64,
  parameter int unsigned SIG_W     = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // from the network
  input  flit_t                flit_in,
  // core logic side
  input  logic [CHAIN_LEN-1:0] func_d,
  input  logic                 func_en,
  output logic [CHAIN_LEN-1:0] cell_q,
  output logic                 core_stall,
  // test status
  output logic [SIG_W-1:0]     signature,
  output logic                 sig_valid,
  output logic [15:0]          vec_count,
  output logic                 test_active
);

  localparam int unsigned DEPTH = CHAIN_LEN / FLIT_W;

  initial begin
    assert (CHAIN_LEN % FLIT_W == 0 && DEPTH >= 1)
      else $error("core_test_wrapper: CHAIN_LEN must be a multiple of FLIT_W");
    assert (N_CORES <= MAX_CORES && CORE_ID < N_CORES)
      else $error("core_test_wrapper: bad CORE_ID / N_CORES");
    assert (FLIT_W <= SIG_W) else $error("core_test_wrapper: SIG_W below FLIT_W");
  end

  typedef enum logic [1:0] {R_IDLE, R_LOAD, R_SKIP, R_APPLY} rx_state_e;

  rx_state_e state;
  logic      apply_after;      // current packet is a PKT_TEST
  logic      flush_done;       // current packet is a PKT_FLUSH
  logic [$clog2(DEPTH+1)-1:0] pay_cnt;

  logic for_me;
  assign for_me = flit_in.data[CORE_ID];

  logic shift_en, apply, clear_chain, misr_clear;
  assign shift_en    = (state == R_LOAD) && flit_in.valid;
  assign apply       = (state == R_APPLY);
  assign clear_chain = (state == R_IDLE) && flit_in.valid && flit_in.head && for_me &&
                       (header_type(flit_in.data[FLIT_W-1 -: 2]) == PKT_START);
  assign misr_clear  = clear_chain;
  assign core_stall  = apply;
  assign test_active = (state == R_LOAD) || (state == R_APPLY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= R_IDLE;
      apply_after <= 1'b0;
      flush_done  <= 1'b0;
      pay_cnt     <= '0;
      sig_valid   <= 1'b0;
      vec_count   <= '0;
    end else begin
      unique case (state)
        R_IDLE: if (flit_in.valid && flit_in.head) begin
          pay_cnt <= '0;
          if (!for_me) begin
            if (!flit_in.tail) state <= R_SKIP;
          end else begin
            unique case (header_type(flit_in.data[FLIT_W-1 -: 2]))
              PKT_START: begin
                sig_valid <= 1'b0;
                vec_count <= '0;
                if (!flit_in.tail) state <= R_SKIP;
              end
              PKT_TEST: begin
                apply_after <= 1'b1;
                flush_done  <= 1'b0;
                state       <= R_LOAD;
              end
              default: begin  // PKT_FLUSH
                apply_after <= 1'b0;
                flush_done  <= 1'b1;
                state       <= R_LOAD;
              end
            endcase
          end
        end
        R_LOAD: if (flit_in.valid) begin
          pay_cnt <= pay_cnt + 1'b1;
          if (flit_in.tail) begin
            if (apply_after) state <= R_APPLY;
            else begin
              state     <= R_IDLE;
              sig_valid <= flush_done;
            end
          end
        end
        R_SKIP: if (flit_in.valid && flit_in.tail) state <= R_IDLE;
        R_APPLY: begin
          vec_count <= vec_count + 1'b1;
          state     <= R_IDLE;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  // ---- scan chains -------------------------------------------------------
  logic [CHAIN_LEN-1:0] scan_out;
  logic [FLIT_W-1:0]    chain_end;

  for (genvar p = 0; p < DEPTH; p++) begin : g_pos
    for (genvar c = 0; c < FLIT_W; c++) begin : g_chain
      localparam int unsigned I = p * FLIT_W + c;
      logic sin;
      if (p == 0) begin : g_first
        assign sin = flit_in.data[c];
      end else begin : g_next
        assign sin = scan_out[I - FLIT_W];
      end
      bist_scan_cell u_cell (
        .clk      (clk),
        .rst_n    (rst_n),
        .func_d   (func_d[I]),
        .func_en  (func_en),
        .cell_q   (cell_q[I]),
        .clear    (clear_chain),
        .shift_en (shift_en),
        .scan_in  (sin),
        .scan_out (scan_out[I]),
        .apply    (apply)
      );
    end
  end

  assign chain_end = scan_out[CHAIN_LEN-1 -: FLIT_W];

  // ---- response analyzer ---------------------------------------------------
  ora_misr #(.WIDTH(SIG_W), .IN_W(FLIT_W)) u_ora (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (misr_clear),
    .en        (shift_en),
    .din       (chain_end),
    .signature (signature)
  );

  // ---- protocol checks -----------------------------------------------------
  // Static flow control: nothing may arrive in the stall cycle.
  a_no_flit_in_stall: assert property (@(posedge clk) disable iff (!rst_n)
    (state == R_APPLY) |-> !flit_in.valid);
  // A packet addressed to this core carries exactly DEPTH payload flits.
  a_payload_len: assert property (@(posedge clk) disable iff (!rst_n)
    (state == R_LOAD && flit_in.valid && flit_in.tail) |-> (32'(pay_cnt) == DEPTH - 1));
  // No header in the middle of a packet.
  a_no_nested_head: assert property (@(posedge clk) disable iff (!rst_n)
    (state inside {R_LOAD, R_SKIP} && flit_in.valid) |-> !flit_in.head);

endmodule
