// etc: Embedded Test Core, the on-chip test source.
//
// After start, the ETC tests every core selected in cfg_cores. It walks
// through them group by group; etc_power_ctrl picks each group so that the
// summed test power of its cores stays within cfg_budget. Every packet is
// multicast: one header addresses the whole group, so one copy of each
// vector crosses the ETC's network link however many cores it tests. For
// each group the ETC sends
//   PKT_START                       (clear shadow chains and signatures)
//   cfg_num_vectors x PKT_TEST       (header + DEPTH flits of LFSR pattern)
//   PKT_FLUSH                       (header + DEPTH zero flits)
// and then moves to the next group; done is raised when none is left.
//
// Flow control is static: packet headers leave exactly gap_eff cycles apart
// (also from one group's FLUSH to the next group's START),
// gap_eff = max(cfg_gap, DEPTH + 2), with no feedback from the network or the
// cores (DEPTH + 2 leaves room for the header, the payload and the cores'
// stall cycle). With one vector per gap_eff cycles, a group's average test
// power is its summed weight over gap_eff cycles, which is what cfg_budget
// and cfg_gap together bound.
//
// Multicasting, static flow control and central average-power control
// follow the architecture; packet formats, the pseudo-random source, the
// grouping rule and the sequencing are this design's own choices.
//
// Timing: start is sampled in idle; the first header appears two cycles
// later. The configuration inputs must stay stable while busy.
module etc
  import bist_pkg::*;
#(
  parameter int unsigned N_CORES   = 4,
  parameter int unsigned CHAIN_LEN = 64,
  parameter int unsigned PW_W      = 8,
  parameter int unsigned BUD_W     = 10
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // configuration and control
  input  logic                         start,
  input  logic [N_CORES-1:0]           cfg_cores,
  input  logic [15:0]                  cfg_num_vectors,
  input  logic [15:0]                  cfg_gap,
  input  logic [31:0]                  cfg_seed,
  input  logic [N_CORES-1:0][PW_W-1:0] cfg_core_power,
  input  logic [BUD_W-1:0]             cfg_budget,
  // towards the network
  output flit_t                        flit_out,
  // status
  output logic                         busy,
  output logic                         done,
  output logic [N_CORES-1:0]           group_mask,
  output logic [BUD_W-1:0]             group_power,
  output logic                         over_budget,
  output logic [7:0]                   group_count
);

  localparam int unsigned DEPTH   = CHAIN_LEN / FLIT_W;
  localparam int unsigned MIN_GAP = DEPTH + 2;

  initial begin
    assert (CHAIN_LEN % FLIT_W == 0 && DEPTH >= 1)
      else $error("etc: CHAIN_LEN must be a multiple of FLIT_W");
    assert (N_CORES <= MAX_CORES) else $error("etc: too many cores for the header mask");
  end

  typedef enum logic [2:0] {E_IDLE, E_GROUP, E_HDR, E_PAY, E_GAP} etc_state_e;

  etc_state_e        state;
  pkt_type_e         pkt;
  logic [N_CORES-1:0] pending;
  logic [15:0]       vec_idx;
  logic [15:0]       timer;
  logic [$clog2(DEPTH+1)-1:0] flit_idx;
  logic [15:0]       gap_eff;

  assign gap_eff = (cfg_gap < 16'(MIN_GAP)) ? 16'(MIN_GAP) : cfg_gap;

  // ---- power control -----------------------------------------------------
  logic [N_CORES-1:0] sel_group;
  logic [BUD_W-1:0]   sel_power;
  logic               sel_over;

  etc_power_ctrl #(.N_CORES(N_CORES), .PW_W(PW_W), .BUD_W(BUD_W)) u_power (
    .pending     (pending),
    .core_power  (cfg_core_power),
    .budget      (cfg_budget),
    .group       (sel_group),
    .group_power (sel_power),
    .over_budget (sel_over)
  );

  // ---- pattern source ----------------------------------------------------
  logic [FLIT_W-1:0] pattern;
  logic              pat_step;

  assign pat_step = (state == E_PAY) && (pkt == PKT_TEST);

  etc_pattern_gen #(.OUT_W(FLIT_W)) u_pattern (
    .clk       (clk),
    .rst_n     (rst_n),
    .load_seed (state == E_IDLE && start),
    .seed      (cfg_seed),
    .step      (pat_step),
    .pattern   (pattern)
  );

  // ---- flit output ---------------------------------------------------------
  always_comb begin
    flit_out = FLIT_IDLE;
    if (state == E_HDR) begin
      flit_out.valid = 1'b1;
      flit_out.head  = 1'b1;
      flit_out.tail  = (pkt == PKT_START);
      flit_out.data  = make_header(pkt, MAX_CORES'(group_mask));
    end else if (state == E_PAY) begin
      flit_out.valid = 1'b1;
      flit_out.tail  = (32'(flit_idx) == DEPTH - 1);
      flit_out.data  = (pkt == PKT_TEST) ? pattern : '0;
    end
  end

  assign busy = (state != E_IDLE);

  // ---- sequencer -----------------------------------------------------------
  // Take the group etc_power_ctrl selects and send its START header next.
  task automatic open_group();
    group_mask  <= sel_group;
    group_power <= sel_power;
    over_budget <= sel_over;
    pending     <= pending & ~sel_group;
    group_count <= group_count + 1'b1;
    pkt         <= PKT_START;
    vec_idx     <= '0;
    state       <= E_HDR;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= E_IDLE;
      pkt         <= PKT_START;
      pending     <= '0;
      vec_idx     <= '0;
      timer       <= '0;
      flit_idx    <= '0;
      done        <= 1'b0;
      group_mask  <= '0;
      group_power <= '0;
      over_budget <= 1'b0;
      group_count <= '0;
    end else begin
      unique case (state)
        E_IDLE: if (start) begin
          pending     <= cfg_cores;
          done        <= 1'b0;
          group_count <= '0;
          group_mask  <= '0;
          state       <= E_GROUP;
        end
        E_GROUP: begin
          if (pending == '0) begin
            done  <= 1'b1;
            state <= E_IDLE;
          end else begin
            open_group();
          end
        end
        E_HDR: begin
          timer    <= 16'd1;
          flit_idx <= '0;
          state    <= (pkt == PKT_START) ? E_GAP : E_PAY;
        end
        E_PAY: begin
          timer    <= timer + 1'b1;
          flit_idx <= flit_idx + 1'b1;
          if (32'(flit_idx) == DEPTH - 1) state <= E_GAP;
        end
        E_GAP: begin
          timer <= timer + 1'b1;
          if (timer >= gap_eff - 16'd1) begin
            unique case (pkt)
              PKT_START: begin
                pkt   <= (cfg_num_vectors == '0) ? PKT_FLUSH : PKT_TEST;
                state <= E_HDR;
              end
              PKT_TEST: begin
                vec_idx <= vec_idx + 1'b1;
                pkt     <= (vec_idx + 16'd1 >= cfg_num_vectors) ? PKT_FLUSH : PKT_TEST;
                state   <= E_HDR;
              end
              default: begin  // PKT_FLUSH: group finished, start the next one
                if (pending == '0) begin
                  done  <= 1'b1;
                  state <= E_IDLE;
                end else begin
                  open_group();
                end
              end
            endcase
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end

endmodule
