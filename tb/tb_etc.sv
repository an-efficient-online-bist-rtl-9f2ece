// tb_etc: self-checking testbench of the Embedded Test Core.
//
// Runs two test sessions (different budgets, gaps, seeds and core sets) and
// records every flit the ETC sends. The stream is checked against a
// reference built independently in the testbench: the multicast groups from
// a greedy budget rule, the packet order START, N x TEST, FLUSH per group,
// header type and mask, payload length and tail flags, TEST payloads equal to
// the LFSR sequence x^32 + x^22 + x^2 + x + 1 from the seed, zero FLUSH
// payloads, and headers exactly max(gap, DEPTH + 2) cycles apart. It also
// checks done and the group count, and that at least one group multicasts
// to more than one core.
module tb_etc;
  import bist_pkg::*;

  localparam int N = 4;
  localparam int L = 64;
  localparam int W = FLIT_W;
  localparam int D = L / W;

  logic clk = 1'b0;
  logic rst_n, start;
  logic [N-1:0] cfg_cores;
  logic [15:0]  cfg_num_vectors, cfg_gap;
  logic [31:0]  cfg_seed;
  logic [N-1:0][7:0] cfg_core_power;
  logic [9:0]   cfg_budget;
  flit_t        flit_out;
  logic         busy, done, over_budget;
  logic [N-1:0] group_mask;
  logic [9:0]   group_power;
  logic [7:0]   group_count;

  int checks = 0;
  int failures = 0;
  int multicasts = 0;

  etc #(.N_CORES(N), .CHAIN_LEN(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] lfsr_next(logic [31:0] s);
    logic [31:0] r;
    r = s << 1;
    if (s[31]) r = r ^ ((32'd1 << 22) | 32'd7);
    return r;
  endfunction

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // recorded stream
  flit_t rec[$];
  int    rec_t[$];
  int    cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (flit_out.valid) begin
      rec.push_back(flit_out);
      rec_t.push_back(cyc);
    end
  end

  task automatic session(logic [N-1:0] cores, int nvec, int gap, logic [31:0] seed,
                         int budget, int p0, int p1, int p2, int p3);
    logic [N-1:0] left, grp;
    int sum, idx, gap_eff, last_head, ngroups;
    logic [31:0] lfsr;
    int pw[N];
    pw = '{p0, p1, p2, p3};
    rec.delete(); rec_t.delete();
    @(negedge clk);
    cfg_cores = cores; cfg_num_vectors = 16'(nvec); cfg_gap = 16'(gap);
    cfg_seed = seed; cfg_budget = 10'(budget);
    for (int i = 0; i < N; i++) cfg_core_power[i] = 8'(pw[i]);
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    gap_eff = (gap < D + 2) ? D + 2 : gap;
    lfsr = (seed == 0) ? 32'd1 : seed;
    left = cores; idx = 0; last_head = -1; ngroups = 0;
    while (left != 0) begin
      bit first;
      grp = '0; sum = 0; first = 1;
      for (int i = 0; i < N; i++)
        if (left[i] && (first || sum + pw[i] <= budget)) begin
          grp[i] = 1; sum += pw[i]; first = 0;
        end
      left &= ~grp;
      ngroups++;
      if ($countones(grp) > 1) multicasts++;
      for (int p = 0; p < nvec + 2; p++) begin
        pkt_type_e t;
        t = (p == 0) ? PKT_START : (p == nvec + 1) ? PKT_FLUSH : PKT_TEST;
        if (idx >= rec.size()) begin
          failures++; $display("FAIL stream too short"); return;
        end
        expect_eq("head flag", rec[idx].head, 1);
        expect_eq("header", rec[idx].data, make_header(t, MAX_CORES'(grp)));
        expect_eq("start tail", rec[idx].tail, t == PKT_START);
        if (last_head >= 0) expect_eq("header spacing", rec_t[idx] - last_head, gap_eff);
        last_head = rec_t[idx];
        idx++;
        if (t != PKT_START) begin
          for (int k = 0; k < D; k++) begin
            expect_eq("payload head", rec[idx].head, 0);
            expect_eq("payload tail", rec[idx].tail, k == D - 1);
            expect_eq("payload back-to-back", rec_t[idx], last_head + 1 + k);
            if (t == PKT_TEST) begin
              expect_eq("pattern", rec[idx].data, lfsr[W-1:0]);
              lfsr = lfsr_next(lfsr);
            end else begin
              expect_eq("flush filler", rec[idx].data, 0);
            end
            idx++;
          end
        end
      end
    end
    expect_eq("flit count", rec.size(), idx);
    expect_eq("group count", group_count, ngroups);
    $display("session: %0d groups, %0d flits", ngroups, idx);
  endtask

  initial begin
    rst_n = 0; start = 0;
    cfg_cores = '0; cfg_num_vectors = '0; cfg_gap = '0; cfg_seed = '0;
    cfg_core_power = '0; cfg_budget = '0;
    #12 rst_n = 1;
    // gap below the minimum; budget 50 with weights 10,20,30,40 -> 3 groups
    session(4'b1111, 5, 2, 32'h1234_5678, 50, 10, 20, 30, 40);
    // wider gap, two cores, all in one group
    session(4'b0101, 3, 11, 32'hCAFE_0001, 500, 100, 100, 100, 100);
    // zero vectors: START and FLUSH only
    session(4'b0010, 0, 7, 32'h0, 10, 50, 50, 50, 50);
    expect_eq("over budget flagged", over_budget, 1);
    checks++;
    if (multicasts == 0) begin failures++; $display("FAIL no multicast group"); end
    $display("multicast groups %0d", multicasts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
