// tb_bist_noc_top: end-to-end testbench of the online scan-BIST system at its
// default size (4 cores, 64 scan cells each, 16-bit flits and signatures).
//
// The top is closed with a behavioural network (noc_model) and with the
// cores' combinational logic, a fixed function f of each core's 64 state
// bits that differs per core by a constant. While the ETC tests, every core
// keeps running with random func_en: each cycle the testbench checks that a
// core that is not stalled shows exactly the functional state a
// never-tested copy of the core would have, so testing costs it only the
// stall cycles. Stalls must be single cycles, one per vector.
//
// For every session an independent reference rebuilds the multicast groups
// from the power budget, the LFSR vectors from the seed, and each core's
// shadow-chain and MISR contents, and the expected signature is compared
// with the core's signature once sig_valid rises.
//
// Sessions: (1) all cores, budget splitting them into three groups, gap below
// the minimum, multicast network; (2) three cores in one multicast group over
// a broadcasting network, so the fourth core must skip their packets;
// (3) cores whose weight alone exceeds the budget. Each mechanism (stall,
// multicast, budget split, skip, over-budget group, flush, gap clamp) is
// counted and must occur.
module tb_bist_noc_top;
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
  logic         etc_busy, etc_done, etc_over_budget;
  logic [N-1:0] etc_group_mask;
  logic [9:0]   etc_group_power;
  logic [7:0]   etc_group_count;
  flit_t        etc_flit_out;
  flit_t [N-1:0] core_flit_in;
  logic [N-1:0][L-1:0] core_func_d, core_cell_q;
  logic [N-1:0] core_func_en, core_stall, core_sig_valid, core_test_active;
  logic [N-1:0][15:0] core_signature, core_vec_count;
  logic         broadcast;

  int checks = 0;
  int failures = 0;

  bist_noc_top dut (.*);

  noc_model #(.N_CORES(N)) u_noc (
    .clk (clk), .rst_n (rst_n), .broadcast (broadcast),
    .from_etc (etc_flit_out), .to_core (core_flit_in)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- core logic ---------------------------------------------------------
  function automatic logic [L-1:0] core_f(int id, logic [L-1:0] s);
    logic [L-1:0] n;
    for (int i = 0; i < L; i++)
      n[i] = s[(i + 1) % L] ^ (s[(i + 5 + id) % L] & s[(i + 11) % L]) ^ (i % (3 + id) == 0);
    return n;
  endfunction

  always_comb
    for (int c = 0; c < N; c++) core_func_d[c] = core_f(c, core_cell_q[c]);

  // ---- online operation check -------------------------------------------
  logic [L-1:0] shadow_func [N];
  logic [N-1:0] stall_prev;
  int stall_cycles [N];
  int n_stall = 0, n_double = 0, n_skip = 0;

  always @(negedge clk) if (rst_n) begin
    core_func_en <= N'($urandom);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < N; c++) begin
        shadow_func[c] = '0;
        stall_cycles[c] = 0;
      end
      stall_prev = '0;
    end else begin
      for (int c = 0; c < N; c++) begin
        if (core_stall[c]) begin
          stall_cycles[c]++;
          n_stall++;
          if (stall_prev[c]) begin
            n_double++; failures++;
            $display("FAIL core %0d stalled two cycles in a row", c);
          end
        end else begin
          checks++;
          if (core_cell_q[c] !== shadow_func[c]) begin
            failures++;
            $display("FAIL core %0d functional state disturbed at %0t", c, $time);
          end
          if (core_func_en[c]) shadow_func[c] = core_f(c, shadow_func[c]);
        end
      end
      stall_prev = core_stall;
    end
  end

  // packets seen by a core that are not addressed to it
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < N; c++)
      if (core_flit_in[c].valid && core_flit_in[c].head && !core_flit_in[c].data[c]) n_skip++;

  // ---- reference -------------------------------------------------------------
  function automatic logic [15:0] misr_step(logic [15:0] s, logic [15:0] d);
    return ({s[14:0], 1'b0} ^ (s[15] ? 16'h1021 : 16'h0)) ^ d;
  endfunction

  function automatic logic [31:0] lfsr_next(logic [31:0] s);
    logic [31:0] r;
    r = s << 1;
    if (s[31]) r = r ^ ((32'd1 << 22) | 32'd7);
    return r;
  endfunction

  int n_multicast = 0, n_split = 0, n_over = 0, n_flush = 0, n_clamp = 0;

  task automatic session(logic [N-1:0] cores, int nvec, int gap, logic [31:0] seed,
                         int budget, int pw0, int pw1, int pw2, int pw3, bit bcast);
    int pw[N];
    logic [N-1:0] left, grp;
    logic [31:0] lfsr;
    logic [15:0] exp_sig [N];
    int base_stalls [N];
    int ngroups, sum, t0, cycles;
    pw = '{pw0, pw1, pw2, pw3};
    for (int c = 0; c < N; c++) base_stalls[c] = stall_cycles[c];
    // reference signatures
    lfsr = (seed == 0) ? 32'd1 : seed;
    left = cores; ngroups = 0;
    while (left != 0) begin
      logic [L-1:0] sh;
      logic [15:0]  sg;
      bit first;
      logic [L-1:0] vecs [$];
      grp = '0; sum = 0; first = 1;
      for (int i = 0; i < N; i++)
        if (left[i] && (first || sum + pw[i] <= budget)) begin
          grp[i] = 1; sum += pw[i]; first = 0;
        end
      if (sum > budget) n_over++;
      if ($countones(grp) > 1) n_multicast++;
      left &= ~grp;
      ngroups++;
      for (int v = 0; v < nvec; v++) begin
        logic [L-1:0] vec;
        for (int k = 0; k < D; k++) begin
          vec[(D - 1 - k) * W +: W] = lfsr[W-1:0];
          lfsr = lfsr_next(lfsr);
        end
        vecs.push_back(vec);
      end
      for (int c = 0; c < N; c++) if (grp[c]) begin
        sh = '0; sg = '0;
        for (int v = 0; v <= nvec; v++) begin
          for (int k = 0; k < D; k++) sg = misr_step(sg, sh[L - 1 - k * W -: W]);
          if (v < nvec) sh = core_f(c, vecs[v]);
        end
        exp_sig[c] = sg;
      end
    end
    if (ngroups > 1) n_split++;
    if (gap < D + 2) n_clamp++;
    // run
    @(negedge clk);
    broadcast = bcast;
    cfg_cores = cores; cfg_num_vectors = 16'(nvec); cfg_gap = 16'(gap);
    cfg_seed = seed; cfg_budget = 10'(budget);
    for (int i = 0; i < N; i++) cfg_core_power[i] = 8'(pw[i]);
    start = 1;
    t0 = $time;
    @(negedge clk);
    start = 0;
    wait (etc_done);
    repeat (N + 4) @(negedge clk);
    cycles = ($time - t0) / 10;
    for (int c = 0; c < N; c++) if (cores[c]) begin
      checks++;
      if (!core_sig_valid[c] || core_signature[c] !== exp_sig[c]) begin
        failures++;
        $display("FAIL core %0d signature %h expected %h (valid %b)", c, core_signature[c],
                 exp_sig[c], core_sig_valid[c]);
      end else n_flush++;
      checks++;
      if (stall_cycles[c] - base_stalls[c] != nvec || int'(core_vec_count[c]) != nvec) begin
        failures++;
        $display("FAIL core %0d stalls %0d vectors %0d expected %0d", c,
                 stall_cycles[c] - base_stalls[c], core_vec_count[c], nvec);
      end
    end else begin
      checks++;
      if (stall_cycles[c] != base_stalls[c]) begin
        failures++; $display("FAIL untested core %0d stalled", c);
      end
    end
    checks++;
    if (int'(etc_group_count) != ngroups) begin
      failures++; $display("FAIL group count %0d expected %0d", etc_group_count, ngroups);
    end
    // static schedule: (nvec + 2) packets per group, max(gap, D+2) cycles apart
    checks++;
    if (cycles < ngroups * (nvec + 2) * ((gap < D + 2) ? D + 2 : gap)) begin
      failures++; $display("FAIL session too short: %0d cycles", cycles);
    end
    $display("session cores=%b vectors=%0d groups=%0d cycles=%0d", cores, nvec, ngroups, cycles);
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  initial begin
    rst_n = 0; start = 0; broadcast = 0;
    cfg_cores = '0; cfg_num_vectors = '0; cfg_gap = '0; cfg_seed = '0;
    cfg_core_power = '0; cfg_budget = '0;
    #12 rst_n = 1;
    session(4'b1111, 20, 2, 32'h1357_9BDF, 50, 10, 20, 30, 40, 0);
    session(4'b1011, 12, 9, 32'hA5A5_0F0F, 1000, 40, 40, 40, 40, 1);
    session(4'b0110, 6, 6, 32'h0000_0042, 100, 10, 150, 150, 10, 0);
    $display("mechanisms:");
    need("stall cycles", n_stall);
    need("multicast groups", n_multicast);
    need("sessions split by budget", n_split);
    need("over-budget single cores", n_over);
    need("foreign packets skipped", n_skip);
    need("signatures closed by flush", n_flush);
    need("gap clamped to minimum", n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
