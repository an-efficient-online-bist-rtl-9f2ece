// tb_core_test_wrapper: self-checking testbench of core_test_wrapper.
//
// The core logic is a fixed combinational function f of the CHAIN_LEN state
// bits (next[i] = s[i+1] ^ (s[i+5] & s[i+11]) ^ (i % 3 == 0), indices modulo
// CHAIN_LEN), closed around the wrapper. The testbench builds a stream of
// packets: a START, random TEST vectors and a FLUSH for this core, mixed with
// packets for other cores, random idle gaps and random func_en. Each cycle
// carries tags saying what the wrapper should do (shift, stall, clear),
// derived from the packets the testbench sent. A reference model of the
// functional state, the shadow chains and the MISR is advanced from those
// tags, and every cycle the testbench checks cell_q and core_stall; at the
// end it checks the signature, sig_valid and the number of applied vectors.
// The stall must come exactly one cycle after each TEST tail and last one
// cycle, so the stall count equals the vector count.
module tb_core_test_wrapper;
  import bist_pkg::*;

  localparam int L = 64;
  localparam int W = FLIT_W;
  localparam int D = L / W;
  localparam int ID = 1;

  logic clk = 1'b0;
  logic rst_n;
  flit_t flit_in;
  logic [L-1:0] func_d, cell_q;
  logic func_en, core_stall, sig_valid, test_active;
  logic [15:0] signature, vec_count;

  int checks = 0;
  int failures = 0;

  core_test_wrapper #(.CORE_ID(ID), .N_CORES(4), .CHAIN_LEN(L), .SIG_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [L-1:0] core_f(logic [L-1:0] s);
    logic [L-1:0] n;
    for (int i = 0; i < L; i++)
      n[i] = s[(i + 1) % L] ^ (s[(i + 5) % L] & s[(i + 11) % L]) ^ (i % 3 == 0);
    return n;
  endfunction

  function automatic logic [15:0] misr_step(logic [15:0] s, logic [15:0] d);
    return ({s[14:0], 1'b0} ^ (s[15] ? 16'h1021 : 16'h0)) ^ d;
  endfunction

  assign func_d = core_f(cell_q);

  typedef struct {
    flit_t f;
    bit    shift;
    bit    apply;
    bit    clear;
    bit    en;
  } cyc_t;

  cyc_t q[$];

  // reference model
  logic [L-1:0] ref_func, ref_shadow;
  logic [15:0]  ref_sig;
  int           exp_vectors = 0;
  int           stalls = 0;

  task automatic push_idle(int n, bit apply_first);
    cyc_t c;
    for (int i = 0; i < n; i++) begin
      c = '{f: '{valid: 0, head: 0, tail: 0, data: '0}, shift: 0,
            apply: (i == 0) && apply_first, clear: 0, en: ($urandom % 4) != 0};
      q.push_back(c);
    end
  endtask

  task automatic push_pkt(pkt_type_e t, logic [3:0] mask);
    cyc_t c;
    bit mine;
    mine = mask[ID];
    c = '{f: '{valid: 1, head: 1, tail: (t == PKT_START), data: make_header(t, MAX_CORES'(mask))},
          shift: 0, apply: 0, clear: mine && (t == PKT_START), en: ($urandom % 4) != 0};
    q.push_back(c);
    if (t != PKT_START) begin
      for (int k = 0; k < D; k++) begin
        c = '{f: '{valid: 1, head: 0, tail: (k == D - 1),
                   data: (t == PKT_TEST) ? W'($urandom) : '0},
              shift: mine, apply: 0, clear: 0, en: ($urandom % 4) != 0};
        q.push_back(c);
      end
    end
    if (t == PKT_TEST && mine) exp_vectors++;
    push_idle(1 + $urandom % 3, t == PKT_TEST && mine);
  endtask

  initial begin
    cyc_t c;
    rst_n = 1'b0;
    flit_in = '{valid: 0, head: 0, tail: 0, data: '0};
    func_en = 1'b0;
    ref_func = '0; ref_shadow = '0; ref_sig = '0;
    push_idle(3, 0);
    push_pkt(PKT_START, 4'b0010);
    push_pkt(PKT_START, 4'b0100);            // for another core
    for (int v = 0; v < 40; v++) begin
      logic [3:0] m;
      m = 4'($urandom);
      if (v % 4 == 0) m[ID] = 1'b1;
      push_pkt(PKT_TEST, m);
    end
    push_pkt(PKT_FLUSH, 4'b1000);            // other core's flush
    push_pkt(PKT_FLUSH, 4'b0010);
    push_idle(3, 0);
    #12 rst_n = 1'b1;
    while (q.size() > 0) begin
      @(negedge clk);
      c = q.pop_front();
      flit_in = c.f;
      func_en = c.en;
      #1;
      // combinational checks for this cycle
      checks++;
      if (core_stall !== c.apply) begin
        failures++; $display("FAIL stall=%b expected %b at %0t", core_stall, c.apply, $time);
      end
      checks++;
      if (cell_q !== (c.apply ? ref_shadow : ref_func)) begin
        failures++; $display("FAIL cell_q at %0t", $time);
      end
      if (core_stall) stalls++;
      @(posedge clk);
      // advance the reference
      if (c.apply) begin
        ref_shadow = core_f(ref_shadow);
      end else if (c.en) begin
        ref_func = core_f(ref_func);
      end
      if (c.clear) begin
        ref_shadow = '0; ref_sig = '0;
      end else if (c.shift) begin
        ref_sig    = misr_step(ref_sig, ref_shadow[L-1 -: W]);
        ref_shadow = {ref_shadow[L-W-1:0], c.f.data};
      end
    end
    @(negedge clk);
    checks++;
    if (signature !== ref_sig || !sig_valid) begin
      failures++; $display("FAIL signature %h exp %h valid %b", signature, ref_sig, sig_valid);
    end
    checks++;
    if (int'(vec_count) != exp_vectors || stalls != exp_vectors) begin
      failures++; $display("FAIL vectors %0d stalls %0d exp %0d", vec_count, stalls, exp_vectors);
    end
    $display("vectors applied %0d, stall cycles %0d, signature %h", exp_vectors, stalls, signature);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
