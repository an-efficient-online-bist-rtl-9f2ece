// tb_etc_pattern_gen: self-checking testbench of etc_pattern_gen.
//
// Checks the seed load (including the zero-seed guard) and compares every
// step with a Fibonacci-free reference that shifts the state by one and adds
// the taps x^22, x^2, x and 1 bit by bit when the top bit leaves. Also checks
// that 100000 steps from seed 1 do not return to the seed (a short cycle
// would show a wrong polynomial).
module tb_etc_pattern_gen;

  logic clk = 1'b0;
  logic rst_n, load_seed, step;
  logic [31:0] seed;
  logic [15:0] pattern;

  int checks = 0;
  int failures = 0;

  etc_pattern_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_next(logic [31:0] s);
    logic [31:0] r;
    r = s << 1;
    if (s[31]) begin
      r[22] = ~r[22];
      r[2]  = ~r[2];
      r[1]  = ~r[1];
      r[0]  = ~r[0];
    end
    return r;
  endfunction

  logic [31:0] model;
  bit returned;

  initial begin
    rst_n = 1'b0; load_seed = 0; step = 0; seed = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (pattern !== 16'h0001) begin failures++; $display("FAIL reset state"); end
    load_seed = 1; seed = 32'h0;
    @(negedge clk);
    checks++;
    if (pattern !== 16'h0001) begin failures++; $display("FAIL zero seed guard"); end
    seed = 32'hDEAD_BEEF;
    @(negedge clk);
    load_seed = 0;
    model = 32'hDEAD_BEEF;
    checks++;
    if (pattern !== 16'hBEEF) begin failures++; $display("FAIL seed load"); end
    for (int i = 0; i < 2000; i++) begin
      step = ($urandom % 3) != 0;
      @(negedge clk);
      if (step) model = ref_next(model);
      checks++;
      if (pattern !== model[15:0]) begin
        failures++; $display("FAIL step %0d: %h exp %h", i, pattern, model[15:0]);
      end
    end
    // period check on the reference-matched generator
    load_seed = 1; seed = 32'd1; @(negedge clk); load_seed = 0;
    step = 1;
    model = 32'd1;
    returned = 0;
    for (int i = 0; i < 100000; i++) begin
      @(negedge clk);
      model = ref_next(model);
      if (model == 32'd1) returned = 1;
    end
    checks++;
    if (returned || pattern !== model[15:0]) begin
      failures++; $display("FAIL long run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
