// tb_bist_scan_cell: self-checking testbench of bist_scan_cell.
//
// Drives random functional data, enables, shifts, clears and apply cycles,
// and compares cell_q and scan_out every cycle with a reference model of
// the cell kept in the testbench: the functional bit updates only when
// enabled and not in an apply cycle, the shadow bit shifts, clears or
// captures func_d during apply, and cell_q shows the shadow bit only in the
// apply cycle. A directed sequence also checks that an apply cycle leaves
// the functional state unchanged.
module tb_bist_scan_cell;

  logic clk = 1'b0;
  logic rst_n;
  logic func_d, func_en, clear, shift_en, scan_in, apply;
  logic cell_q, scan_out;

  int checks = 0;
  int failures = 0;

  bist_scan_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic ref_func, ref_shadow;

  task automatic check(string what);
    logic exp_q;
    exp_q = apply ? ref_shadow : ref_func;
    checks++;
    if (cell_q !== exp_q || scan_out !== ref_shadow) begin
      failures++;
      $display("FAIL %s: cell_q=%b exp=%b scan_out=%b exp=%b", what, cell_q, exp_q,
               scan_out, ref_shadow);
    end
  endtask

  task automatic step();
    logic nf, ns;
    nf = (func_en && !apply) ? func_d : ref_func;
    ns = clear ? 1'b0 : shift_en ? scan_in : apply ? func_d : ref_shadow;
    @(posedge clk);
    ref_func   = nf;
    ref_shadow = ns;
    #1;
  endtask

  initial begin
    {func_d, func_en, clear, shift_en, scan_in, apply} = '0;
    rst_n = 1'b0;
    ref_func = 1'b0;
    ref_shadow = 1'b0;
    #12 rst_n = 1'b1;
    @(posedge clk); #1;
    check("after reset");

    // directed: load functional 1, shadow 0; apply must show 0 and keep func 1
    func_en = 1; func_d = 1; step(); check("func load");
    func_en = 1; func_d = 0; shift_en = 1; scan_in = 0; step(); // func 0
    func_d = 1; step();                                          // func 1, shadow 0
    shift_en = 0; func_d = 0; apply = 1; #1; check("apply shows shadow");
    if (cell_q !== 1'b0) begin failures++; $display("FAIL apply value"); end
    checks++;
    step();                                   // shadow captures func_d = 0, func holds 1
    apply = 0; func_en = 0; #1; check("after apply");
    if (cell_q !== 1'b1) begin failures++; $display("FAIL functional state lost"); end
    checks++;

    // random
    for (int i = 0; i < 3000; i++) begin
      func_d   = 1'($urandom);
      func_en  = ($urandom % 4) != 0;
      clear    = ($urandom % 16) == 0;
      shift_en = ($urandom % 2) == 0;
      scan_in  = 1'($urandom);
      apply    = ($urandom % 5) == 0;
      #1 check("random comb");
      step();
      check("random seq");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
