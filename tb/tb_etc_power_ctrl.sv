// tb_etc_power_ctrl: self-checking testbench of etc_power_ctrl.
//
// Applies directed and random pending masks, weights and budgets and
// compares the chosen group, its summed power and the over-budget flag with
// a reference: the lowest pending core is always chosen, then each further
// pending core in index order whose weight still fits under the budget.
// Also checks that repeated selection covers every pending core.
module tb_etc_power_ctrl;

  localparam int N = 4;

  logic [N-1:0]       pending, group;
  logic [N-1:0][7:0]  core_power;
  logic [9:0]         budget, group_power;
  logic               over_budget;

  int checks = 0;
  int failures = 0;

  etc_power_ctrl dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    logic [N-1:0] eg;
    int sum;
    bit eo, taken;
    eg = '0; sum = 0; eo = 0; taken = 0;
    for (int i = 0; i < N; i++) begin
      if (!pending[i]) continue;
      if (!taken) begin
        taken = 1; eg[i] = 1; sum = core_power[i]; eo = (sum > budget);
      end else if (sum + core_power[i] <= budget) begin
        eg[i] = 1; sum += core_power[i];
      end
    end
    #1;
    checks++;
    if (group !== eg || group_power !== 10'(sum) || over_budget !== eo) begin
      failures++;
      $display("FAIL pend=%b pw=%h bud=%0d: grp=%b/%b pow=%0d/%0d ov=%b/%b",
               pending, core_power, budget, group, eg, group_power, sum, over_budget, eo);
    end
  endtask

  initial begin
    // directed: weights 10,20,30,40 budget 50 -> {0,1} then {2} then {3}
    core_power = {8'd40, 8'd30, 8'd20, 8'd10};
    budget = 10'd50;
    pending = 4'b1111; check_one();
    checks++; if (group !== 4'b0011) begin failures++; $display("FAIL directed 1"); end
    pending = 4'b1100; check_one();
    checks++; if (group !== 4'b0100) begin failures++; $display("FAIL directed 2"); end
    // single core over budget is still taken
    budget = 10'd5; pending = 4'b1000; check_one();
    checks++; if (group !== 4'b1000 || !over_budget) begin failures++; $display("FAIL directed 3"); end
    pending = 4'b0000; check_one();
    for (int t = 0; t < 2000; t++) begin
      logic [N-1:0] left;
      int rounds;
      for (int i = 0; i < N; i++) core_power[i] = 8'($urandom);
      budget  = 10'($urandom % 700);
      left    = 4'($urandom);
      rounds  = 0;
      while (left != 0 && rounds < 8) begin
        pending = left;
        check_one();
        left &= ~group;
        rounds++;
      end
      checks++;
      if (left != 0) begin failures++; $display("FAIL cores never selected"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
