// etc_power_ctrl: test power control of the Embedded Test Core.
//
// Chooses the next group of cores to be tested together (one multicast
// group). Every core has a test power weight, the power one applied test
// vector costs it; the group's summed weight must stay within budget. The
// choice is greedy in core index order: each pending core is added if it
// still fits. The lowest pending core is always taken, even alone over the
// budget (over_budget is then raised), so that every core is tested.
//
// Because the ETC sends the group one vector per fixed packet interval, the
// group weight over that interval is the average test power; the ETC thus
// keeps average test power within budget centrally. That the ETC controls
// average test power centrally follows the architecture; weights, budget and
// the greedy grouping are this design's choices.
//
// Timing: purely combinational.
module etc_power_ctrl #(
  parameter int unsigned N_CORES = 4,
  parameter int unsigned PW_W    = 8,   // bits of one core's power weight
  parameter int unsigned BUD_W   = 10   // bits of the budget and the group sum
) (
  input  logic [N_CORES-1:0]           pending,
  input  logic [N_CORES-1:0][PW_W-1:0] core_power,
  input  logic [BUD_W-1:0]             budget,
  output logic [N_CORES-1:0]           group,
  output logic [BUD_W-1:0]             group_power,
  output logic                         over_budget
);

  initial begin
    assert (BUD_W > PW_W) else $error("etc_power_ctrl: BUD_W must exceed PW_W");
  end

  always_comb begin
    logic [BUD_W:0] acc;
    logic [BUD_W:0] trial;
    logic           first;
    group       = '0;
    acc         = '0;
    first       = 1'b1;
    over_budget = 1'b0;
    for (int i = 0; i < N_CORES; i++) begin
      trial = acc + (BUD_W+1)'(core_power[i]);
      if (pending[i]) begin
        if (first) begin
          group[i]    = 1'b1;
          acc         = trial;
          first       = 1'b0;
          over_budget = (trial > (BUD_W+1)'(budget));
        end else if (trial <= (BUD_W+1)'(budget)) begin
          group[i] = 1'b1;
          acc      = trial;
        end
      end
    end
    group_power = acc[BUD_W-1:0];
  end

endmodule
