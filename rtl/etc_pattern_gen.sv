// etc_pattern_gen: test pattern source of the Embedded Test Core.
//
// A 32-bit maximal-length Galois LFSR (x^32 + x^22 + x^2 + x + 1) that supplies
// one flit of pseudo-random test data per step:
//   state' = {state[30:0], 0} ^ (state[31] ? 32'h0040_0007 : 0)
// pattern is the low OUT_W bits of the current state; step advances it.
// load_seed sets the state to seed (a zero seed is replaced by 1, since the
// all-zero state would lock the LFSR).
//
// The architecture names the ETC as the source of the test patterns but does
// not say how they are produced; a pseudo-random generator is this design's
// choice.
//
// Timing: registered on the rising edge of clk; load_seed has priority over
// step; active-low asynchronous reset to state 1.
module etc_pattern_gen #(
  parameter int unsigned OUT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_seed,
  input  logic [31:0]      seed,
  input  logic             step,
  output logic [OUT_W-1:0] pattern
);

  localparam logic [31:0] TAPS = 32'h0040_0007;

  logic [31:0] state;

  initial begin
    assert (OUT_W <= 32) else $error("etc_pattern_gen: OUT_W must not exceed 32");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         state <= 32'd1;
    else if (load_seed) state <= (seed == '0) ? 32'd1 : seed;
    else if (step)      state <= {state[30:0], 1'b0} ^ (state[31] ? TAPS : 32'd0);
  end

  assign pattern = state[OUT_W-1:0];

endmodule
