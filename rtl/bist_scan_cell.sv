// bist_scan_cell: scan cell for online testing with a single stall cycle.
//
// Replaces one state flip-flop of a logic core. Besides the functional
// flip-flop (func_q) it holds a shadow test bit. The shadow bits of many cells
// form scan chains that are shifted (shift_en) while the core keeps running,
// so a test vector is loaded with no cost to normal operation. Applying the
// vector takes one clock cycle (apply = 1, the core's stall cycle):
//   * cell_q, the value the core's combinational logic sees, switches from
//     the functional state to the shadow bit (the test vector);
//   * at the end of that cycle the shadow bit captures func_d, the response
//     of the core logic to the test vector;
//   * the functional flip-flop holds its value, so after the stall cycle the
//     core resumes exactly where it left off.
// The captured response is shifted out towards the signature analyzer while
// the next vector is shifted in.
//
// The one-cycle apply-and-capture with normal operation preserved follows
// the architecture's description; the mux-plus-shadow structure, the
// priorities (clear > shift > capture) and the reset to zero are this
// design's own choices.
//
// Timing: all registers update on the rising edge of clk; rst_n is an
// active-low asynchronous reset. cell_q is combinational from apply.
module bist_scan_cell (
  input  logic clk,
  input  logic rst_n,
  // functional side
  input  logic func_d,    // next-state value from the core logic
  input  logic func_en,   // the core's own enable for this flip-flop
  output logic cell_q,    // value driven into the core logic
  // test side
  input  logic clear,     // zero the shadow bit
  input  logic shift_en,  // shift the shadow chain by one position
  input  logic scan_in,
  output logic scan_out,
  input  logic apply      // the stall cycle: apply shadow bit, capture response
);

  logic func_q;
  logic shadow_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 func_q <= 1'b0;
    else if (func_en && !apply) func_q <= func_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        shadow_q <= 1'b0;
    else if (clear)    shadow_q <= 1'b0;
    else if (shift_en) shadow_q <= scan_in;
    else if (apply)    shadow_q <= func_d;
  end

  assign cell_q   = apply ? shadow_q : func_q;
  assign scan_out = shadow_q;

endmodule
