// ora_misr: output response analyzer of a core, a multiple-input signature
// register (MISR).
//
// Every cycle with en = 1 the signature is advanced one step of a Galois LFSR
// with feedback polynomial POLY (implicit x^WIDTH term) and the IN_W input
// bits are XORed into its low bits:
//   sig' = {sig[WIDTH-2:0], 0} ^ (sig[WIDTH-1] ? POLY : 0) ^ din
// clear (synchronous, priority over en) restarts the signature at zero.
//
// The architecture gives each core its own response analyzer so that only
// test vectors, not responses, cross the network; the MISR form, its width
// and polynomial (CRC-CCITT, x^16 + x^12 + x^5 + 1) are this design's choices.
//
// Timing: registered on the rising edge of clk, active-low asynchronous reset.
module ora_misr #(
  parameter int unsigned    WIDTH = 16,
  parameter int unsigned    IN_W  = 16,
  parameter logic [WIDTH-1:0] POLY = 16'h1021
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [IN_W-1:0]  din,
  output logic [WIDTH-1:0] signature
);

  initial begin
    assert (IN_W <= WIDTH) else $error("ora_misr: IN_W must not exceed WIDTH");
  end

  logic [WIDTH-1:0] next_sig;

  always_comb begin
    next_sig = {signature[WIDTH-2:0], 1'b0};
    if (signature[WIDTH-1]) next_sig = next_sig ^ POLY;
    next_sig[IN_W-1:0] = next_sig[IN_W-1:0] ^ din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     signature <= '0;
    else if (clear) signature <= '0;
    else if (en)    signature <= next_sig;
  end

endmodule
