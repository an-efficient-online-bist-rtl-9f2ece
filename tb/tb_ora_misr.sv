// tb_ora_misr: self-checking testbench of ora_misr.
//
// Feeds random input words with random enables and clears, and compares the
// signature every cycle with a bit-serial reference: multiplying the
// signature polynomial by x modulo x^16 + x^12 + x^5 + 1 is done tap by tap
// (bits 0, 5 and 12 receive the bit that leaves the top), then the input
// word is added.
module tb_ora_misr;

  logic clk = 1'b0;
  logic rst_n, clear, en;
  logic [15:0] din, signature;

  int checks = 0;
  int failures = 0;

  ora_misr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_step(logic [15:0] s, logic [15:0] d);
    logic [15:0] r;
    logic top;
    top = s[15];
    for (int i = 15; i > 0; i--) r[i] = s[i-1];
    r[0] = 1'b0;
    if (top) begin
      r[0]  = ~r[0];
      r[5]  = ~r[5];
      r[12] = ~r[12];
    end
    return r ^ d;
  endfunction

  logic [15:0] model;

  initial begin
    rst_n = 1'b0; clear = 0; en = 0; din = '0;
    model = '0;
    #12 rst_n = 1'b1;
    // known value: one input of 1 followed by 16 zero steps equals x^16 mod p = 0x1021
    @(negedge clk); en = 1; din = 16'h0001;
    @(negedge clk); din = 16'h0000;
    repeat (16) @(negedge clk);
    checks++;
    if (signature !== 16'h1021) begin
      failures++; $display("FAIL x^16 mod p: %h", signature);
    end
    en = 0;
    model = signature;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clear = ($urandom % 50) == 0;
      en    = ($urandom % 4) != 0;
      din   = 16'($urandom);
      @(posedge clk);
      if (clear) model = '0;
      else if (en) model = ref_step(model, din);
      #1;
      checks++;
      if (signature !== model) begin
        failures++; $display("FAIL step %0d: sig=%h exp=%h", i, signature, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
