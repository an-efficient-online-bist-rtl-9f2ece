// noc_model: behavioural stand-in for the network that carries test packets
// from the ETC to the cores (simulation only).
//
// Each core i receives the ETC's flit stream after a fixed latency of
// BASE_LAT + i cycles, as if the cores sat at growing hop distances. With
// broadcast = 0 the model is a multicast network: a packet reaches only the
// cores in its header's destination mask. With broadcast = 1 every core sees
// every packet and must skip those not addressed to it. Packets are never
// dropped, reordered or stretched, which is what the ETC's static flow
// control relies on.
module noc_model
  import bist_pkg::*;
#(
  parameter int unsigned N_CORES  = 4,
  parameter int unsigned BASE_LAT = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 broadcast,
  input  flit_t                from_etc,
  output flit_t [N_CORES-1:0]  to_core
);

  localparam int unsigned MAX_LAT = BASE_LAT + N_CORES;

  flit_t              pipe [MAX_LAT];
  logic [N_CORES-1:0] pass_q [MAX_LAT];
  logic [N_CORES-1:0] route;      // cores the current packet goes to
  logic [N_CORES-1:0] pass_now;

  always_comb begin
    if (from_etc.valid && from_etc.head)
      pass_now = broadcast ? '1 : from_etc.data[N_CORES-1:0];
    else
      pass_now = broadcast ? '1 : route;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      route <= '0;
      for (int s = 0; s < MAX_LAT; s++) begin
        pipe[s]   <= '{valid: 1'b0, head: 1'b0, tail: 1'b0, data: '0};
        pass_q[s] <= '0;
      end
    end else begin
      if (from_etc.valid && from_etc.head) route <= from_etc.data[N_CORES-1:0];
      pipe[0]   <= from_etc;
      pass_q[0] <= pass_now;
      for (int s = 1; s < MAX_LAT; s++) begin
        pipe[s]   <= pipe[s-1];
        pass_q[s] <= pass_q[s-1];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N_CORES; i++) begin
      to_core[i] = pipe[BASE_LAT + i - 1];
      if (!pass_q[BASE_LAT + i - 1][i]) to_core[i].valid = 1'b0;
    end
  end

endmodule
