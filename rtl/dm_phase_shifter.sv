// dm_phase_shifter: XOR network that turns the LFSR state into one 32-bit test flit,
// one bit per scan chain.
//
// Adjacent scan chains fed straight from adjacent LFSR stages would receive shifted
// copies of the same sequence; the phase shifter breaks that correlation by making
// every output the XOR of three different LFSR stages. Output bit i is
//   state[i mod LEN] ^ state[(3i+7) mod LEN] ^ state[(5i+14) mod LEN]
// (the tap formula is this design's choice; the source design only names the phase
// shifter and says it organises the vectors into 32-bit flits). Purely combinational.
module dm_phase_shifter #(
  parameter int unsigned LEN   = 64,
  parameter int unsigned OUT_W = 32
) (
  input  logic [LEN-1:0]   state,
  output logic [OUT_W-1:0] flit
);

  for (genvar i = 0; i < OUT_W; i++) begin : g_bit
    localparam int unsigned A = i % LEN;
    localparam int unsigned B = (3 * i + 7) % LEN;
    localparam int unsigned C = (5 * i + 14) % LEN;
    assign flit[i] = state[A] ^ state[B] ^ state[C];
  end

endmodule
