// dm_bitflip: bit-flipping function of the test pattern generator, the alternative
// to reseeding for turning a free-running LFSR sequence into deterministic test
// vectors.
//
// Instead of reloading the LFSR for every vector, the LFSR runs on and a small
// decoder watches its state: for each of N_ENTRIES entries, when the low MATCH_W bits
// of the state equal the entry's match value, the entry's flit bit is inverted. A
// pattern-embedding tool would choose the entries so that the flipped bits supply
// the care bits the pseudo-random sequence gets wrong. Purely combinational:
// flip_mask follows state in the same cycle.
//
// The source design names bit flipping as one of the two compression methods its DM
// generator can be built with, without details. The decoder structure is the usual
// one for bit-flipping BIST; the entries here come from a formula (entry e matches
// the low bits of xorshift(e) and flips bit (7e+3) mod FLIT_W), because the real
// entries depend on the core's ATPG patterns, which are not available.
module dm_bitflip #(
  parameter int unsigned LEN       = 64,
  parameter int unsigned FLIT_W    = 32,
  parameter int unsigned N_ENTRIES = 16,
  parameter int unsigned MATCH_W   = 12
) (
  input  logic [LEN-1:0]    state,
  output logic [FLIT_W-1:0] flip_mask
);

  function automatic logic [MATCH_W-1:0] match_of(int unsigned e);
    logic [31:0] x;
    x = 32'h2545_F491 ^ (e + 1);
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return MATCH_W'(x);
  endfunction

  always_comb begin
    flip_mask = '0;
    for (int unsigned e = 0; e < N_ENTRIES; e++)
      if (state[MATCH_W-1:0] == match_of(e))
        flip_mask[(7 * e + 3) % FLIT_W] = ~flip_mask[(7 * e + 3) % FLIT_W];
  end

endmodule
