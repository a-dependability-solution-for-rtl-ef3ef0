// dm_lfsr: reseedable linear feedback shift register of the DM's test pattern
// generator.
//
// A Fibonacci LFSR of LEN bits that steps once per cycle while `step` is high. When
// `load` is high the state is replaced by `seed` instead (reseeding): the DM loads one
// seed per test vector, so each vector is the deterministic expansion of its seed.
// Load wins over step. The source design says the TPG uses an LFSR with reseeding and
// that its length is a design choice; the length (64) and the feedback polynomial
// x^64 + x^63 + x^61 + x^60 + 1 (maximal length) are this design's choices.
// Timing: the new state is visible on `state` one cycle after `load` or `step`.
module dm_lfsr #(
  parameter int unsigned LEN = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [LEN-1:0] seed,
  input  logic           step,
  output logic [LEN-1:0] state
);

  // Feedback taps (1-based exponents of the polynomial); for lengths other than 64 a
  // maximal-length tap set from the standard table is used where known.
  function automatic logic [LEN-1:0] tap_mask();
    logic [LEN-1:0] m;
    m = '0;
    case (LEN)
      8:       begin m[7] = 1'b1; m[5] = 1'b1; m[4] = 1'b1; m[3] = 1'b1; end
      16:      begin m[15] = 1'b1; m[14] = 1'b1; m[12] = 1'b1; m[3] = 1'b1; end
      32:      begin m[31] = 1'b1; m[21] = 1'b1; m[1] = 1'b1; m[0] = 1'b1; end
      default: begin m[LEN-1] = 1'b1; m[LEN-2] = 1'b1; m[LEN-4] = 1'b1; m[LEN-5] = 1'b1; end
    endcase
    return m;
  endfunction

  localparam logic [LEN-1:0] TAPS = tap_mask();

  logic fb;
  assign fb = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= {{(LEN-1){1'b0}}, 1'b1};
    else if (load) state <= seed;
    else if (step) state <= {state[LEN-2:0], fb};
  end

endmodule
