// dm_tre: Test Response Evaluator of the Dependability Manager.
//
// The tiles under test are identical and receive identical stimuli, so a fault-free
// tile returns exactly the responses its fault-free peers return. The TRE therefore
// needs no stored reference responses and no signature register: for every response
// flit it forms the bitwise majority of the N tiles and flags each tile whose flit
// differs from it. Flags are sticky until `clear`. Under the assumption that at most
// one tile became faulty since the previous test, at most one flag can be set; two or
// more set flags mean the vote could not single out the faulty tile (`no_majority`).
//
// Interface: the N responses arrive in lockstep (one `valid` for all) and are only
// evaluated while `check` is high. `dut_fault` and `no_majority` reflect a flit one
// cycle after it is presented. Majority voting and the single-faulty-tile assumption
// follow the source design; lockstep arrival is this design's choice (the tiles are
// wired straight to the DM, see the top level).
module dm_tre #(
  parameter int unsigned N      = 3,     // tiles compared per test
  parameter int unsigned FLIT_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              valid,
  input  logic              check,
  input  logic [FLIT_W-1:0] resp [N],
  output logic [N-1:0]      dut_fault,
  output logic              no_majority
);

  logic [FLIT_W-1:0] maj;
  logic [N-1:0]      differs;

  // Bitwise majority: a bit is 1 when more than half of the tiles return 1.
  always_comb begin
    for (int b = 0; b < FLIT_W; b++) begin
      int unsigned ones;
      ones = 0;
      for (int t = 0; t < N; t++) ones += int'(resp[t][b]);
      maj[b] = (ones > N / 2);
    end
    for (int t = 0; t < N; t++) differs[t] = (resp[t] != maj);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                dut_fault <= '0;
    else if (clear)            dut_fault <= '0;
    else if (valid && check)   dut_fault <= dut_fault | differs;
  end

  assign no_majority = ($countones(dut_fault) > 1);

  initial assert (N >= 3) else $error("dm_tre: majority voting needs at least three tiles");

endmodule
