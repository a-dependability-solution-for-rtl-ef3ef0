// dm_tpg: Test Pattern Generator of the Dependability Manager.
//
// Reproduces the deterministic scan test on chip: for every test vector it reseeds
// the LFSR (dm_lfsr) with that vector's seed and expands it, one LFSR step per flit,
// through the phase shifter (dm_phase_shifter) into CHAIN_LEN flits of 32 bits, one
// bit per scan chain. The flits are multicast to the tiles under test. After the
// last flit of a vector a one-cycle `capture` strobe lets the tiles capture the
// response into their chains. The responses are shifted out while the next vector
// shifts in, so a final unload pass of CHAIN_LEN all-zero flits follows the last
// vector. `check` marks flits whose returning response is meaningful (all passes but
// the first, which unloads whatever the chains held before the test).
//
// Flow control: a flit is transferred when flit_valid and flit_ready are both high;
// a low flit_ready (the network granting the DM only part of its bandwidth) stalls
// the generator without losing data. With flit_ready always high a test takes
// (N_VECTORS+1)*CHAIN_LEN shift cycles plus N_VECTORS capture cycles; at the
// source design's sizes (413 vectors of 398 flits) that is 165,185 cycles, 0.83 ms
// at 200 MHz.
//
// From the source design: 413 vectors, 398 flits per vector, 32-bit flits, LFSR with
// reseeding and a phase shifter. This design's own: the LFSR length, and the seeds.
// The real seeds are computed by the DM generation tool from the core's ATPG pattern
// file, which is not available; seed_of() stands in for that seed ROM with a fixed
// xorshift function of the vector index, so the generator's behaviour (not its fault
// coverage) is that of the real one.
//
// With BIT_FLIP = 1 the generator uses the other compression method instead: the
// LFSR is seeded once at the start of the test and then runs on through all vectors,
// and dm_bitflip inverts selected flit bits when it recognises certain LFSR states.
// The flit and capture timing is the same in both modes. Reseeding is the default.
module dm_tpg #(
  parameter int unsigned LEN       = 64,    // LFSR length
  parameter int unsigned CHAIN_LEN = 398,   // flits per test vector (scan chain length)
  parameter int unsigned N_VECTORS = 413,   // test vectors per structural test
  parameter int unsigned FLIT_W    = 32,
  parameter bit          BIT_FLIP  = 1'b0   // 0: reseeding, 1: bit flipping
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,       // pulse: begin a structural test
  output logic              busy,
  output logic              done,        // pulse: last flit of the unload pass sent
  output logic              flit_valid,
  input  logic              flit_ready,
  output logic [FLIT_W-1:0] flit,
  output logic              check,       // response to this flit is to be evaluated
  output logic              capture      // one-cycle capture strobe between vectors
);

  localparam int unsigned CW = $clog2(CHAIN_LEN);
  localparam int unsigned VW = $clog2(N_VECTORS + 1);

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_CAPTURE} tpg_state_e;

  // Seed of vector `idx`: three xorshift rounds of a constant mixed with the index.
  function automatic logic [LEN-1:0] seed_of(logic [VW-1:0] idx);
    logic [63:0] x;
    x = 64'h9E37_79B9_7F4A_7C15 ^ 64'(idx);
    for (int r = 0; r < 3; r++) begin
      x = x ^ (x << 13);
      x = x ^ (x >> 7);
      x = x ^ (x << 17);
    end
    return LEN'(x);
  endfunction

  tpg_state_e       st;
  logic [CW-1:0]    cnt;     // flit within the pass
  logic [VW-1:0]    pass;    // 0..N_VECTORS; pass N_VECTORS is the unload pass
  logic             lfsr_load, lfsr_step;
  logic [LEN-1:0]   lfsr_seed, lfsr_state;
  logic [FLIT_W-1:0] ps_flit, flip_mask;
  logic             xfer;

  dm_lfsr #(.LEN(LEN)) u_lfsr (
    .clk, .rst_n,
    .load (lfsr_load),
    .seed (lfsr_seed),
    .step (lfsr_step),
    .state(lfsr_state)
  );

  dm_phase_shifter #(.LEN(LEN), .OUT_W(FLIT_W)) u_ps (
    .state(lfsr_state),
    .flit (ps_flit)
  );

  if (BIT_FLIP) begin : g_flip
    dm_bitflip #(.LEN(LEN), .FLIT_W(FLIT_W)) u_flip (
      .state    (lfsr_state),
      .flip_mask(flip_mask)
    );
  end else begin : g_reseed
    assign flip_mask = '0;
  end

  assign xfer       = flit_valid && flit_ready;
  assign flit_valid = (st == S_SHIFT);
  assign flit       = (pass == VW'(N_VECTORS)) ? '0 : ps_flit ^ flip_mask;
  assign check      = (st == S_SHIFT) && (pass != '0);
  assign capture    = (st == S_CAPTURE);
  assign busy       = (st != S_IDLE);
  assign lfsr_step  = xfer;

  always_comb begin
    lfsr_load = 1'b0;
    lfsr_seed = seed_of('0);
    if (st == S_IDLE && start) begin
      lfsr_load = 1'b1;
    end else if (st == S_CAPTURE && !BIT_FLIP) begin
      lfsr_load = 1'b1;
      lfsr_seed = seed_of(pass + 1'b1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      cnt  <= '0;
      pass <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st   <= S_SHIFT;
          cnt  <= '0;
          pass <= '0;
        end
        S_SHIFT: if (xfer) begin
          if (cnt == CW'(CHAIN_LEN - 1)) begin
            cnt <= '0;
            if (pass == VW'(N_VECTORS)) begin
              st   <= S_IDLE;
              done <= 1'b1;
            end else begin
              st <= S_CAPTURE;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_CAPTURE: begin
          st   <= S_SHIFT;
          pass <= pass + 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
