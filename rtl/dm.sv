// dm: Dependability Manager, the self-test infrastructure IP of the device.
//
// Tests groups of identical Xentium tiles at application run time and reports which
// tile, if any, is faulty. It is made of the three parts of the source design:
//   dm_fsm  controller with the command register and the report word
//   dm_tpg  test pattern generator (reseeded LFSR + phase shifter), 32-bit flits
//   dm_tre  test response evaluator, majority vote over the group's responses
// plus the glue that multicasts each test flit to the tiles of the group and routes
// the group's response flits to the evaluator.
//
// Interface: commands and reports are 32-bit words (see dm_pkg). Test flits leave on
// tam_flit; tam_shift[i] is high for tile i in every cycle in which a flit is
// transferred to it, i.e. tam_ready (the network's grant) is high and the generator
// has a flit. Every selected tile must answer in the same cycle with its response
// flit (resp_flit[i], resp_valid[i]). tam_capture[i] is the capture strobe between
// vectors. Wrapper configuration uses the serial port signals wsi, select_wir,
// shift_wr and the per-tile update_wr.
//
// Timing, with tam_ready held high: command accepted, 1 cycle check, 4 cycles of
// wrapper configuration, 1 start cycle, then (N_VECTORS+1)*CHAIN_LEN flits and
// N_VECTORS capture cycles, 4 cycles to restore the wrappers and the report.
module dm
  import dm_pkg::*;
#(
  parameter int unsigned LFSR_LEN      = 64,
  parameter int unsigned CHAIN_LEN     = 398,
  parameter int unsigned N_VECTORS     = 413,
  parameter int unsigned MBIST_TIMEOUT = 65536,
  parameter bit          BIT_FLIP      = 1'b0   // pattern generator: 0 reseeding, 1 bit flipping
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cmd_valid,
  input  logic [31:0]          cmd_data,
  output logic                 busy,
  output logic                 rpt_valid,
  output logic [31:0]          rpt_data,
  output logic                 wsi,
  output logic                 select_wir,
  output logic                 shift_wr,
  output logic [N_TILES-1:0]   update_wr,
  output logic [N_TILES-1:0]   mbist_start,
  input  logic [N_TILES-1:0]   mbist_done,
  input  logic [N_TILES-1:0]   mbist_fail,
  input  logic                 tam_ready,
  output logic [N_TILES-1:0]   tam_shift,
  output logic [FLIT_W-1:0]    tam_flit,
  output logic [N_TILES-1:0]   tam_capture,
  input  logic [N_TILES-1:0]   resp_valid,
  input  logic [FLIT_W-1:0]    resp_flit [N_TILES]
);

  logic                  tpg_start, tpg_done, tpg_valid, tpg_check, tpg_capture;
  logic                  tre_clear, tre_no_majority, xfer;
  logic [N_PER_TEST-1:0] tre_dut_fault;
  logic [N_TILES-1:0]    grp_mask;
  logic [3:0]            grp_idx [N_PER_TEST];
  logic [FLIT_W-1:0]     grp_resp [N_PER_TEST];

  dm_fsm #(.MBIST_TIMEOUT(MBIST_TIMEOUT)) u_fsm (
    .clk, .rst_n, .cmd_valid, .cmd_data, .busy, .rpt_valid, .rpt_data,
    .wsi, .select_wir, .shift_wr, .update_wr,
    .mbist_start, .mbist_done, .mbist_fail,
    .tpg_start, .tpg_done, .tre_clear, .tre_dut_fault, .tre_no_majority,
    .grp_mask, .grp_idx
  );

  dm_tpg #(.LEN(LFSR_LEN), .CHAIN_LEN(CHAIN_LEN), .N_VECTORS(N_VECTORS),
           .FLIT_W(FLIT_W), .BIT_FLIP(BIT_FLIP)) u_tpg (
    .clk, .rst_n,
    .start     (tpg_start),
    .busy      (),
    .done      (tpg_done),
    .flit_valid(tpg_valid),
    .flit_ready(tam_ready),
    .flit      (tam_flit),
    .check     (tpg_check),
    .capture   (tpg_capture)
  );

  assign xfer        = tpg_valid && tam_ready;
  assign tam_shift   = xfer ? grp_mask : '0;
  assign tam_capture = tpg_capture ? grp_mask : '0;

  always_comb
    for (int g = 0; g < N_PER_TEST; g++) grp_resp[g] = resp_flit[grp_idx[g]];

  dm_tre #(.N(N_PER_TEST), .FLIT_W(FLIT_W)) u_tre (
    .clk, .rst_n,
    .clear      (tre_clear),
    .valid      (xfer),
    .check      (tpg_check),
    .resp       (grp_resp),
    .dut_fault  (tre_dut_fault),
    .no_majority(tre_no_majority)
  );

  // every tile that received a flit answers in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n)
                   xfer |-> ((resp_valid & grp_mask) == grp_mask));

endmodule
