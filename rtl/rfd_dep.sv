// rfd_dep: dependability infrastructure of one reconfigurable fabric device (RFD):
// the Dependability Manager (dm) and the dependability wrappers (xe_wrapper) of the
// nine Xentium tiles.
//
// The device is a homogeneous multiprocessor: nine identical tiles, of which the
// application needs only some. Software moves the load off a group of three tiles and
// asks the DM to test them; the DM switches their wrappers into test mode, runs the
// memory BIST and/or a deterministic scan test on all three at once, compares the
// three response streams by majority vote and reports the tile that disagrees. The
// other tiles keep running throughout, since their wrappers stay in normal mode.
//
// Top-level ports:
//   cmd_*/rpt_*/busy   command register and report of the DM (network side)
//   tam_ready          grant for the DM's test traffic; low cycles model the DM
//                      getting only part of the network bandwidth
//   noc_*[i]           functional network traffic of tile i (through its wrapper)
//   ate_*[i]           manufacturing test pins of tile i
//   fi_core/fi_mem[i]  fault injection into tile i's wrapper
//   core_*[i]          connection to the Xentium core i itself (scan chains,
//                      memory BIST, functional data), which is not part of this RTL
//   tm, tm_*           chip-level test control of the serial wrapper port, used to
//                      put tiles into manufacturing test mode; while tm is high
//                      it replaces the DM as driver of that port
//   mode[i], wso       wrapper modes and the shared serial wrapper output (bypass or
//                      WIR shift stage of tile 1), for observation
// The network itself is not modelled: the DM's test flits reach every wrapper
// directly and all responses return in the same cycle, which is what the network
// provides with a guaranteed-throughput multicast connection at full bandwidth.
module rfd_dep
  import dm_pkg::*;
#(
  parameter int unsigned LFSR_LEN      = 64,
  parameter int unsigned CHAIN_LEN     = 398,
  parameter int unsigned N_VECTORS     = 413,
  parameter int unsigned MBIST_TIMEOUT = 65536,
  parameter bit          BIT_FLIP      = 1'b0   // pattern generator: 0 reseeding, 1 bit flipping
) (
  input  logic                clk,
  input  logic                rst_n,
  // DM control register and report
  input  logic                cmd_valid,
  input  logic [31:0]         cmd_data,
  output logic                busy,
  output logic                rpt_valid,
  output logic [31:0]         rpt_data,
  input  logic                tam_ready,
  // chip test controller: takes over the serial wrapper port while tm is high
  input  logic                tm,
  input  logic                tm_wsi,
  input  logic                tm_select_wir,
  input  logic                tm_shift_wr,
  input  logic [N_TILES-1:0]  tm_update_wr,
  // per tile: functional network side
  input  logic [N_TILES-1:0]  noc_in_valid,
  input  logic [FLIT_W-1:0]   noc_in_data  [N_TILES],
  output logic [N_TILES-1:0]  noc_out_valid,
  output logic [FLIT_W-1:0]   noc_out_data [N_TILES],
  // per tile: manufacturing test pins
  input  logic [N_TILES-1:0]  ate_se,
  input  logic [N_TILES-1:0]  ate_capture,
  input  logic [FLIT_W-1:0]   ate_si [N_TILES],
  output logic [FLIT_W-1:0]   ate_so [N_TILES],
  // per tile: fault injection
  input  logic [N_TILES-1:0]  fi_core,
  input  logic [N_TILES-1:0]  fi_mem,
  // per tile: Xentium core connection
  output logic [N_TILES-1:0]  core_in_valid,
  output logic [FLIT_W-1:0]   core_in_data [N_TILES],
  input  logic [N_TILES-1:0]  core_out_valid,
  input  logic [FLIT_W-1:0]   core_out_data [N_TILES],
  output logic [N_TILES-1:0]  core_se,
  output logic [N_TILES-1:0]  core_capture,
  output logic [FLIT_W-1:0]   core_si [N_TILES],
  input  logic [FLIT_W-1:0]   core_so [N_TILES],
  output logic [N_TILES-1:0]  core_mbist_start,
  input  logic [N_TILES-1:0]  core_mbist_done,
  input  logic [N_TILES-1:0]  core_mbist_fail,
  // observation
  output wir_e                mode [N_TILES],
  output logic                wso
);

  logic                dm_wsi, dm_select_wir, dm_shift_wr;
  logic                wsi, select_wir, shift_wr;
  logic [N_TILES-1:0]  dm_update_wr, update_wr, mbist_start, mbist_done, mbist_fail;
  logic [N_TILES-1:0]  tam_shift, tam_capture, resp_valid, wso_t;
  logic [FLIT_W-1:0]   tam_flit;
  logic [FLIT_W-1:0]   resp_flit [N_TILES];

  dm #(.LFSR_LEN(LFSR_LEN), .CHAIN_LEN(CHAIN_LEN), .N_VECTORS(N_VECTORS),
       .MBIST_TIMEOUT(MBIST_TIMEOUT), .BIT_FLIP(BIT_FLIP)) u_dm (
    .clk, .rst_n, .cmd_valid, .cmd_data, .busy, .rpt_valid, .rpt_data,
    .wsi(dm_wsi), .select_wir(dm_select_wir), .shift_wr(dm_shift_wr),
    .update_wr(dm_update_wr),
    .mbist_start, .mbist_done, .mbist_fail,
    .tam_ready, .tam_shift, .tam_flit, .tam_capture,
    .resp_valid, .resp_flit
  );

  // serial wrapper port: test pins or DM
  assign wsi        = tm ? tm_wsi        : dm_wsi;
  assign select_wir = tm ? tm_select_wir : dm_select_wir;
  assign shift_wr   = tm ? tm_shift_wr   : dm_shift_wr;
  assign update_wr  = tm ? tm_update_wr  : dm_update_wr;

  for (genvar i = 0; i < N_TILES; i++) begin : g_tile
    xe_wrapper u_wrap (
      .clk, .rst_n,
      .wsi, .select_wir, .shift_wr,
      .update_wr       (update_wr[i]),
      .wso             (wso_t[i]),
      .mode            (mode[i]),
      .noc_in_valid    (noc_in_valid[i]),
      .noc_in_data     (noc_in_data[i]),
      .noc_out_valid   (noc_out_valid[i]),
      .noc_out_data    (noc_out_data[i]),
      .tam_valid       (tam_shift[i]),
      .tam_flit        (tam_flit),
      .tam_capture     (tam_capture[i]),
      .resp_valid      (resp_valid[i]),
      .resp_flit       (resp_flit[i]),
      .dm_mbist_start  (mbist_start[i]),
      .dm_mbist_done   (mbist_done[i]),
      .dm_mbist_fail   (mbist_fail[i]),
      .ate_se          (ate_se[i]),
      .ate_capture     (ate_capture[i]),
      .ate_si          (ate_si[i]),
      .ate_so          (ate_so[i]),
      .fi_core         (fi_core[i]),
      .fi_mem          (fi_mem[i]),
      .core_in_valid   (core_in_valid[i]),
      .core_in_data    (core_in_data[i]),
      .core_out_valid  (core_out_valid[i]),
      .core_out_data   (core_out_data[i]),
      .core_se         (core_se[i]),
      .core_capture    (core_capture[i]),
      .core_si         (core_si[i]),
      .core_so         (core_so[i]),
      .core_mbist_start(core_mbist_start[i]),
      .core_mbist_done (core_mbist_done[i]),
      .core_mbist_fail (core_mbist_fail[i])
    );
  end

  // all wrappers share the serial input; tile 1's serial output is observed
  assign wso = wso_t[0];

endmodule
