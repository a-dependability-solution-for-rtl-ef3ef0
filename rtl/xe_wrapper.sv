// xe_wrapper: IEEE 1500 style dependability wrapper around one Xentium tile.
//
// The wrapper decides what the tile's 32 parallel scan chains and its embedded memory
// BIST are connected to, so that one tile can be tested structurally while the others
// keep running the application. A 3-bit wrapper instruction register (WIR) selects the
// mode (dm_pkg::wir_e):
//   WIR_NORMAL  core connected to the network, test paths idle (reset value)
//   WIR_MFG     manufacturing test: chains driven from and observed on the test pins
//   WIR_DEP     dependability test: each test flit accepted from the DM shifts the 32
//               chains by one bit; the bits shifted out form the response flit sent
//               back in the same cycle; `tam_capture` makes the core capture
//   WIR_MBIST   the DM's memory BIST start is passed to the core, done/fail returned
// In every test mode the functional network ports are isolated (valid held low).
//
// The WIR is loaded over the serial wrapper port: while select_wir and shift_wr are
// high, wsi shifts in LSB first (one bit per clock; the first bit ends in bit 0 after
// three clocks); update_wr copies the shift stage to the WIR. With select_wir low the
// one-bit bypass register sits between wsi and wso.
//
// Fault injection (for dependability experiments): fi_core forces bit 0 of the scan
// response and of the functional output to 1 (a stuck-at-1 fault); fi_mem forces the
// memory BIST to report a failure.
//
// From the source design: the three modes, the 32 scan chains, IEEE 1500 compliance,
// the wrapper's fault-injection feature and the DM starting and checking memory BIST.
// This design's own: the WIR width and codes, the separate memory BIST instruction,
// the exact fault that injection emulates, and the combinational (zero-latency)
// response path.
module xe_wrapper
  import dm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // serial wrapper port
  input  logic              wsi,
  input  logic              select_wir,
  input  logic              shift_wr,
  input  logic              update_wr,
  output logic              wso,
  output wir_e              mode,
  // functional network side
  input  logic              noc_in_valid,
  input  logic [FLIT_W-1:0] noc_in_data,
  output logic              noc_out_valid,
  output logic [FLIT_W-1:0] noc_out_data,
  // test access from the DM over the network (TAM)
  input  logic              tam_valid,
  input  logic [FLIT_W-1:0] tam_flit,
  input  logic              tam_capture,
  output logic              resp_valid,
  output logic [FLIT_W-1:0] resp_flit,
  // memory BIST handshake with the DM
  input  logic              dm_mbist_start,
  output logic              dm_mbist_done,
  output logic              dm_mbist_fail,
  // manufacturing test pins
  input  logic              ate_se,
  input  logic              ate_capture,
  input  logic [FLIT_W-1:0] ate_si,
  output logic [FLIT_W-1:0] ate_so,
  // fault injection
  input  logic              fi_core,
  input  logic              fi_mem,
  // core side
  output logic              core_in_valid,
  output logic [FLIT_W-1:0] core_in_data,
  input  logic              core_out_valid,
  input  logic [FLIT_W-1:0] core_out_data,
  output logic              core_se,
  output logic              core_capture,
  output logic [FLIT_W-1:0] core_si,
  input  logic [FLIT_W-1:0] core_so,
  output logic              core_mbist_start,
  input  logic              core_mbist_done,
  input  logic              core_mbist_fail
);

  logic [WIR_W-1:0] wir_shift;
  logic             wby;
  wir_e             wir;

  // serial wrapper port: WIR shift stage, update stage and bypass
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wir_shift <= '0;
      wir       <= WIR_NORMAL;
      wby       <= 1'b0;
    end else begin
      if (select_wir && shift_wr)      wir_shift <= {wsi, wir_shift[WIR_W-1:1]};
      if (!select_wir && shift_wr)     wby       <= wsi;
      if (select_wir && update_wr)     wir       <= wir_e'(wir_shift);
    end
  end

  assign wso  = select_wir ? wir_shift[0] : wby;
  assign mode = wir;

  // stuck-at-1 on bit 0 when a core fault is injected
  logic [FLIT_W-1:0] fi_mask;
  assign fi_mask = fi_core ? FLIT_W'(1) : '0;

  always_comb begin
    // defaults: everything idle and isolated
    core_in_valid    = 1'b0;
    core_in_data     = '0;
    noc_out_valid    = 1'b0;
    noc_out_data     = '0;
    core_se          = 1'b0;
    core_capture     = 1'b0;
    core_si          = '0;
    ate_so           = '0;
    resp_valid       = 1'b0;
    resp_flit        = '0;
    core_mbist_start = 1'b0;
    dm_mbist_done    = 1'b0;
    dm_mbist_fail    = 1'b0;
    unique case (wir)
      WIR_NORMAL: begin
        core_in_valid = noc_in_valid;
        core_in_data  = noc_in_data;
        noc_out_valid = core_out_valid;
        noc_out_data  = core_out_data | fi_mask;
      end
      WIR_MFG: begin
        core_se      = ate_se;
        core_capture = ate_capture;
        core_si      = ate_si;
        ate_so       = core_so | fi_mask;
      end
      WIR_DEP: begin
        core_se      = tam_valid;
        core_capture = tam_capture;
        core_si      = tam_flit;
        resp_valid   = tam_valid;
        resp_flit    = core_so | fi_mask;
      end
      WIR_MBIST: begin
        core_mbist_start = dm_mbist_start;
        dm_mbist_done    = core_mbist_done;
        dm_mbist_fail    = core_mbist_fail | fi_mem;
      end
      default: ;
    endcase
  end

  // a core never shifts and captures in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(core_se && core_capture));

endmodule
