// dm_fsm: controller of the Dependability Manager.
//
// The DM sits idle in standby until the dependability software writes a command word
// (dm_pkg::dm_cmd_t) into its control register. It then runs the test flow for the
// selected group of tiles:
//   1. check the command (operation code, number of selected tiles);
//   2. configure the wrappers of the selected tiles for the test (serial WIR load of
//      the instruction, then an update pulse to the selected tiles only, so tiles
//      still running the application are not disturbed);
//   3. memory BIST (OP_MBIST, OP_FULL): pulse start, wait until every selected tile
//      reports done or MBIST_TIMEOUT cycles pass; a failing or silent tile is a
//      memory fault. OP_FULL stops here if a memory fault was found;
//   4. scan test (OP_SCAN, OP_FULL): start the pattern generator and clear the
//      response evaluator, wait until the unload pass is done, read the vote;
//   5. return the tested wrappers to normal mode and present the report word
//      (dm_pkg::dm_report_t) for one cycle on rpt_valid.
// A scan or full test needs exactly N_PER_TEST selected tiles (majority voting);
// memory BIST takes one or more. Commands arriving while busy are ignored.
//
// The flow (standby, initialisation, wrapper configuration, memory BIST, scan test,
// flag faulty tile, back to standby) follows the source design's test flow chart; the
// command and report layouts, the timeout and the wrapper-load protocol are this
// design's own.
module dm_fsm
  import dm_pkg::*;
#(
  parameter int unsigned MBIST_TIMEOUT = 65536
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // control register (written over the network) and report
  input  logic                   cmd_valid,
  input  logic [31:0]            cmd_data,
  output logic                   busy,
  output logic                   rpt_valid,
  output logic [31:0]            rpt_data,
  // wrapper configuration
  output logic                   wsi,
  output logic                   select_wir,
  output logic                   shift_wr,
  output logic [N_TILES-1:0]     update_wr,
  // memory BIST
  output logic [N_TILES-1:0]     mbist_start,
  input  logic [N_TILES-1:0]     mbist_done,
  input  logic [N_TILES-1:0]     mbist_fail,
  // scan test: generator and evaluator
  output logic                   tpg_start,
  input  logic                   tpg_done,
  output logic                   tre_clear,
  input  logic [N_PER_TEST-1:0]  tre_dut_fault,
  input  logic                   tre_no_majority,
  // group under test
  output logic [N_TILES-1:0]     grp_mask,
  output logic [3:0]             grp_idx [N_PER_TEST]
);

  typedef enum logic [3:0] {
    S_STANDBY, S_INIT, S_WCFG, S_WUPD, S_MBIST_START, S_MBIST_WAIT,
    S_SCAN_START, S_SCAN_RUN, S_REPORT
  } fsm_state_e;

  typedef enum logic [1:0] {NEXT_MBIST, NEXT_SCAN, NEXT_REPORT} next_e;

  fsm_state_e          st;
  dm_cmd_t             cmd;
  next_e               after_cfg;
  wir_e                cfg_code;
  logic [1:0]          bitcnt;
  logic [$clog2(MBIST_TIMEOUT+1)-1:0] timer;
  dm_report_t          rpt;

  // indices of the first N_PER_TEST selected tiles, in ascending tile order
  function automatic void pick_group(input logic [N_TILES-1:0] m,
                                     output logic [3:0] idx [N_PER_TEST]);
    int unsigned k;
    k = 0;
    for (int g = 0; g < N_PER_TEST; g++) idx[g] = '0;
    for (int t = 0; t < N_TILES; t++) begin
      if (m[t] && k < N_PER_TEST) begin
        idx[k] = 4'(t);
        k++;
      end
    end
  endfunction

  logic [N_TILES-1:0] dut_tiles;   // tiles whose DUT flag is set
  always_comb begin
    dut_tiles = '0;
    for (int g = 0; g < N_PER_TEST; g++)
      if (tre_dut_fault[g]) dut_tiles[grp_idx[g]] = 1'b1;
  end

  // DUT flags reversed so that the first tile of the group is the report's MSB
  logic [N_PER_TEST-1:0] duts_msb_first;
  always_comb
    for (int g = 0; g < N_PER_TEST; g++) duts_msb_first[N_PER_TEST-1-g] = tre_dut_fault[g];

  assign busy       = (st != S_STANDBY);
  assign grp_mask   = cmd.tiles;
  assign select_wir = (st == S_WCFG) || (st == S_WUPD);
  assign shift_wr   = (st == S_WCFG);
  assign wsi        = (st == S_WCFG) ? cfg_code[bitcnt] : 1'b0;
  assign update_wr  = (st == S_WUPD) ? cmd.tiles : '0;
  assign mbist_start = (st == S_MBIST_START) ? cmd.tiles : '0;
  assign tpg_start  = (st == S_SCAN_START);
  assign tre_clear  = (st == S_SCAN_START);
  assign rpt_valid  = (st == S_REPORT);

  // the presented report always carries done = 1
  always_comb begin
    rpt_data = rpt;
    rpt_data[31] = 1'b1;
  end

  always_comb pick_group(cmd.tiles, grp_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_STANDBY;
      cmd       <= '0;
      after_cfg <= NEXT_REPORT;
      cfg_code  <= WIR_NORMAL;
      bitcnt    <= '0;
      timer     <= '0;
      rpt       <= '0;
    end else begin
      unique case (st)
        S_STANDBY: if (cmd_valid && cmd_data[31]) begin
          cmd <= dm_cmd_t'(cmd_data);
          rpt <= '0;
          st  <= S_INIT;
        end

        S_INIT: begin
          rpt.tested_tiles <= cmd.tiles;
          bitcnt <= '0;
          if (cmd.op == OP_RSVD) begin
            rpt.is_error <= 1'b1;
            rpt.err      <= ERR_BAD_OP;
            st           <= S_REPORT;
          end else if ((cmd.op == OP_MBIST && cmd.tiles == '0) ||
                       (cmd.op != OP_MBIST && $countones(cmd.tiles) != N_PER_TEST)) begin
            rpt.is_error <= 1'b1;
            rpt.err      <= ERR_BAD_SELECT;
            st           <= S_REPORT;
          end else if (cmd.op == OP_SCAN) begin
            cfg_code  <= WIR_DEP;
            after_cfg <= NEXT_SCAN;
            st        <= S_WCFG;
          end else begin
            cfg_code  <= WIR_MBIST;
            after_cfg <= NEXT_MBIST;
            st        <= S_WCFG;
          end
        end

        S_WCFG: begin
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt == 2'(WIR_W - 1)) st <= S_WUPD;
        end

        S_WUPD: begin
          bitcnt <= '0;
          unique case (after_cfg)
            NEXT_MBIST: st <= S_MBIST_START;
            NEXT_SCAN:  st <= S_SCAN_START;
            default:    st <= S_REPORT;
          endcase
        end

        S_MBIST_START: begin
          timer <= '0;
          st    <= S_MBIST_WAIT;
        end

        S_MBIST_WAIT: begin
          timer <= timer + 1'b1;
          // done is ignored in the first waiting cycle, so that a done flag left
          // over from an earlier BIST run cannot end this one
          if ((timer != '0 && (mbist_done & cmd.tiles) == cmd.tiles) ||
              (timer == $bits(timer)'(MBIST_TIMEOUT - 1))) begin
            logic [N_TILES-1:0] bad;
            bad = cmd.tiles & (mbist_fail | ~mbist_done);
            rpt.faulty_tiles <= bad;
            rpt.mem_fault    <= (bad != '0);
            if (cmd.op == OP_FULL && bad == '0) begin
              cfg_code  <= WIR_DEP;
              after_cfg <= NEXT_SCAN;
            end else begin
              cfg_code  <= WIR_NORMAL;
              after_cfg <= NEXT_REPORT;
            end
            st <= S_WCFG;
          end
        end

        S_SCAN_START: st <= S_SCAN_RUN;

        S_SCAN_RUN: if (tpg_done) begin
          rpt.core_fault   <= (tre_dut_fault != '0);
          rpt.faulty_duts  <= duts_msb_first;
          rpt.faulty_tiles <= rpt.faulty_tiles | dut_tiles;
          if (tre_no_majority) begin
            rpt.is_error <= 1'b1;
            rpt.err      <= ERR_NO_MAJORITY;
          end
          cfg_code  <= WIR_NORMAL;
          after_cfg <= NEXT_REPORT;
          st        <= S_WCFG;
        end

        S_REPORT: st <= S_STANDBY;

        default: st <= S_STANDBY;
      endcase
    end
  end

endmodule
