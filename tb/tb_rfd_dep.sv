// tb_rfd_dep: end-to-end test of the device's dependability infrastructure (DM plus
// nine wrapped tiles, each tile a behavioural scan/BIST/functional model) at reduced
// scan sizes (16-flit vectors, 6 vectors). All nine tiles carry functional traffic
// the whole time; tiles not under test must keep answering correctly, tiles under
// test must be isolated. Scenarios, each with its report word worked out here:
//   - the measured command 0x96000000 (memory BIST on tiles 6, 7, 9)
//   - memory BIST with an injected memory fault, and with a tile that never finishes
//   - scan test, fault free, timed against (V+1)*L + V + 11 cycles
//   - scan test of tiles 1, 6, 7 with a core fault injected on tile 7, under random
//     network stalls (the run-time experiment of the source design)
//   - two faulty tiles in one group (no majority)
//   - full flow (memory BIST then scan), fault free and with a memory fault
//   - a refused selection
//   - manufacturing test mode through the test pins, data shifted through the chains
// Each mechanism is counted; one that never happened counts as a failure.
module tb_rfd_dep;
  import dm_pkg::*;
  localparam int CL = 16, NV = 6;

  logic clk = 0, rst_n = 0, cmd_valid = 0, tam_ready = 1;
  logic [31:0] cmd_data = '0, rpt_data;
  logic busy, rpt_valid, wso;
  logic tm = 0, tm_wsi = 0, tm_select_wir = 0, tm_shift_wr = 0;
  logic [8:0] tm_update_wr = '0;
  logic [8:0] noc_in_valid, noc_out_valid, ate_se = '0, ate_capture = '0, fi_core = '0, fi_mem = '0;
  logic [31:0] noc_in_data [9], noc_out_data [9], ate_si [9], ate_so [9];
  logic [8:0] core_in_valid, core_out_valid, core_se, core_capture;
  logic [31:0] core_in_data [9], core_out_data [9], core_si [9], core_so [9];
  logic [8:0] core_mbist_start, core_mbist_done, core_mbist_fail;
  wir_e mode [9];
  int checks = 0, failures = 0;

  rfd_dep #(.CHAIN_LEN(CL), .N_VECTORS(NV), .MBIST_TIMEOUT(100)) dut (.*);

  for (genvar i = 0; i < 9; i++) begin : g_core
    // tile 5 has a slow memory BIST, tile 2 a real stuck-at defect in chain 5
    xe_core_model #(.LEN(CL), .MBIST_CYC(i == 4 ? 300 : 20),
                    .STUCK_CHAIN(i == 1 ? 5 : -1)) u_core (
      .clk,
      .in_valid(core_in_valid[i]), .in_data(core_in_data[i]),
      .out_valid(core_out_valid[i]), .out_data(core_out_data[i]),
      .se(core_se[i]), .capture(core_capture[i]), .si(core_si[i]), .so(core_so[i]),
      .mbist_start(core_mbist_start[i]), .mbist_done(core_mbist_done[i]),
      .mbist_fail(core_mbist_fail[i])
    );
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanisms seen
  int n_stall, n_runtime, n_isolated, n_mem_fault, n_timeout, n_core_fault, n_nomaj,
      n_bad_select, n_full, n_mfg, n_mbist_cmd;

  // functional traffic on every tile, checked one cycle later
  logic [8:0]  prev_valid = '0, prev_normal = '0;
  logic [31:0] prev_data [9];
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < 9; i++) begin
      if (prev_normal[i] && mode[i] == WIR_NORMAL) begin
        checks++;
        if (noc_out_valid[i] !== prev_valid[i] ||
            (prev_valid[i] && noc_out_data[i] !== ((prev_data[i] + 1) | 32'(fi_core[i])))) begin
          failures++;
          $display("FAIL tile %0d functional output %h", i + 1, noc_out_data[i]);
        end
      end
      if (mode[i] != WIR_NORMAL && noc_out_valid[i]) begin
        failures++;
        $display("FAIL tile %0d not isolated in test mode", i + 1);
      end
      if (mode[i] != WIR_NORMAL && noc_in_valid[i]) n_isolated++;
      prev_normal[i] = (mode[i] == WIR_NORMAL);
      noc_in_valid[i] = $urandom;
      noc_in_data[i]  = $urandom;
      prev_valid[i]   = noc_in_valid[i];
      prev_data[i]    = noc_in_data[i];
    end
    if (busy && mode.or() with (item != WIR_NORMAL) && noc_out_valid != '0) n_runtime++;
  end

  bit stalls = 0;
  always @(negedge clk) begin
    tam_ready = stalls ? ($urandom % 4 != 0) : 1'b1;
    if (dut.u_dm.u_tpg.flit_valid && !tam_ready) n_stall++;
  end

  function automatic logic [31:0] mkcmd(dm_op_e op, logic [8:0] tiles);
    dm_cmd_t c = '0;
    c.start = 1; c.op = op; c.tiles = tiles;
    return c;
  endfunction

  function automatic logic [31:0] mkrpt(logic err_f, dm_err_e err, logic cf, logic mf,
                                        logic [8:0] ft, logic [2:0] duts, logic [8:0] tested);
    dm_report_t r = '0;
    r.done = 1; r.is_error = err_f; r.err = err; r.core_fault = cf; r.mem_fault = mf;
    r.faulty_tiles = ft; r.faulty_duts = duts; r.tested_tiles = tested;
    return r;
  endfunction

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(logic [31:0] cmd, logic [31:0] exp, string what, output int cycles);
    dm_report_t r;
    cycles = 0;
    @(negedge clk) begin cmd_valid = 1; cmd_data = cmd; end
    @(negedge clk) cmd_valid = 0;
    while (!rpt_valid && cycles < 30000) begin @(negedge clk); cycles++; end
    chk(rpt_data, exp, what);
    r = rpt_data;
    if (r.mem_fault)  n_mem_fault++;
    if (r.core_fault) n_core_fault++;
    if (r.err == ERR_NO_MAJORITY) n_nomaj++;
    if (r.err == ERR_BAD_SELECT)  n_bad_select++;
    $display("%-34s report %h after %0d cycles", what, rpt_data, cycles);
    repeat (3) @(negedge clk);
    for (int i = 0; i < 9; i++) chk(mode[i], WIR_NORMAL, "wrappers back to normal");
  endtask

  task automatic tm_load(wir_e code, logic [8:0] tiles);
    @(negedge clk) begin tm = 1; tm_select_wir = 1; tm_shift_wr = 1; end
    for (int b = 0; b < 3; b++) begin tm_wsi = code[b]; @(negedge clk); end
    tm_shift_wr = 0; tm_update_wr = tiles;
    @(negedge clk) begin tm_update_wr = '0; tm_select_wir = 0; tm = 0; end
  endtask

  int cyc;
  initial begin
    for (int i = 0; i < 9; i++) ate_si[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    run(32'h9600_0000, mkrpt(0, ERR_NONE, 0, 0, 0, 0, 9'h160), "mbist tiles 6,7,9", cyc);
    n_mbist_cmd++;
    fi_mem[6] = 1;
    run(32'h9600_0000, mkrpt(0, ERR_NONE, 0, 1, 9'h040, 0, 9'h160), "mbist, tile 7 memory fault", cyc);
    fi_mem[6] = 0;
    run(mkcmd(OP_MBIST, 9'h010), mkrpt(0, ERR_NONE, 0, 1, 9'h010, 0, 9'h010), "mbist, tile 5 times out", cyc);
    if (cyc > 100) n_timeout++;

    run(mkcmd(OP_SCAN, 9'h061), mkrpt(0, ERR_NONE, 0, 0, 0, 0, 9'h061), "scan 1,6,7 fault free", cyc);
    chk(cyc, (NV + 1) * CL + NV + 11, "scan test duration");

    stalls = 1;
    fi_core[6] = 1;
    run(mkcmd(OP_SCAN, 9'h061), mkrpt(0, ERR_NONE, 1, 0, 9'h040, 3'b001, 9'h061),
        "scan 1,6,7, tile 7 core fault", cyc);
    // tile 2's own defect plus the injected fault on tile 7: two different faults
    run(mkcmd(OP_SCAN, 9'h062), mkrpt(1, ERR_NO_MAJORITY, 1, 0, 9'h042, 3'b101, 9'h062),
        "scan 2,6,7, two faulty", cyc);
    fi_core = '0;
    stalls = 0;

    run(mkcmd(OP_FULL, 9'h1C0), mkrpt(0, ERR_NONE, 0, 0, 0, 0, 9'h1C0), "full 7,8,9", cyc);
    n_full++;
    fi_mem[7] = 1;
    run(mkcmd(OP_FULL, 9'h1C0), mkrpt(0, ERR_NONE, 0, 1, 9'h080, 0, 9'h1C0), "full 7,8,9, memory fault", cyc);
    fi_mem[7] = 0;
    run(mkcmd(OP_SCAN, 9'h180), mkrpt(1, ERR_BAD_SELECT, 0, 0, 0, 0, 9'h180), "scan with two tiles", cyc);

    // manufacturing test of tile 3 through the test pins: data shifted through
    tm_load(WIR_MFG, 9'h004);
    chk(mode[2], WIR_MFG, "manufacturing mode");
    begin
      logic [31:0] sent [CL];
      for (int k = 0; k < 2 * CL; k++) begin
        ate_se[2] = 1;
        ate_si[2] = $urandom;
        if (k < CL) sent[k] = ate_si[2];
        else begin
          chk(ate_so[2], sent[k - CL], "manufacturing scan path");
          n_mfg++;
        end
        @(negedge clk);
      end
      ate_se[2] = 0;
    end
    tm_load(WIR_NORMAL, 9'h004);
    chk(mode[2], WIR_NORMAL, "back to normal");

    $display("mechanisms: stall=%0d runtime=%0d isolated=%0d mbist=%0d mem_fault=%0d timeout=%0d core_fault=%0d no_majority=%0d bad_select=%0d full=%0d mfg=%0d",
             n_stall, n_runtime, n_isolated, n_mbist_cmd, n_mem_fault, n_timeout, n_core_fault,
             n_nomaj, n_bad_select, n_full, n_mfg);
    begin
      int m [11];
      m = '{n_stall, n_runtime, n_isolated, n_mbist_cmd, n_mem_fault, n_timeout,
                     n_core_fault, n_nomaj, n_bad_select, n_full, n_mfg};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
