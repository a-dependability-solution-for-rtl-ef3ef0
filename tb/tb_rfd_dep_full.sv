// tb_rfd_dep_full: the device at its full size (413 test vectors of 398 32-bit flits,
// nine tiles of 32 scan chains each) repeating the run-time experiment of the
// source design. Tiles 1, 6 and 7 run the application; first a fault-free scan test
// of that group, timed against (413+1)*398 + 413 + 11 cycles (0.83 ms at 200 MHz);
// then a fault is injected into tile 7's wrapper and the full dependability test
// (memory BIST, then scan test) must name tile 7 as the third DUT of the group. The
// other six tiles carry functional traffic throughout and are checked.
module tb_rfd_dep_full;
  import dm_pkg::*;
  localparam int CL = 398, NV = 413;

  logic clk = 0, rst_n = 0, cmd_valid = 0, tam_ready = 1;
  logic [31:0] cmd_data = '0, rpt_data;
  logic busy, rpt_valid, wso;
  logic tm = 0, tm_wsi = 0, tm_select_wir = 0, tm_shift_wr = 0;
  logic [8:0] tm_update_wr = '0;
  logic [8:0] noc_in_valid = '0, noc_out_valid, ate_se = '0, ate_capture = '0, fi_core = '0, fi_mem = '0;
  logic [31:0] noc_in_data [9], noc_out_data [9], ate_si [9], ate_so [9];
  logic [8:0] core_in_valid, core_out_valid, core_se, core_capture;
  logic [31:0] core_in_data [9], core_out_data [9], core_si [9], core_so [9];
  logic [8:0] core_mbist_start, core_mbist_done, core_mbist_fail;
  wir_e mode [9];
  int checks = 0, failures = 0;

  rfd_dep dut (.*);

  for (genvar i = 0; i < 9; i++) begin : g_core
    xe_core_model #(.LEN(CL)) u_core (
      .clk,
      .in_valid(core_in_valid[i]), .in_data(core_in_data[i]),
      .out_valid(core_out_valid[i]), .out_data(core_out_data[i]),
      .se(core_se[i]), .capture(core_capture[i]), .si(core_si[i]), .so(core_so[i]),
      .mbist_start(core_mbist_start[i]), .mbist_done(core_mbist_done[i]),
      .mbist_fail(core_mbist_fail[i])
    );
  end

  always #2.5 clk = ~clk;   // 200 MHz

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // functional traffic on the six tiles not under test
  localparam logic [8:0] APP = 9'h19E;
  logic [8:0]  prev_valid = '0;
  logic [31:0] prev_data [9];
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < 9; i++) if (APP[i]) begin
      if (prev_valid[i]) begin
        checks++;
        if (!noc_out_valid[i] || noc_out_data[i] !== prev_data[i] + 1) begin
          failures++;
          $display("FAIL tile %0d functional traffic", i + 1);
        end
      end
      noc_in_valid[i] = $urandom;
      noc_in_data[i]  = $urandom;
      prev_valid[i]   = noc_in_valid[i];
      prev_data[i]    = noc_in_data[i];
    end
  end

  task automatic run(logic [31:0] cmd, logic [31:0] exp, string what, int exp_cycles);
    int cycles = 0;
    @(negedge clk) begin cmd_valid = 1; cmd_data = cmd; end
    @(negedge clk) cmd_valid = 0;
    while (!rpt_valid && cycles < 300000) begin @(negedge clk); cycles++; end
    $display("%s: report %h after %0d cycles (%.3f ms at 200 MHz)", what, rpt_data, cycles,
             cycles * 5.0e-6);
    checks++;
    if (rpt_data !== exp) begin
      failures++;
      $display("FAIL %s: expected %h", what, exp);
    end
    if (exp_cycles > 0) begin
      checks++;
      if (cycles != exp_cycles) begin
        failures++;
        $display("FAIL %s: expected %0d cycles", what, exp_cycles);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    dm_cmd_t c;
    dm_report_t r;
    for (int i = 0; i < 9; i++) begin ate_si[i] = '0; noc_in_data[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);

    c = '0; c.start = 1; c.op = OP_SCAN; c.tiles = 9'h061;
    r = '0; r.done = 1; r.tested_tiles = 9'h061;
    run(c, r, "scan test, tiles 1, 6, 7", (NV + 1) * CL + NV + 11);

    fi_core[6] = 1;
    c.op = OP_FULL;
    r.core_fault = 1; r.faulty_tiles = 9'h040; r.faulty_duts = 3'b001;
    run(c, r, "full test, fault injected on tile 7", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
