// tb_rfd_nine_tiles: dependability test of all nine tiles in three groups of three,
// at full size (413 vectors of 398 flits), as in the device's maximum-detection-time
// budget: three scan tests of 0.83 ms each, about 2.5 ms in all at 200 MHz. While a
// group is tested the other six tiles carry functional traffic (the beamforming
// arrangement: six working tiles, three under test) and are checked every cycle.
// A core fault is injected into tile 5, so the second group must report tile 5 as its
// second DUT and the other groups must come back clean. Each test must take exactly
// (413+1)*398 + 413 + 11 cycles from command to report.
module tb_rfd_nine_tiles;
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
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // functional traffic on the tiles outside the group under test
  logic [8:0]  app = '0, prev_valid = '0;
  logic [31:0] prev_data [9];
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < 9; i++) begin
      if (prev_valid[i]) begin
        checks++;
        if (!noc_out_valid[i] || noc_out_data[i] !== ((prev_data[i] + 1) | 32'(fi_core[i]))) begin
          failures++;
          $display("FAIL tile %0d functional traffic", i + 1);
        end
      end
      noc_in_valid[i] = app[i] && ($urandom % 2);
      noc_in_data[i]  = $urandom;
      prev_valid[i]   = noc_in_valid[i];
      prev_data[i]    = noc_in_data[i];
    end
  end

  initial begin
    int total = 0;
    for (int i = 0; i < 9; i++) begin ate_si[i] = '0; noc_in_data[i] = '0; end
    fi_core[4] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    for (int g = 0; g < 3; g++) begin
      dm_cmd_t c;
      dm_report_t r;
      int cycles;
      c = '0; c.start = 1; c.op = OP_SCAN; c.tiles = 9'b111 << (3 * g);
      r = '0; r.done = 1; r.tested_tiles = c.tiles;
      if (g == 1) begin r.core_fault = 1; r.faulty_tiles = 9'h010; r.faulty_duts = 3'b010; end
      // wait until the traffic of the previous cycle has drained, then move it
      app = '0;
      @(negedge clk);
      @(negedge clk);
      app = ~c.tiles;
      @(negedge clk) begin cmd_valid = 1; cmd_data = c; end
      @(negedge clk) cmd_valid = 0;
      cycles = 0;
      while (!rpt_valid && cycles < 300000) begin @(negedge clk); cycles++; end
      total += cycles;
      $display("group %0d (tiles %0d-%0d): report %h after %0d cycles", g + 1, 3*g + 1, 3*g + 3,
               rpt_data, cycles);
      checks += 2;
      if (rpt_data !== r) begin failures++; $display("FAIL expected report %h", r); end
      if (cycles != (NV + 1) * CL + NV + 11) begin failures++; $display("FAIL cycle count"); end
      @(negedge clk);
    end
    $display("all nine tiles tested in %0d cycles = %.2f ms at 200 MHz", total, total * 5.0e-6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
