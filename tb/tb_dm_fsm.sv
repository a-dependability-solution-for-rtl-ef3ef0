// tb_dm_fsm: drives the DM controller's command register and plays the part of the
// wrappers, memory BIST engines, pattern generator and response evaluator. A monitor
// decodes the serial wrapper loads (instruction, tiles updated). For each scenario
// the expected report word and wrapper sequence are built here from the command:
// memory BIST pass/fail/timeout, scan test with one faulty tile and with no
// majority, the full flow with and without a memory fault, bad tile selections, a
// reserved opcode, and a command written while busy (ignored).
module tb_dm_fsm;
  import dm_pkg::*;
  logic clk = 0, rst_n = 0, cmd_valid = 0;
  logic [31:0] cmd_data = '0, rpt_data;
  logic busy, rpt_valid, wsi, select_wir, shift_wr;
  logic [8:0] update_wr, mbist_start, mbist_done = '0, mbist_fail = '0;
  logic tpg_start, tpg_done = 0, tre_clear, tre_no_majority = 0;
  logic [2:0] tre_dut_fault = '0;
  logic [8:0] grp_mask;
  logic [3:0] grp_idx [3];
  int checks = 0, failures = 0;

  dm_fsm #(.MBIST_TIMEOUT(60)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behaviour of the tiles and of the scan datapath for the current scenario
  logic [8:0] sc_fail, sc_silent;
  logic [2:0] sc_flags;
  bit         sc_nomaj;
  int         n_tpg_start;

  always @(posedge clk) begin
    if (|mbist_start) begin
      // the done flag of the previous run drops one cycle late
      fork begin
        @(posedge clk) mbist_done <= '0;
        repeat (9) @(posedge clk);
        mbist_done <= ~sc_silent;
        mbist_fail <= sc_fail;
      end join_none
    end
    if (tpg_start) begin
      n_tpg_start++;
      tre_dut_fault <= '0;
      tre_no_majority <= 0;
      fork begin
        repeat (30) @(posedge clk);
        tre_dut_fault <= sc_flags;
        tre_no_majority <= sc_nomaj;
        tpg_done <= 1;
        @(posedge clk) tpg_done <= 0;
      end join_none
    end
  end

  // wrapper load monitor: instruction bits LSB first, then the update mask
  logic [2:0] shreg;
  string      loads;
  always @(posedge clk) begin
    if (select_wir && shift_wr) shreg <= {wsi, shreg[2:1]};
    if (select_wir && |update_wr) loads = {loads, $sformatf("%0d:%03h ", shreg, update_wr)};
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

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

  task automatic run(logic [31:0] cmd, logic [31:0] exp_rpt, string exp_loads,
                     int exp_starts, string what);
    int t = 0;
    loads = "";
    n_tpg_start = 0;
    @(negedge clk) begin cmd_valid = 1; cmd_data = cmd; end
    @(negedge clk) cmd_valid = 0;
    // a second command while busy must be ignored
    @(negedge clk) begin cmd_valid = 1; cmd_data = mkcmd(OP_SCAN, 9'h007); end
    @(negedge clk) cmd_valid = 0;
    while (!rpt_valid && t < 5000) begin @(negedge clk); t++; end
    chk(rpt_data, exp_rpt, {what, " report"});
    checks++;
    if (loads != exp_loads) begin
      failures++;
      $display("FAIL %s wrapper loads: '%s' expected '%s'", what, loads, exp_loads);
    end
    chk(n_tpg_start, exp_starts, {what, " scan starts"});
    @(negedge clk);
    chk(busy, 0, {what, " idle afterwards"});
  endtask

  initial begin
    sc_fail = '0; sc_silent = '0; sc_flags = '0; sc_nomaj = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // the measured command: memory BIST on tiles 6, 7 and 9; tile 7 fails
    sc_fail = 9'b0_0100_0000;
    run(32'h9600_0000, mkrpt(0, ERR_NONE, 0, 1, 9'h040, 0, 9'h160),
        "3:160 0:160 ", 0, "mbist 0x96000000");
    // memory BIST on one tile that never finishes: timeout counts as memory fault
    sc_fail = '0; sc_silent = 9'h001;
    run(mkcmd(OP_MBIST, 9'h001), mkrpt(0, ERR_NONE, 0, 1, 9'h001, 0, 9'h001),
        "3:001 0:001 ", 0, "mbist timeout");
    sc_silent = '0;
    // memory BIST passing on all nine tiles
    run(mkcmd(OP_MBIST, 9'h1FF), mkrpt(0, ERR_NONE, 0, 0, 0, 0, 9'h1FF),
        "3:1ff 0:1ff ", 0, "mbist all pass");
    // scan test on tiles 1, 6, 7 with the third one disagreeing
    sc_flags = 3'b100;
    run(mkcmd(OP_SCAN, 9'h061), mkrpt(0, ERR_NONE, 1, 0, 9'h040, 3'b001, 9'h061),
        "2:061 0:061 ", 1, "scan, tile 7 faulty");
    // scan test, two tiles disagree: no majority
    sc_flags = 3'b011; sc_nomaj = 1;
    run(mkcmd(OP_SCAN, 9'h00E), mkrpt(1, ERR_NO_MAJORITY, 1, 0, 9'h006, 3'b110, 9'h00E),
        "2:00e 0:00e ", 1, "scan, no majority");
    sc_flags = '0; sc_nomaj = 0;
    // full flow, memories pass, scan passes
    run(mkcmd(OP_FULL, 9'h1C0), mkrpt(0, ERR_NONE, 0, 0, 0, 0, 9'h1C0),
        "3:1c0 2:1c0 0:1c0 ", 1, "full, fault free");
    // full flow, memory fault stops before the scan test
    sc_fail = 9'h100;
    run(mkcmd(OP_FULL, 9'h1C0), mkrpt(0, ERR_NONE, 0, 1, 9'h100, 0, 9'h1C0),
        "3:1c0 0:1c0 ", 0, "full, memory fault");
    sc_fail = '0;
    // selections the controller must refuse
    run(mkcmd(OP_SCAN, 9'h003), mkrpt(1, ERR_BAD_SELECT, 0, 0, 0, 0, 9'h003), "", 0, "scan with 2 tiles");
    run(mkcmd(OP_MBIST, 9'h000), mkrpt(1, ERR_BAD_SELECT, 0, 0, 0, 0, 9'h000), "", 0, "mbist with none");
    run(mkcmd(OP_RSVD, 9'h007), mkrpt(1, ERR_BAD_OP, 0, 0, 0, 0, 9'h007), "", 0, "reserved op");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
