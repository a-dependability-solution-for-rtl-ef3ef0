// tb_dm: the Dependability Manager with nine behavioural tiles wired straight to its
// test ports (no wrappers): each tile shifts when the DM sends it a flit and returns
// its scan output as the response. Tile 4 has a stuck-at defect in scan chain 9 and
// tile 9 a failing memory BIST. Expected reports are worked out from those defects:
// fault-free groups pass, a group with tile 4 names tile 4 (and only tile 4), the
// measured command 0x96000000 reports tile 9's memory, and the scan test takes
// (V+1)*L + V + 11 cycles from command to report. The multicast is also checked:
// only the selected tiles ever receive flits.
module tb_dm;
  import dm_pkg::*;
  localparam int CL = 24, NV = 5;
  logic clk = 0, rst_n = 0, cmd_valid = 0, tam_ready = 1;
  logic [31:0] cmd_data = '0, rpt_data, tam_flit;
  logic busy, rpt_valid, wsi, select_wir, shift_wr;
  logic [8:0] update_wr, mbist_start, mbist_done, mbist_fail, tam_shift, tam_capture, resp_valid;
  logic [31:0] resp_flit [9];
  logic [31:0] unused_out [9];
  logic [8:0]  unused_valid;
  int checks = 0, failures = 0;

  dm #(.CHAIN_LEN(CL), .N_VECTORS(NV), .MBIST_TIMEOUT(1000)) dut (.*);

  for (genvar i = 0; i < 9; i++) begin : g_tile
    xe_core_model #(.LEN(CL), .MBIST_FAIL(i == 8), .STUCK_CHAIN(i == 3 ? 9 : -1)) u_core (
      .clk, .in_valid(1'b0), .in_data('0), .out_valid(unused_valid[i]), .out_data(unused_out[i]),
      .se(tam_shift[i]), .capture(tam_capture[i]), .si(tam_flit), .so(resp_flit[i]),
      .mbist_start(mbist_start[i]), .mbist_done(mbist_done[i]), .mbist_fail(mbist_fail[i])
    );
  end
  assign resp_valid = tam_shift;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [8:0] allowed = '0;
  always @(negedge clk) if (tam_shift != '0) begin
    checks++;
    if (tam_shift & ~allowed) begin
      failures++;
      $display("FAIL flits sent to unselected tiles %b", tam_shift);
    end
  end

  function automatic logic [31:0] mkrpt(logic cf, logic mf, logic [8:0] ft, logic [2:0] duts,
                                        logic [8:0] tested);
    dm_report_t r = '0;
    r.done = 1; r.core_fault = cf; r.mem_fault = mf;
    r.faulty_tiles = ft; r.faulty_duts = duts; r.tested_tiles = tested;
    return r;
  endfunction

  task automatic run(logic [31:0] cmd, logic [31:0] exp, string what, int exp_cycles);
    int cycles = 0;
    dm_cmd_t c = cmd;
    allowed = c.tiles;
    @(negedge clk) begin cmd_valid = 1; cmd_data = cmd; end
    @(negedge clk) cmd_valid = 0;
    while (!rpt_valid && cycles < 10000) begin @(negedge clk); cycles++; end
    checks++;
    if (rpt_data !== exp) begin
      failures++;
      $display("FAIL %s: report %h expected %h", what, rpt_data, exp);
    end
    if (exp_cycles > 0) begin
      checks++;
      if (cycles != exp_cycles) begin
        failures++;
        $display("FAIL %s: %0d cycles, expected %0d", what, cycles, exp_cycles);
      end
    end
    @(negedge clk);
  endtask

  function automatic logic [31:0] scan_cmd(logic [8:0] tiles);
    dm_cmd_t c = '0;
    c.start = 1; c.op = OP_SCAN; c.tiles = tiles;
    return c;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(scan_cmd(9'h007), mkrpt(0, 0, 0, 0, 9'h007), "tiles 1,2,3", (NV + 1) * CL + NV + 11);
    run(scan_cmd(9'h00E), mkrpt(1, 0, 9'h008, 3'b001, 9'h00E), "tiles 2,3,4", (NV + 1) * CL + NV + 11);
    run(scan_cmd(9'h038), mkrpt(1, 0, 9'h008, 3'b100, 9'h038), "tiles 4,5,6", 0);
    run(scan_cmd(9'h0E0), mkrpt(0, 0, 0, 0, 9'h0E0), "tiles 6,7,8", 0);
    run(32'h9600_0000, mkrpt(0, 1, 9'h100, 0, 9'h160), "memory BIST 6,7,9", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
