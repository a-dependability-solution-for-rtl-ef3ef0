// tb_xe_wrapper: loads every instruction into the wrapper over its serial port and,
// in each mode, drives all inputs at random and compares every output with the mode
// table (normal: core on the network, test paths idle; manufacturing: chains on the
// test pins; dependability: chains on the DM's flits, response returned; memory
// BIST: handshake passed through). Fault injection is checked in each mode, as is
// the bypass register and that a WIR shift without update leaves the mode alone.
module tb_xe_wrapper;
  import dm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wsi = 0, select_wir = 0, shift_wr = 0, update_wr = 0, wso;
  wir_e mode;
  logic noc_in_valid, noc_out_valid, tam_valid, tam_capture, resp_valid;
  logic [31:0] noc_in_data, noc_out_data, tam_flit, resp_flit, ate_si, ate_so;
  logic dm_mbist_start, dm_mbist_done, dm_mbist_fail, ate_se, ate_capture, fi_core, fi_mem;
  logic core_in_valid, core_out_valid, core_se, core_capture;
  logic [31:0] core_in_data, core_out_data, core_si, core_so;
  logic core_mbist_start, core_mbist_done, core_mbist_fail;
  int checks = 0, failures = 0;

  xe_wrapper dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s (mode %s): got %h expected %h", what, mode.name(), got, exp);
    end
  endtask

  task automatic load_wir(logic [2:0] code, bit do_update);
    @(negedge clk) begin select_wir = 1; shift_wr = 1; end
    for (int b = 0; b < 3; b++) begin
      wsi = code[b];
      @(negedge clk);
    end
    shift_wr = 0;
    update_wr = do_update;
    @(negedge clk) begin update_wr = 0; select_wir = 0; end
  endtask

  task automatic randomize_inputs();
    noc_in_valid = $urandom; noc_in_data = $urandom;
    tam_valid = $urandom; tam_capture = !tam_valid && ($urandom % 2);
    tam_flit = $urandom; dm_mbist_start = $urandom;
    ate_se = $urandom; ate_capture = !ate_se && ($urandom % 2);
    ate_si = $urandom; fi_core = ($urandom % 3 == 0); fi_mem = ($urandom % 3 == 0);
    core_out_valid = $urandom; core_out_data = $urandom; core_so = $urandom;
    core_mbist_done = $urandom; core_mbist_fail = $urandom;
  endtask

  task automatic check_mode(wir_e m);
    logic [31:0] fi = fi_core ? 32'd1 : 32'd0;
    bit n = (m == WIR_NORMAL), f = (m == WIR_MFG), d = (m == WIR_DEP), b = (m == WIR_MBIST);
    chk(mode, m, "mode");
    chk(core_in_valid, n & noc_in_valid, "core_in_valid");
    chk(core_in_data, n ? noc_in_data : 0, "core_in_data");
    chk(noc_out_valid, n & core_out_valid, "noc_out_valid");
    chk(noc_out_data, n ? core_out_data | fi : 0, "noc_out_data");
    chk(core_se, f ? ate_se : d ? tam_valid : 0, "core_se");
    chk(core_capture, f ? ate_capture : d ? tam_capture : 0, "core_capture");
    chk(core_si, f ? ate_si : d ? tam_flit : 0, "core_si");
    chk(ate_so, f ? core_so | fi : 0, "ate_so");
    chk(resp_valid, d & tam_valid, "resp_valid");
    chk(resp_flit, d ? core_so | fi : 0, "resp_flit");
    chk(core_mbist_start, b & dm_mbist_start, "core_mbist_start");
    chk(dm_mbist_done, b & core_mbist_done, "dm_mbist_done");
    chk(dm_mbist_fail, b & (core_mbist_fail | fi_mem), "dm_mbist_fail");
  endtask

  initial begin
    randomize_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check_mode(WIR_NORMAL);
    for (int r = 0; r < 3; r++) begin
      wir_e seq [4] = '{WIR_MFG, WIR_DEP, WIR_MBIST, WIR_NORMAL};
      foreach (seq[i]) begin
        load_wir(seq[i], 1'b1);
        repeat (50) begin
          randomize_inputs();
          #1 check_mode(seq[i]);
          @(negedge clk);
        end
        // shifting without update must not change the mode
        load_wir(WIR_DEP ^ seq[i], 1'b0);
        #1 chk(mode, seq[i], "mode kept without update");
      end
    end
    // bypass register: wso is wsi delayed by one shift
    select_wir = 0;
    shift_wr = 1;
    for (int i = 0; i < 40; i++) begin
      wsi = $urandom;
      @(negedge clk);
      chk(wso, wsi, "bypass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
