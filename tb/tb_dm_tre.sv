// tb_dm_tre: feeds the response evaluator identical response streams and corrupts
// the stream of zero, one or two tiles in random flits. Expected flags are worked out
// here from where the corruption was put: the corrupted tile is flagged, a clean
// group stays clean, two corrupted tiles give no_majority, corruption in flits with
// check low or valid low is ignored, and clear resets the flags.
module tb_dm_tre;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0, check = 0;
  logic [31:0] resp [3];
  logic [2:0] dut_fault;
  logic no_majority;
  int checks = 0, failures = 0;

  dm_tre #(.N(3), .FLIT_W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_flags(logic [2:0] f, logic nm, string what);
    checks++;
    if (dut_fault !== f || no_majority !== nm) begin
      failures++;
      $display("FAIL %s: flags %b nm %b, expected %b %b", what, dut_fault, no_majority, f, nm);
    end
  endtask

  // one test: nbad tiles (chosen at random) corrupted in one random flit each
  task automatic one_test(int nbad, bit gated);
    logic [2:0] bad = '0;
    int where [3];
    while ($countones(bad) < nbad) bad[$urandom % 3] = 1'b1;
    for (int t = 0; t < 3; t++) where[t] = $urandom % 50;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int n = 0; n < 50; n++) begin
      logic [31:0] d = $urandom;
      valid = 1;
      check = 1;
      for (int t = 0; t < 3; t++)
        resp[t] = (bad[t] && where[t] == n) ? d ^ (32'd1 << ($urandom % 32)) : d;
      if (gated && n == where[0]) begin
        if (n % 2) valid = 0; else check = 0;
      end
      @(negedge clk);
    end
    valid = 0;
    check = 0;
    if (gated) expect_flags(3'b000, 1'b0, "ignored flit");
    else       expect_flags(bad, nbad > 1, $sformatf("%0d bad tiles", nbad));
  endtask

  initial begin
    for (int t = 0; t < 3; t++) resp[t] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20) one_test(0, 0);
    repeat (60) one_test(1, 0);
    repeat (30) one_test(2, 0);
    // corrupt only tile 0 and only in a flit that is not evaluated
    for (int r = 0; r < 20; r++) begin
      int w;
      w = $urandom % 50;
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      for (int n = 0; n < 50; n++) begin
        logic [31:0] d;
        d = $urandom;
        valid = !(n == w && (r % 2 == 1));
        check = !(n == w && (r % 2 == 0));
        resp[0] = (n == w) ? ~d : d;
        resp[1] = d;
        resp[2] = d;
        @(negedge clk);
      end
      valid = 0;
      check = 0;
      expect_flags(3'b000, 1'b0, "gated flit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
