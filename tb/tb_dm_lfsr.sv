// tb_dm_lfsr: checks the reseedable LFSR against a bit-level reference (feedback =
// XOR of stages 63, 62, 60 and 59, shifted in at stage 0): reset value, seed load,
// stepping, hold, and load taking priority over step.
module tb_dm_lfsr;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [63:0] seed = '0, state, ref_state;
  int checks = 0, failures = 0;

  dm_lfsr #(.LEN(64)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (state !== ref_state) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, state, ref_state);
    end
  endtask

  function automatic logic [63:0] ref_step(logic [63:0] s);
    return {s[62:0], s[63] ^ s[62] ^ s[60] ^ s[59]};
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    ref_state = 64'd1;
    #1 check("reset");
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      seed = {$urandom, $urandom};
      @(negedge clk) load = 1;
      @(negedge clk) load = 0;
      ref_state = seed;
      check("load");
      for (int i = 0; i < 200; i++) begin
        step = ($urandom % 4) != 0;
        @(negedge clk);
        if (step) ref_state = ref_step(ref_state);
        check("step");
      end
      step = 0;
    end
    // load wins over step
    seed = 64'hDEAD_BEEF_0123_4567;
    @(negedge clk) begin load = 1; step = 1; end
    @(negedge clk) begin load = 0; step = 0; end
    ref_state = seed;
    check("load priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
