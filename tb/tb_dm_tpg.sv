// tb_dm_tpg: runs the test pattern generator at its full size (413 vectors of 398
// flits) twice, once with the network granting every cycle and once with random
// stalls, and compares every transferred flit with a reference built here from the
// specification: per vector, seed = three xorshift(13,7,17) rounds of
// 64'h9E3779B97F4A7C15 ^ index, a 64-bit Fibonacci LFSR (taps 63,62,60,59) and the
// phase shifter formula; the final unload pass is all zero. Also checks the number of
// flits, captures and check-marked flits, and, without stalls, that the test takes
// exactly (413+1)*398 + 413 busy cycles.
module tb_dm_tpg;
  localparam int L = 398, V = 413;
  logic clk = 0, rst_n = 0, start = 0, flit_ready = 0;
  logic busy, done, flit_valid, check, capture;
  logic [31:0] flit;
  int checks = 0, failures = 0;

  dm_tpg #(.LEN(64), .CHAIN_LEN(L), .N_VECTORS(V), .FLIT_W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] ref_seed(int idx);
    logic [63:0] x = 64'h9E37_79B9_7F4A_7C15 ^ 64'(idx);
    repeat (3) begin
      x ^= x << 13;
      x ^= x >> 7;
      x ^= x << 17;
    end
    return x;
  endfunction

  function automatic logic [31:0] ref_ps(logic [63:0] s);
    logic [31:0] f;
    for (int i = 0; i < 32; i++) f[i] = s[i] ^ s[(3*i+7)%64] ^ s[(5*i+14)%64];
    return f;
  endfunction

  task automatic run(bit stalls);
    int v = 0, k = 0, nflit = 0, ncap = 0, nchk = 0, nbusy = 0, nstall = 0;
    logic [63:0] s = ref_seed(0);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      flit_ready = stalls ? ($urandom % 3 != 0) : 1'b1;
      #1;
      if (busy) nbusy++;
      if (flit_valid && !flit_ready) nstall++;
      if (capture) begin
        ncap++;
        if (k != 0) begin failures++; $display("FAIL capture mid-vector"); end
        v++;
        s = ref_seed(v);
      end
      if (flit_valid && flit_ready) begin
        logic [31:0] e = (v == V) ? 32'h0 : ref_ps(s);
        checks++;
        if (flit !== e) begin
          failures++;
          if (failures < 10) $display("FAIL vector %0d flit %0d: %h exp %h", v, k, flit, e);
        end
        if (check) nchk++;
        s = {s[62:0], s[63] ^ s[62] ^ s[60] ^ s[59]};
        nflit++;
        k = (k == L - 1) ? 0 : k + 1;
      end
      @(negedge clk);
    end
    checks += 3;
    if (nflit != (V + 1) * L) begin failures++; $display("FAIL flits %0d", nflit); end
    if (ncap != V)            begin failures++; $display("FAIL captures %0d", ncap); end
    if (nchk != V * L)        begin failures++; $display("FAIL checked flits %0d", nchk); end
    if (!stalls) begin
      checks++;
      if (nbusy != (V + 1) * L + V) begin
        failures++;
        $display("FAIL test took %0d cycles, expected %0d", nbusy, (V + 1) * L + V);
      end
      $display("structural test: %0d cycles = %.3f ms at 200 MHz", nbusy, nbusy * 5.0e-6);
    end else begin
      checks++;
      if (nstall == 0) begin failures++; $display("FAIL no stall happened"); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
