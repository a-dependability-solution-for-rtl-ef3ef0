// tb_dm_bitflip: the bit-flipping decoder on its own and the pattern generator in its
// bit-flipping mode. The decoder is driven with states whose low 12 bits hit each
// entry's match value (and with random states) and its mask is compared with a
// reference computed here: entry e matches xorshift(0x2545F491 ^ (e+1)) and flips bit
// (7e+3) mod 32. The generator (30 vectors of 40 flits) must then produce, flit by
// flit, the free-running LFSR sequence seeded once, through the phase shifter, XORed
// with that mask, and the flips must actually occur.
module tb_dm_bitflip;
  localparam int L = 40, V = 30;
  logic [63:0] state;
  logic [31:0] mask;
  logic clk = 0, rst_n = 0, start = 0, flit_ready = 1;
  logic busy, done, flit_valid, check, capture;
  logic [31:0] flit;
  int checks = 0, failures = 0;

  dm_bitflip #(.LEN(64), .FLIT_W(32), .N_ENTRIES(16), .MATCH_W(12)) u_dec (.state, .flip_mask(mask));
  dm_tpg #(.CHAIN_LEN(L), .N_VECTORS(V), .BIT_FLIP(1'b1)) u_tpg (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] ref_match(int e);
    logic [31:0] x = 32'h2545_F491 ^ (e + 1);
    x ^= x << 13;
    x ^= x >> 17;
    x ^= x << 5;
    return x[11:0];
  endfunction

  function automatic logic [31:0] ref_mask(logic [63:0] s);
    logic [31:0] m = '0;
    for (int e = 0; e < 16; e++) if (s[11:0] == ref_match(e)) m[(7*e+3)%32] ^= 1'b1;
    return m;
  endfunction

  function automatic logic [63:0] ref_seed0();
    logic [63:0] x = 64'h9E37_79B9_7F4A_7C15;
    repeat (3) begin x ^= x << 13; x ^= x >> 7; x ^= x << 17; end
    return x;
  endfunction

  function automatic logic [31:0] ref_ps(logic [63:0] s);
    logic [31:0] f;
    for (int i = 0; i < 32; i++) f[i] = s[i] ^ s[(3*i+7)%64] ^ s[(5*i+14)%64];
    return f;
  endfunction

  initial begin
    int nflip = 0, nflit = 0;
    logic [63:0] s;
    // decoder alone
    for (int n = 0; n < 2000; n++) begin
      state = {$urandom, $urandom};
      if (n < 16) state[11:0] = ref_match(n);
      #1;
      checks++;
      if (mask !== ref_mask(state)) begin
        failures++;
        $display("FAIL decoder state %h: %h expected %h", state, mask, ref_mask(state));
      end
      if (n < 16 && mask == 0) begin failures++; $display("FAIL entry %0d never flips", n); end
    end
    // generator in bit-flipping mode
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    s = ref_seed0();
    while (!done) begin
      #1;
      if (flit_valid) begin
        logic [31:0] e;
        e = (nflit >= V * L) ? 32'h0 : ref_ps(s) ^ ref_mask(s);
        checks++;
        if (nflit < V * L && ref_mask(s) != 0) nflip++;
        if (flit !== e) begin
          failures++;
          if (failures < 10) $display("FAIL flit %0d: %h expected %h", nflit, flit, e);
        end
        s = {s[62:0], s[63] ^ s[62] ^ s[60] ^ s[59]};
        nflit++;
      end
      @(negedge clk);
    end
    checks += 2;
    if (nflit != (V + 1) * L) begin failures++; $display("FAIL %0d flits", nflit); end
    if (nflip == 0) begin failures++; $display("FAIL no bit was flipped"); end
    $display("bit-flipping run: %0d flits, %0d flipped", nflit, nflip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
