// tb_dm_phase_shifter: random LFSR states; every output bit must be the XOR of
// stages i, (3i+7) mod 64 and (5i+14) mod 64.
module tb_dm_phase_shifter;
  logic [63:0] state;
  logic [31:0] flit, expv;
  int checks = 0, failures = 0;

  dm_phase_shifter #(.LEN(64), .OUT_W(32)) dut (.state, .flit);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      state = (n < 64) ? (64'd1 << n) : {$urandom, $urandom};
      #1;
      for (int i = 0; i < 32; i++)
        expv[i] = state[i] ^ state[(3*i+7)%64] ^ state[(5*i+14)%64];
      checks++;
      if (flit !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL state=%h flit=%h exp=%h", state, flit, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
