// xe_core_model: behavioural stand-in for a Xentium tile as seen by its wrapper.
// Not synthesizable design content; used only by testbenches.
//
// Scan: NCH parallel chains of LEN flops. While `se` is high every chain shifts by one
// (si enters at position 0, so is taken from position LEN-1). A `capture` cycle loads
// every flop with a fixed nonlinear function of the current chain contents, standing
// in for the core logic. STUCK_CHAIN >= 0 emulates a real stuck-at-0 defect on the
// capture input of flop 0 of that chain.
// Memory BIST: a start pulse makes `mbist_done` rise MBIST_CYC cycles later, with
// `mbist_fail` = MBIST_FAIL; both hold until the next start.
// Functional: every valid input word comes back one cycle later incremented by one.
module xe_core_model #(
  parameter int NCH         = 32,
  parameter int LEN         = 398,
  parameter int MBIST_CYC   = 20,
  parameter bit MBIST_FAIL  = 1'b0,
  parameter int STUCK_CHAIN = -1
) (
  input  logic           clk,
  input  logic           in_valid,
  input  logic [NCH-1:0] in_data,
  output logic           out_valid,
  output logic [NCH-1:0] out_data,
  input  logic           se,
  input  logic           capture,
  input  logic [NCH-1:0] si,
  output logic [NCH-1:0] so,
  input  logic           mbist_start,
  output logic           mbist_done,
  output logic           mbist_fail
);
  logic [LEN-1:0] chain [NCH];
  int             mb_cnt = -1;

  for (genvar c = 0; c < NCH; c++) begin : g_so
    assign so[c] = chain[c][LEN-1];
  end

  function automatic logic cap_fn(int c, int k);
    return chain[c][k] ^ (chain[(c+1)%NCH][(k+1)%LEN] & ~chain[(c+7)%NCH][(k+3)%LEN])
           ^ chain[(c+3)%NCH][(k+LEN-1)%LEN];
  endfunction

  always_ff @(posedge clk) begin
    if (se) begin
      for (int c = 0; c < NCH; c++) chain[c] <= {chain[c][LEN-2:0], si[c]};
    end else if (capture) begin
      for (int c = 0; c < NCH; c++)
        for (int k = 0; k < LEN; k++)
          chain[c][k] <= (c == STUCK_CHAIN && k == 0) ? 1'b0 : cap_fn(c, k);
    end
  end

  initial begin
    mbist_done = 1'b0;
    mbist_fail = 1'b0;
    out_valid  = 1'b0;
    out_data   = '0;
  end

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    out_data  <= in_data + 1'b1;
    if (mbist_start) begin
      mb_cnt     <= MBIST_CYC;
      mbist_done <= 1'b0;
      mbist_fail <= 1'b0;
    end else if (mb_cnt > 0) begin
      mb_cnt <= mb_cnt - 1;
    end else if (mb_cnt == 0) begin
      mb_cnt     <= -1;
      mbist_done <= 1'b1;
      mbist_fail <= MBIST_FAIL;
    end
  end
endmodule
