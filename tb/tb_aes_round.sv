// tb_aes_round: the round unit at every pipelining depth.
//
// Four units with PR = 0, 1, 2 and 3 run side by side as the only unit of a
// chain (HR=1), so a block with tag t performs round t+1; tag 9 is round 10,
// which must skip MixColumns. Random states and tags are applied every cycle
// and each unit's output is compared, PR cycles later, with the reference
// round; the tag and valid bit must come out with the state.
module tb_aes_round;
  import aes_ref_pkg::*;
  import aes_pkg::round_keys_t;

  localparam int DEPTH = 8;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  logic [3:0]  in_tag = '0;
  blk_t        in_state = '0;
  round_keys_t rks;
  blk_t        key;
  int checks = 0, failures = 0, last_rounds = 0;

  logic [3:0]       ov;
  logic [3:0][3:0]  ot;
  blk_t             os [4];

  for (genvar g = 0; g < 4; g++) begin : g_pr
    aes_round #(.PR(g), .HR(1), .POS(0), .TAG_W(4)) dut (
      .clk, .rst_n, .in_valid, .in_tag, .in_state, .round_keys(rks),
      .out_valid(ov[g]), .out_tag(ot[g]), .out_state(os[g]));
  end

  always #5 clk = ~clk;

  // History of inputs, index 0 = current cycle
  logic hv [DEPTH];
  logic [3:0] ht [DEPTH];
  blk_t hs [DEPTH];

  initial begin
    ref_init();
    key = rand_blk();
    for (int r = 0; r <= 10; r++) rks[r] = round_key(key, r);
    for (int i = 0; i < DEPTH; i++) begin hv[i] = 0; ht[i] = '0; hs[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_tag   = 4'($urandom % 10);
      in_state = rand_blk();
      for (int i = DEPTH - 1; i > 0; i--) begin hv[i] = hv[i-1]; ht[i] = ht[i-1]; hs[i] = hs[i-1]; end
      hv[0] = in_valid; ht[0] = in_tag; hs[0] = in_state;
      #1;
      if (cyc >= 4)
        for (int g = 0; g < 4; g++) begin
          checks++;
          if (ov[g] !== hv[g]) begin
            failures++;
            $display("FAIL PR=%0d valid %0b expected %0b", g, ov[g], hv[g]);
          end else if (hv[g]) begin
            blk_t exp;
            exp = enc_round(hs[g], rks[int'(ht[g]) + 1], ht[g] == 4'd9);
            if (g == 3 && ht[g] == 4'd9) last_rounds++;
            checks++;
            if (ot[g] !== ht[g] || os[g] !== exp) begin
              failures++;
              $display("FAIL PR=%0d tag %0d: %032h expected %032h", g, ht[g], os[g], exp);
            end
          end
        end
    end
    checks++;
    if (last_rounds == 0) begin failures++; $display("FAIL no last round exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
