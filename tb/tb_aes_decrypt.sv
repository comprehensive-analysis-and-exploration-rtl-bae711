// tb_aes_decrypt: the iterative decryption core.
//
// Decrypts the FIPS-197 ciphertext and checks the plaintext and the latency
// of 11 cycles; then decrypts random ciphertexts under random keys, offered
// back to back and with gaps, comparing with the reference model. Blocks
// offered while the core is busy must wait (in_ready low), and a new block
// must be accepted in the cycle the previous result is presented.
module tb_aes_decrypt;
  import aes_ref_pkg::*;
  import aes_pkg::round_keys_t;

  logic        clk = 0, rst_n = 0;
  round_keys_t rks;
  logic        in_valid = 0, in_ready, out_valid, busy;
  blk_t        ciphertext = '0, plaintext, key;
  int checks = 0, failures = 0, cyc = 0, stalls = 0, overlap = 0;
  blk_t exp_q [$];
  int   acc_q [$];
  int   lat_first = -1;

  aes_decrypt dut (.clk, .rst_n, .round_keys(rks), .in_valid, .in_ready, .ciphertext,
                   .out_valid, .plaintext, .busy);

  always #5 clk = ~clk;

  task automatic set_key(input blk_t k);
    key = k;
    for (int r = 0; r <= 10; r++) rks[r] = round_key(k, r);
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (in_valid && !in_ready) stalls++;
    if (in_valid && in_ready && out_valid) overlap++;
    if (in_valid && in_ready) begin
      exp_q.push_back(decrypt(ciphertext, key));
      acc_q.push_back(cyc);
    end
    if (out_valid) begin
      blk_t e;
      int a;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = exp_q.pop_front();
        a = acc_q.pop_front();
        if (lat_first < 0) lat_first = cyc - a;
        if (plaintext !== e) begin
          failures++;
          $display("FAIL plaintext %032h expected %032h", plaintext, e);
        end
        checks++;
        if (cyc - a != 11) begin failures++; $display("FAIL latency %0d", cyc - a); end
      end
    end
  end

  task automatic offer(input blk_t ct);
    in_valid = 1;
    ciphertext = ct;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    ref_init();
    set_key(FIPS_KEY);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    offer(FIPS_CT);
    repeat (14) @(negedge clk);
    checks += 2;
    if (lat_first != 11) begin failures++; $display("FAIL first latency %0d", lat_first); end
    if (decrypt(FIPS_CT, FIPS_KEY) !== FIPS_PT) begin failures++; $display("FAIL reference model"); end
    for (int k = 0; k < 4; k++) begin
      set_key(rand_blk());
      // back to back: in_valid held high
      for (int n = 0; n < 6; n++) begin
        in_valid = 1;
        ciphertext = rand_blk();
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
      end
      @(negedge clk);
      in_valid = 0;
      for (int n = 0; n < 4; n++) begin
        repeat ($urandom % 15) @(negedge clk);
        offer(rand_blk());
      end
      while (exp_q.size() != 0) @(negedge clk);
      @(negedge clk);
    end
    checks += 2;
    if (stalls == 0)  begin failures++; $display("FAIL input never stalled"); end
    if (overlap == 0) begin failures++; $display("FAIL no accept in the output cycle"); end
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
