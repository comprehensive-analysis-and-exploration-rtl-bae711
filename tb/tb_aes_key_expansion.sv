// tb_aes_key_expansion: round keys against the FIPS-197 schedule.
//
// Loads the FIPS-197 Appendix A key and checks round keys 1 and 10 against
// the published words, then all eleven round keys of random keys against the
// reference schedule. Also checks that the registers hold their value while
// key_load is low and that round keys appear one cycle after key_load.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;
  import aes_pkg::round_keys_t;

  logic        clk = 0, rst_n = 0, key_load = 0;
  blk_t        key_in = '0;
  round_keys_t round_keys;
  int checks = 0, failures = 0;

  aes_key_expansion dut (.clk, .rst_n, .key_load, .key_in, .round_keys);

  always #5 clk = ~clk;

  task automatic expect_eq(input blk_t got, input blk_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic load(input blk_t k);
    @(negedge clk);
    key_in = k;
    key_load = 1;
    @(negedge clk);
    key_load = 0;
    key_in = rand_blk();   // must not matter while key_load is low
  endtask

  initial begin
    ref_init();
    repeat (2) @(negedge clk);
    rst_n = 1;
    load(FIPS_KEY);
    expect_eq(round_keys[0],  FIPS_KEY, "round key 0");
    expect_eq(round_keys[1],  128'ha0fafe1788542cb123a339392a6c7605, "round key 1");
    expect_eq(round_keys[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "round key 10");
    repeat (3) @(negedge clk);
    expect_eq(round_keys[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "round key 10 held");
    for (int n = 0; n < 20; n++) begin
      blk_t k;
      k = rand_blk();
      load(k);
      for (int r = 0; r <= 10; r++) expect_eq(round_keys[r], round_key(k, r), $sformatf("key %0d round %0d", n, r));
    end
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
