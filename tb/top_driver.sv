// top_driver: stimulus and checking for one aes_top instance.
//
// Connects to every port of an aes_top and runs it end to end:
//   1. loads the FIPS-197 key, encrypts the FIPS-197 plaintext and decrypts
//      the FIPS-197 ciphertext, checking both results;
//   2. for each of NKEYS random keys (loaded only while both engines are
//      idle), streams NBLK random plaintexts into the encryption engine back
//      to back, feeds every ciphertext it produces into the decryption core,
//      and checks each ciphertext against the reference model and each
//      decrypted block against the original plaintext.
// Counts: key loads, the largest number of encryptions in flight, and the
// cycles in which either input was held off (in_valid high, in_ready low).
module top_driver #(
  parameter int NKEYS = 3,
  parameter int NBLK  = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         key_load,
  output logic [127:0] key_in,
  output logic         enc_in_valid,
  input  logic         enc_in_ready,
  output logic [127:0] enc_plaintext,
  input  logic         enc_out_valid,
  input  logic [127:0] enc_ciphertext,
  input  logic         enc_busy,
  output logic         dec_in_valid,
  input  logic         dec_in_ready,
  output logic [127:0] dec_ciphertext,
  input  logic         dec_out_valid,
  input  logic [127:0] dec_plaintext,
  input  logic         dec_busy,
  output logic         done,
  output int           checks,
  output int           failures,
  output int           key_loads,
  output int           max_enc_inflight,
  output int           enc_stalls,
  output int           dec_stalls
);
  import aes_ref_pkg::*;

  blk_t key;
  blk_t enc_exp [$];   // expected ciphertexts, in order
  blk_t enc_pt  [$];   // their plaintexts
  blk_t dec_todo [$];  // ciphertexts waiting for the decryptor
  blk_t dec_exp [$];   // expected plaintexts, in order
  int   enc_in_flight = 0;

  task automatic err(input string msg);
    failures++;
    $display("FAIL %m: %s", msg);
  endtask

  always @(posedge clk) if (rst_n) begin
    if (key_load) key_loads++;
    if (enc_in_valid && !enc_in_ready) enc_stalls++;
    if (dec_in_valid && !dec_in_ready) dec_stalls++;
    if (enc_in_valid && enc_in_ready) begin
      enc_exp.push_back(encrypt(enc_plaintext, key));
      enc_pt.push_back(enc_plaintext);
      enc_in_flight++;
    end
    if (enc_out_valid) begin
      blk_t e, p;
      checks++;
      enc_in_flight--;
      if (enc_exp.size() == 0) err("unexpected ciphertext");
      else begin
        e = enc_exp.pop_front();
        p = enc_pt.pop_front();
        if (enc_ciphertext !== e) err($sformatf("ciphertext %032h expected %032h", enc_ciphertext, e));
        dec_todo.push_back(enc_ciphertext);
      end
    end
    if (enc_in_flight > max_enc_inflight) max_enc_inflight = enc_in_flight;
    if (dec_in_valid && dec_in_ready) dec_exp.push_back(decrypt(dec_ciphertext, key));
    if (dec_out_valid) begin
      checks++;
      if (dec_exp.size() == 0) err("unexpected plaintext");
      else begin
        blk_t e;
        e = dec_exp.pop_front();
        if (dec_plaintext !== e) err($sformatf("plaintext %032h expected %032h", dec_plaintext, e));
      end
    end
  end

  task automatic load_key(input blk_t k);
    while (enc_busy || dec_busy) @(negedge clk);
    key_load = 1;
    key_in   = k;
    @(negedge clk);
    key_load = 0;
    key      = k;
  endtask

  // Streams n plaintexts into the encryptor and feeds the decryptor with the
  // ciphertexts as they come out; pts keeps the plaintexts for the round trip.
  task automatic run_stream(input int n);
    blk_t pts [$];
    fork
      begin : enc_feed
        for (int i = 0; i < n; i++) begin
          blk_t p;
          p = rand_blk();
          pts.push_back(p);
          enc_in_valid  = 1;
          enc_plaintext = p;
          @(posedge clk);
          while (!enc_in_ready) @(posedge clk);
          #1;
        end
        @(negedge clk);
        enc_in_valid = 0;
      end
      begin : dec_feed
        for (int i = 0; i < n; i++) begin
          while (dec_todo.size() == 0) @(negedge clk);
          dec_in_valid   = 1;
          dec_ciphertext = dec_todo.pop_front();
          @(posedge clk);
          while (!dec_in_ready) @(posedge clk);
          #1;
          dec_in_valid = 0;
        end
      end
      begin : round_trip
        // every decrypted block must be the plaintext that went in
        for (int i = 0; i < n; i++) begin
          @(posedge clk iff dec_out_valid);
          checks++;
          if (dec_plaintext !== pts[i]) err($sformatf("round trip %0d: %032h expected %032h", i, dec_plaintext, pts[i]));
        end
      end
    join
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; key_loads = 0; max_enc_inflight = 0;
    enc_stalls = 0; dec_stalls = 0;
    key_load = 0; key_in = '0; enc_in_valid = 0; enc_plaintext = '0;
    dec_in_valid = 0; dec_ciphertext = '0;
    wait (tables_ready);
    @(posedge rst_n);
    @(negedge clk);
    load_key(FIPS_KEY);
    // FIPS-197 vector in both directions
    enc_in_valid = 1; enc_plaintext = FIPS_PT;
    @(posedge clk iff enc_in_ready); #1; enc_in_valid = 0;
    @(posedge clk iff enc_out_valid);
    checks++;
    if (enc_ciphertext !== FIPS_CT) err("FIPS-197 ciphertext");
    @(negedge clk);
    dec_todo.delete();
    dec_in_valid = 1; dec_ciphertext = FIPS_CT;
    @(posedge clk iff dec_in_ready); #1; dec_in_valid = 0;
    @(posedge clk iff dec_out_valid);
    checks++;
    if (dec_plaintext !== FIPS_PT) err("FIPS-197 plaintext");
    @(negedge clk);
    for (int k = 0; k < NKEYS; k++) begin
      load_key(rand_blk());
      run_stream(NBLK);
    end
    while (enc_busy || dec_busy) @(negedge clk);
    done = 1;
  end
endmodule
