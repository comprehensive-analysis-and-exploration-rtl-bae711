// enc_config_check: drives and checks one aes_encrypt configuration.
//
// Used by the encryption testbenches to run any point PR_P_HR of the design
// space. Round keys come from the reference model, not from the RTL key
// schedule. Three phases:
//   1. the FIPS-197 block alone: ciphertext and exact latency LAT;
//   2. NBLK random blocks offered back to back: every ciphertext, in order;
//      the largest number of blocks in flight must be PAR + 1 (PAR in the
//      loop plus one waiting in the input register), and the whole batch
//      must finish within NBLK*LAT/PAR + LAT cycles, the rate given by
//      throughput = f*128*PAR/LAT;
//   3. random blocks with random gaps under a second key, loaded while the
//      engine is idle.
// It counts cycles with in_valid high and in_ready low (stalls) and cycles
// in which a block was fed back into the chain (recirculations).
module enc_config_check #(
  parameter int unsigned PR   = 3,
  parameter bit          P    = 0,
  parameter int unsigned HR   = 10,
  parameter int          LAT  = 32,
  parameter int          PAR  = 31,
  parameter int          NBLK = 40
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   recircs
);
  import aes_ref_pkg::*;
  import aes_pkg::round_keys_t;

  round_keys_t rks;
  logic        in_valid;
  logic        in_ready;
  blk_t        plaintext;
  logic        out_valid;
  blk_t        ciphertext;
  logic        busy;
  blk_t        key;

  aes_encrypt #(.PR(PR), .P(P), .HR(HR)) dut (
    .clk, .rst_n, .round_keys(rks), .in_valid, .in_ready, .plaintext,
    .out_valid, .ciphertext, .busy);

  int   cyc = 0;
  blk_t exp_q [$];
  int   acc_q [$];
  int   accepted = 0, completed = 0, max_inflight = 0;
  int   first_lat = -1;

  task automatic set_key(input blk_t k);
    key = k;
    for (int r = 0; r <= 10; r++) rks[r] = round_key(k, r);
  endtask

  task automatic err(input string msg);
    failures++;
    $display("FAIL [%0d_%0d_%0d] %s", PR, P, HR, msg);
  endtask

  // Monitor: accepts, completions, stalls, recirculations
  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (in_valid && !in_ready) stalls++;
      if (dut.recirc) recircs++;
      if (in_valid && in_ready) begin
        exp_q.push_back(encrypt(plaintext, key));
        acc_q.push_back(cyc);
        accepted++;
      end
      if (out_valid) begin
        checks++;
        if (exp_q.size() == 0) err("output with no block in flight");
        else begin
          blk_t e;
          int   a;
          e = exp_q.pop_front();
          a = acc_q.pop_front();
          if (ciphertext !== e) err($sformatf("ciphertext %032h expected %032h", ciphertext, e));
          if (first_lat < 0) first_lat = cyc - a;
          checks++;
          if (cyc - a < LAT) err($sformatf("latency %0d below %0d", cyc - a, LAT));
        end
        completed++;
      end
      if (accepted - completed > max_inflight) max_inflight = accepted - completed;
    end
  end

  task automatic wait_idle();
    while (completed != accepted) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic offer(input blk_t pt);
    in_valid  = 1;
    plaintext = pt;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int t0, t1;
    done = 0; checks = 0; failures = 0; stalls = 0; recircs = 0;
    in_valid = 0; plaintext = '0;
    wait (tables_ready);
    set_key(FIPS_KEY);
    @(posedge rst_n);
    @(negedge clk);

    // Phase 1: FIPS-197 block, exact latency
    offer(FIPS_PT);
    wait_idle();
    checks += 2;
    if (first_lat != LAT) err($sformatf("latency %0d, expected %0d", first_lat, LAT));
    if (exp_q.size() != 0) err("queue not empty");

    // Phase 2: back-to-back stream
    max_inflight = 0;
    t0 = cyc;
    for (int n = 0; n < NBLK; n++) begin
      in_valid  = 1;
      plaintext = rand_blk();
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    @(negedge clk);
    in_valid = 0;
    wait_idle();
    t1 = cyc;
    checks += 2;
    if (max_inflight != PAR + 1)
      err($sformatf("max blocks in flight %0d, expected %0d", max_inflight, PAR + 1));
    if ((t1 - t0) * PAR > NBLK * LAT + LAT * PAR)
      err($sformatf("%0d blocks took %0d cycles", NBLK, t1 - t0));

    // Phase 3: new key, random gaps
    set_key(rand_blk());
    for (int n = 0; n < NBLK / 2; n++) begin
      repeat ($urandom % 3) @(negedge clk);
      offer(rand_blk());
    end
    wait_idle();
    done = 1;
  end
endmodule
