// tb_aes_top: end-to-end test of the whole design at an iterative point.
//
// One complete aes_top at point 1_1_2 (two round units, one register inside
// each round and one between them, reused five times per block) is driven by
// top_driver: the FIPS-197 vector in both directions, then streams under
// several keys, with every ciphertext decrypted again and compared with its
// plaintext. This point has every mechanism of the design, so each must occur
// at least once: key reload, four blocks interleaved in the loop plus one
// waiting, recirculation through the reused chain, the encryption input held
// off while the loop is busy, and the decryption input held off while the
// decryptor works. The default unrolled point runs in tb_aes_top_full.
module tb_aes_top;
  localparam int N = 1;
  logic kl [N], eiv [N], eir [N], eov [N], eb [N], div [N], dir [N], dov [N], db [N];
  logic [127:0] ki [N], ept [N], ect [N], dct [N], dpt [N];
  logic done [N];
  int c [N], f [N], kloads [N], inflight [N], estall [N], dstall [N];
  int checks, failures;
  int recircs = 0;
  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;

  aes_top #(.PR(1), .P(1), .HR(2)) u_top_iter (.clk, .rst_n, .key_load(kl[0]), .key_in(ki[0]), .enc_in_valid(eiv[0]), .enc_in_ready(eir[0]), .enc_plaintext(ept[0]), .enc_out_valid(eov[0]), .enc_ciphertext(ect[0]), .enc_busy(eb[0]), .dec_in_valid(div[0]), .dec_in_ready(dir[0]), .dec_ciphertext(dct[0]), .dec_out_valid(dov[0]), .dec_plaintext(dpt[0]), .dec_busy(db[0]));

  top_driver #(.NKEYS(3), .NBLK(40)) u_drv0 (.clk, .rst_n, .key_load(kl[0]), .key_in(ki[0]), .enc_in_valid(eiv[0]), .enc_in_ready(eir[0]), .enc_plaintext(ept[0]), .enc_out_valid(eov[0]), .enc_ciphertext(ect[0]), .enc_busy(eb[0]), .dec_in_valid(div[0]), .dec_in_ready(dir[0]), .dec_ciphertext(dct[0]), .dec_out_valid(dov[0]), .dec_plaintext(dpt[0]), .dec_busy(db[0]), .done(done[0]), .checks(c[0]), .failures(f[0]),
    .key_loads(kloads[0]), .max_enc_inflight(inflight[0]), .enc_stalls(estall[0]), .dec_stalls(dstall[0]));

  always @(posedge clk) if (u_top_iter.u_encrypt.recirc) recircs++;

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
  endtask

  task automatic need(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    aes_ref_pkg::ref_init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0]);
    report();
    $display("key loads %0d, max in flight %0d, recirculations %0d, enc stalls %0d, dec stalls %0d",
             kloads[0], inflight[0], recircs, estall[0], dstall[0]);
    need(kloads[0] >= 2, "key reload");
    need(inflight[0] == 5, "4 blocks interleaved in the loop plus one waiting");
    need(recircs > 0, "recirculation");
    need(estall[0] > 0, "encryption input stall");
    need(dstall[0] > 0, "decryption input stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    report();
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
