// tb_aes_top_full: the design at its default parameters, end to end.
//
// One aes_top with no parameter overrides (PR=3, P=0, HR=10), driven by
// top_driver: the FIPS-197 vector in both directions, then streams of
// random blocks under three keys, each ciphertext decrypted again. The
// unrolled pipeline must hold 32 blocks at once (31 register stages plus
// the input register) and never hold off its input.
module tb_aes_top_full;
  localparam int N = 1;
  logic kl [N], eiv [N], eir [N], eov [N], eb [N], div [N], dir [N], dov [N], db [N];
  logic [127:0] ki [N], ept [N], ect [N], dct [N], dpt [N];
  logic done [N];
  int c [N], f [N], kloads [N], inflight [N], estall [N], dstall [N];
  int checks, failures;
  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;

  aes_top u_top (.clk, .rst_n, .key_load(kl[0]), .key_in(ki[0]), .enc_in_valid(eiv[0]), .enc_in_ready(eir[0]), .enc_plaintext(ept[0]), .enc_out_valid(eov[0]), .enc_ciphertext(ect[0]), .enc_busy(eb[0]), .dec_in_valid(div[0]), .dec_in_ready(dir[0]), .dec_ciphertext(dct[0]), .dec_out_valid(dov[0]), .dec_plaintext(dpt[0]), .dec_busy(db[0]));

  top_driver #(.NKEYS(3), .NBLK(64)) u_drv (.clk, .rst_n, .key_load(kl[0]), .key_in(ki[0]), .enc_in_valid(eiv[0]), .enc_in_ready(eir[0]), .enc_plaintext(ept[0]), .enc_out_valid(eov[0]), .enc_ciphertext(ect[0]), .enc_busy(eb[0]), .dec_in_valid(div[0]), .dec_in_ready(dir[0]), .dec_ciphertext(dct[0]), .dec_out_valid(dov[0]), .dec_plaintext(dpt[0]), .dec_busy(db[0]), .done(done[0]), .checks(c[0]), .failures(f[0]),
    .key_loads(kloads[0]), .max_enc_inflight(inflight[0]), .enc_stalls(estall[0]), .dec_stalls(dstall[0]));

  initial begin
    aes_ref_pkg::ref_init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0]);
    checks = c[0] + 3;
    failures = f[0];
    if (kloads[0] < 2) begin failures++; $display("FAIL no key reload"); end
    if (inflight[0] != 32) begin failures++; $display("FAIL max in flight %0d, expected 32", inflight[0]); end
    if (estall[0] != 0) begin failures++; $display("FAIL unrolled pipeline stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    checks = c[0];
    failures = f[0] + 1;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
